// tb_intra_host_top: end-to-end test of the whole design.
//
// Enso side (4 pipes of 64 flits, 8-record notification ring, 4-record TX ring,
// prefetching on): a network source and enso_host_model (memory plus software) run
// light and heavy RX load with TX traffic, checking every flit. Nagare side (default
// 10 x 10-cycle pipeline): the accelerator chain NIC (port 1) -> decryption (port 2) ->
// inference (port 3) -> NIC is opened as three streams; every device pushes into its
// outgoing stream and each push must arrive at the next device, back to back in that
// device's streaming buffer, 100 cycles later, or later only while an egress stalls.
// Each mechanism is counted and must happen at least once: pipe overflow drop,
// notification coalescing, notification prefetch, notification ring full, TX
// completion, stream routing, streaming-buffer wrap, pass-through of non-stream
// traffic and egress stall.
`timescale 1ns/1ps
module tb_intra_host_top;
  import enso_pkg::*;
  import nagare_pkg::*;
  localparam int NP = 4, PRL = 6, NRL = 3, TRL = 2;
  localparam int SP = 4, LAT = 100;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // Enso
  logic enso_mmio_wr_valid;
  logic [19:0] enso_mmio_addr;
  logic [63:0] enso_mmio_data;
  logic enso_rx_valid = 0, enso_rx_ready, enso_rx_sop = 0, enso_rx_eop = 0;
  logic [enso_pkg::PIPE_ID_W-1:0] enso_rx_pipe = 0;
  logic [enso_pkg::LEN_W-1:0] enso_rx_len = 0;
  logic [enso_pkg::DATA_W-1:0] enso_rx_data = '0;
  logic enso_dma_wr_valid, enso_dma_wr_ready;
  dma_wr_t enso_dma_wr;
  logic enso_dma_rd_req_valid, enso_dma_rd_req_ready;
  dma_rd_req_t enso_dma_rd_req;
  logic enso_dma_rd_cpl_valid, enso_dma_rd_cpl_ready;
  logic [enso_pkg::DATA_W-1:0] enso_dma_rd_cpl_data;
  logic enso_tx_valid, enso_tx_ready, enso_tx_sop, enso_tx_eop;
  logic [enso_pkg::DATA_W-1:0] enso_tx_data;
  logic [31:0] enso_rx_accept_count, enso_rx_drop_count, enso_notif_count,
               enso_prefetch_count, enso_notif_full_cycles, enso_tx_sent_count;
  // Nagare
  logic nagare_tbl_cfg_valid = 0, nagare_ins_cfg_valid = 0;
  logic [STREAM_W-1:0] nagare_tbl_cfg_index = 0, nagare_ins_cfg_stream = 0;
  stream_entry_t nagare_tbl_cfg_entry = '0;
  logic [7:0] nagare_ins_cfg_stage = 0;
  instr_t nagare_ins_cfg_instr = '0;
  logic [SP-1:0] nagare_in_valid = '0, nagare_in_ready, nagare_out_valid, nagare_out_ready = '1;
  nmsg_t nagare_in_msg [SP];
  nmsg_t nagare_out_msg [SP];
  logic [31:0] nagare_stall_cycles;

  intra_host_top #(.ENSO_NUM_PIPES(NP), .ENSO_PIPE_RING_LOG2(PRL), .ENSO_NOTIF_RING_LOG2(NRL),
                   .ENSO_TX_RING_LOG2(TRL), .ENSO_PREFETCH_EN(1'b1)) dut (.*);

  enso_host_model #(.NUM_PIPES(NP), .PIPE_RING_LOG2(PRL), .NOTIF_RING_LOG2(NRL),
                    .TX_RING_LOG2(TRL), .USE_PREFETCH(1'b1)) host (
    .clk, .rst_n,
    .mmio_wr_valid(enso_mmio_wr_valid), .mmio_addr(enso_mmio_addr), .mmio_data(enso_mmio_data),
    .dma_wr_valid(enso_dma_wr_valid), .dma_wr_ready(enso_dma_wr_ready), .dma_wr(enso_dma_wr),
    .dma_rd_req_valid(enso_dma_rd_req_valid), .dma_rd_req_ready(enso_dma_rd_req_ready),
    .dma_rd_req(enso_dma_rd_req),
    .dma_rd_cpl_valid(enso_dma_rd_cpl_valid), .dma_rd_cpl_ready(enso_dma_rd_cpl_ready),
    .dma_rd_cpl_data(enso_dma_rd_cpl_data),
    .tx_valid(enso_tx_valid), .tx_ready(enso_tx_ready), .tx_sop(enso_tx_sop),
    .tx_eop(enso_tx_eop), .tx_data(enso_tx_data)
  );

  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- Enso network source
  int sent = 0, msg_no [NP];
  bit net_on = 0, busy = 0;
  int gap = 12, cur_p = 0, cur_m = 0, cur_i = 0, cur_len = 0;

  always @(posedge clk) begin
    if (rst_n && (!enso_rx_valid || enso_rx_ready)) begin
      if (busy) begin
        enso_rx_valid <= 1; enso_rx_sop <= 0; enso_rx_eop <= (cur_i == cur_len - 1);
        enso_rx_data <= host.make_flit(cur_p, cur_m, cur_i, cur_len);
        cur_i++;
        if (cur_i == cur_len) busy = 0;
      end else if (net_on && $urandom_range(0, gap) == 0) begin
        cur_p = $urandom_range(0, NP - 1);
        cur_m = msg_no[cur_p]++;
        cur_len = $urandom_range(1, 8);
        cur_i = 1;
        busy = (cur_len > 1);
        sent++;
        enso_rx_valid <= 1; enso_rx_pipe <= enso_pkg::PIPE_ID_W'(cur_p); enso_rx_sop <= 1;
        enso_rx_eop <= (cur_len == 1); enso_rx_len <= enso_pkg::LEN_W'(cur_len);
        enso_rx_data <= host.make_flit(cur_p, cur_m, 0, cur_len);
      end else enso_rx_valid <= 0;
    end
  end

  // ---------------- Nagare chain
  localparam logic [63:0] WIN [3] = '{64'h8000_0000, 64'h8010_0000, 64'h8020_0000};
  localparam int NEXT [3] = '{2, 3, 1};
  localparam logic [63:0] BUF [3] = '{64'hA000_0000, 64'hB000_0000, 64'hC000_0000};
  localparam int WRAP_LOG2 = 13;   // 8 KiB streaming buffers, wrapped many times below
  logic [63:0] sptr [3];
  nmsg_t exp_q [SP][$];
  int acc_q [SP][$];
  int cyc = 0, n_in = 0, n_out = 0, n_routed = 0, n_wraps = 0, n_pass = 0, lat_ok = 0;
  bit sw_on = 0, lat_check = 0, sw_bp = 0;

  function automatic nmsg_t chain_model(nmsg_t m, int src);
    nmsg_t r;
    r = m;
    r.src_port = nagare_pkg::PORT_W'(src);
    r.stream_hit = 0;
    r.stream = '0;
    for (int s = 2; s >= 0; s--)
      if ((m.addr >> 20) == (WIN[s] >> 20)) begin r.stream_hit = 1; r.stream = STREAM_W'(s); end
    if (r.stream_hit) begin
      int s;
      logic [63:0] nxt;
      s = int'(r.stream);
      r.dst_port = nagare_pkg::PORT_W'(NEXT[s]);
      r.addr = BUF[s] + sptr[s];
      nxt = sptr[s] + 64'(m.len);
      if (nxt >= (64'(1) << WRAP_LOG2)) n_wraps++;
      sptr[s] = nxt % (64'(1) << WRAP_LOG2);
      n_routed++;
    end else n_pass++;
    return r;
  endfunction

  function automatic nmsg_t chain_msg(int src);
    nmsg_t m;
    m = '0;
    m.kind = MSG_MEM_WR;
    m.len  = nagare_pkg::LEN_W'($urandom_range(1, 16) * 64);
    m.data = {8{$urandom}};
    if (src != 0 && $urandom_range(0, 5) != 0) begin
      m.addr = WIN[src - 1] + 64'($urandom_range(0, 1023) * 64);
    end else begin
      m.addr = 64'h2_0000_0000 + 64'($urandom);   // ordinary traffic, not a stream
      m.dst_port = nagare_pkg::PORT_W'($urandom_range(0, SP - 1));
    end
    return m;
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      for (int p = 0; p < SP; p++)
        if (nagare_out_valid[p] && nagare_out_ready[p]) begin
          n_out++;
          if (exp_q[p].size() == 0) check(0, "unexpected switch output");
          else begin
            int t;
            t = acc_q[p].pop_front();
            check(nagare_out_msg[p] == exp_q[p].pop_front(), $sformatf("switch port %0d output", p));
            if (lat_check) begin
              check(cyc - t == LAT, $sformatf("switch latency %0d", cyc - t));
              lat_ok++;
            end
          end
        end
      for (int p = 0; p < SP; p++) begin
        if (nagare_in_valid[p] && nagare_in_ready[p]) begin
          nmsg_t r;
          r = chain_model(nagare_in_msg[p], p);
          exp_q[r.dst_port].push_back(r);
          acc_q[r.dst_port].push_back(cyc);
          n_in++;
        end
        if (!nagare_in_valid[p] || nagare_in_ready[p]) begin
          nagare_in_valid[p] <= sw_on && ($urandom_range(0, 5) == 0);
          nagare_in_msg[p]   <= chain_msg(p);
        end
      end
      nagare_out_ready <= sw_bp ? SP'($urandom | $urandom) : '1;
    end
  end

  task automatic open_chain();
    for (int s = 0; s < 3; s++) begin
      instr_t i;
      @(negedge clk);
      nagare_tbl_cfg_valid <= 1; nagare_tbl_cfg_index <= STREAM_W'(s);
      nagare_tbl_cfg_entry <= '{valid: 1'b1, base: WIN[s], size_log2: 6'd20};
      i = '0; i.op = OP_PUSH; i.port = nagare_pkg::PORT_W'(NEXT[s]); i.imm = BUF[s];
      i.wrap_log2 = 6'(WRAP_LOG2);
      nagare_ins_cfg_valid <= 1; nagare_ins_cfg_stage <= 8'd0;
      nagare_ins_cfg_stream <= STREAM_W'(s); nagare_ins_cfg_instr <= i;
      sptr[s] = 0;
      @(negedge clk);
      nagare_tbl_cfg_valid <= 0; nagare_ins_cfg_valid <= 0;
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + host.checks, failures + host.failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NP; p++) msg_no[p] = 0;
    for (int p = 0; p < SP; p++) nagare_in_msg[p] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    open_chain();
    repeat (20) @(posedge clk);
    // phase 1: light Enso load; switch without stalls (latency checked)
    net_on = 1; gap = 12; sw_on = 1; lat_check = 1;
    repeat (2000) @(posedge clk);
    check(enso_rx_drop_count == 0, "no drops at light load");
    host.queue_tx(3);
    host.queue_tx(1);
    // phase 2: heavy load, slow software, back-pressure everywhere
    lat_check = 0; sw_bp = 1;
    gap = 1; host.slow = 40; host.bp_en = 1;
    for (int k = 0; k < 20; k++) begin
      repeat (300) @(posedge clk);
      if (host.tx_queued - host.tx_done < 3) host.queue_tx($urandom_range(0, 6));
    end
    // drain
    net_on = 0; sw_on = 0;
    wait (!busy);
    host.slow = 0; host.bp_en = 0; sw_bp = 0;
    repeat (3000) @(posedge clk);
    // Enso results
    check(host.rx_msgs + int'(enso_rx_drop_count) == sent, "every message received or dropped");
    check(int'(enso_rx_accept_count) == host.rx_msgs, "accepted == received");
    check(host.tx_done == host.tx_queued, "every TX record completed");
    check(host.exp_tx.size() == 0, "all TX flits sent");
    // Nagare results
    for (int p = 0; p < SP; p++) check(exp_q[p].size() == 0, $sformatf("switch port %0d drained", p));
    check(n_in == n_out, "switch lost nothing");
    check(lat_ok > 50, "switch latency measured");
    // mechanisms
    $display("mechanisms: drop=%0d coalesce=%0d/%0d prefetch=%0d notif_full=%0d tx=%0d routed=%0d wraps=%0d pass=%0d stall=%0d",
             enso_rx_drop_count, enso_notif_count, host.rx_msgs, enso_prefetch_count,
             enso_notif_full_cycles, host.tx_done, n_routed, n_wraps, n_pass, nagare_stall_cycles);
    check(enso_rx_drop_count > 0, "mechanism: pipe overflow drop");
    check(int'(enso_notif_count) < host.rx_msgs, "mechanism: notification coalescing");
    check(enso_prefetch_count > 0, "mechanism: notification prefetch");
    check(enso_notif_full_cycles > 0, "mechanism: notification ring full");
    check(host.tx_done > 5, "mechanism: TX completion");
    check(n_routed > 0, "mechanism: stream routing");
    check(n_wraps > 0, "mechanism: streaming-buffer wrap");
    check(n_pass > 0, "mechanism: non-stream pass-through");
    check(nagare_stall_cycles > 0, "mechanism: egress stall");
    $display("TB_RESULT checks=%0d failures=%0d", checks + host.checks, failures + host.failures);
    $finish;
  end
endmodule
