// tb_intra_host_full: one complete operation through the design at its default size.
//
// intra_host_top with no parameter overrides: 16 pipes of 2**15 flits, 1024-record
// notification and TX rings, prefetching off; a 4-port Nagare switch with 16 streams and
// 10 stages of 10 cycles. Enso: messages to several pipes are received, notified and
// checked by enso_host_model, and one message is transmitted and completed. Nagare: one
// push travels the chain NIC -> decryption -> inference -> NIC, each hop arriving in the
// next device's streaming buffer 100 cycles after it entered the switch.
`timescale 1ns/1ps
module tb_intra_host_full;
  import enso_pkg::*;
  import nagare_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

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
  logic nagare_tbl_cfg_valid = 0, nagare_ins_cfg_valid = 0;
  logic [STREAM_W-1:0] nagare_tbl_cfg_index = 0, nagare_ins_cfg_stream = 0;
  stream_entry_t nagare_tbl_cfg_entry = '0;
  logic [7:0] nagare_ins_cfg_stage = 0;
  instr_t nagare_ins_cfg_instr = '0;
  logic [3:0] nagare_in_valid = '0, nagare_in_ready, nagare_out_valid, nagare_out_ready = '1;
  nmsg_t nagare_in_msg [4];
  nmsg_t nagare_out_msg [4];
  logic [31:0] nagare_stall_cycles;

  intra_host_top dut (.*);

  enso_host_model #(.NUM_PIPES(16), .PIPE_RING_LOG2(15), .NOTIF_RING_LOG2(10),
                    .TX_RING_LOG2(10), .USE_PREFETCH(1'b0)) host (
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
  int cyc = 0;
  always @(posedge clk) cyc++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send_msg(int p, int m, int len);
    for (int i = 0; i < len; i++) begin
      @(negedge clk);
      enso_rx_valid = 1; enso_rx_pipe = enso_pkg::PIPE_ID_W'(p); enso_rx_sop = (i == 0);
      enso_rx_eop = (i == len - 1); enso_rx_len = enso_pkg::LEN_W'(len);
      enso_rx_data = host.make_flit(p, m, i, len);
      @(posedge clk);
      while (!enso_rx_ready) @(posedge clk);
    end
    @(negedge clk) enso_rx_valid = 0;
  endtask

  // one push into the switch from port src; returns when it leaves on port dst
  task automatic push(int src, logic [63:0] addr, int len, int dst, logic [63:0] exp_addr);
    nmsg_t m;
    int t0;
    bit seen;
    m = '0;
    m.kind = MSG_MEM_WR; m.addr = addr; m.len = nagare_pkg::LEN_W'(len); m.data = {8{$urandom}};
    @(negedge clk);
    nagare_in_valid[src] = 1; nagare_in_msg[src] = m;
    @(posedge clk);
    t0 = cyc;
    @(negedge clk) nagare_in_valid[src] = 0;
    seen = 0;
    for (int k = 0; k < 200 && !seen; k++) begin
      @(posedge clk);
      if (nagare_out_valid[dst]) begin
        seen = 1;
        check(cyc - t0 == 100, $sformatf("hop %0d->%0d latency %0d", src, dst, cyc - t0));
        check(nagare_out_msg[dst].addr == exp_addr && nagare_out_msg[dst].data == m.data &&
              int'(nagare_out_msg[dst].src_port) == src, $sformatf("hop %0d->%0d content", src, dst));
      end
    end
    check(seen, $sformatf("hop %0d->%0d arrived", src, dst));
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + host.checks, failures + host.failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 4; p++) nagare_in_msg[p] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (30) @(posedge clk);
    // Enso RX: messages to pipes 0, 7 and 15
    send_msg(0, 0, 3);
    send_msg(7, 0, 8);
    send_msg(15, 0, 1);
    send_msg(0, 1, 5);
    repeat (300) @(posedge clk);
    check(host.rx_msgs == 4, $sformatf("4 messages received, got %0d", host.rx_msgs));
    check(enso_rx_drop_count == 0, "no drops");
    // Enso TX
    host.queue_tx(4);
    repeat (300) @(posedge clk);
    check(host.tx_done == 1 && enso_tx_sent_count == 1, "one message transmitted and completed");
    // Nagare: open the chain and push once along it
    for (int s = 0; s < 3; s++) begin
      instr_t i;
      @(negedge clk);
      nagare_tbl_cfg_valid = 1; nagare_tbl_cfg_index = STREAM_W'(s);
      nagare_tbl_cfg_entry = '{valid: 1'b1, base: 64'h8000_0000 + 64'(s) * 64'h10_0000, size_log2: 6'd20};
      i = '0; i.op = OP_PUSH; i.port = nagare_pkg::PORT_W'(s == 2 ? 1 : s + 2);
      i.imm = 64'hA000_0000 + 64'(s) * 64'h1000_0000; i.wrap_log2 = 6'd16;
      nagare_ins_cfg_valid = 1; nagare_ins_cfg_stage = 8'd0;
      nagare_ins_cfg_stream = STREAM_W'(s); nagare_ins_cfg_instr = i;
      @(negedge clk);
      nagare_tbl_cfg_valid = 0; nagare_ins_cfg_valid = 0;
    end
    push(1, 64'h8000_0040, 256, 2, 64'hA000_0000);     // NIC -> decryption
    push(2, 64'h8010_0000, 256, 3, 64'hB000_0000);     // decryption -> inference
    push(3, 64'h8020_0000, 64,  1, 64'hC000_0000);     // inference -> NIC
    push(1, 64'h8000_0000, 128, 2, 64'hA000_0100);     // next push lands after the first
    $display("TB_RESULT checks=%0d failures=%0d", checks + host.checks, failures + host.failures);
    $finish;
  end
endmodule
