// enso_host_model: host memory plus the software side of an Enso NIC, for testbenches.
//
// Memory: a sparse flit-addressed array. DMA writes land in it (with optional random
// back-pressure); DMA reads are answered in order after a random delay of 2-6 cycles.
// Software, configured through MMIO writes (one per cycle, queued):
//   RX: polls the notification ring. For each record with signal = 1 it walks the
//       named pipe from its Head_SW to the reported tail, checks every flit (each flit
//       encodes pipe, message number, flit index and length, see make_flit), checks that
//       messages are whole and in order, clears the record, and writes the notification
//       head and the pipe's Head_SW. It pauses a random 0..SLOW cycles between records,
//       so a slow setting fills pipes and the notification ring.
//   Prefetch: every so often asks for a notification on a random pipe (if enabled).
//   TX: queue_tx(len) stores a message and its TX record and advances the TX tail; the
//       model checks the flits on the TX stream and the completion overwrite.
// Counters (checks, failures, rx_msgs, rx_flits, tx_done) are read by the testbench.
`timescale 1ns/1ps
module enso_host_model
  import enso_pkg::*;
#(
  parameter int NUM_PIPES       = 4,
  parameter int PIPE_RING_LOG2  = 6,
  parameter int NOTIF_RING_LOG2 = 3,
  parameter int TX_RING_LOG2    = 2,
  parameter bit USE_PREFETCH    = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              mmio_wr_valid,
  output logic [19:0]       mmio_addr,
  output logic [63:0]       mmio_data,
  input  logic              dma_wr_valid,
  output logic              dma_wr_ready,
  input  dma_wr_t           dma_wr,
  input  logic              dma_rd_req_valid,
  output logic              dma_rd_req_ready,
  input  dma_rd_req_t       dma_rd_req,
  output logic              dma_rd_cpl_valid,
  input  logic              dma_rd_cpl_ready,
  output logic [DATA_W-1:0] dma_rd_cpl_data,
  input  logic              tx_valid,
  output logic              tx_ready,
  input  logic              tx_sop,
  input  logic              tx_eop,
  input  logic [DATA_W-1:0] tx_data
);
  localparam logic [ADDR_W-1:0] NRING = 64'h2_0000_0000;
  localparam logic [ADDR_W-1:0] TRING = 64'h3_0000_0000;
  localparam logic [ADDR_W-1:0] TDATA = 64'h4_0000_0000;
  localparam int PRING = 1 << PIPE_RING_LOG2;

  int checks = 0, failures = 0;
  int rx_msgs = 0, rx_flits = 0, n_records = 0, tx_done = 0, tx_queued = 0;
  int slow = 0;            // software pause between records: 0..slow cycles
  bit bp_en = 0;           // random back-pressure on DMA writes and TX
  bit sw_run = 1;
  int prefetch_sent = 0;

  logic [DATA_W-1:0] mem [logic [ADDR_W-1:0]];
  logic [DATA_W-1:0] cpl_q [$];
  int cpl_delay = 0;
  logic [63:0] mmio_q [$];       // {addr[19:0], ...} packed as addr<<44 is too wide: two queues
  logic [19:0] mmio_aq [$];
  int next_msg [NUM_PIPES];      // next message number software may see per pipe
  int shead [NUM_PIPES];
  int nhead = 0;
  int ttail = 0;
  logic [ADDR_W-1:0] tdata_ptr = TDATA;
  logic [DATA_W-1:0] exp_tx [$];
  bit exp_sop [$], exp_eop [$];

  function automatic logic [ADDR_W-1:0] pipe_base(int p);
    return 64'h1_0000_0000 + 64'(p) * 64'h100_0000;
  endfunction

  // Flit i of message m (length len) to pipe p: a header in the low 64 bits and a
  // payload derived from it.
  function automatic logic [DATA_W-1:0] make_flit(int p, int m, int i, int len);
    logic [DATA_W-1:0] d;
    logic [31:0] h;
    h = (32'(p) << 24) ^ (32'(m) << 8) ^ 32'(i);
    for (int w = 0; w < DATA_W / 32; w++) d[w*32 +: 32] = (h + 32'(w)) * 32'h9E37_79B1;
    d[63:0] = {8'hE5, 8'(p), 16'(m), 16'(i), 16'(len)};
    return d;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic mmio(logic [19:0] a, logic [63:0] d);
    mmio_aq.push_back(a);
    mmio_q.push_back(d);
  endtask

  task automatic queue_tx(int len);
    for (int i = 0; i < len; i++) begin
      logic [DATA_W-1:0] d;
      d = make_flit(99, tx_queued, i, len);
      mem[tdata_ptr + 64'(i) * 64] = d;
      exp_tx.push_back(d);
      exp_sop.push_back(i == 0);
      exp_eop.push_back(i == len - 1);
    end
    mem[TRING + 64'(ttail) * 64] = DATA_W'(tx_notif_t'{signal: 1'b1, addr: tdata_ptr, len_flits: LEN_W'(len)});
    tdata_ptr += 64'(len) * 64;
    ttail = (ttail + 1) % (1 << TX_RING_LOG2);
    tx_queued++;
    mmio({MMIO_RGN_GLOBAL, MMIO_TX_NOTIF_TAIL}, 64'(ttail));
  endtask

  // ---- memory, MMIO and stream handshakes, all at the rising edge
  initial begin
    mmio_wr_valid = 0; mmio_addr = 0; mmio_data = 0;
    dma_rd_cpl_valid = 0; dma_rd_cpl_data = '0;
    dma_wr_ready = 1; tx_ready = 1;
  end
  assign dma_rd_req_ready = 1'b1;

  always @(posedge clk) begin
    if (rst_n) begin
      if (dma_wr_valid && dma_wr_ready) begin
        mem[dma_wr.addr] = dma_wr.data;
        if (dma_wr.addr >= TRING && dma_wr.addr < TDATA) begin
          check(dma_wr.data[TX_NOTIF_W-1] == 1'b0, "TX completion clears signal");
          tx_done++;
        end
      end
      if (dma_rd_cpl_valid && dma_rd_cpl_ready) void'(cpl_q.pop_front());
      if (dma_rd_req_valid && dma_rd_req_ready) begin
        for (int i = 0; i < int'(dma_rd_req.len_flits); i++) begin
          logic [ADDR_W-1:0] a;
          a = dma_rd_req.addr + 64'(i) * 64;
          cpl_q.push_back(mem.exists(a) ? mem[a] : '0);
        end
        cpl_delay = $urandom_range(2, 6);
      end else if (cpl_delay > 0) cpl_delay--;
      dma_rd_cpl_valid <= (cpl_q.size() != 0) && (cpl_delay == 0);
      dma_rd_cpl_data  <= (cpl_q.size() != 0) ? cpl_q[0] : '0;
      if (tx_valid && tx_ready) begin
        if (exp_tx.size() == 0) check(0, "unexpected TX flit");
        else begin
          check(tx_data == exp_tx.pop_front(), "TX flit data");
          check(tx_sop == exp_sop.pop_front() && tx_eop == exp_eop.pop_front(), "TX framing");
        end
      end
      dma_wr_ready <= bp_en ? ($urandom_range(0, 3) != 0) : 1'b1;
      tx_ready     <= bp_en ? ($urandom_range(0, 3) != 0) : 1'b1;
      if (mmio_q.size() != 0) begin
        mmio_wr_valid <= 1'b1;
        mmio_addr     <= mmio_aq.pop_front();
        mmio_data     <= mmio_q.pop_front();
      end else mmio_wr_valid <= 1'b0;
    end
  end

  // ---- software
  task automatic handle_record(int p, int t);
    int i, guard;
    i = shead[p];
    guard = 0;
    while (i != t && guard < PRING) begin
      logic [DATA_W-1:0] f;
      logic [ADDR_W-1:0] a;
      int m, idx, len;
      guard++;
      a = pipe_base(p) + 64'(i) * 64;
      f = mem.exists(a) ? mem[a] : '0;
      m = int'(f[47:32]); idx = int'(f[31:16]); len = int'(f[15:0]);
      check(f[63:56] == 8'hE5 && int'(f[55:48]) == p, $sformatf("pipe %0d flit header", p));
      check(idx == 0 && m >= next_msg[p], $sformatf("pipe %0d message %0d starts in order", p, m));
      next_msg[p] = m + 1;
      for (int k = 0; k < len; k++) begin
        a = pipe_base(p) + 64'((i + k) % PRING) * 64;
        f = mem.exists(a) ? mem[a] : '0;
        check(f == make_flit(p, m, k, len), $sformatf("pipe %0d message %0d flit %0d got %h at %h", p, m, k, f[63:0], a));
      end
      i = (i + len) % PRING;
      rx_msgs++;
      rx_flits += len;
    end
    check(i == t, $sformatf("pipe %0d messages end at the reported tail", p));
    shead[p] = t;
  endtask

  initial begin
    for (int p = 0; p < NUM_PIPES; p++) begin next_msg[p] = 0; shead[p] = 0; end
    wait (rst_n);
    for (int p = 0; p < NUM_PIPES; p++)
      mmio({MMIO_RGN_PIPE_BASE, 13'(p), 3'b000}, pipe_base(p));
    mmio({MMIO_RGN_GLOBAL, MMIO_RX_NOTIF_BASE}, NRING);
    mmio({MMIO_RGN_GLOBAL, MMIO_TX_NOTIF_BASE}, TRING);
    forever begin
      logic [ADDR_W-1:0] a;
      @(posedge clk);
      a = NRING + 64'(nhead) * 64;
      if (sw_run && mem.exists(a) && mem[a][RX_NOTIF_W-1]) begin
        rx_notif_t r;
        r = rx_notif_t'(mem[a][RX_NOTIF_W-1:0]);
        check(int'(r.pipe) < NUM_PIPES, "record names a pipe");
        handle_record(int'(r.pipe), int'(r.tail) % PRING);
        n_records++;
        mem[a] = '0;
        nhead = (nhead + 1) % (1 << NOTIF_RING_LOG2);
        mmio({MMIO_RGN_GLOBAL, MMIO_RX_NOTIF_HEAD}, 64'(nhead));
        mmio({MMIO_RGN_PIPE_HEAD, 13'(r.pipe), 3'b000}, 64'(shead[r.pipe]));
        if (USE_PREFETCH && $urandom_range(0, 3) == 0) begin
          mmio({MMIO_RGN_GLOBAL, MMIO_PREFETCH}, 64'($urandom_range(0, NUM_PIPES - 1)));
          prefetch_sent++;
        end
        if (slow > 0) repeat ($urandom_range(0, slow)) @(posedge clk);
      end
    end
  end
endmodule
