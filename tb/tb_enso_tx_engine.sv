// tb_enso_tx_engine: self-checking test of the Enso TX path.
//
// A small host-memory model answers DMA reads (in order, after a random delay of a few
// cycles) and applies DMA writes. Software places messages of random length (including
// an empty one) in memory, writes one TX notification record per message into a 4-slot
// ring and advances the ring tail by MMIO. The test checks that every message leaves on
// the TX stream flit for flit with correct sop/eop, that each record is overwritten
// with signal = 0 after its message has gone, that sent_count matches, and that the
// ring wraps. It also checks that a 4-flit message streams at one flit per cycle.
`timescale 1ns/1ps
module tb_enso_tx_engine;
  import enso_pkg::*;
  localparam int RL = 2;
  localparam logic [ADDR_W-1:0] RING = 64'h3_0000_0000;
  localparam logic [ADDR_W-1:0] DATA = 64'h4_0000_0000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic base_wr_valid = 0, tail_wr_valid = 0;
  logic [ADDR_W-1:0] base_wr_addr = 0;
  logic [PTR_W-1:0] tail_wr_value = 0;
  logic rd_req_valid, rd_req_ready;
  dma_rd_req_t rd_req;
  logic rd_cpl_valid = 0, rd_cpl_ready;
  logic [DATA_W-1:0] rd_cpl_data = '0;
  logic dma_valid, dma_ready;
  dma_wr_t dma;
  logic tx_valid, tx_ready, tx_sop, tx_eop;
  logic [DATA_W-1:0] tx_data;
  logic [31:0] sent_count;

  enso_tx_engine #(.RING_LOG2(RL)) dut (.*);

  int checks = 0, failures = 0;
  logic [DATA_W-1:0] mem [logic [ADDR_W-1:0]];
  logic [DATA_W-1:0] cpl_q [$];
  int cpl_delay = 0;
  logic [DATA_W-1:0] exp_tx [$];
  bit exp_sop [$], exp_eop [$];
  int n_compl = 0;
  int total_sent = 0, total_queued = 0;
  int cum_q [$];   // flits sent in total once each queued message is complete
  int stream_first = -1, stream_last = -1, cyc = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) cyc++;

  // host memory: reads
  assign rd_req_ready = 1'b1;
  assign dma_ready    = 1'b1;
  always @(negedge clk) tx_ready <= ($urandom_range(0, 7) != 0);

  always @(negedge clk) begin
    bit req_hs, cpl_hs;
    #1;
    // queue methods do not wake continuous assignments: drive the outputs here
    rd_cpl_valid = (cpl_q.size() != 0) && (cpl_delay == 0);
    rd_cpl_data  = (cpl_q.size() != 0) ? cpl_q[0] : '0;
    #1;
    req_hs = rst_n && rd_req_valid && rd_req_ready;
    cpl_hs = rst_n && rd_cpl_valid && rd_cpl_ready;
    if (cpl_hs) void'(cpl_q.pop_front());
    if (req_hs) begin
      for (int i = 0; i < int'(rd_req.len_flits); i++) begin
        logic [ADDR_W-1:0] a;
        a = rd_req.addr + 64'(i) * 64;
        cpl_q.push_back(mem.exists(a) ? mem[a] : '0);
      end
      cpl_delay = $urandom_range(2, 6);
    end else if (cpl_delay > 0) cpl_delay--;
    if (rst_n && dma_valid && dma_ready) begin
      tx_notif_t r;
      mem[dma.addr] = dma.data;
      r = tx_notif_t'(dma.data[TX_NOTIF_W-1:0]);
      check(r.signal == 1'b0, "completion clears signal");
      check(cum_q.size() != 0 && total_sent == cum_q.pop_front(), "completion only after the whole message");
      n_compl++;
    end
    if (rst_n && tx_valid && tx_ready) begin
      if (exp_tx.size() == 0) check(0, "unexpected TX flit");
      else begin
        check(tx_data == exp_tx.pop_front(), "TX flit data");
        check(tx_sop == exp_sop.pop_front(), "TX sop");
        check(tx_eop == exp_eop.pop_front(), "TX eop");
      end
      total_sent++;
      if (tx_sop) stream_first = cyc;
      if (tx_eop) stream_last = cyc;
    end
  end

  int tail = 0;
  logic [ADDR_W-1:0] data_ptr = DATA;

  // software queues one message of len flits
  task automatic queue_msg(int len);
    for (int i = 0; i < len; i++) begin
      logic [DATA_W-1:0] d;
      d = {16{$urandom()}};
      mem[data_ptr + 64'(i) * 64] = d;
      exp_tx.push_back(d);
      exp_sop.push_back(i == 0);
      exp_eop.push_back(i == len - 1);
    end
    total_queued += len;
    cum_q.push_back(total_queued);
    mem[RING + 64'(tail) * 64] = DATA_W'(tx_notif_t'{signal: 1'b1, addr: data_ptr, len_flits: LEN_W'(len)});
    data_ptr += 64'(len) * 64;
    tail = (tail + 1) % (1 << RL);
    @(negedge clk);
    tail_wr_valid <= 1; tail_wr_value <= PTR_W'(tail);
    @(negedge clk) tail_wr_valid <= 0;
  endtask

  task automatic wait_done(int n);
    int k = 0;
    while (n_compl < n && k < 5000) begin @(negedge clk); k++; end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int done = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    base_wr_valid <= 1; base_wr_addr <= RING;
    @(negedge clk) base_wr_valid <= 0;

    queue_msg(3); done++;
    wait_done(done);
    check(n_compl == 1 && exp_tx.size() == 0, "first message sent and completed");
    check(mem[RING][TX_NOTIF_W-1] == 1'b0, "record 0 overwritten with signal 0");
    queue_msg(0); done++;                      // empty record: completion only
    wait_done(done);
    check(n_compl == 2, "empty record completed");
    // rate check with the MAC always ready
    force tx_ready = 1'b1;
    queue_msg(4); done++;
    wait_done(done);
    check(stream_last - stream_first == 3, $sformatf("4 flits in %0d cycles", stream_last - stream_first + 1));
    release tx_ready;
    // several queued at once, wrapping the ring
    for (int r = 0; r < 20; r++) begin
      int n;
      n = $urandom_range(1, 3);
      for (int k = 0; k < n; k++) begin queue_msg($urandom_range(1, 9)); done++; end
      wait_done(done);
    end
    check(n_compl == done, $sformatf("completions %0d of %0d", n_compl, done));
    check(sent_count == 32'(done - 1), "sent_count counts non-empty messages");
    check(exp_tx.size() == 0, "all flits sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
