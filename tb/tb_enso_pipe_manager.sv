// tb_enso_pipe_manager: self-checking test of the RX Enso Pipe pointer logic.
//
// Four pipes with 32-flit rings. Random messages to random pipes under random DMA
// back-pressure; a reference model keeps each pipe's Head_SW/Tail_NIC and predicts the
// address and data of every DMA write, which pipe drops a message that does not fit,
// and the tail vector. Also checks the one-flit-per-cycle rate (an 8-flit message takes
// 8 cycles with no back-pressure) and that freeing space with a Head_SW write lets a
// previously dropped size through.
`timescale 1ns/1ps
module tb_enso_pipe_manager;
  import enso_pkg::*;
  localparam int NP = 4, RL = 5, CAP = (1 << RL) - 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic base_wr_valid = 0, head_wr_valid = 0;
  logic [PIPE_ID_W-1:0] base_wr_pipe = 0, head_wr_pipe = 0;
  logic [ADDR_W-1:0] base_wr_addr = 0;
  logic [PTR_W-1:0] head_wr_value = 0;
  logic in_valid = 0, in_ready, in_sop = 0, in_eop = 0;
  logic [PIPE_ID_W-1:0] in_pipe = 0;
  logic [LEN_W-1:0] in_len = 0;
  logic [DATA_W-1:0] in_data = 0;
  logic dma_valid, dma_ready = 1;
  dma_wr_t dma;
  logic [NP-1:0][RL-1:0] tail_o, head_o;
  logic [31:0] drop_count, accept_count;

  enso_pipe_manager #(.NUM_PIPES(NP), .RING_LOG2(RL)) dut (.*);

  int checks = 0, failures = 0;
  int m_head [NP], m_tail [NP];
  dma_wr_t exp_q [$];
  int exp_drops = 0, exp_accepts = 0;
  bit bp_en = 1;

  function automatic logic [ADDR_W-1:0] base_of(int p);
    return 64'h1_0000_0000 + 64'(p) * 64'h10_0000;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // random back-pressure on the DMA port
  always @(negedge clk) dma_ready <= bp_en ? ($urandom_range(0, 3) != 0) : 1'b1;

  // DMA monitor: sample a settled handshake just before the rising edge
  always @(negedge clk) begin
    #2;
    if (rst_n && dma_valid && dma_ready) begin
      if (exp_q.size() == 0) check(0, "unexpected DMA write");
      else begin
        dma_wr_t e;
        e = exp_q.pop_front();
        check(dma.addr == e.addr && dma.data == e.data,
              $sformatf("DMA write addr %h exp %h", dma.addr, e.addr));
      end
    end
  end

  task automatic send_msg(int p, int len);
    int used, free_f;
    bit fits;
    used   = (m_tail[p] - m_head[p]) & CAP;
    free_f = CAP - used;
    fits   = len <= free_f;
    for (int i = 0; i < len; i++) begin
      logic [DATA_W-1:0] d;
      d = {16{$urandom()}};
      @(negedge clk);
      in_valid <= 1; in_pipe <= PIPE_ID_W'(p); in_sop <= (i == 0); in_eop <= (i == len - 1);
      in_len <= LEN_W'(len); in_data <= d;
      if (fits) begin
        exp_q.push_back('{addr: base_of(p) + 64'((m_tail[p] + i) & CAP) * 64, data: d});
      end
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      @(posedge clk);
    end
    @(negedge clk);
    in_valid <= 0;
    if (fits) begin m_tail[p] = (m_tail[p] + len) & CAP; exp_accepts++; end
    else exp_drops++;
  endtask

  task automatic set_head(int p, int h);
    @(negedge clk);
    head_wr_valid <= 1; head_wr_pipe <= PIPE_ID_W'(p); head_wr_value <= PTR_W'(h);
    @(negedge clk);
    head_wr_valid <= 0;
    m_head[p] = h;
  endtask

  task automatic drain();
    int n = 0;
    while (exp_q.size() != 0 && n < 1000) begin @(negedge clk); n++; end
    repeat (2) @(negedge clk);
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NP; p++) begin m_head[p] = 0; m_tail[p] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < NP; p++) begin
      @(negedge clk);
      base_wr_valid <= 1; base_wr_pipe <= PIPE_ID_W'(p); base_wr_addr <= base_of(p);
    end
    @(negedge clk) base_wr_valid <= 0;

    // rate: 8-flit message, no back-pressure, one flit per cycle
    bp_en = 0;
    @(negedge clk);
    begin
      int t0, t1;
      t0 = $time;
      send_msg(1, 8);
      t1 = $time;
      check((t1 - t0) / 10 == 8 + 1, $sformatf("8-flit message took %0d cycles", (t1 - t0) / 10 - 1));
    end
    drain();
    bp_en = 1;

    // overflow: pipe 0 gets 10-flit messages until one no longer fits
    send_msg(0, 10); send_msg(0, 10); send_msg(0, 10);   // 30 of 31 used
    send_msg(0, 10);                                      // dropped
    drain();
    check(drop_count == 1, "one drop after overflow");
    check(32'(tail_o[0]) == 30, "tail of pipe 0 after overflow");
    set_head(0, 20);                                      // software frees 20 flits
    send_msg(0, 10);                                      // fits now, wraps round
    drain();
    check(32'(tail_o[0]) == ((30 + 10) & CAP), "tail of pipe 0 after wrap");

    // random traffic, software consuming at random
    for (int n = 0; n < 300; n++) begin
      int p;
      p = $urandom_range(0, NP - 1);
      send_msg(p, $urandom_range(1, 12));
      if ($urandom_range(0, 2) == 0) begin
        int q;
        q = $urandom_range(0, NP - 1);
        drain();
        set_head(q, m_tail[q]);
      end
    end
    drain();
    check(exp_q.size() == 0, "all expected writes seen");
    check(drop_count == 32'(exp_drops), $sformatf("drop count %0d exp %0d", drop_count, exp_drops));
    check(accept_count == 32'(exp_accepts), "accept count");
    check(exp_drops > 1, "random run produced drops");
    for (int p = 0; p < NP; p++) begin
      check(32'(tail_o[p]) == m_tail[p], $sformatf("tail of pipe %0d", p));
      check(32'(head_o[p]) == m_head[p], $sformatf("head of pipe %0d", p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
