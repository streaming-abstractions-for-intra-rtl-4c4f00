// tb_enso_notif_engine: self-checking test of reactive notifications and prefetching.
//
// Four pipes, prefetching enabled. Directed checks: a notification follows the first
// tail move one cycle later; later moves are coalesced until software writes Head_SW;
// the next notification then carries the newest tail; a prefetch request produces a
// notification at once even while one is outstanding. A random phase then moves tails,
// re-arms pipes and stalls notif_ready at random, and checks that no pipe ever gets
// two notifications without a re-arm or prefetch in between, that reported tails never
// run ahead of the real ones, and that every pipe's last report ends equal to its tail.
`timescale 1ns/1ps
module tb_enso_notif_engine;
  import enso_pkg::*;
  localparam int NP = 4, RL = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NP-1:0][RL-1:0] tail_i = '0;
  logic head_wr_valid = 0, prefetch_valid = 0;
  logic [PIPE_ID_W-1:0] head_wr_pipe = 0, prefetch_pipe = 0;
  logic notif_valid, notif_ready = 1;
  rx_notif_t notif;
  logic [31:0] notif_count, prefetch_count;

  enso_notif_engine #(.NUM_PIPES(NP), .RING_LOG2(RL), .PREFETCH_EN(1'b1)) dut (.*);

  int checks = 0, failures = 0;
  int got [NP];            // notifications seen since the last re-arm/prefetch
  int last_tail [NP];      // tail carried by the last notification
  int n_seen = 0;
  bit bp_en = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) notif_ready <= bp_en ? ($urandom_range(0, 2) != 0) : 1'b1;

  always @(negedge clk) begin
    #2;
    if (rst_n && notif_valid && notif_ready) begin
      int p;
      p = int'(notif.pipe);
      n_seen++;
      got[p]++;
      check(notif.signal == 1'b1, "signal bit set");
      check(got[p] <= 1, $sformatf("pipe %0d notified twice without re-arm", p));
      check(((int'(tail_i[p]) - int'(notif.tail)) & ((1 << RL) - 1)) < (1 << (RL - 1)),
            "reported tail not ahead of the real tail");
      last_tail[p] = int'(notif.tail);
    end
  end

  task automatic move(int p, int n);
    @(negedge clk);
    tail_i[p] <= tail_i[p] + RL'(n);
  endtask
  task automatic rearm(int p);
    @(negedge clk);
    head_wr_valid <= 1; head_wr_pipe <= PIPE_ID_W'(p);
    got[p] = 0;
    @(negedge clk);
    head_wr_valid <= 0;
  endtask
  task automatic prefetch(int p);
    @(negedge clk);
    prefetch_valid <= 1; prefetch_pipe <= PIPE_ID_W'(p);
    got[p] = -1;   // a report already in flight may arrive besides the prefetched one
    @(negedge clk);
    prefetch_valid <= 0;
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NP; p++) begin got[p] = 0; last_tail[p] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    check(!notif_valid, "quiet after reset");

    // first message: notification one cycle after the tail moves
    move(0, 2);
    @(negedge clk); #1;
    check(notif_valid && notif.pipe == 0 && notif.tail == 2, "notification after one cycle");
    // three more messages while the first report is outstanding: no notification
    move(0, 1); move(0, 3); move(0, 1);
    repeat (10) @(negedge clk);
    check(n_seen == 1, "coalesced while outstanding");
    check(notif_count == 1, "count after coalescing");
    // software reacts: exactly one notification with the newest tail
    rearm(0);
    repeat (5) @(negedge clk);
    check(n_seen == 2 && last_tail[0] == 7, "re-armed notification carries newest tail");
    // re-arm with nothing new: no notification
    rearm(0);
    repeat (5) @(negedge clk);
    check(n_seen == 2, "no notification without new data");
    // prefetch while idle: immediate notification, same tail
    move(1, 4);
    repeat (3) @(negedge clk);
    check(n_seen == 3, "pipe 1 notified");
    prefetch(1);
    repeat (3) @(negedge clk);
    check(n_seen == 4 && last_tail[1] == 4, "prefetch gives a notification at once");
    check(prefetch_count == 1, "prefetch counted");

    // random phase
    bp_en = 1;
    for (int n = 0; n < 2000; n++) begin
      int p, r;
      p = $urandom_range(0, NP - 1);
      r = $urandom_range(0, 9);
      if (r < 5) move(p, $urandom_range(1, 5));
      else if (r < 9) begin if (got[p] > 0) rearm(p); end
      else prefetch(p);
    end
    bp_en = 0;
    // final: software re-arms every pipe until all reports are current
    repeat (4) begin
      repeat (5) @(negedge clk);
      for (int p = 0; p < NP; p++) rearm(p);
    end
    repeat (10) @(negedge clk);
    for (int p = 0; p < NP; p++)
      check(last_tail[p] == int'(tail_i[p]), $sformatf("pipe %0d final report %0d vs tail %0d",
            p, last_tail[p], tail_i[p]));
    check(notif_count == 32'(n_seen), "notification count matches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
