// tb_stream_rr_arb: self-checking test of the round-robin stream merger.
//
// Three sources each send a numbered sequence of beats with random gaps, into an
// output with random back-pressure. Checks: every beat arrives once and in order per
// source, out_data stays stable while out_valid waits for out_ready, and with all three
// sources always valid and the output always ready the grants rotate 0,1,2,0,...; and a
// waiting source is granted before any other source is granted N times.
`timescale 1ns/1ps
module tb_stream_rr_arb;
  localparam int N = 3, BEATS = 200;
  typedef logic [15:0] beat_t;   // {source, sequence number}

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0] in_valid = '0, in_ready;
  beat_t in_data [N];
  logic out_valid, out_ready = 0;
  beat_t out_data;
  logic [1:0] out_sel;

  stream_rr_arb #(.N(N), .T(beat_t)) dut (.*);

  int checks = 0, failures = 0;
  int next_exp [N];
  int sent [N];
  bit full_rate = 0;
  int last_sel = -1;
  int waited [N];     // grants to others while source i was waiting
  bit prev_wait = 0;
  beat_t prev_data;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial for (int i = 0; i < N; i++) in_data[i] = '0;

  // Sources, sink and monitor all sample at the rising edge and drive with
  // non-blocking assignments, so they see the values the DUT sees.
  always @(posedge clk) begin
    if (rst_n) begin
      bit taken [N];
      if (prev_wait) check(out_valid && out_data == prev_data, "output held while waiting");
      prev_wait = out_valid && !out_ready;
      prev_data = out_data;
      if (out_valid && out_ready) begin
        int s, q;
        s = int'(out_data[15:12]);
        q = int'(out_data[11:0]);
        check(s == int'(out_sel), "out_sel names the source");
        check(q == next_exp[s], $sformatf("source %0d beat %0d exp %0d", s, q, next_exp[s]));
        next_exp[s] = q + 1;
        if (full_rate && &in_valid && last_sel >= 0) check(s == (last_sel + 1) % N, "round-robin order");
        last_sel = s;
        // fairness: a waiting source sees at most N-1 grants to others
        for (int i = 0; i < N; i++) begin
          if (i == s) waited[i] = 0;
          else if (in_valid[i]) begin
            waited[i]++;
            check(waited[i] < N, $sformatf("source %0d waited %0d grants", i, waited[i]));
          end
        end
      end
      out_ready <= full_rate ? 1'b1 : ($urandom_range(0, 2) != 0);
      for (int i = 0; i < N; i++) begin
        taken[i] = in_valid[i] && in_ready[i];
        if (taken[i]) sent[i]++;
        if ((!in_valid[i] || taken[i]) && sent[i] < BEATS && (full_rate || $urandom_range(0, 1) == 0)) begin
          in_valid[i] <= 1;
          in_data[i]  <= {4'(i), 12'(sent[i])};
        end else if (taken[i]) in_valid[i] <= 0;
      end
    end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin next_exp[i] = 0; sent[i] = 0; waited[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (sent[0] >= 150 && sent[1] >= 150 && sent[2] >= 150);
    full_rate = 1;
    last_sel = -1;
    wait (sent[0] == BEATS && sent[1] == BEATS && sent[2] == BEATS);
    repeat (5) @(negedge clk);
    for (int i = 0; i < N; i++) check(next_exp[i] == BEATS, $sformatf("source %0d all beats", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
