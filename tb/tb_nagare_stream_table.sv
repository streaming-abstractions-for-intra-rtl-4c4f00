// tb_nagare_stream_table: self-checking test of the stream address match.
//
// Opens streams with windows of different sizes (two of them overlapping, to check that
// the lower index wins), looks up addresses inside, at the edges of and outside every
// window, then closes a stream and checks that its addresses stop matching. Expected
// results come from a reference search in the testbench.
`timescale 1ns/1ps
module tb_nagare_stream_table;
  import nagare_pkg::*;
  localparam int NS = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_valid = 0;
  logic [STREAM_W-1:0] cfg_index = 0;
  stream_entry_t cfg_entry = '0;
  logic [ADDR_W-1:0] addr = 0;
  logic hit;
  logic [STREAM_W-1:0] stream;

  nagare_stream_table #(.NUM_STREAMS(NS)) dut (.*);

  int checks = 0, failures = 0;
  stream_entry_t model [NS];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic open_stream(int i, logic [ADDR_W-1:0] base, int sz, bit v = 1);
    @(negedge clk);
    cfg_valid <= 1; cfg_index <= STREAM_W'(i);
    cfg_entry <= '{valid: v, base: base, size_log2: 6'(sz)};
    model[i] = '{valid: v, base: base, size_log2: 6'(sz)};
    @(negedge clk) cfg_valid <= 0;
  endtask

  task automatic lookup(logic [ADDR_W-1:0] a);
    bit eh;
    int es;
    eh = 0; es = 0;
    for (int i = NS - 1; i >= 0; i--)
      if (model[i].valid && (a >> model[i].size_log2) == (model[i].base >> model[i].size_log2)) begin
        eh = 1; es = i;
      end
    @(negedge clk);
    addr <= a;
    #1;
    check(hit == eh, $sformatf("hit for %h", a));
    if (eh) check(int'(stream) == es, $sformatf("stream for %h: %0d exp %0d", a, stream, es));
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NS; i++) model[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    lookup(64'h8000_0000);                          // empty table: no hit
    open_stream(0, 64'h8000_0000, 20);
    open_stream(1, 64'h8010_0000, 12);
    open_stream(2, 64'h8010_0000, 16);              // overlaps stream 1
    open_stream(5, 64'hF_0000_0000, 30);
    for (int i = 0; i < NS; i++) begin
      if (model[i].valid) begin
        logic [ADDR_W-1:0] b, top;
        b   = model[i].base;
        top = b + (64'(1) << model[i].size_log2);
        lookup(b); lookup(top - 1); lookup(top); lookup(b - 1);
        lookup(b + 64'($urandom) % (top - b));
      end
    end
    for (int k = 0; k < 300; k++) lookup({$urandom_range(0, 15) == 0 ? 32'hF : 32'h0, 32'h8000_0000 + ($urandom & 32'h003F_FFFF)});
    open_stream(0, 64'h8000_0000, 20, 0);           // close stream 0
    lookup(64'h8000_1234);
    lookup(64'h8010_0040);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
