// tb_nagare_stage: self-checking test of one match-action stage.
//
// Four streams, each with a different instruction (route, offset the address, convert
// the kind, push into a streaming buffer that wraps at 4 KiB), plus messages that match
// no stream. A reference model computes each message's expected result as it is
// accepted, including the running push pointer, and the test compares the stage output
// in order. It checks the fixed latency of STAGE_CYCLES cycles with en held high, and
// that en = 0 freezes the stage without losing or duplicating messages.
`timescale 1ns/1ps
module tb_nagare_stage;
  import nagare_pkg::*;
  localparam int NS = 4, SC = 10;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic en = 1, cfg_valid = 0, in_valid = 0, out_valid;
  logic [STREAM_W-1:0] cfg_stream = 0;
  instr_t cfg_instr = '0;
  nmsg_t in_msg = '0, out_msg;

  nagare_stage #(.NUM_STREAMS(NS), .STAGE_CYCLES(SC)) dut (.*);

  int checks = 0, failures = 0;
  instr_t prog [NS];
  logic [63:0] preg [NS];
  nmsg_t exp_q [$];
  int acc_cyc [$];
  int cyc = 0, n_out = 0;
  bit rand_en = 0, lat_check = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic nmsg_t model(nmsg_t m);
    nmsg_t r;
    instr_t i;
    r = m;
    if (!m.stream_hit) return r;
    i = prog[m.stream];
    case (i.op)
      OP_SET_DST:  r.dst_port = i.port;
      OP_SET_ADDR: r.addr = i.imm;
      OP_ADD_ADDR: r.addr = m.addr + i.imm;
      OP_SET_KIND: r.kind = i.kind;
      OP_PUSH: begin
        r.dst_port = i.port;
        r.addr = i.imm + preg[m.stream];
        preg[m.stream] = (preg[m.stream] + 64'(m.len)) % (64'(1) << i.wrap_log2);
      end
      default: ;
    endcase
    return r;
  endfunction

  function automatic nmsg_t rand_msg();
    nmsg_t m;
    m = '0;
    m.kind       = MSG_MEM_WR;
    m.addr       = {$urandom, $urandom};
    m.len        = LEN_W'($urandom_range(1, 16) * 64);
    m.src_port   = PORT_W'($urandom_range(0, 3));
    m.dst_port   = PORT_W'($urandom_range(0, 3));
    m.stream_hit = ($urandom_range(0, 4) != 0);
    m.stream     = STREAM_W'($urandom_range(0, NS - 1));
    m.data       = {8{$urandom}};
    return m;
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (en && out_valid) begin
        nmsg_t e;
        int t;
        e = exp_q.pop_front();
        t = acc_cyc.pop_front();
        n_out++;
        check(out_msg == e, $sformatf("output %0d matches the model", n_out));
        if (lat_check) check(cyc - t == SC, $sformatf("latency %0d", cyc - t));
      end
      if (en && in_valid) begin
        exp_q.push_back(model(in_msg));
        acc_cyc.push_back(cyc);
      end
      en       <= rand_en ? ($urandom_range(0, 3) != 0) : 1'b1;
      in_valid <= ($urandom_range(0, 3) != 0) || (en == 1'b0 && in_valid);
      if (!(in_valid && !en)) in_msg <= rand_msg();
    end
  end

  task automatic load_instr(int s, instr_t i);
    @(negedge clk);
    cfg_valid <= 1; cfg_stream <= STREAM_W'(s); cfg_instr <= i;
    prog[s] = i;
    preg[s] = '0;
    @(negedge clk) cfg_valid <= 0;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    instr_t i;
    rst_n = 0;
    force in_valid = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    i = '0; i.op = OP_SET_DST;  i.port = 4'd3;                            load_instr(0, i);
    i = '0; i.op = OP_ADD_ADDR; i.imm = 64'h1000;                         load_instr(1, i);
    i = '0; i.op = OP_SET_KIND; i.kind = MSG_MSG;                         load_instr(2, i);
    i = '0; i.op = OP_PUSH; i.port = 4'd2; i.imm = 64'hA000_0000; i.wrap_log2 = 6'd12; load_instr(3, i);
    @(negedge clk);
    lat_check = 1;
    release in_valid;
    repeat (300) @(posedge clk);
    lat_check = 0;
    rand_en = 1;
    repeat (1500) @(posedge clk);
    rand_en = 0;
    force in_valid = 1'b0;
    repeat (SC + 5) @(posedge clk);
    check(exp_q.size() == 0, "every accepted message came out");
    check(n_out > 1000, $sformatf("%0d messages", n_out));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
