// tb_nagare_switch: self-checking test of the Nagare switch dataplane at its default
// size (10 stages of 10 cycles, 4 ports, 16 streams).
//
// Sets up the accelerator chain NIC -> decryption -> inference -> NIC as three streams,
// as the host CPU would: port 1 is the NIC, port 2 the decryption accelerator, port 3
// the inference accelerator, port 0 the host. Each device pushes into the address
// window of its outgoing stream; stage 0 turns the push into a write into the next
// device's streaming buffer (back to back, wrapping at 64 KiB), stage 4 of the
// inference stream additionally offsets the address, and other stages do nothing.
// Messages outside any stream go to the port they name. The test checks every output
// against a reference model (port, address, payload, order), the fixed 100-cycle
// latency when nothing stalls, and that holding an egress port's ready low stalls the
// pipeline without losing or reordering anything.
`timescale 1ns/1ps
module tb_nagare_switch;
  import nagare_pkg::*;
  localparam int NP = 4, NSTG = 10, SC = 10, LAT = NSTG * SC;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic tbl_cfg_valid = 0, ins_cfg_valid = 0;
  logic [STREAM_W-1:0] tbl_cfg_index = 0, ins_cfg_stream = 0;
  stream_entry_t tbl_cfg_entry = '0;
  logic [7:0] ins_cfg_stage = 0;
  instr_t ins_cfg_instr = '0;
  logic [NP-1:0] in_valid = '0, in_ready, out_valid, out_ready = '1;
  nmsg_t in_msg [NP];
  nmsg_t out_msg [NP];
  logic [31:0] stall_cycles;

  nagare_switch dut (.*);

  int checks = 0, failures = 0;
  // stream s: window base, next device port, buffer base in that device
  localparam logic [ADDR_W-1:0] WIN [3] = '{64'h8000_0000, 64'h8010_0000, 64'h8020_0000};
  localparam int NEXT [3] = '{2, 3, 1};
  localparam logic [ADDR_W-1:0] BUF [3] = '{64'hA000_0000, 64'hB000_0000, 64'hC000_0000};
  localparam logic [ADDR_W-1:0] OFF2 = 64'h40;
  logic [63:0] ptr [3];
  nmsg_t exp_q [NP][$];
  int acc_q [NP][$];
  int cyc = 0, n_out = 0, n_in = 0, n_stream = 0;
  bit lat_check = 0, bp_en = 0;
  int lat_seen = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic nmsg_t model(nmsg_t m, int src);
    nmsg_t r;
    r = m;
    r.src_port = PORT_W'(src);
    r.stream_hit = 0;
    r.stream = '0;
    for (int s = 2; s >= 0; s--)
      if ((m.addr >> 20) == (WIN[s] >> 20)) begin
        r.stream_hit = 1;
        r.stream = STREAM_W'(s);
      end
    if (r.stream_hit) begin
      int s;
      s = int'(r.stream);
      r.dst_port = PORT_W'(NEXT[s]);
      r.addr = BUF[s] + ptr[s] + (s == 2 ? OFF2 : 64'h0);
      ptr[s] = (ptr[s] + 64'(m.len)) % 64'h1_0000;
    end
    return r;
  endfunction

  function automatic nmsg_t rand_msg(int src);
    nmsg_t m;
    int s;
    m = '0;
    m.kind = MSG_MEM_WR;
    m.len  = LEN_W'($urandom_range(1, 8) * 64);
    m.data = {8{$urandom}};
    if ($urandom_range(0, 4) != 0) begin
      // a push into the stream this device feeds (the NIC also feeds stream 0)
      s = (src == 1) ? 0 : (src == 2) ? 1 : (src == 3) ? 2 : int'($urandom_range(0, 2));
      m.addr = WIN[s] + 64'($urandom_range(0, 255) * 64);
      m.dst_port = 4'd0;
    end else begin
      m.addr = 64'h1_0000_0000 + 64'($urandom);
      m.dst_port = PORT_W'($urandom_range(0, NP - 1));
    end
    return m;
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      for (int p = 0; p < NP; p++) begin
        if (out_valid[p] && out_ready[p]) begin
          nmsg_t e;
          int t;
          n_out++;
          if (exp_q[p].size() == 0) check(0, $sformatf("unexpected output on port %0d", p));
          else begin
            e = exp_q[p].pop_front();
            t = acc_q[p].pop_front();
            check(out_msg[p] == e, $sformatf("port %0d output matches the model", p));
            if (lat_check) begin
              check(cyc - t == LAT, $sformatf("latency %0d cycles", cyc - t));
              lat_seen++;
            end
          end
        end
      end
      for (int p = 0; p < NP; p++) begin
        if (in_valid[p] && in_ready[p]) begin
          nmsg_t r;
          r = model(in_msg[p], p);
          if (r.stream_hit) n_stream++;
          exp_q[r.dst_port].push_back(r);
          acc_q[r.dst_port].push_back(cyc);
          n_in++;
        end
        if (!in_valid[p] || in_ready[p]) begin
          in_valid[p] <= ($urandom_range(0, 7) == 0);
          in_msg[p]   <= rand_msg(p);
        end
      end
      out_ready <= bp_en ? NP'($urandom) | NP'($urandom) : '1;
    end
  end

  task automatic cfg_stream(int s);
    instr_t i;
    @(negedge clk);
    tbl_cfg_valid <= 1; tbl_cfg_index <= STREAM_W'(s);
    tbl_cfg_entry <= '{valid: 1'b1, base: WIN[s], size_log2: 6'd20};
    @(negedge clk) tbl_cfg_valid <= 0;
    i = '0; i.op = OP_PUSH; i.port = PORT_W'(NEXT[s]); i.imm = BUF[s]; i.wrap_log2 = 6'd16;
    ins_cfg_valid <= 1; ins_cfg_stage <= 8'd0; ins_cfg_stream <= STREAM_W'(s); ins_cfg_instr <= i;
    @(negedge clk) ins_cfg_valid <= 0;
    ptr[s] = 0;
  endtask

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    instr_t i;
    for (int p = 0; p < NP; p++) in_msg[p] = '0;
    force in_valid = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 3; s++) cfg_stream(s);
    @(negedge clk);
    i = '0; i.op = OP_ADD_ADDR; i.imm = OFF2;
    ins_cfg_valid <= 1; ins_cfg_stage <= 8'd4; ins_cfg_stream <= 4'd2; ins_cfg_instr <= i;
    @(negedge clk) ins_cfg_valid <= 0;
    lat_check = 1;
    release in_valid;
    repeat (1500) @(posedge clk);
    lat_check = 0;
    bp_en = 1;
    repeat (3000) @(posedge clk);
    bp_en = 0;
    force in_valid = '0;
    repeat (LAT + 20) @(posedge clk);
    for (int p = 0; p < NP; p++) check(exp_q[p].size() == 0, $sformatf("port %0d drained", p));
    check(n_out == n_in && n_in > 500, $sformatf("%0d in, %0d out", n_in, n_out));
    check(n_stream > 300, "stream traffic exercised");
    check(lat_seen > 100, "latency measured");
    check(stall_cycles > 0, $sformatf("egress back-pressure stalled the pipeline %0d cycles", stall_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
