// nagare_switch: dataplane of the Nagare programmable PCIe switch.
//
// Devices push data to each other by writing to a stream's address window; the switch,
// not the host CPU, decides where each message goes. Messages from NUM_PORTS ingress
// ports are merged round robin (src_port is stamped with the ingress port), matched to
// a stream by their address (nagare_stream_table), and sent through NUM_STAGES
// match-action stages (nagare_stage) that run the stream's per-stage instructions. At the
// end the message leaves on egress port dst_port. The host CPU only configures: it opens
// a stream by writing a table entry and the stream's instructions in each stage, which
// together encode the stream's path through a chain of devices (its policy graph).
// Messages that match no stream keep the dst_port they arrived with.
//
// Latency is fixed: a message accepted in cycle t is offered on its egress port in cycle
// t + NUM_STAGES * STAGE_CYCLES (100 cycles with the defaults, 33 ns at 3 GHz), unless
// the pipeline is stalled. If the message at the end of the pipeline is not taken by
// its egress port, the whole pipeline and the ingress stop until it is (a simple
// head-of-line stall). One message per cycle otherwise.
//
// Following the source: RMT-like stage pipeline, fixed cycles per stage, per-stream
// routing configured by the CPU, address-based stream match, 10 stages of 10 cycles as
// its sizing example. This design's choices: port count, stream count, message format,
// instruction set, and the global stall.
module nagare_switch
  import nagare_pkg::*;
#(
  parameter int NUM_PORTS    = 4,
  parameter int NUM_STREAMS  = 16,
  parameter int NUM_STAGES   = 10,
  parameter int STAGE_CYCLES = 10
) (
  input  logic                clk,
  input  logic                rst_n,
  // configuration from the host CPU
  input  logic                tbl_cfg_valid,
  input  logic [STREAM_W-1:0] tbl_cfg_index,
  input  stream_entry_t       tbl_cfg_entry,
  input  logic                ins_cfg_valid,
  input  logic [7:0]          ins_cfg_stage,
  input  logic [STREAM_W-1:0] ins_cfg_stream,
  input  instr_t              ins_cfg_instr,
  // device ports
  input  logic [NUM_PORTS-1:0] in_valid,
  output logic [NUM_PORTS-1:0] in_ready,
  input  nmsg_t               in_msg  [NUM_PORTS],
  output logic [NUM_PORTS-1:0] out_valid,
  input  logic [NUM_PORTS-1:0] out_ready,
  output nmsg_t               out_msg [NUM_PORTS],
  output logic [31:0]         stall_cycles
);
  localparam int SW = $clog2(NUM_PORTS > 1 ? NUM_PORTS : 2);

  logic  arb_valid, arb_ready, en;
  nmsg_t arb_msg, head_msg;
  logic [SW-1:0] arb_sel;
  logic  hit;
  logic [STREAM_W-1:0] stream;

  logic  sv [NUM_STAGES+1];
  nmsg_t sm [NUM_STAGES+1];

  stream_rr_arb #(.N(NUM_PORTS), .T(nmsg_t)) u_ingress (
    .clk, .rst_n, .in_valid, .in_ready, .in_data(in_msg),
    .out_valid(arb_valid), .out_ready(arb_ready), .out_data(arb_msg), .out_sel(arb_sel)
  );

  nagare_stream_table #(.NUM_STREAMS(NUM_STREAMS)) u_table (
    .clk, .rst_n, .cfg_valid(tbl_cfg_valid), .cfg_index(tbl_cfg_index),
    .cfg_entry(tbl_cfg_entry), .addr(arb_msg.addr), .hit, .stream
  );

  always_comb begin
    head_msg            = arb_msg;
    head_msg.src_port   = PORT_W'(arb_sel);
    head_msg.stream_hit = hit;
    head_msg.stream     = stream;
  end

  assign sv[0]     = arb_valid;
  assign sm[0]     = head_msg;
  assign arb_ready = en;

  for (genvar g = 0; g < NUM_STAGES; g++) begin : g_stage
    nagare_stage #(.NUM_STREAMS(NUM_STREAMS), .STAGE_CYCLES(STAGE_CYCLES)) u_stage (
      .clk, .rst_n, .en,
      .cfg_valid(ins_cfg_valid && 32'(ins_cfg_stage) == g),
      .cfg_stream(ins_cfg_stream), .cfg_instr(ins_cfg_instr),
      .in_valid(sv[g]), .in_msg(sm[g]), .out_valid(sv[g+1]), .out_msg(sm[g+1])
    );
  end

  // egress
  logic tail_blocked;
  assign tail_blocked = sv[NUM_STAGES] &&
                        (32'(sm[NUM_STAGES].dst_port) >= NUM_PORTS ||
                         !out_ready[sm[NUM_STAGES].dst_port[SW-1:0]]);
  assign en = !tail_blocked;

  always_comb
    for (int p = 0; p < NUM_PORTS; p++) begin
      out_valid[p] = sv[NUM_STAGES] && 32'(sm[NUM_STAGES].dst_port) == p;
      out_msg[p]   = sm[NUM_STAGES];
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)            stall_cycles <= '0;
    else if (tail_blocked) stall_cycles <= stall_cycles + 1;

  a_port: assert property (@(posedge clk) disable iff (!rst_n)
    sv[NUM_STAGES] |-> 32'(sm[NUM_STAGES].dst_port) < NUM_PORTS);
endmodule
