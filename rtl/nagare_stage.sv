// nagare_stage: one match-action stage of the Nagare switch pipeline.
//
// Each stage holds, for every stream, one instruction and one 64-bit register. A
// message that belongs to a stream runs that stream's instruction as it enters the
// stage; messages outside any stream pass unchanged. Instructions (nagare_pkg::op_e)
// rewrite message fields or use the register:
//   OP_SET_DST  route the message to a given port
//   OP_SET_ADDR / OP_ADD_ADDR  retarget or offset its address
//   OP_SET_KIND convert it to another message kind
//   OP_PUSH     route to a port and place the payload at imm + reg, then advance reg by
//               the payload length modulo 2**wrap_log2. This is the streaming buffer:
//               consecutive pushes of one stream land back to back in the receiving
//               device's ring without any per-message pointer exchange.
// Every stage takes exactly STAGE_CYCLES cycles: the instruction's result is registered
// and then delayed by STAGE_CYCLES - 1 more registers, so the pipeline latency is fixed.
// en = 0 freezes the stage (back-pressure from the outputs); a message is accepted and
// its register update made only in cycles with en = 1. One message per cycle.
//
// Following the source: fixed cycles per stage, instructions that read message fields
// or registers and write fields or registers, per-stream state, 10 cycles per stage.
// The instruction set and its encoding are this design's own.
module nagare_stage
  import nagare_pkg::*;
#(
  parameter int NUM_STREAMS  = 16,
  parameter int STAGE_CYCLES = 10
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  // configuration (host CPU); writing an instruction clears the stream's register
  input  logic                cfg_valid,
  input  logic [STREAM_W-1:0] cfg_stream,
  input  instr_t              cfg_instr,
  input  logic                in_valid,
  input  nmsg_t               in_msg,
  output logic                out_valid,
  output nmsg_t               out_msg
);
  instr_t      imem_q [NUM_STREAMS];
  logic [63:0] reg_q  [NUM_STREAMS];

  logic        vpipe [STAGE_CYCLES];
  nmsg_t       mpipe [STAGE_CYCLES];

  instr_t      ins;
  nmsg_t       res;
  logic        exec;
  logic [63:0] reg_next;

  assign exec = in_valid && in_msg.stream_hit && 32'(in_msg.stream) < NUM_STREAMS;
  assign ins  = exec ? imem_q[in_msg.stream] : '0;

  always_comb begin
    res      = in_msg;
    reg_next = '0;
    if (exec) begin
      unique case (ins.op)
        OP_SET_DST:  res.dst_port = ins.port;
        OP_SET_ADDR: res.addr     = ins.imm;
        OP_ADD_ADDR: res.addr     = in_msg.addr + ins.imm;
        OP_SET_KIND: res.kind     = ins.kind;
        OP_PUSH: begin
          res.dst_port = ins.port;
          res.addr     = ins.imm + reg_q[in_msg.stream];
          reg_next     = (reg_q[in_msg.stream] + 64'(in_msg.len)) &
                         ((64'(1) << ins.wrap_log2) - 1'b1);
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NUM_STREAMS; s++) begin
        imem_q[s] <= '0;
        reg_q[s]  <= '0;
      end
      for (int i = 0; i < STAGE_CYCLES; i++) begin
        vpipe[i] <= 1'b0;
        mpipe[i] <= '0;
      end
    end else begin
      if (en) begin
        if (exec && ins.op == OP_PUSH) reg_q[in_msg.stream] <= reg_next;
        vpipe[0] <= in_valid;
        mpipe[0] <= res;
        for (int i = 1; i < STAGE_CYCLES; i++) begin
          vpipe[i] <= vpipe[i-1];
          mpipe[i] <= mpipe[i-1];
        end
      end
      if (cfg_valid && 32'(cfg_stream) < NUM_STREAMS) begin
        imem_q[cfg_stream] <= cfg_instr;
        reg_q[cfg_stream]  <= '0;
      end
    end
  end

  assign out_valid = vpipe[STAGE_CYCLES-1];
  assign out_msg   = mpipe[STAGE_CYCLES-1];
endmodule
