// enso_pipe_manager: the NIC side of the RX Enso Pipes.
//
// An Enso Pipe is a ring buffer of data in host memory. The NIC appends incoming
// messages back to back at the pipe's Tail_NIC; software consumes from Head_SW and
// returns space by writing its new Head_SW to an MMIO register. This block keeps both
// pointers of every pipe and turns flit k of an accepted message into one DMA write at
// base + (Tail_NIC + k) * 64 bytes. Tail_NIC moves past the message only when the DMA
// write of its last flit is accepted, so a tail seen by the notification logic always
// ends on a message boundary and never runs ahead of the data it covers.
//
// Input: a stream of flits already steered to a pipe (in_pipe), with in_sop/in_eop
// framing and the message length in flits on the first flit. A message that does not
// fit in the free space of its pipe is dropped whole (all its flits are consumed and
// counted in drop_count), so a pipe never holds part of a message. One ring slot stays
// empty to tell a full ring from an empty one: capacity is 2**RING_LOG2 - 1 flits.
//
// Timing: in_ready follows dma_ready combinationally (or is 1 while dropping); one
// flit per cycle. Head, tail and base registers reset to zero.
//
// Following the source: data rings, contiguous placement, Head_SW/Tail_NIC ownership,
// MMIO head updates. This design's choices: flit granularity, ring size, per-pipe base
// registers, the number of pipes and whole-message drop when a pipe is full.
module enso_pipe_manager
  import enso_pkg::*;
#(
  parameter int NUM_PIPES = 16,
  parameter int RING_LOG2 = 15        // 2**15 flits = 2 MiB per pipe
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // configuration and software pointer updates (from MMIO)
  input  logic                 base_wr_valid,
  input  logic [PIPE_ID_W-1:0] base_wr_pipe,
  input  logic [ADDR_W-1:0]    base_wr_addr,
  input  logic                 head_wr_valid,
  input  logic [PIPE_ID_W-1:0] head_wr_pipe,
  input  logic [PTR_W-1:0]     head_wr_value,
  // incoming messages
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [PIPE_ID_W-1:0] in_pipe,
  input  logic                 in_sop,
  input  logic                 in_eop,
  input  logic [LEN_W-1:0]     in_len,
  input  logic [DATA_W-1:0]    in_data,
  // DMA writes of data flits
  output logic                 dma_valid,
  input  logic                 dma_ready,
  output dma_wr_t              dma,
  // pointer state for the notification logic
  output logic [NUM_PIPES-1:0][RING_LOG2-1:0] tail_o,
  output logic [NUM_PIPES-1:0][RING_LOG2-1:0] head_o,
  output logic [31:0]          drop_count,
  output logic [31:0]          accept_count
);
  localparam int PW = $clog2(NUM_PIPES > 1 ? NUM_PIPES : 2);

  logic [ADDR_W-1:0]    base_q [NUM_PIPES];
  logic [RING_LOG2-1:0] head_q [NUM_PIPES];
  logic [RING_LOG2-1:0] tail_q [NUM_PIPES];

  logic                 in_msg_q;    // inside a message (after its first flit)
  logic                 drop_q;      // current message is being dropped
  logic [PW-1:0]        msg_pipe_q;
  logic [RING_LOG2-1:0] off_q;       // flit offset inside the current message

  logic [PW-1:0]        pidx;
  logic [RING_LOG2-1:0] used, free_flits;
  logic                 fits, dropping;

  // The pipe of a message is taken from its first flit; later flits follow it.
  assign pidx       = in_sop ? PW'(in_pipe) : msg_pipe_q;
  assign used       = tail_q[pidx] - head_q[pidx];
  assign free_flits = {RING_LOG2{1'b1}} - used;
  assign fits       = (in_len != '0) && (32'(in_len) <= 32'(free_flits));
  assign dropping   = in_sop ? !fits : drop_q;

  assign dma_valid  = in_valid && !dropping;
  assign in_ready   = dropping ? 1'b1 : dma_ready;
  assign dma.addr   = base_q[pidx] + (ADDR_W'(RING_LOG2'(tail_q[pidx] + off_q)) << FLIT_SHIFT);
  assign dma.data   = in_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NUM_PIPES; p++) begin
        base_q[p] <= '0;
        head_q[p] <= '0;
        tail_q[p] <= '0;
      end
      in_msg_q     <= 1'b0;
      drop_q       <= 1'b0;
      msg_pipe_q   <= '0;
      off_q        <= '0;
      drop_count   <= '0;
      accept_count <= '0;
    end else begin
      if (base_wr_valid) base_q[PW'(base_wr_pipe)] <= base_wr_addr;
      if (head_wr_valid) head_q[PW'(head_wr_pipe)] <= RING_LOG2'(head_wr_value);
      if (in_valid && in_ready) begin
        if (in_sop) begin
          msg_pipe_q <= PW'(in_pipe);
          drop_q     <= !fits;
          if (fits) accept_count <= accept_count + 1;
          else      drop_count   <= drop_count + 1;
        end
        in_msg_q <= !in_eop;
        if (!dropping) begin
          if (in_eop) begin
            tail_q[pidx] <= tail_q[pidx] + off_q + 1'b1;
            off_q        <= '0;
          end else begin
            off_q        <= off_q + 1'b1;
          end
        end
      end
    end
  end

  always_comb
    for (int p = 0; p < NUM_PIPES; p++) begin
      tail_o[p] = tail_q[p];
      head_o[p] = head_q[p];
    end

  // A message starts with in_sop exactly when no message is open.
  a_sop: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> (in_sop == !in_msg_q));
  a_pipe: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid && in_sop |-> 32'(in_pipe) < NUM_PIPES);
endmodule
