// enso_notif_engine: decides when the NIC tells software about new data in a pipe.
//
// Enso sends notifications reactively: at most one notification per pipe is in flight.
// A pipe becomes eligible when its Tail_NIC has moved past the tail last reported for
// it and software has reacted to that last report. Software "reacts" by writing the
// pipe's Head_SW register. Any number of messages that land in a pipe meanwhile are
// covered by the single next notification, which carries the newest tail; under load
// this coalesces many messages into one notification, at low load it gives one
// notification per message.
//
// Notification prefetching (compile-time option PREFETCH_EN, off by default as in the
// source): software may ask for a notification about a pipe it will read next (MMIO
// write of the pipe number). The request makes that pipe eligible at once, whether or
// not a notification is outstanding or new data has arrived, so software never waits a
// full round trip when it moves to the next pipe.
//
// Eligible pipes are served round robin. The chosen notification sits in an output
// register until notif_ready; the tail it carries is the one sampled when it was loaded.
// One notification can leave per cycle. State resets to "nothing reported, nothing
// outstanding".
//
// Following the source: reactive notifications, notification coalescing, prefetch
// requests, prefetch off by default. This design's choices: the exact rule that a
// Head_SW write re-arms a pipe, and the round-robin order.
module enso_notif_engine
  import enso_pkg::*;
#(
  parameter int NUM_PIPES   = 16,
  parameter int RING_LOG2   = 15,
  parameter bit PREFETCH_EN = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NUM_PIPES-1:0][RING_LOG2-1:0] tail_i,
  input  logic                 head_wr_valid,
  input  logic [PIPE_ID_W-1:0] head_wr_pipe,
  input  logic                 prefetch_valid,
  input  logic [PIPE_ID_W-1:0] prefetch_pipe,
  output logic                 notif_valid,
  input  logic                 notif_ready,
  output rx_notif_t            notif,
  output logic [31:0]          notif_count,
  output logic [31:0]          prefetch_count   // prefetch requests received
);
  localparam int PW = $clog2(NUM_PIPES > 1 ? NUM_PIPES : 2);

  logic [RING_LOG2-1:0] reported_q [NUM_PIPES];
  logic [NUM_PIPES-1:0] outstanding_q;
  logic [NUM_PIPES-1:0] force_q;
  logic [NUM_PIPES-1:0] eligible;
  logic [PW-1:0]        last_q, pick;
  logic                 any;
  logic                 load;

  always_comb
    for (int p = 0; p < NUM_PIPES; p++)
      eligible[p] = force_q[p] || ((tail_i[p] != reported_q[p]) && !outstanding_q[p]);

  // Round robin: the lowest eligible pipe above the last one served wins,
  // otherwise the lowest eligible pipe overall.
  always_comb begin
    pick = '0;
    any  = 1'b0;
    for (int p = NUM_PIPES - 1; p >= 0; p--) begin
      if (eligible[p]) begin
        pick = PW'(p);
        any  = 1'b1;
      end
    end
    for (int p = NUM_PIPES - 1; p >= 0; p--) begin
      if (eligible[p] && (PW'(p) > last_q)) pick = PW'(p);
    end
  end

  assign load = any && (!notif_valid || notif_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NUM_PIPES; p++) reported_q[p] <= '0;
      outstanding_q  <= '0;
      force_q        <= '0;
      last_q         <= PW'(NUM_PIPES - 1);
      notif_valid    <= 1'b0;
      notif          <= '0;
      notif_count    <= '0;
      prefetch_count <= '0;
    end else begin
      if (notif_valid && notif_ready) notif_valid <= 1'b0;
      // software reacted to the last notification of this pipe
      if (head_wr_valid) outstanding_q[PW'(head_wr_pipe)] <= 1'b0;
      if (prefetch_valid) prefetch_count <= prefetch_count + 1;
      if (PREFETCH_EN && prefetch_valid) force_q[PW'(prefetch_pipe)] <= 1'b1;
      if (load) begin
        notif_valid          <= 1'b1;
        notif.signal         <= 1'b1;
        notif.pipe           <= PIPE_ID_W'(pick);
        notif.tail           <= PTR_W'(tail_i[pick]);
        reported_q[pick]     <= tail_i[pick];
        outstanding_q[pick]  <= 1'b1;
        force_q[pick]        <= 1'b0;
        last_q               <= pick;
        notif_count          <= notif_count + 1;
      end
    end
  end

  a_stable: assert property (@(posedge clk) disable iff (!rst_n)
    notif_valid && !notif_ready |=> notif_valid && $stable(notif));
endmodule
