// stream_rr_arb: round-robin merge of N valid/ready streams of one payload type.
//
// Used where several sources share one outlet: the Enso NIC's RX data writes, RX
// notification writes and TX completion writes share the single DMA write port, and
// the Nagare switch's ingress ports share its stage pipeline. Every transfer is a
// single beat, so the arbiter may switch source after any beat.
//
// Policy: the search for the next grant starts one past the input granted last. Once
// the output is offered (out_valid) and not yet taken, the grant is held, so out_data
// stays stable until out_ready; this keeps the valid/ready rule on the outlet.
// Combinational from in_valid/in_data to out_*, and from out_ready to in_ready.
// The source names no arbitration policy; round robin is this design's choice.
module stream_rr_arb #(
  parameter int  N = 2,
  parameter type T = logic [7:0]
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] in_valid,
  output logic [N-1:0] in_ready,
  input  T             in_data [N],
  output logic         out_valid,
  input  logic         out_ready,
  output T             out_data,
  output logic [$clog2(N > 1 ? N : 2)-1:0] out_sel
);
  localparam int IW = $clog2(N > 1 ? N : 2);

  logic [IW-1:0] last_q;      // input granted most recently
  logic          hold_q;      // output offered but not taken last cycle
  logic [IW-1:0] held_q;
  logic [IW-1:0] pick;
  logic          any;

  // Round robin: the lowest requesting index above the last grant wins,
  // otherwise the lowest requesting index overall.
  always_comb begin
    pick = '0;
    any  = 1'b0;
    for (int i = N - 1; i >= 0; i--) begin
      if (in_valid[i]) begin
        pick = IW'(i);
        any  = 1'b1;
      end
    end
    for (int i = N - 1; i >= 0; i--) begin
      if (in_valid[i] && (IW'(i) > last_q)) pick = IW'(i);
    end
    if (hold_q) begin
      pick = held_q;
      any  = 1'b1;
    end
  end

  assign out_sel   = pick;
  assign out_valid = any;
  assign out_data  = in_data[pick];

  always_comb begin
    in_ready = '0;
    if (any) in_ready[pick] = out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_q <= IW'(N - 1);
      hold_q <= 1'b0;
      held_q <= '0;
    end else begin
      hold_q <= any && !out_ready;
      held_q <= pick;
      if (any && out_ready) last_q <= pick;
    end
  end

  // A source must keep offering its beat until it is taken.
  for (genvar i = 0; i < N; i++) begin : g_chk
    a_hold: assert property (@(posedge clk) disable iff (!rst_n)
      in_valid[i] && !in_ready[i] |=> in_valid[i]);
  end
endmodule
