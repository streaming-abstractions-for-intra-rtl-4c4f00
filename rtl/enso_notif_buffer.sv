// enso_notif_buffer: writes RX notifications into the notification ring in host memory.
//
// Software does not poll the data rings; it polls one ring of notification records,
// each naming a pipe and that pipe's new Tail_NIC. This block owns the tail of that
// ring: each accepted notification becomes one DMA write of a 64-byte record at
// base + tail * 64, and the tail advances. Software returns slots by writing the ring's
// head (MMIO). While the ring is full (tail + 1 == head) no notification is accepted,
// which holds the notification engine back; data writes are not affected.
//
// Record layout (this design's choice): rx_notif_t in the low bits of the flit,
// signal = 1 in a fresh record, the rest zero. Ring size 2**RING_LOG2 records.
// Timing: notif_ready follows dma_ready combinationally; one record per cycle.
module enso_notif_buffer
  import enso_pkg::*;
#(
  parameter int RING_LOG2 = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              base_wr_valid,
  input  logic [ADDR_W-1:0] base_wr_addr,
  input  logic              head_wr_valid,
  input  logic [PTR_W-1:0]  head_wr_value,
  input  logic              notif_valid,
  output logic              notif_ready,
  input  rx_notif_t         notif,
  output logic              dma_valid,
  input  logic              dma_ready,
  output dma_wr_t           dma,
  output logic              full,
  output logic [31:0]       full_cycles
);
  logic [ADDR_W-1:0]    base_q;
  logic [RING_LOG2-1:0] head_q, tail_q;

  assign full        = (tail_q + 1'b1) == head_q;
  assign dma_valid   = notif_valid && !full;
  assign notif_ready = dma_ready && !full;
  assign dma.addr    = base_q + (ADDR_W'(tail_q) << FLIT_SHIFT);
  assign dma.data    = DATA_W'(notif);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      base_q      <= '0;
      head_q      <= '0;
      tail_q      <= '0;
      full_cycles <= '0;
    end else begin
      if (base_wr_valid) base_q <= base_wr_addr;
      if (head_wr_valid) head_q <= RING_LOG2'(head_wr_value);
      if (dma_valid && dma_ready) tail_q <= tail_q + 1'b1;
      if (notif_valid && full) full_cycles <= full_cycles + 1;
    end
  end
endmodule
