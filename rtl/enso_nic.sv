// enso_nic: host interface of an Enso NIC.
//
// Joins the RX pipe manager, the reactive notification engine, the RX notification
// ring writer and the TX engine, decodes the MMIO writes that software uses to drive
// them, and merges their DMA writes onto one port with a round-robin arbiter.
//
//   RX: rx_* flits (already steered to a pipe) -> enso_pipe_manager -> DMA write of
//       data; Tail_NIC moves -> enso_notif_engine -> enso_notif_buffer -> DMA write of
//       a notification record. A notification can only be produced after the data
//       writes it covers have been accepted by the arbiter, and the arbiter keeps
//       order, so data always reaches the host link ahead of its notification.
//   TX: MMIO tail write -> enso_tx_engine -> DMA reads of record and data -> tx_*
//       flits; the completion is a DMA write through the same arbiter.
//
// MMIO map (byte address, 8-byte registers; enso_pkg holds the constants):
//   0x0_0000 + 8*p : Head_SW of RX pipe p (flits). Also re-arms notifications of p.
//   0x1_0000 + 8*p : base address of RX pipe p's ring.
//   0x2_0000       : head of the RX notification ring (records consumed by software)
//   0x2_0008       : base address of the RX notification ring
//   0x2_0010       : tail of the TX notification ring (records queued by software)
//   0x2_0018       : base address of the TX notification ring
//   0x2_0020       : notification prefetch request, data = pipe (needs PREFETCH_EN)
// The register map is this design's own. The demultiplexing of packets to pipes
// (RSS or flow rules) is outside this block: rx_pipe arrives with each message.
module enso_nic
  import enso_pkg::*;
#(
  parameter int NUM_PIPES       = 16,
  parameter int PIPE_RING_LOG2  = 15,
  parameter int NOTIF_RING_LOG2 = 10,
  parameter int TX_RING_LOG2    = 10,
  parameter bit PREFETCH_EN     = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // MMIO writes from the host
  input  logic                 mmio_wr_valid,
  input  logic [19:0]          mmio_addr,
  input  logic [63:0]          mmio_data,
  // messages from the network, steered to a pipe
  input  logic                 rx_valid,
  output logic                 rx_ready,
  input  logic [PIPE_ID_W-1:0] rx_pipe,
  input  logic                 rx_sop,
  input  logic                 rx_eop,
  input  logic [LEN_W-1:0]     rx_len,
  input  logic [DATA_W-1:0]    rx_data,
  // DMA towards host memory
  output logic                 dma_wr_valid,
  input  logic                 dma_wr_ready,
  output dma_wr_t              dma_wr,
  output logic                 dma_rd_req_valid,
  input  logic                 dma_rd_req_ready,
  output dma_rd_req_t          dma_rd_req,
  input  logic                 dma_rd_cpl_valid,
  output logic                 dma_rd_cpl_ready,
  input  logic [DATA_W-1:0]    dma_rd_cpl_data,
  // messages to the network
  output logic                 tx_valid,
  input  logic                 tx_ready,
  output logic                 tx_sop,
  output logic                 tx_eop,
  output logic [DATA_W-1:0]    tx_data,
  // statistics
  output logic [31:0]          rx_accept_count,
  output logic [31:0]          rx_drop_count,
  output logic [31:0]          notif_count,
  output logic [31:0]          prefetch_count,
  output logic [31:0]          notif_full_cycles,
  output logic [31:0]          tx_sent_count
);
  // ---- MMIO decode
  logic [3:0]  rgn;
  logic [15:0] off;
  logic        wr_head, wr_base, wr_nhead, wr_nbase, wr_ttail, wr_tbase, wr_pref;

  assign rgn      = mmio_addr[19:16];
  assign off      = mmio_addr[15:0];
  assign wr_head  = mmio_wr_valid && rgn == MMIO_RGN_PIPE_HEAD;
  assign wr_base  = mmio_wr_valid && rgn == MMIO_RGN_PIPE_BASE;
  assign wr_nhead = mmio_wr_valid && rgn == MMIO_RGN_GLOBAL && off == MMIO_RX_NOTIF_HEAD;
  assign wr_nbase = mmio_wr_valid && rgn == MMIO_RGN_GLOBAL && off == MMIO_RX_NOTIF_BASE;
  assign wr_ttail = mmio_wr_valid && rgn == MMIO_RGN_GLOBAL && off == MMIO_TX_NOTIF_TAIL;
  assign wr_tbase = mmio_wr_valid && rgn == MMIO_RGN_GLOBAL && off == MMIO_TX_NOTIF_BASE;
  assign wr_pref  = mmio_wr_valid && rgn == MMIO_RGN_GLOBAL && off == MMIO_PREFETCH;

  logic [PIPE_ID_W-1:0] mmio_pipe;
  assign mmio_pipe = PIPE_ID_W'(off[15:3]);

  // ---- RX
  logic [NUM_PIPES-1:0][PIPE_RING_LOG2-1:0] tails;
  logic [2:0] wr_valid, wr_ready;
  dma_wr_t    wr_data [3];
  logic       notif_valid, notif_ready;
  rx_notif_t  notif;
  logic [1:0] wr_sel;

  enso_pipe_manager #(.NUM_PIPES(NUM_PIPES), .RING_LOG2(PIPE_RING_LOG2)) u_pipes (
    .clk, .rst_n,
    .base_wr_valid(wr_base), .base_wr_pipe(mmio_pipe), .base_wr_addr(mmio_data),
    .head_wr_valid(wr_head), .head_wr_pipe(mmio_pipe), .head_wr_value(PTR_W'(mmio_data)),
    .in_valid(rx_valid), .in_ready(rx_ready), .in_pipe(rx_pipe), .in_sop(rx_sop),
    .in_eop(rx_eop), .in_len(rx_len), .in_data(rx_data),
    .dma_valid(wr_valid[0]), .dma_ready(wr_ready[0]), .dma(wr_data[0]),
    .tail_o(tails), .head_o(),
    .drop_count(rx_drop_count), .accept_count(rx_accept_count)
  );

  enso_notif_engine #(.NUM_PIPES(NUM_PIPES), .RING_LOG2(PIPE_RING_LOG2),
                      .PREFETCH_EN(PREFETCH_EN)) u_notif (
    .clk, .rst_n, .tail_i(tails),
    .head_wr_valid(wr_head), .head_wr_pipe(mmio_pipe),
    .prefetch_valid(wr_pref), .prefetch_pipe(PIPE_ID_W'(mmio_data)),
    .notif_valid, .notif_ready, .notif,
    .notif_count, .prefetch_count
  );

  enso_notif_buffer #(.RING_LOG2(NOTIF_RING_LOG2)) u_nbuf (
    .clk, .rst_n,
    .base_wr_valid(wr_nbase), .base_wr_addr(mmio_data),
    .head_wr_valid(wr_nhead), .head_wr_value(PTR_W'(mmio_data)),
    .notif_valid, .notif_ready, .notif,
    .dma_valid(wr_valid[1]), .dma_ready(wr_ready[1]), .dma(wr_data[1]),
    .full(), .full_cycles(notif_full_cycles)
  );

  // ---- TX
  enso_tx_engine #(.RING_LOG2(TX_RING_LOG2)) u_tx (
    .clk, .rst_n,
    .base_wr_valid(wr_tbase), .base_wr_addr(mmio_data),
    .tail_wr_valid(wr_ttail), .tail_wr_value(PTR_W'(mmio_data)),
    .rd_req_valid(dma_rd_req_valid), .rd_req_ready(dma_rd_req_ready), .rd_req(dma_rd_req),
    .rd_cpl_valid(dma_rd_cpl_valid), .rd_cpl_ready(dma_rd_cpl_ready), .rd_cpl_data(dma_rd_cpl_data),
    .dma_valid(wr_valid[2]), .dma_ready(wr_ready[2]), .dma(wr_data[2]),
    .tx_valid, .tx_ready, .tx_sop, .tx_eop, .tx_data, .sent_count(tx_sent_count)
  );

  // ---- one DMA write port
  stream_rr_arb #(.N(3), .T(dma_wr_t)) u_arb (
    .clk, .rst_n,
    .in_valid(wr_valid), .in_ready(wr_ready), .in_data(wr_data),
    .out_valid(dma_wr_valid), .out_ready(dma_wr_ready), .out_data(dma_wr), .out_sel(wr_sel)
  );
endmodule
