// enso_pkg: types and constants shared by the Enso NIC blocks.
//
// Enso replaces the descriptor rings of a conventional NIC with rings that hold the
// data itself (an "Enso Pipe"), plus a separate ring of notifications that tell the
// host how far the NIC has written into each pipe. Every host-memory transfer in this
// RTL is one flit: DATA_W bits, i.e. one 64-byte cache line. Pointers into the
// rings count flits, not bytes.
//
// The flit width, the field widths and the layout of the notification records are
// this design's choices; the source describes what a notification means (which pipe,
// and the new tail of that pipe) but not its encoding.
package enso_pkg;

  localparam int ADDR_W     = 64;       // host physical address
  localparam int DATA_W     = 512;      // one flit = one 64-byte cache line
  localparam int FLIT_BYTES = DATA_W / 8;
  localparam int FLIT_SHIFT = $clog2(FLIT_BYTES);
  localparam int PIPE_ID_W  = 16;       // pipe index field in records and MMIO
  localparam int PTR_W      = 32;       // flit pointer field in records and MMIO
  localparam int LEN_W      = 16;       // message length in flits

  // One posted DMA write of one flit towards host memory.
  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] data;
  } dma_wr_t;

  // One DMA read request of len_flits consecutive flits starting at addr.
  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    logic [LEN_W-1:0]  len_flits;
  } dma_rd_req_t;

  // RX notification record, written by the NIC into the RX notification ring.
  // signal = 1 marks a freshly written record; the host clears it after reading.
  typedef struct packed {
    logic                 signal;
    logic [PIPE_ID_W-1:0] pipe;
    logic [PTR_W-1:0]     tail;
  } rx_notif_t;

  // TX notification record, written by the host into the TX notification ring.
  // signal = 1: data waiting to be sent. The NIC overwrites the record with
  // signal = 0 once the data has been transmitted (the completion).
  typedef struct packed {
    logic              signal;
    logic [ADDR_W-1:0] addr;
    logic [LEN_W-1:0]  len_flits;
  } tx_notif_t;

  localparam int RX_NOTIF_W = $bits(rx_notif_t);
  localparam int TX_NOTIF_W = $bits(tx_notif_t);

  // MMIO register map of the NIC (byte offsets inside its BAR, 8-byte registers).
  // Region selected by mmio_addr[19:16]; inside the per-pipe regions the pipe index is
  // mmio_addr[15:3].
  localparam logic [3:0] MMIO_RGN_PIPE_HEAD = 4'h0; // data = new Head_SW (flits)
  localparam logic [3:0] MMIO_RGN_PIPE_BASE = 4'h1; // data = pipe buffer base address
  localparam logic [3:0] MMIO_RGN_GLOBAL    = 4'h2;
  localparam logic [15:0] MMIO_RX_NOTIF_HEAD = 16'h0000; // host consumed RX notifications
  localparam logic [15:0] MMIO_RX_NOTIF_BASE = 16'h0008;
  localparam logic [15:0] MMIO_TX_NOTIF_TAIL = 16'h0010; // host queued TX notifications
  localparam logic [15:0] MMIO_TX_NOTIF_BASE = 16'h0018;
  localparam logic [15:0] MMIO_PREFETCH      = 16'h0020; // data = pipe to notify now

endpackage
