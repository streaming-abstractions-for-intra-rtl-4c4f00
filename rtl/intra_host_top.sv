// intra_host_top: the two streaming interfaces of this design, side by side.
//
//  * enso_nic      - a NIC host interface built on Enso Pipes: data rings in host memory
//                    instead of descriptor rings, reactive notifications, optional
//                    notification prefetching, and a TX path that completes by
//                    overwriting the host's TX notification.
//  * nagare_switch - the dataplane of a programmable PCIe switch that matches pushed
//                    messages to streams by address and routes them through a fixed-
//                    latency pipeline of per-stream instructions.
// They are independent designs and share only clock and reset; each has its own ports,
// named with an enso_ or nagare_ prefix. Host memory, the PCIe core, the Ethernet MAC and
// the flow steering that assigns a pipe to each received message are outside: their
// signals are ports. All parameters keep their defaults.
module intra_host_top
  import enso_pkg::*;
  import nagare_pkg::*;
#(
  parameter int ENSO_NUM_PIPES       = 16,
  parameter int ENSO_PIPE_RING_LOG2  = 15,
  parameter int ENSO_NOTIF_RING_LOG2 = 10,
  parameter int ENSO_TX_RING_LOG2    = 10,
  parameter bit ENSO_PREFETCH_EN     = 1'b0,
  parameter int NAGARE_NUM_PORTS     = 4,
  parameter int NAGARE_NUM_STREAMS   = 16,
  parameter int NAGARE_NUM_STAGES    = 10,
  parameter int NAGARE_STAGE_CYCLES  = 10
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // ---- Enso NIC
  input  logic                 enso_mmio_wr_valid,
  input  logic [19:0]          enso_mmio_addr,
  input  logic [63:0]          enso_mmio_data,
  input  logic                 enso_rx_valid,
  output logic                 enso_rx_ready,
  input  logic [enso_pkg::PIPE_ID_W-1:0] enso_rx_pipe,
  input  logic                 enso_rx_sop,
  input  logic                 enso_rx_eop,
  input  logic [enso_pkg::LEN_W-1:0]  enso_rx_len,
  input  logic [enso_pkg::DATA_W-1:0] enso_rx_data,
  output logic                 enso_dma_wr_valid,
  input  logic                 enso_dma_wr_ready,
  output dma_wr_t              enso_dma_wr,
  output logic                 enso_dma_rd_req_valid,
  input  logic                 enso_dma_rd_req_ready,
  output dma_rd_req_t          enso_dma_rd_req,
  input  logic                 enso_dma_rd_cpl_valid,
  output logic                 enso_dma_rd_cpl_ready,
  input  logic [enso_pkg::DATA_W-1:0] enso_dma_rd_cpl_data,
  output logic                 enso_tx_valid,
  input  logic                 enso_tx_ready,
  output logic                 enso_tx_sop,
  output logic                 enso_tx_eop,
  output logic [enso_pkg::DATA_W-1:0] enso_tx_data,
  output logic [31:0]          enso_rx_accept_count,
  output logic [31:0]          enso_rx_drop_count,
  output logic [31:0]          enso_notif_count,
  output logic [31:0]          enso_prefetch_count,
  output logic [31:0]          enso_notif_full_cycles,
  output logic [31:0]          enso_tx_sent_count,
  // ---- Nagare switch
  input  logic                 nagare_tbl_cfg_valid,
  input  logic [STREAM_W-1:0]  nagare_tbl_cfg_index,
  input  stream_entry_t        nagare_tbl_cfg_entry,
  input  logic                 nagare_ins_cfg_valid,
  input  logic [7:0]           nagare_ins_cfg_stage,
  input  logic [STREAM_W-1:0]  nagare_ins_cfg_stream,
  input  instr_t               nagare_ins_cfg_instr,
  input  logic [NAGARE_NUM_PORTS-1:0] nagare_in_valid,
  output logic [NAGARE_NUM_PORTS-1:0] nagare_in_ready,
  input  nmsg_t                nagare_in_msg  [NAGARE_NUM_PORTS],
  output logic [NAGARE_NUM_PORTS-1:0] nagare_out_valid,
  input  logic [NAGARE_NUM_PORTS-1:0] nagare_out_ready,
  output nmsg_t                nagare_out_msg [NAGARE_NUM_PORTS],
  output logic [31:0]          nagare_stall_cycles
);
  enso_nic #(
    .NUM_PIPES(ENSO_NUM_PIPES), .PIPE_RING_LOG2(ENSO_PIPE_RING_LOG2),
    .NOTIF_RING_LOG2(ENSO_NOTIF_RING_LOG2), .TX_RING_LOG2(ENSO_TX_RING_LOG2),
    .PREFETCH_EN(ENSO_PREFETCH_EN)
  ) u_enso (
    .clk, .rst_n,
    .mmio_wr_valid(enso_mmio_wr_valid), .mmio_addr(enso_mmio_addr), .mmio_data(enso_mmio_data),
    .rx_valid(enso_rx_valid), .rx_ready(enso_rx_ready), .rx_pipe(enso_rx_pipe),
    .rx_sop(enso_rx_sop), .rx_eop(enso_rx_eop), .rx_len(enso_rx_len), .rx_data(enso_rx_data),
    .dma_wr_valid(enso_dma_wr_valid), .dma_wr_ready(enso_dma_wr_ready), .dma_wr(enso_dma_wr),
    .dma_rd_req_valid(enso_dma_rd_req_valid), .dma_rd_req_ready(enso_dma_rd_req_ready),
    .dma_rd_req(enso_dma_rd_req),
    .dma_rd_cpl_valid(enso_dma_rd_cpl_valid), .dma_rd_cpl_ready(enso_dma_rd_cpl_ready),
    .dma_rd_cpl_data(enso_dma_rd_cpl_data),
    .tx_valid(enso_tx_valid), .tx_ready(enso_tx_ready), .tx_sop(enso_tx_sop),
    .tx_eop(enso_tx_eop), .tx_data(enso_tx_data),
    .rx_accept_count(enso_rx_accept_count), .rx_drop_count(enso_rx_drop_count),
    .notif_count(enso_notif_count), .prefetch_count(enso_prefetch_count),
    .notif_full_cycles(enso_notif_full_cycles), .tx_sent_count(enso_tx_sent_count)
  );

  nagare_switch #(
    .NUM_PORTS(NAGARE_NUM_PORTS), .NUM_STREAMS(NAGARE_NUM_STREAMS),
    .NUM_STAGES(NAGARE_NUM_STAGES), .STAGE_CYCLES(NAGARE_STAGE_CYCLES)
  ) u_nagare (
    .clk, .rst_n,
    .tbl_cfg_valid(nagare_tbl_cfg_valid), .tbl_cfg_index(nagare_tbl_cfg_index),
    .tbl_cfg_entry(nagare_tbl_cfg_entry),
    .ins_cfg_valid(nagare_ins_cfg_valid), .ins_cfg_stage(nagare_ins_cfg_stage),
    .ins_cfg_stream(nagare_ins_cfg_stream), .ins_cfg_instr(nagare_ins_cfg_instr),
    .in_valid(nagare_in_valid), .in_ready(nagare_in_ready), .in_msg(nagare_in_msg),
    .out_valid(nagare_out_valid), .out_ready(nagare_out_ready), .out_msg(nagare_out_msg),
    .stall_cycles(nagare_stall_cycles)
  );
endmodule
