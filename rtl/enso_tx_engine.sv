// enso_tx_engine: the NIC side of transmission through Enso Pipes.
//
// To send, software places data in its TX pipe, writes a TX notification record
// (signal = 1, address of the data, length in flits) into the TX notification ring, and
// advances the ring's tail with an MMIO write. For each queued record this block:
//   1. DMA-reads the record (one flit at base + head * 64),
//   2. DMA-reads the data it points to (len_flits flits in one request),
//   3. streams the returned flits to the Ethernet side with sop/eop framing,
//   4. overwrites the same record with signal = 0, the completion software waits for,
//   5. advances its head and moves to the next record.
// A record with len_flits = 0 is completed without sending anything.
//
// One record is handled at a time and DMA read completions are assumed to return in
// order. Timing: each record costs two DMA read round trips plus len_flits cycles of
// streaming plus one write. The record layout, ring size and the one-at-a-time order
// are this design's choices; the source gives the steps and the completion-by-overwrite.
module enso_tx_engine
  import enso_pkg::*;
#(
  parameter int RING_LOG2 = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              base_wr_valid,
  input  logic [ADDR_W-1:0] base_wr_addr,
  input  logic              tail_wr_valid,
  input  logic [PTR_W-1:0]  tail_wr_value,
  // DMA reads
  output logic              rd_req_valid,
  input  logic              rd_req_ready,
  output dma_rd_req_t       rd_req,
  input  logic              rd_cpl_valid,
  output logic              rd_cpl_ready,
  input  logic [DATA_W-1:0] rd_cpl_data,
  // completion write
  output logic              dma_valid,
  input  logic              dma_ready,
  output dma_wr_t           dma,
  // towards the Ethernet MAC
  output logic              tx_valid,
  input  logic              tx_ready,
  output logic              tx_sop,
  output logic              tx_eop,
  output logic [DATA_W-1:0] tx_data,
  output logic [31:0]       sent_count
);
  typedef enum logic [2:0] {S_IDLE, S_RD_NOTIF, S_WAIT_NOTIF, S_RD_DATA, S_STREAM, S_COMPLETE} state_e;

  state_e               state_q;
  logic [ADDR_W-1:0]    base_q;
  logic [RING_LOG2-1:0] head_q, tail_q;
  tx_notif_t            rec_q, rec_in;
  logic [LEN_W-1:0]     left_q;
  logic                 first_q;

  assign rec_in = tx_notif_t'(rd_cpl_data[TX_NOTIF_W-1:0]);

  always_comb begin
    rd_req_valid = 1'b0;
    rd_req       = '0;
    unique case (state_q)
      S_RD_NOTIF: begin
        rd_req_valid     = 1'b1;
        rd_req.addr      = base_q + (ADDR_W'(head_q) << FLIT_SHIFT);
        rd_req.len_flits = LEN_W'(1);
      end
      S_RD_DATA: begin
        rd_req_valid     = 1'b1;
        rd_req.addr      = rec_q.addr;
        rd_req.len_flits = rec_q.len_flits;
      end
      default: ;
    endcase
  end

  assign rd_cpl_ready = (state_q == S_WAIT_NOTIF) || (state_q == S_STREAM && tx_ready);
  assign tx_valid     = (state_q == S_STREAM) && rd_cpl_valid;
  assign tx_data      = rd_cpl_data;
  assign tx_sop       = first_q;
  assign tx_eop       = (left_q == LEN_W'(1));

  assign dma_valid    = (state_q == S_COMPLETE);
  assign dma.addr     = base_q + (ADDR_W'(head_q) << FLIT_SHIFT);
  assign dma.data     = DATA_W'(tx_notif_t'{signal: 1'b0, addr: rec_q.addr, len_flits: rec_q.len_flits});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      base_q     <= '0;
      head_q     <= '0;
      tail_q     <= '0;
      rec_q      <= '0;
      left_q     <= '0;
      first_q    <= 1'b0;
      sent_count <= '0;
    end else begin
      if (base_wr_valid) base_q <= base_wr_addr;
      if (tail_wr_valid) tail_q <= RING_LOG2'(tail_wr_value);
      unique case (state_q)
        S_IDLE:       if (head_q != tail_q) state_q <= S_RD_NOTIF;
        S_RD_NOTIF:   if (rd_req_ready) state_q <= S_WAIT_NOTIF;
        S_WAIT_NOTIF: if (rd_cpl_valid) begin
          rec_q   <= rec_in;
          left_q  <= rec_in.len_flits;
          first_q <= 1'b1;
          state_q <= (rec_in.len_flits == '0) ? S_COMPLETE : S_RD_DATA;
        end
        S_RD_DATA:    if (rd_req_ready) state_q <= S_STREAM;
        S_STREAM:     if (tx_valid && tx_ready) begin
          first_q <= 1'b0;
          left_q  <= left_q - 1'b1;
          if (left_q == LEN_W'(1)) begin
            state_q    <= S_COMPLETE;
            sent_count <= sent_count + 1;
          end
        end
        S_COMPLETE:   if (dma_ready) begin
          head_q  <= head_q + 1'b1;
          state_q <= S_IDLE;
        end
        default:      state_q <= S_IDLE;
      endcase
    end
  end

  a_eop: assert property (@(posedge clk) disable iff (!rst_n)
    tx_valid && tx_ready && tx_eop |=> state_q == S_COMPLETE);
endmodule
