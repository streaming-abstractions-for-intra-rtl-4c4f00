// nagare_stream_table: maps the destination address of a message to an open stream.
//
// The switch gives every established stream its own window of the host address
// space; a device pushes data into a stream just by writing to that window. This table
// holds NUM_STREAMS windows, each an aligned power-of-two region [base, base + 2**size),
// written by the host CPU when it opens or closes a stream. Lookup is combinational: the
// lowest-numbered valid entry whose window holds addr wins; no hit means the message
// is not part of any stream and the stages leave it alone.
//
// Following the source: one address per stream, match on the destination address,
// CPU-only configuration. Window shape, table size and priority are this design's.
module nagare_stream_table
  import nagare_pkg::*;
#(
  parameter int NUM_STREAMS = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                cfg_valid,
  input  logic [STREAM_W-1:0] cfg_index,
  input  stream_entry_t       cfg_entry,
  input  logic [ADDR_W-1:0]   addr,
  output logic                hit,
  output logic [STREAM_W-1:0] stream
);
  stream_entry_t tbl_q [NUM_STREAMS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NUM_STREAMS; s++) tbl_q[s] <= '0;
    end else if (cfg_valid && 32'(cfg_index) < NUM_STREAMS) begin
      tbl_q[cfg_index] <= cfg_entry;
    end
  end

  logic [ADDR_W-1:0] mask;

  always_comb begin
    mask   = '0;
    hit    = 1'b0;
    stream = '0;
    for (int s = NUM_STREAMS - 1; s >= 0; s--) begin
      mask = ~((ADDR_W'(1) << tbl_q[s].size_log2) - 1'b1);
      if (tbl_q[s].valid && ((addr & mask) == (tbl_q[s].base & mask))) begin
        hit    = 1'b1;
        stream = STREAM_W'(s);
      end
    end
  end
endmodule
