// nagare_pkg: types shared by the Nagare programmable-interconnect blocks.
//
// Nagare is a PCIe switch whose dataplane matches each incoming message to an open
// stream by its destination address, and then sends it through a pipeline of
// match-action stages. Each stage runs one simple instruction per message, chosen per
// stream, that can rewrite message fields (destination port, address, kind) and read or
// write per-stream registers. The message format and the instruction set below are this
// design's own: the source says what the stages may do, not how they are encoded.
package nagare_pkg;

  localparam int ADDR_W   = 64;
  localparam int DATA_W   = 256;   // payload carried with each message beat
  localparam int LEN_W    = 13;    // payload length in bytes (up to 4096)
  localparam int PORT_W   = 4;     // up to 16 switch ports
  localparam int STREAM_W = 4;     // up to 16 streams

  typedef enum logic [1:0] {
    MSG_MEM_WR = 2'd0,   // posted memory write (a push)
    MSG_MEM_RD = 2'd1,   // memory read request
    MSG_CPL    = 2'd2,   // completion with data
    MSG_MSG    = 2'd3    // vendor message
  } msg_kind_e;

  typedef struct packed {
    msg_kind_e           kind;
    logic [ADDR_W-1:0]   addr;
    logic [LEN_W-1:0]    len;
    logic [PORT_W-1:0]   src_port;
    logic [PORT_W-1:0]   dst_port;
    logic                stream_hit;
    logic [STREAM_W-1:0] stream;
    logic [DATA_W-1:0]   data;
  } nmsg_t;

  // Stream table entry: a stream owns the aligned address window
  // [base, base + 2**size_log2).
  typedef struct packed {
    logic              valid;
    logic [ADDR_W-1:0] base;
    logic [5:0]        size_log2;
  } stream_entry_t;

  typedef enum logic [2:0] {
    OP_NOP      = 3'd0,  // leave the message alone
    OP_SET_DST  = 3'd1,  // dst_port <- port
    OP_SET_ADDR = 3'd2,  // addr <- imm
    OP_ADD_ADDR = 3'd3,  // addr <- addr + imm
    OP_SET_KIND = 3'd4,  // kind <- kind (convert the message)
    OP_PUSH     = 3'd5   // dst_port <- port; addr <- imm + reg; reg <- (reg + len) mod 2**wrap_log2
  } op_e;

  typedef struct packed {
    op_e               op;
    logic [PORT_W-1:0] port;
    msg_kind_e         kind;
    logic [ADDR_W-1:0] imm;
    logic [5:0]        wrap_log2;
  } instr_t;

endpackage
