// avl_pkg: types and constants shared by the Widget subsystems.
//
// Sizes that come from the Avalanche design: 64-bit SB bus, 80-bit Runway and
// Taxiway, 2K-line x 128-byte Shared Buffer, 128-byte coherency blocks made of
// four 32-byte PA-RISC lines, 4 KB pages, three Runway coherency responses
// (COH_OK, COH_SHR, COH_CPY), SM-CC block states (invalid, shared, exclusive)
// and DC global states (free, shared, exclusive), and the per-page protocol
// choice. The field layout of the Runway word, the RIM command, the SB access
// request and the network message header are this implementation's own.
package avl_pkg;

  localparam int unsigned DW          = 64;    // SB bus and Runway data width
  localparam int unsigned PA_W        = 32;    // physical address width
  localparam int unsigned NODE_W      = 6;     // 64-node prototype
  localparam int unsigned SB_LINES    = 2048;  // Shared Buffer lines
  localparam int unsigned SB_LINE_W   = 11;
  localparam int unsigned SB_AW       = 15;    // doubleword address in the SB
  localparam int unsigned BLK_BEATS   = 16;    // 128-byte block, 8-byte beats
  localparam int unsigned LINE_BEATS  = 4;     // 32-byte PA-RISC line
  localparam int unsigned BLK_AW      = PA_W - 7;

  typedef enum logic [1:0] {COH_OK = 2'd0, COH_SHR = 2'd1, COH_CPY = 2'd2} coh_resp_t;
  typedef enum logic [1:0] {BS_INVALID = 2'd0, BS_SHARED = 2'd1, BS_EXCLUSIVE = 2'd2} bstate_t;
  typedef enum logic [1:0] {GS_FREE = 2'd0, GS_SHARED = 2'd1, GS_EXCLUSIVE = 2'd2} gstate_t;
  typedef enum logic [1:0] {PR_MIGRATORY = 2'd0, PR_WRITE_UPDATE = 2'd1,
                            PR_WRITE_INVALIDATE = 2'd2} proto_t;

  // Runway / Taxiway word: 16 control bits and a multiplexed 64-bit address/data field.
  typedef enum logic [3:0] {
    RW_IDLE = 4'd0, RW_RD_SHAR = 4'd1, RW_RD_PRIV = 4'd2, RW_WB = 4'd3,
    RW_NC_RD = 4'd4, RW_NC_WR = 4'd5, RW_C2C_WR = 4'd6, RW_DATA = 4'd7, RW_FLUSH = 4'd8
  } rw_op_t;
  typedef struct packed {
    rw_op_t      op;
    logic [3:0]  src;      // issuing client; for RW_DATA and RW_C2C_WR the receiving client
    logic [7:0]  tag;      // transaction tag of the issuing (or receiving) client
    logic [63:0] payload;  // address on address cycles, data on RW_DATA cycles
  } runway_t;

  // Command to the RIM, which masters the Runway and moves data between the bus and the SB.
  typedef enum logic [1:0] {RC_MEM_RD = 2'd0, RC_MEM_WR = 2'd1, RC_C2C = 2'd2, RC_FLUSH_RD = 2'd3} rim_op_t;
  typedef struct packed {
    rim_op_t           op;
    logic [PA_W-1:0]   addr;     // main memory byte address
    logic [SB_AW-1:0]  sb_addr;  // first SB doubleword
    logic [4:0]        beats;    // 1..16 doublewords
    logic [3:0]        dest;     // RC_C2C: receiving Runway client
    logic [7:0]        dtag;     // RC_C2C: tag of the read being answered
  } rim_cmd_t;

  // One SB access (a doubleword read or write).
  typedef struct packed {
    logic              we;
    logic [SB_AW-1:0]  addr;
    logic [DW-1:0]     wdata;
  } sb_req_t;

  // Network message header, carried in one 64-bit flit.
  typedef enum logic [2:0] {MT_REQ = 3'd0, MT_INV_FWD = 3'd1, MT_DATA = 3'd2,
                            MT_MPDATA = 3'd3, MT_UPDATE = 3'd4} mtype_t;
  typedef struct packed {
    mtype_t               mtype;
    logic [NODE_W-1:0]    src;
    logic [NODE_W-1:0]    dst;
    logic [NODE_W-1:0]    req_node;  // node that asked for the block
    logic [BLK_AW-1:0]    blk;       // 128-byte block address
    logic [SB_LINE_W-1:0] sb_line;   // receive line at the requester (MT_REQ/INV_FWD/DATA)
    logic [1:0]           slot;      // requester's SM-CC operation slot
    logic                 has_data;  // a 128-byte payload follows
    logic [2:0]           sub;       // 32-byte line within the block that was missed
    logic                 spare;
  } msg_t;

  localparam int unsigned MSG_W = $bits(msg_t);

endpackage
