// Types and sizes of the IXIAM packets seen by the MORUS-PRNG accelerator.
//
// IXIAM lets RISC-V cores drive an integrated accelerator with dedicated
// instructions; each instruction reaches the accelerator as a command packet
// over the SoC interconnect, and the four synchronous ones (CHECK, TRS,
// ISBUSY, AFENCE) get a response packet back. The accelerator also sends
// memory requests for TGL (load from memory) and TGS (store to memory).
//
// The instruction set is IXIAM's; the field layout, the widths, the opcode
// encoding and the local address map below are this design's choices:
//   resource REGFILE: word 0 = N, words 1..4 = key words K0..K3
//   resource OUTBUF : word i = i-th generated 32-bit number
package ixiam_pkg;

  localparam int unsigned NODE_W = 4;   // interconnect node id (cores, memory)
  localparam int unsigned PID_W  = 8;   // process id inside a core
  localparam int unsigned ID_W   = NODE_W + PID_W;
  localparam int unsigned ADDR_W = 64;  // main-memory byte address
  localparam int unsigned DATA_W = 32;  // one accelerator word
  localparam int unsigned LOC_W  = 20;  // local word offset
  localparam int unsigned LEN_W  = 20;  // transfer length in words

  localparam int unsigned RF_WORDS = 5;

  // Node id of the memory side of the interconnect (assumed).
  localparam logic [NODE_W-1:0] MEM_NODE = 4'hF;

  typedef enum logic [3:0] {
    OP_RESERVE = 4'd0,
    OP_CHECK   = 4'd1,
    OP_TGL     = 4'd2,
    OP_TGS     = 4'd3,
    OP_TL      = 4'd4,
    OP_TRL     = 4'd5,
    OP_TRS     = 4'd6,
    OP_EXEC    = 4'd7,
    OP_ISBUSY  = 4'd8,
    OP_RELEASE = 4'd9,
    OP_AFENCE  = 4'd10,
    OP_RUISR   = 4'd11
  } ixiam_op_e;

  typedef enum logic [0:0] {
    RES_REGFILE = 1'b0,
    RES_OUTBUF  = 1'b1
  } res_e;

  // EXEC op_id values of this accelerator.
  localparam logic [7:0] EXEC_INITIALIZE = 8'd0;
  localparam logic [7:0] EXEC_GENERATE   = 8'd1;

  typedef enum logic [1:0] {
    ST_FREE  = 2'd0,
    ST_BUSY  = 2'd1,
    ST_ERROR = 2'd2
  } acc_status_e;

  // Command from a core. core is filled from the packet's source node.
  typedef struct packed {
    ixiam_op_e          op;
    logic [NODE_W-1:0]  core;
    logic [PID_W-1:0]   pid;
    logic [7:0]         op_id;
    res_e               src_res;
    logic [LOC_W-1:0]   src_off;
    res_e               dst_res;
    logic [LOC_W-1:0]   dst_off;
    logic [ADDR_W-1:0]  mem_addr;
    logic [LEN_W-1:0]   len;
    logic [DATA_W-1:0]  data;
  } ixiam_cmd_t;

  // Response to a core (CHECK, TRS, ISBUSY, AFENCE).
  typedef struct packed {
    ixiam_op_e          op;
    logic [NODE_W-1:0]  core;
    logic [PID_W-1:0]   pid;
    logic               ok;
    logic [DATA_W-1:0]  data;
  } ixiam_resp_t;

  // Memory request issued by the accelerator.
  typedef struct packed {
    logic               we;
    logic [ADDR_W-1:0]  addr;
    logic [DATA_W-1:0]  wdata;
  } mem_req_t;

  // Packet kinds on the interconnect link of the accelerator.
  typedef enum logic [2:0] {
    NOC_CMD       = 3'd0,   // core -> accelerator
    NOC_RESP      = 3'd1,   // accelerator -> core
    NOC_MEM_RD    = 3'd2,   // accelerator -> memory
    NOC_MEM_WR    = 3'd3,   // accelerator -> memory
    NOC_MEM_RDATA = 3'd4    // memory -> accelerator
  } noc_kind_e;

  localparam int unsigned CMD_W  = $bits(ixiam_cmd_t);
  localparam int unsigned RESP_W = $bits(ixiam_resp_t);
  localparam int unsigned MREQ_W = $bits(mem_req_t);
  // The command is the widest payload; the others are zero-extended into it.
  localparam int unsigned PAY_W  = CMD_W;

  // One interconnect packet. node is the source for incoming packets and
  // the destination for outgoing ones. The payload holds, in its low bits,
  // an ixiam_cmd_t (core field ignored), an ixiam_resp_t, a mem_req_t or,
  // for NOC_MEM_RDATA, the 32-bit read data.
  typedef struct packed {
    noc_kind_e          kind;
    logic [NODE_W-1:0]  node;
    logic [PAY_W-1:0]   payload;
  } noc_pkt_t;

endpackage
