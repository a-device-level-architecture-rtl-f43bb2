// fcp_pkg: types and constants shared by the FPGA co-processor node.
//
// The node moves data between an external DDR2 memory, on-chip SRAMs of the
// co-processors and a Serial RapidIO link. Internal memory paths are 128 bits
// wide (DDR2 controller user side, OCM), the RapidIO side is 64 bits wide;
// both widths follow the architecture. Command and packet encodings below are
// this design's own: the architecture names the transaction types but not
// their bit layout.
package fcp_pkg;

  localparam int DW        = 128;   // internal memory datapath width
  localparam int SW        = 64;    // RapidIO user datapath width
  localparam int AW        = 27;    // DDR2 byte address, 128 MB
  localparam int LEN_W     = 25;    // transfer length in bytes, up to 16 MB
  localparam int BURST_B   = 32;    // one DDR2 burst: BL4 on a 64-bit device bus
  localparam int PKT_MAX_B = 256;   // largest RapidIO payload per packet
  localparam int OCM_AW    = 13;    // SRAM word address: 128 KB of 16-byte words
  localparam int OCM_LEN_W = 18;    // OCM transfer length in bytes, up to 128 KB

  // Request to a DDR2 port controller. len is in bytes, a multiple of BURST_B.
  typedef struct packed {
    logic             wr;
    logic [AW-1:0]    addr;
    logic [LEN_W-1:0] len;
  } mem_cmd_t;

  // Command to the on-chip memory controller.
  // to_ddr = 1: SRAM -> DDR2 ("read" of the SRAM); 0: DDR2 -> SRAM.
  typedef struct packed {
    logic                 to_ddr;
    logic [1:0]           sram;
    logic [OCM_AW-1:0]    sram_addr;
    logic [AW-1:0]        ddr_addr;
    logic [OCM_LEN_W-1:0] len;
  } ocm_cmd_t;

  typedef struct packed {
    logic       to_ddr;
    logic [1:0] sram;
  } ocm_rsp_t;

  // RapidIO I/O logical transaction types (codes are this design's own).
  typedef enum logic [3:0] {
    TT_NREAD     = 4'h1,
    TT_NWRITE    = 4'h2,
    TT_NWRITE_R  = 4'h3,
    TT_SWRITE    = 4'h4,
    TT_RESP_DONE = 4'h8,
    TT_RESP_DATA = 4'h9
  } ttype_e;

  // One-beat packet header on the 64-bit endpoint user ports.
  typedef struct packed {
    ttype_e      ttype;    // [63:60]
    logic [7:0]  tid;      // [59:52]
    logic [7:0]  dest;     // [51:44]
    logic [7:0]  src;      // [43:36]
    logic [5:0]  dwords;   // [35:30] payload (or requested) 64-bit words, 1..32
    logic        rsvd;     // [29]
    logic [28:0] addr;     // [28:0]  64-bit word address
  } pkt_hdr_t;

  // A beat on a packet port: the first beat is a pkt_hdr_t.
  typedef struct packed {
    logic [SW-1:0] data;
    logic          last;
  } pkt_beat_t;

  // Initiator command from the node controller to the RapidIO interface.
  typedef struct packed {
    ttype_e           ttype;
    logic [7:0]       dest;
    logic [31:0]      raddr;   // remote byte address
    logic [AW-1:0]    laddr;   // local DDR2 byte address
    logic [LEN_W-1:0] len;     // bytes, multiple of BURST_B
  } srio_cmd_t;

  typedef struct packed {
    ttype_e ttype;
    logic   err;
  } srio_cpl_t;

  // Remote address map of a node (byte addresses on the RapidIO link):
  //   bit31=0          : DDR2
  //   bit31=1, bit30=0 : control BRAM (node controller instruction memory)
  //   bit31=1, bit30=1 : start register (write: start PC) / status (read)

  // Node controller opcodes (this design's own encoding).
  typedef enum logic [3:0] {
    OP_NOP    = 4'h0,
    OP_HALT   = 4'h1,
    OP_OCM    = 4'h2,   // move data between DDR2 and an SRAM
    OP_SRIO   = 4'h3,   // RapidIO transfer, two instruction words
    OP_RUN    = 4'h4,   // process X words on a co-processor
    OP_CFG    = 4'h5,   // write a co-processor config register
    OP_TSTAMP = 4'h6,   // store a timestamp in node controller SRAM
    OP_SETCNT = 4'h7,   // load a loop counter
    OP_LOOP   = 4'h8,   // decrement counter, branch if not zero
    OP_JUMP   = 4'h9,
    OP_SYNC   = 4'hA    // wait until every outstanding operation is done
  } opcode_e;

endpackage
