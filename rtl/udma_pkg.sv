// udma_pkg: types and constants shared by the FPGA side of a UDMA local resource agent.
//
// The system moves data with one instruction, UDMA <src_addr> <dst_addr> <src_inc> <dst_inc> <N>,
// which copies N 32-bit words from a source to a destination, stepping each address by its own
// increment. This package holds:
//   * the instruction as a packed struct, the command codes (START, STOP, RESET) and the status
//     word the UDMA processor reports back;
//   * the Wishbone request/response bundles that every master and slave port uses;
//   * the FPGA memory map (which 64K-word region holds which memory);
//   * the ComBlock register numbers the UDMA processor is wired to;
//   * the common packet header exchanged between agents. Its field layout (keyword 31:16,
//     protocol 15:12, type 11:4, priority 3:0; destination ID 31:16, source ID 15:0) follows the
//     architecture; the keyword values, the type and command codes are this design's choice.
// Addresses are word addresses and increments are in words: one address holds one 32-bit word.
package udma_pkg;

  localparam int unsigned DW = 32;  // data word, fixed by the instruction definition
  localparam int unsigned AW = 32;  // global (word) address

  // ---------------------------------------------------------------- UDMA instruction
  typedef struct packed {
    logic [AW-1:0] src_addr;
    logic [AW-1:0] dst_addr;
    logic [AW-1:0] src_inc;   // two's complement, so a step may also be negative
    logic [AW-1:0] dst_inc;
    logic [31:0]   n_words;
  } udma_instr_t;

  typedef enum logic [1:0] {
    CMD_NONE  = 2'd0,
    CMD_START = 2'd1,
    CMD_STOP  = 2'd2,
    CMD_RESET = 2'd3
  } udma_cmd_e;

  typedef struct packed {
    logic [27:0] rsvd;
    logic        error;    // a bus access ended with err (unmapped address)
    logic        stopped;  // the last transfer was ended by STOP
    logic        done;     // the last transfer moved all N words
    logic        busy;
  } udma_status_t;

  // ---------------------------------------------------------------- Wishbone (classic cycles)
  typedef struct packed {
    logic          cyc;
    logic          stb;
    logic          we;
    logic [3:0]    sel;
    logic [AW-1:0] adr;
    logic [DW-1:0] dat;
  } wb_req_t;

  typedef struct packed {
    logic          ack;
    logic          err;
    logic [DW-1:0] dat;
  } wb_rsp_t;

  localparam wb_req_t WB_REQ_IDLE = '0;
  localparam wb_rsp_t WB_RSP_IDLE = '0;

  // ---------------------------------------------------------------- FPGA memory map
  // Region = adr[31:16]; the offset inside a region is adr[15:0].
  localparam int unsigned NUM_SLAVES = 4;
  localparam logic [15:0] REGION_BRAM   = 16'h0000;
  localparam logic [15:0] REGION_FIFO   = 16'h0001;  // ComBlock FIFOs (read: uP->FPGA, write: FPGA->uP)
  localparam logic [15:0] REGION_TDPRAM = 16'h0002;  // ComBlock true dual-port RAM
  localparam logic [15:0] REGION_USER   = 16'h0003;  // port left free for further WB resources
  localparam logic [NUM_SLAVES-1:0][15:0] REGION_MAP =
      {REGION_USER, REGION_TDPRAM, REGION_FIFO, REGION_BRAM};
  localparam int unsigned SLV_BRAM = 0, SLV_FIFO = 1, SLV_TDPRAM = 2, SLV_USER = 3;

  // ---------------------------------------------------------------- ComBlock register use
  localparam int unsigned NUM_REGS = 16;
  // output registers (uP writes, FPGA reads)
  localparam int unsigned OREG_SRC_ADDR = 0;
  localparam int unsigned OREG_DST_ADDR = 1;
  localparam int unsigned OREG_SRC_INC  = 2;
  localparam int unsigned OREG_DST_INC  = 3;
  localparam int unsigned OREG_N_WORDS  = 4;
  localparam int unsigned OREG_CMD      = 5;  // writing it issues the command in bits 1:0
  // input registers (FPGA writes, uP reads)
  localparam int unsigned IREG_STATUS = 0;
  localparam int unsigned IREG_COUNT  = 1;

  // ComBlock uP-side word offsets below the TDPRAM half of the address space
  localparam logic [5:0] HOST_OREG_BASE = 6'h00;  // 0x00..0x0F
  localparam logic [5:0] HOST_IREG_BASE = 6'h10;  // 0x10..0x1F
  localparam logic [5:0] HOST_FIFO_DATA = 6'h20;
  localparam logic [5:0] HOST_FIFO_STAT = 6'h21;
  localparam logic [5:0] HOST_FIFO_CTRL = 6'h22;

  // ---------------------------------------------------------------- packets between agents
  localparam logic [15:0] HEADER_KEYWORD  = 16'hA5C3;
  localparam logic [31:0] TRAILER_KEYWORD = 32'h5A3C_C3A5;
  localparam logic [3:0]  PROTOCOL_NUMBER = 4'd1;

  typedef enum logic [7:0] {
    PKT_COMMAND  = 8'h01,
    PKT_RAW_DATA = 8'h02,
    PKT_UDMA     = 8'h03
  } pkt_type_e;

  typedef struct packed {
    logic [15:0] keyword;
    logic [3:0]  protocol;
    logic [7:0]  ptype;
    logic [3:0]  priority_lvl;
  } pkt_hdr0_t;

  typedef struct packed {
    logic [15:0] dst_id;
    logic [15:0] src_id;
  } pkt_hdr1_t;

endpackage
