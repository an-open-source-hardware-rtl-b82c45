// soc_fpga_top: the FPGA half of a SoC-FPGA local resource agent for remote control.
//
// The processor receives packets from the remote PC, and passes every UDMA instruction whose
// memory domain lies in the FPGA through the ComBlock. This top holds that FPGA domain:
//   UDMA processor --WB--> interconnect --> BRAM            region 0x0000
//                                      \--> ComBlock FIFOs   region 0x0001
//                                      \--> ComBlock TDPRAM  region 0x0002
//                                      \--> user port        region 0x0003 (brought out)
// The ComBlock output registers carry the instruction (registers 0..4: src_addr, dst_addr,
// src_inc, dst_inc, N) and the command (register 5, a write issues START/STOP/RESET from bits
// 1:0); input register 0 returns the status word and register 1 the number of words moved.
// Input registers 2..15 are free for the application and come in on user_ireg.
// The processor side of the ComBlock (host_*) is brought out: it is where the SoC bus and the
// processor firmware connect. The user Wishbone port stands for the external hardware
// controllers and core design that a real system adds to the memory map.
// Timing: one clock. A host write to register 5 reaches the UDMA processor one cycle later;
// a transfer of N words between zero-wait slaves then takes 4*N cycles.
// The block split and connections follow the architecture; register assignment, address map and
// the user port are this design's choices.
module soc_fpga_top
  import udma_pkg::*;
#(
  parameter int unsigned BRAM_DEPTH = 1024,
  parameter int unsigned FIFO_DEPTH = 32,
  parameter int unsigned RAM_DEPTH  = 1024,
  localparam int unsigned HAW = $clog2(RAM_DEPTH) + 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // processor (SoC bus) side of the ComBlock
  input  logic                          host_valid,
  input  logic                          host_we,
  input  logic [HAW-1:0]                host_addr,
  input  logic [DW-1:0]                 host_wdata,
  output logic [DW-1:0]                 host_rdata,
  output logic                          host_rvalid,
  // application input registers 2..NUM_REGS-1
  input  logic [NUM_REGS-1:2][DW-1:0]   user_ireg,
  // user Wishbone slave port (region 0x0003)
  output wb_req_t                       user_wb_req,
  input  wb_rsp_t                       user_wb_rsp
);

  wb_req_t                  m_req;
  wb_rsp_t                  m_rsp;
  wb_req_t [NUM_SLAVES-1:0] s_req;
  wb_rsp_t [NUM_SLAVES-1:0] s_rsp;

  logic [NUM_REGS-1:0][DW-1:0] oreg, ireg;
  logic [NUM_REGS-1:0]         oreg_wr;

  udma_instr_t  instr;
  udma_status_t status;
  logic [31:0]  count;

  assign instr.src_addr = oreg[OREG_SRC_ADDR];
  assign instr.dst_addr = oreg[OREG_DST_ADDR];
  assign instr.src_inc  = oreg[OREG_SRC_INC];
  assign instr.dst_inc  = oreg[OREG_DST_INC];
  assign instr.n_words  = oreg[OREG_N_WORDS];

  always_comb begin
    ireg                   = '0;
    ireg[NUM_REGS-1:2]     = user_ireg;
    ireg[IREG_STATUS]      = status;
    ireg[IREG_COUNT]       = count;
  end

  udma_processor u_udma (
    .clk, .rst_n,
    .instr,
    .cmd_valid (oreg_wr[OREG_CMD]),
    .cmd       (udma_cmd_e'(oreg[OREG_CMD][1:0])),
    .status,
    .count,
    .wbm_req   (m_req),
    .wbm_rsp   (m_rsp)
  );

  wb_interconnect #(.NS(NUM_SLAVES), .REGIONS(REGION_MAP)) u_ic (
    .clk, .rst_n,
    .m_req, .m_rsp,
    .s_req, .s_rsp
  );

  wb_bram #(.DEPTH(BRAM_DEPTH)) u_bram (
    .clk, .rst_n,
    .wb_req (s_req[SLV_BRAM]),
    .wb_rsp (s_rsp[SLV_BRAM])
  );

  comblock #(.NREG(NUM_REGS), .FIFO_DEPTH(FIFO_DEPTH), .RAM_DEPTH(RAM_DEPTH)) u_cb (
    .clk, .rst_n,
    .host_valid, .host_we, .host_addr, .host_wdata, .host_rdata, .host_rvalid,
    .oreg_o      (oreg),
    .oreg_wr_o   (oreg_wr),
    .ireg_i      (ireg),
    .fifo_wb_req (s_req[SLV_FIFO]),
    .fifo_wb_rsp (s_rsp[SLV_FIFO]),
    .ram_wb_req  (s_req[SLV_TDPRAM]),
    .ram_wb_rsp  (s_rsp[SLV_TDPRAM])
  );

  assign user_wb_req      = s_req[SLV_USER];
  assign s_rsp[SLV_USER]  = user_wb_rsp;

endmodule
