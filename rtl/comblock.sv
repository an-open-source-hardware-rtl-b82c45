// comblock: communication block between the processor (SoC bus side) and the FPGA fabric.
//
// It hides the SoC bus from the FPGA design and offers both sides three kinds of resource:
//   * registers: NUM_REGS output registers written by the processor and read by the fabric
//     (oreg_o, with a one-cycle oreg_wr_o pulse on the cycle a new value appears), and NUM_REGS
//     input registers driven by the fabric (ireg_i) and read by the processor;
//   * two FIFOs: "in" carries words from the processor to the fabric, "out" from the fabric to
//     the processor;
//   * a true dual-port RAM shared by both sides.
// On the fabric side the FIFOs and the RAM are two Wishbone slaves. A read of the FIFO slave pops
// the "in" FIFO and a write pushes the "out" FIFO (any offset in the region); while the FIFO is
// empty (read) or full (write) the slave holds ack low, so the master stalls until the processor
// catches up. The RAM slave maps its region offset onto RAM port A. Both answer one cycle after
// the strobe when not stalled, and drop ack for one cycle after every access.
//
// Processor side: a simple synchronous bus standing in for the vendor SoC bus (an AXI bridge
// would sit in front of it). A request is one cycle of host_valid with host_we, host_addr and
// host_wdata; read data come back with host_rvalid in the next cycle. Word address map:
//   addr[HAW-1] = 1        TDPRAM port B, word addr[HAW-2:0]
//   0x00..0x0F             output registers (read/write)
//   0x10..0x1F             input registers (read only)
//   0x20                   FIFO data: write pushes "in" (dropped when full, sets overflow),
//                          read pops "out" (returns 0 when empty, sets underflow)
//   0x21                   FIFO status (read): bit0 in_empty, bit1 in_full, bit2 out_empty,
//                          bit3 out_full, bit4 in_overflow, bit5 out_underflow (both sticky),
//                          bits 15:8 in_count, bits 23:16 out_count
//   0x22                   FIFO control (write): bit0 clears "in", bit1 clears "out",
//                          bit2 clears the sticky flags
// Unused offsets read 0. The split into registers, FIFOs and RAM follows the architecture; the
// counts, depths, this address map and the single clock shared by both sides are this design's.
module comblock
  import udma_pkg::*;
#(
  parameter int unsigned NREG       = NUM_REGS,
  parameter int unsigned FIFO_DEPTH = 32,
  parameter int unsigned RAM_DEPTH  = 1024,
  localparam int unsigned HAW = $clog2(RAM_DEPTH) + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // processor side
  input  logic                 host_valid,
  input  logic                 host_we,
  input  logic [HAW-1:0]       host_addr,
  input  logic [DW-1:0]        host_wdata,
  output logic [DW-1:0]        host_rdata,
  output logic                 host_rvalid,
  // fabric side: registers
  output logic [NREG-1:0][DW-1:0] oreg_o,
  output logic [NREG-1:0]         oreg_wr_o,
  input  logic [NREG-1:0][DW-1:0] ireg_i,
  // fabric side: Wishbone slaves
  input  wb_req_t              fifo_wb_req,
  output wb_rsp_t              fifo_wb_rsp,
  input  wb_req_t              ram_wb_req,
  output wb_rsp_t              ram_wb_rsp
);

  localparam int unsigned RAW = $clog2(RAM_DEPTH);
  localparam int unsigned CW  = $clog2(FIFO_DEPTH + 1);

  // ------------------------------------------------------------------ host decode
  logic host_ram, host_oreg, host_ireg, host_fdata, host_fstat, host_fctrl;
  logic [5:0] host_off;

  assign host_off   = host_addr[5:0];
  assign host_ram   = host_addr[HAW-1];
  assign host_oreg  = !host_ram && host_addr[HAW-2:6] == '0 && host_off[5:4] == 2'b00;
  assign host_ireg  = !host_ram && host_addr[HAW-2:6] == '0 && host_off[5:4] == 2'b01;
  assign host_fdata = !host_ram && host_addr[HAW-2:6] == '0 && host_off == HOST_FIFO_DATA;
  assign host_fstat = !host_ram && host_addr[HAW-2:6] == '0 && host_off == HOST_FIFO_STAT;
  assign host_fctrl = !host_ram && host_addr[HAW-2:6] == '0 && host_off == HOST_FIFO_CTRL;

  // ------------------------------------------------------------------ FIFOs
  logic [DW-1:0] in_rdata, out_rdata;
  logic          in_empty, in_full, out_empty, out_full;
  logic [CW-1:0] in_count, out_count;
  logic          in_push, in_pop, out_push, out_pop, in_clr, out_clr;
  logic          in_ovf, in_unf, out_ovf, out_unf;
  logic          in_ovf_q, out_unf_q;

  assign in_push = host_valid & host_we & host_fdata;
  assign out_pop = host_valid & ~host_we & host_fdata;
  assign in_clr  = host_valid & host_we & host_fctrl & host_wdata[0];
  assign out_clr = host_valid & host_we & host_fctrl & host_wdata[1];

  logic fifo_ack_q;
  logic fifo_rd_go, fifo_wr_go;
  assign fifo_rd_go = fifo_wb_req.cyc & fifo_wb_req.stb & ~fifo_wb_req.we & ~fifo_ack_q & ~in_empty;
  assign fifo_wr_go = fifo_wb_req.cyc & fifo_wb_req.stb &  fifo_wb_req.we & ~fifo_ack_q & ~out_full;
  assign in_pop   = fifo_rd_go;
  assign out_push = fifo_wr_go;

  sync_fifo #(.WIDTH(DW), .DEPTH(FIFO_DEPTH)) u_fifo_in (
    .clk, .rst_n, .clr(in_clr),
    .push(in_push), .wdata(host_wdata),
    .pop(in_pop), .rdata(in_rdata),
    .empty(in_empty), .full(in_full), .count(in_count),
    .overflow(in_ovf), .underflow(in_unf)
  );

  sync_fifo #(.WIDTH(DW), .DEPTH(FIFO_DEPTH)) u_fifo_out (
    .clk, .rst_n, .clr(out_clr),
    .push(out_push), .wdata(fifo_wb_req.dat),
    .pop(out_pop), .rdata(out_rdata),
    .empty(out_empty), .full(out_full), .count(out_count),
    .overflow(out_ovf), .underflow(out_unf)
  );

  logic [DW-1:0] fifo_rdat_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fifo_ack_q  <= 1'b0;
      fifo_rdat_q <= '0;
      in_ovf_q    <= 1'b0;
      out_unf_q   <= 1'b0;
    end else begin
      fifo_ack_q <= fifo_rd_go | fifo_wr_go;
      if (fifo_rd_go) fifo_rdat_q <= in_rdata;
      if (host_valid && host_we && host_fctrl && host_wdata[2]) begin
        in_ovf_q  <= 1'b0;
        out_unf_q <= 1'b0;
      end else begin
        if (in_ovf)  in_ovf_q  <= 1'b1;
        if (out_unf) out_unf_q <= 1'b1;
      end
    end
  end

  always_comb begin
    fifo_wb_rsp     = WB_RSP_IDLE;
    fifo_wb_rsp.ack = fifo_ack_q;
    fifo_wb_rsp.dat = fifo_rdat_q;
  end

  // ------------------------------------------------------------------ true dual-port RAM
  logic          ram_ack_q;
  logic          ram_en_a;
  logic [DW-1:0] ram_rdata_a, ram_rdata_b;

  assign ram_en_a = ram_wb_req.cyc & ram_wb_req.stb & ~ram_ack_q;

  tdpram #(.WIDTH(DW), .DEPTH(RAM_DEPTH)) u_ram (
    .clk_a(clk), .en_a(ram_en_a), .we_a(ram_wb_req.we),
    .addr_a(ram_wb_req.adr[RAW-1:0]), .wdata_a(ram_wb_req.dat), .rdata_a(ram_rdata_a),
    .clk_b(clk), .en_b(host_valid & host_ram), .we_b(host_we),
    .addr_b(host_addr[RAW-1:0]), .wdata_b(host_wdata), .rdata_b(ram_rdata_b)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ram_ack_q <= 1'b0;
    else        ram_ack_q <= ram_en_a;
  end

  always_comb begin
    ram_wb_rsp     = WB_RSP_IDLE;
    ram_wb_rsp.ack = ram_ack_q;
    ram_wb_rsp.dat = ram_rdata_a;
  end

  // ------------------------------------------------------------------ registers and host reads
  logic [DW-1:0] reg_rdata_q;
  logic          rd_ram_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      oreg_o      <= '0;
      oreg_wr_o   <= '0;
      reg_rdata_q <= '0;
      rd_ram_q    <= 1'b0;
      host_rvalid <= 1'b0;
    end else begin
      oreg_wr_o   <= '0;
      host_rvalid <= host_valid & ~host_we;
      rd_ram_q    <= host_ram;
      if (host_valid && host_we && host_oreg && 32'(host_off[3:0]) < NREG) begin
        oreg_o[host_off[3:0]]    <= host_wdata;
        oreg_wr_o[host_off[3:0]] <= 1'b1;
      end
      if (host_valid && !host_we) begin
        reg_rdata_q <= '0;
        if (host_oreg && 32'(host_off[3:0]) < NREG) reg_rdata_q <= oreg_o[host_off[3:0]];
        if (host_ireg && 32'(host_off[3:0]) < NREG) reg_rdata_q <= ireg_i[host_off[3:0]];
        if (host_fdata) reg_rdata_q <= out_empty ? '0 : out_rdata;
        if (host_fstat) begin
          reg_rdata_q        <= '0;
          reg_rdata_q[0]     <= in_empty;
          reg_rdata_q[1]     <= in_full;
          reg_rdata_q[2]     <= out_empty;
          reg_rdata_q[3]     <= out_full;
          reg_rdata_q[4]     <= in_ovf_q;
          reg_rdata_q[5]     <= out_unf_q;
          reg_rdata_q[15:8]  <= 8'(in_count);
          reg_rdata_q[23:16] <= 8'(out_count);
        end
      end
    end
  end

  assign host_rdata = rd_ram_q ? ram_rdata_b : reg_rdata_q;

  // The FIFO slaves never see an overflowing push or an empty pop: they stall instead.
  assert property (@(posedge clk) disable iff (!rst_n) !(out_ovf || in_unf));

endmodule
