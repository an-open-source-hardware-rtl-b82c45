// wb_bram: single-port block RAM behind a Wishbone slave port.
//
// DEPTH words of 32 bits at word offsets 0..DEPTH-1 of its region (adr above that wraps). A
// strobed access is carried out at the next clock edge and acknowledged in the following cycle,
// so every access takes exactly one wait-free cycle after the strobe; read data come with the ack.
// ack is cleared for one cycle after each access, which keeps a master that holds stb high from
// being acknowledged twice. sel is honoured per byte on writes.
// The memory has no reset (block RAM contents are not reset); a reader must write first.
// The architecture names the memory but gives no size: 1024 words, one 36-kbit block, is this
// design's choice.
module wb_bram
  import udma_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic    clk,
  input  logic    rst_n,
  input  wb_req_t wb_req,
  output wb_rsp_t wb_rsp
);

  localparam int unsigned IW = $clog2(DEPTH);

  logic [DW-1:0] mem [DEPTH];
  logic [IW-1:0] idx;
  logic          ack_q;
  logic [DW-1:0] rdat_q;

  assign idx = wb_req.adr[IW-1:0];

  always_ff @(posedge clk) begin
    if (wb_req.cyc && wb_req.stb && !ack_q) begin
      if (wb_req.we) begin
        for (int b = 0; b < 4; b++)
          if (wb_req.sel[b]) mem[idx][8*b +: 8] <= wb_req.dat[8*b +: 8];
      end
      rdat_q <= mem[idx];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ack_q <= 1'b0;
    else        ack_q <= wb_req.cyc & wb_req.stb & ~ack_q;
  end

  always_comb begin
    wb_rsp     = WB_RSP_IDLE;
    wb_rsp.ack = ack_q;
    wb_rsp.dat = rdat_q;
  end

endmodule
