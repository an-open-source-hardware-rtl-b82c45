// wb_interconnect: one Wishbone master to NS slaves, selected by address region.
//
// The UDMA processor is the only master inside the FPGA; every memory resource is a slave in
// the global memory map. Adding a resource to the map means giving it a region and a port here.
// The region of an access is adr[31:16]; slave i answers accesses whose region equals
// REGIONS[i]. The request is passed to every slave with cyc/stb gated by its select, and the
// response of the selected slave is passed back. A strobe whose address matches no region is
// answered with err one cycle later (same timing as the slaves' ack), so a bad instruction ends
// instead of hanging the bus.
// Decoding and muxing are combinational: the interconnect adds no cycle; its only flip-flop is
// the error responder. The region width and the error response are this design's choices.
module wb_interconnect
  import udma_pkg::*;
#(
  parameter int unsigned             NS      = NUM_SLAVES,
  parameter logic [NS-1:0][15:0]     REGIONS = REGION_MAP
) (
  input  logic              clk,
  input  logic              rst_n,
  input  wb_req_t           m_req,
  output wb_rsp_t           m_rsp,
  output wb_req_t [NS-1:0]  s_req,
  input  wb_rsp_t [NS-1:0]  s_rsp
);

  logic [NS-1:0] hit;
  logic          err_q;

  always_comb begin
    for (int i = 0; i < NS; i++) hit[i] = (m_req.adr[31:16] == REGIONS[i]);
  end

  always_comb begin
    for (int i = 0; i < NS; i++) begin
      s_req[i]     = m_req;
      s_req[i].cyc = m_req.cyc & hit[i];
      s_req[i].stb = m_req.stb & hit[i];
    end
  end

  always_comb begin
    m_rsp     = WB_RSP_IDLE;
    m_rsp.err = err_q;
    for (int i = 0; i < NS; i++) begin
      if (hit[i]) begin
        m_rsp.ack = s_rsp[i].ack;
        m_rsp.err = s_rsp[i].err;
        m_rsp.dat = s_rsp[i].dat;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) err_q <= 1'b0;
    else        err_q <= m_req.cyc & m_req.stb & ~(|hit) & ~err_q;
  end

  // Regions must not overlap: at most one slave is selected.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(hit));

endmodule
