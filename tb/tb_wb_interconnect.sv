// tb_wb_interconnect: self-checking test of the Wishbone address decoder.
// Four tb-side slaves, each a small memory that answers one cycle after the strobe with its own
// tag in the data, sit on the four regions of the default map. The test checks that each access
// reaches exactly the slave of its region (strobes seen by the others are counted as failures),
// that the response comes back from that slave, and that an address in no region gets err one
// cycle after the strobe and no ack.
module tb_wb_interconnect;
  import udma_pkg::*;
  logic clk = 0, rst_n = 0;
  wb_req_t m_req;
  wb_rsp_t m_rsp;
  wb_req_t [NUM_SLAVES-1:0] s_req;
  wb_rsp_t [NUM_SLAVES-1:0] s_rsp;
  logic [31:0] smem [NUM_SLAVES][16];
  logic [NUM_SLAVES-1:0] sack;
  logic [31:0] sdat [NUM_SLAVES];
  int strobes [NUM_SLAVES];
  int checks = 0, failures = 0;

  wb_interconnect dut (.clk, .rst_n, .m_req, .m_rsp, .s_req, .s_rsp);

  always #5 clk = ~clk;

  for (genvar g = 0; g < NUM_SLAVES; g++) begin : g_slv
    always_ff @(posedge clk) begin
      if (!rst_n) sack[g] <= 0;
      else begin
        sack[g] <= s_req[g].stb & s_req[g].cyc & ~sack[g];
        if (s_req[g].stb & ~sack[g]) begin
          strobes[g]++;
          if (s_req[g].we) smem[g][s_req[g].adr[3:0]] <= s_req[g].dat;
          sdat[g] <= smem[g][s_req[g].adr[3:0]] ^ (32'(g) << 28);
        end
      end
    end
    always_comb begin
      s_rsp[g]     = '0;
      s_rsp[g].ack = sack[g];
      s_rsp[g].dat = sdat[g];
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(bit we, logic [31:0] adr, logic [31:0] dat,
                        output logic [31:0] rdat, output bit ack, output bit err, output int cyc);
    @(negedge clk);
    m_req = '0; m_req.cyc = 1; m_req.stb = 1; m_req.we = we; m_req.adr = adr; m_req.dat = dat;
    m_req.sel = 4'hF;
    cyc = 0;
    do begin @(posedge clk); cyc++; #1; end while (!m_rsp.ack && !m_rsp.err && cyc < 10);
    rdat = m_rsp.dat; ack = m_rsp.ack; err = m_rsp.err;
    @(negedge clk); m_req = '0;
  endtask

  initial begin
    logic [31:0] r, ref_val [NUM_SLAVES][16];
    bit a, e;
    int c;
    int prev_cnt [NUM_SLAVES];
    m_req = '0;
    for (int s = 0; s < NUM_SLAVES; s++) strobes[s] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < NUM_SLAVES; s++)
      for (int i = 0; i < 16; i++) begin
        ref_val[s][i] = $urandom;
        prev_cnt = strobes;
        access(1, {REGION_MAP[s], 16'(i)}, ref_val[s][i], r, a, e, c);
        check(a && !e && c == 1, $sformatf("write ack slave %0d", s));
        for (int o = 0; o < NUM_SLAVES; o++)
          check(strobes[o] - prev_cnt[o] == (o == s ? 1 : 0), $sformatf("write %0d reached slave %0d", s, o));
      end
    for (int k = 0; k < 200; k++) begin
      automatic int s = $urandom % NUM_SLAVES;
      automatic int i = $urandom % 16;
      prev_cnt = strobes;
      access(0, {REGION_MAP[s], 16'(i)}, '0, r, a, e, c);
      check(a && !e && c == 1, "read ack");
      check(r == (ref_val[s][i] ^ (32'(s) << 28)), $sformatf("read slave %0d word %0d", s, i));
      for (int o = 0; o < NUM_SLAVES; o++)
        check(strobes[o] - prev_cnt[o] == (o == s ? 1 : 0), "read reached only its slave");
    end
    // unmapped regions
    for (int k = 0; k < 20; k++) begin
      automatic logic [15:0] reg_ = 16'h0004 + 16'($urandom % 16'hFFF0);
      prev_cnt = strobes;
      access($urandom % 2, {reg_, 16'($urandom)}, $urandom, r, a, e, c);
      check(e && !a && c == 1, $sformatf("unmapped region %h gives err", reg_));
      for (int o = 0; o < NUM_SLAVES; o++) check(strobes[o] == prev_cnt[o], "unmapped reaches no slave");
    end
    @(posedge clk); #1;
    check(!m_rsp.err && !m_rsp.ack, "err is a single pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
