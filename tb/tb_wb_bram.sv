// tb_wb_bram: self-checking test of the Wishbone block RAM.
// A small Wishbone master task runs single classic cycles (hold stb until ack) and counts the
// cycles each takes: every access must be acknowledged exactly one cycle after the strobe.
// Writes random data (some with partial byte selects) and reads everything back against a
// reference array; also holds stb over two back-to-back accesses to see that ack drops between
// them and that one access is not acknowledged twice.
module tb_wb_bram;
  import udma_pkg::*;
  localparam int unsigned D = 256;
  logic clk = 0, rst_n = 0;
  wb_req_t req;
  wb_rsp_t rsp;
  logic [31:0] ref_mem [D];
  int checks = 0, failures = 0;

  wb_bram #(.DEPTH(D)) dut (.clk, .rst_n, .wb_req(req), .wb_rsp(rsp));

  always #5 clk = ~clk;

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

  task automatic wb_access(bit we, logic [31:0] adr, logic [31:0] dat, logic [3:0] sel,
                           output logic [31:0] rdat, output int cycles);
    @(negedge clk);
    req = '0;
    req.cyc = 1; req.stb = 1; req.we = we; req.adr = adr; req.dat = dat; req.sel = sel;
    cycles = 0;
    do begin
      @(posedge clk);
      cycles++;
      #1;
    end while (!rsp.ack && cycles < 20);
    rdat = rsp.dat;
    @(negedge clk);
    req = '0;
  endtask

  initial begin
    logic [31:0] r;
    int cyc;
    req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < D; i++) begin
      ref_mem[i] = $urandom;
      wb_access(1, 32'(i), ref_mem[i], 4'hF, r, cyc);
      check(cyc == 1, $sformatf("write ack latency %0d", cyc));
    end
    for (int i = 0; i < 200; i++) begin
      automatic int a = $urandom % D;
      automatic logic [31:0] d = $urandom;
      automatic logic [3:0] s = 4'($urandom);
      wb_access(1, 32'(a), d, s, r, cyc);
      for (int b = 0; b < 4; b++) if (s[b]) ref_mem[a][8*b +: 8] = d[8*b +: 8];
    end
    for (int i = 0; i < D; i++) begin
      wb_access(0, 32'(i), '0, 4'hF, r, cyc);
      check(cyc == 1, $sformatf("read ack latency %0d", cyc));
      check(r == ref_mem[i], $sformatf("read %0d: %h vs %h", i, r, ref_mem[i]));
    end
    // stb held high across two reads: ack, then a gap, then ack again
    @(negedge clk);
    req = '0; req.cyc = 1; req.stb = 1; req.adr = 32'd5; req.sel = 4'hF;
    @(posedge clk); #1;
    check(rsp.ack && rsp.dat == ref_mem[5], "first ack of held strobe");
    @(negedge clk); req.adr = 32'd6;
    @(posedge clk); #1;
    check(!rsp.ack, "ack drops for one cycle");
    @(posedge clk); #1;
    check(rsp.ack && rsp.dat == ref_mem[6], "second ack of held strobe");
    @(negedge clk); req = '0;
    @(posedge clk); #1;
    check(!rsp.ack && !rsp.err, "idle after cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
