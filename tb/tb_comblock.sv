// tb_comblock: self-checking test of the ComBlock from both of its sides.
// Processor side: register write/read, input-register read, FIFO push/pop through the data
// word, FIFO status and control words, TDPRAM access, all with the one-cycle read latency.
// Fabric side: oreg_wr pulses, Wishbone reads that pop the "in" FIFO and stall while it is empty,
// Wishbone writes that push the "out" FIFO and stall while it is full, and TDPRAM sharing (words
// written on one side read on the other). Also the sticky overflow and underflow flags.
module tb_comblock;
  import udma_pkg::*;
  localparam int unsigned FD = 8, RD = 128, HAW = $clog2(RD) + 1;
  logic clk = 0, rst_n = 0;
  logic host_valid = 0, host_we = 0, host_rvalid;
  logic [HAW-1:0] host_addr = 0;
  logic [31:0] host_wdata = 0, host_rdata;
  logic [NUM_REGS-1:0][31:0] oreg, ireg;
  logic [NUM_REGS-1:0] oreg_wr;
  wb_req_t fifo_req, ram_req;
  wb_rsp_t fifo_rsp, ram_rsp;
  int checks = 0, failures = 0;
  int stall_rd = 0, stall_wr = 0;

  comblock #(.NREG(NUM_REGS), .FIFO_DEPTH(FD), .RAM_DEPTH(RD)) dut (
    .clk, .rst_n, .host_valid, .host_we, .host_addr, .host_wdata, .host_rdata, .host_rvalid,
    .oreg_o(oreg), .oreg_wr_o(oreg_wr), .ireg_i(ireg),
    .fifo_wb_req(fifo_req), .fifo_wb_rsp(fifo_rsp), .ram_wb_req(ram_req), .ram_wb_rsp(ram_rsp));

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

  task automatic hwrite(logic [HAW-1:0] a, logic [31:0] d);
    @(negedge clk);
    host_valid = 1; host_we = 1; host_addr = a; host_wdata = d;
    @(negedge clk);
    host_valid = 0; host_we = 0;
  endtask

  task automatic hread(logic [HAW-1:0] a, output logic [31:0] d);
    @(negedge clk);
    host_valid = 1; host_we = 0; host_addr = a;
    @(posedge clk); #1;
    host_valid = 0;
    check(host_rvalid, "rvalid one cycle after read");
    d = host_rdata;
  endtask

  // Wishbone access on one of the two slaves; returns cycles until ack
  task automatic wb(bit ram, bit we, logic [31:0] adr, logic [31:0] dat,
                    output logic [31:0] rdat, output int cyc, input int max_cyc = 1000);
    wb_req_t r;
    r = '0; r.cyc = 1; r.stb = 1; r.we = we; r.adr = adr; r.dat = dat; r.sel = 4'hF;
    @(negedge clk);
    if (ram) ram_req = r; else fifo_req = r;
    cyc = 0;
    do begin
      @(posedge clk); cyc++; #1;
    end while (!(ram ? ram_rsp.ack : fifo_rsp.ack) && cyc < max_cyc);
    rdat = ram ? ram_rsp.dat : fifo_rsp.dat;
    @(negedge clk);
    fifo_req = '0; ram_req = '0;
  endtask

  initial begin
    logic [31:0] d, exp_q[$];
    int cyc;
    int wr_pulses;
    fifo_req = '0; ram_req = '0; ireg = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // ---- registers
    for (int i = 0; i < NUM_REGS; i++) begin
      @(negedge clk);
      host_valid = 1; host_we = 1; host_addr = HAW'(i); host_wdata = 32'hA000_0000 + 32'(i * 17);
      @(posedge clk); #1;
      host_valid = 0; host_we = 0;
      check(oreg_wr == (NUM_REGS'(1) << i), $sformatf("oreg_wr pulse %0d", i));
      check(oreg[i] == 32'hA000_0000 + 32'(i * 17), "oreg value with pulse");
      @(posedge clk); #1;
      check(oreg_wr == '0, "oreg_wr is one cycle");
    end
    for (int i = 0; i < NUM_REGS; i++) begin
      hread(HAW'(i), d);
      check(d == 32'hA000_0000 + 32'(i * 17), "oreg readback");
      ireg[i] = $urandom;
      hread(HAW'(16 + i), d);
      check(d == ireg[i], "ireg read");
    end

    // ---- FIFO in: processor -> fabric
    hread(HAW'(HOST_FIFO_STAT), d);
    check(d[0] && !d[1] && d[2] && !d[3] && d[15:8] == 0 && d[23:16] == 0, "FIFO status after reset");
    for (int i = 0; i < FD; i++) begin
      exp_q.push_back($urandom);
      hwrite(HAW'(HOST_FIFO_DATA), exp_q[$]);
    end
    hread(HAW'(HOST_FIFO_STAT), d);
    check(d[1] && !d[0] && d[15:8] == FD, "in FIFO full");
    hwrite(HAW'(HOST_FIFO_DATA), 32'hDEAD_BEEF);  // dropped
    hread(HAW'(HOST_FIFO_STAT), d);
    check(d[4], "overflow flag set");
    for (int i = 0; i < FD; i++) begin
      wb(0, 0, 32'h0001_0000, '0, d, cyc);
      check(d == exp_q.pop_front(), "WB read pops in FIFO in order");
      check(cyc == 1, "WB FIFO read latency 1 when data present");
    end
    // read on empty FIFO stalls until the processor pushes
    fork
      begin
        wb(0, 0, 32'h0001_0000, '0, d, cyc);
        check(d == 32'h1234_5678, "stalled read gets the late word");
        check(cyc > 10, $sformatf("read stalled %0d cycles", cyc));
        if (cyc > 10) stall_rd++;
      end
      begin
        repeat (15) @(posedge clk);
        hwrite(HAW'(HOST_FIFO_DATA), 32'h1234_5678);
      end
    join
    hwrite(HAW'(HOST_FIFO_CTRL), 32'h4);
    hread(HAW'(HOST_FIFO_STAT), d);
    check(!d[4] && !d[5], "sticky flags cleared");

    // ---- FIFO out: fabric -> processor
    for (int i = 0; i < FD; i++) begin
      exp_q.push_back($urandom);
      wb(0, 1, 32'h0001_0003, exp_q[$], d, cyc);
      check(cyc == 1, "WB FIFO write latency 1");
    end
    hread(HAW'(HOST_FIFO_STAT), d);
    check(d[3] && d[23:16] == FD, "out FIFO full");
    fork
      begin
        wb(0, 1, 32'h0001_0000, 32'hCAFE_0001, d, cyc);
        check(cyc > 10, $sformatf("write stalled %0d cycles", cyc));
        if (cyc > 10) stall_wr++;
      end
      begin
        repeat (15) @(posedge clk);
        hread(HAW'(HOST_FIFO_DATA), d);
        check(d == exp_q.pop_front(), "processor pops out FIFO");
      end
    join
    exp_q.push_back(32'hCAFE_0001);
    while (exp_q.size() > 0) begin
      hread(HAW'(HOST_FIFO_DATA), d);
      check(d == exp_q.pop_front(), "out FIFO order");
    end
    hread(HAW'(HOST_FIFO_DATA), d);
    check(d == 0, "empty read returns 0");
    hread(HAW'(HOST_FIFO_STAT), d);
    check(d[5] && d[2], "underflow flag set");
    // clear control
    hwrite(HAW'(HOST_FIFO_DATA), 32'h1);
    hwrite(HAW'(HOST_FIFO_DATA), 32'h2);
    hwrite(HAW'(HOST_FIFO_CTRL), 32'h1);
    hread(HAW'(HOST_FIFO_STAT), d);
    check(d[0] && d[15:8] == 0, "clear empties in FIFO");

    // ---- TDPRAM
    for (int i = 0; i < RD; i += 5) hwrite(HAW'(RD + i), 32'h5000_0000 + 32'(i));
    for (int i = 0; i < RD; i += 5) begin
      wb(1, 0, 32'h0002_0000 + 32'(i), '0, d, cyc);
      check(d == 32'h5000_0000 + 32'(i) && cyc == 1, "processor write, fabric read");
    end
    for (int i = 1; i < RD; i += 7) wb(1, 1, 32'h0002_0000 + 32'(i), 32'h7000_0000 + 32'(i), d, cyc);
    for (int i = 1; i < RD; i += 7) begin
      hread(HAW'(RD + i), d);
      check(d == 32'h7000_0000 + 32'(i), "fabric write, processor read");
    end
    check(stall_rd > 0 && stall_wr > 0, "both stall directions exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
