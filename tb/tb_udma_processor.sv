// tb_udma_processor: self-checking test of the UDMA instruction engine.
// A tb-side Wishbone slave serves two 256-word memories: region 0 answers one cycle after the
// strobe, region 1 stalls a random 0..3 extra cycles per access; any other region answers err.
// Each instruction's result is compared with a reference copy loop run in the testbench.
// Covered: plain copy with the 4*N cycle count, negative and zero increments, N = 0, stalls,
// STOP in mid-transfer (at every phase of a word), START ignored while busy, a bus error and RESET.
module tb_udma_processor;
  import udma_pkg::*;
  logic clk = 0, rst_n = 0;
  udma_instr_t  instr;
  logic         cmd_valid;
  udma_cmd_e    cmd;
  udma_status_t status;
  logic [31:0]  count;
  wb_req_t      req;
  wb_rsp_t      rsp;
  int checks = 0, failures = 0;

  logic [31:0] mem  [2][256];
  logic [31:0] refm [2][256];
  int accesses = 0;

  udma_processor dut (.clk, .rst_n, .instr, .cmd_valid, .cmd, .status, .count,
                      .wbm_req(req), .wbm_rsp(rsp));

  always #5 clk = ~clk;

  // ---- slave model
  int wait_left = 0;
  logic busy_acc = 0;
  always @(posedge clk) begin
    rsp <= '0;
    if (!rst_n) begin
      busy_acc <= 0;
    end else if (req.cyc && req.stb && !rsp.ack && !rsp.err) begin
      if (!busy_acc) begin
        busy_acc  <= 1;
        wait_left <= (req.adr[31:16] == 16'h0001) ? int'($urandom % 4) : 0;
      end
      if (busy_acc && wait_left == 0 || !busy_acc && req.adr[31:16] != 16'h0001) begin
        busy_acc <= 0;
        accesses++;
        if (req.adr[31:16] > 16'h0001) rsp.err <= 1;
        else begin
          rsp.ack <= 1;
          if (req.we) mem[req.adr[16]][req.adr[7:0]] <= req.dat;
          rsp.dat <= mem[req.adr[16]][req.adr[7:0]];
        end
      end else if (busy_acc) wait_left <= wait_left - 1;
    end else if (!(req.cyc && req.stb)) busy_acc <= 0;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic issue(udma_cmd_e c);
    @(negedge clk);
    cmd_valid = 1; cmd = c;
    @(negedge clk);
    cmd_valid = 0; cmd = CMD_NONE;
  endtask

  task automatic ref_copy(logic [31:0] s, logic [31:0] d, logic [31:0] si, logic [31:0] di, int n);
    for (int k = 0; k < n; k++) begin
      refm[d[16]][d[7:0]] = refm[s[16]][s[7:0]];
      s += si; d += di;
    end
  endtask

  task automatic compare_mem(string what);
    int bad = 0;
    for (int r = 0; r < 2; r++) for (int i = 0; i < 256; i++) if (mem[r][i] !== refm[r][i]) bad++;
    check(bad == 0, $sformatf("%s: %0d words differ", what, bad));
  endtask

  // run one instruction to completion; returns cycles from the START cycle to done
  task automatic run(logic [31:0] s, logic [31:0] d, logic [31:0] si, logic [31:0] di, int n,
                     output int cycles);
    instr = '{src_addr: s, dst_addr: d, src_inc: si, dst_inc: di, n_words: n};
    @(negedge clk);
    cmd_valid = 1; cmd = CMD_START;
    @(posedge clk);
    cycles = 0;
    #1 cmd_valid = 0; cmd = CMD_NONE;
    while (status.busy && cycles < 5000) begin @(posedge clk); #1; cycles++; end
    ref_copy(s, d, si, di, n);
  endtask

  initial begin
    int cyc;
    cmd_valid = 0; cmd = CMD_NONE; instr = '0;
    for (int r = 0; r < 2; r++) for (int i = 0; i < 256; i++) begin
      mem[r][i] = $urandom; refm[r][i] = mem[r][i];
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!status.busy && !status.done && req.cyc == 0, "idle after reset");

    // 1. plain copy region 0 -> region 0, 16 words, 4 cycles per word
    run(32'h0000_0000, 32'h0000_0064, 1, 1, 16, cyc);
    compare_mem("copy 16");
    check(status.done && !status.error && !status.stopped, "done after copy");
    check(count == 16, "count 16");
    check(cyc == 4 * 16, $sformatf("16 words took %0d cycles, expected 64", cyc));

    // 2. negative source step, destination step 2
    run(32'h0000_0032, 32'h0000_00C8, 32'hFFFF_FFFF, 2, 10, cyc);
    compare_mem("negative increment");
    check(cyc == 40, $sformatf("10 words took %0d cycles", cyc));

    // 3. zero source step: one word repeated
    run(32'h0000_0007, 32'h0000_0010, 0, 1, 8, cyc);
    compare_mem("zero source increment");

    // 4. zero destination step: last word wins
    run(32'h0000_0020, 32'h0000_00F0, 1, 0, 5, cyc);
    compare_mem("zero destination increment");

    // 5. N = 0: done at once, no bus traffic
    accesses = 0;
    run(32'h0000_0000, 32'h0000_0001, 1, 1, 0, cyc);
    @(posedge clk); #1;
    check(status.done && !status.busy && accesses == 0 && count == 0, "N=0 completes without access");

    // 6. stalling source region 1 -> region 0
    run(32'h0001_0000, 32'h0000_0080, 1, 1, 40, cyc);
    compare_mem("copy from stalling slave");
    check(cyc > 4 * 40, $sformatf("stalls lengthen the transfer (%0d cycles)", cyc));
    check(count == 40 && status.done, "count after stalled copy");

    // 7. region 0 -> region 1 (stalling destination), overlapping copy pattern
    run(32'h0000_0010, 32'h0001_0010, 1, 3, 30, cyc);
    compare_mem("copy to stalling slave");

    // 8. STOP in mid transfer
    instr = '{src_addr: 32'h0000_0000, dst_addr: 32'h0001_0080, src_inc: 1, dst_inc: 1, n_words: 100};
    issue(CMD_START);
    repeat (30) @(posedge clk);
    issue(CMD_STOP);
    @(posedge clk); #1;
    check(!status.busy && status.stopped && !status.done, "stopped");
    check(count > 0 && count < 100, $sformatf("partial count %0d", count));
    check(!req.cyc, "bus released after STOP");
    // the words moved so far are exactly the first `count`
    ref_copy(32'h0000_0000, 32'h0001_0080, 1, 1, int'(count));
    compare_mem("partial copy before STOP");

    // 8b. STOP at every phase of a word: count must equal the words actually written
    for (int dly = 0; dly < 8; dly++) begin
      instr = '{src_addr: 32'h0000_0000, dst_addr: 32'h0000_00D0, src_inc: 1, dst_inc: 1, n_words: 20};
      issue(CMD_START);
      repeat (8 + dly) @(posedge clk);
      issue(CMD_STOP);
      @(posedge clk); #1;
      check(status.stopped && !status.busy, $sformatf("STOP at phase %0d", dly));
      ref_copy(32'h0000_0000, 32'h0000_00D0, 1, 1, int'(count));
      compare_mem($sformatf("count matches memory after STOP at phase %0d", dly));
    end

    // 9. START while busy is ignored
    instr = '{src_addr: 32'h0000_0040, dst_addr: 32'h0000_00A0, src_inc: 1, dst_inc: 1, n_words: 12};
    issue(CMD_START);
    instr = '{src_addr: 32'h0000_0000, dst_addr: 32'h0000_0000, src_inc: 0, dst_inc: 0, n_words: 3};
    repeat (5) @(posedge clk);
    issue(CMD_START);
    while (status.busy) @(posedge clk);
    #1;
    ref_copy(32'h0000_0040, 32'h0000_00A0, 1, 1, 12);
    compare_mem("second START ignored while busy");
    check(count == 12 && status.done, "count of first instruction");

    // 10. bus error on an unmapped destination
    instr = '{src_addr: 32'h0000_0000, dst_addr: 32'h0042_0000, src_inc: 1, dst_inc: 1, n_words: 4};
    issue(CMD_START);
    repeat (10) @(posedge clk);
    #1;
    check(status.error && !status.busy && !status.done && count == 0, "error on unmapped address");
    compare_mem("nothing written on error");

    // 11. RESET clears status and count
    run(32'h0000_0000, 32'h0000_0001, 1, 1, 2, cyc);
    check(count == 2 && status.done, "before reset");
    issue(CMD_RESET);
    #1;
    check(count == 0 && status == '0, "RESET clears status and count");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
