// tb_sync_fifo: self-checking test of sync_fifo against a queue reference model.
// Random pushes and pops (including pushes when full and pops when empty) over several thousand
// cycles; each cycle checks empty, full, count, the head word and the overflow/underflow pulses.
// Also checks that clr empties the buffer.
module tb_sync_fifo;
  localparam int unsigned W = 32, D = 8;
  logic clk = 0, rst_n = 0;
  logic clr, push, pop;
  logic [W-1:0] wdata, rdata;
  logic empty, full, ovf, unf;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];
  int n_full = 0, n_ovf = 0, n_unf = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst_n, .clr, .push, .wdata, .pop, .rdata,
                                          .empty, .full, .count, .overflow(ovf), .underflow(unf));

  always #5 clk = ~clk;

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

  initial begin
    clr = 0; push = 0; pop = 0; wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      // compare state with the model
      check(empty == (q.size() == 0), "empty");
      check(full == (q.size() == D), "full");
      check(count == q.size(), $sformatf("count %0d vs %0d", count, q.size()));
      if (q.size() != 0) check(rdata == q[0], "head");
      // phases: fill-biased, drain-biased, balanced
      push  = ($urandom % 100) < ((cyc / 500) % 3 == 0 ? 80 : (cyc / 500) % 3 == 1 ? 20 : 50);
      pop   = ($urandom % 100) < ((cyc / 500) % 3 == 0 ? 20 : (cyc / 500) % 3 == 1 ? 80 : 50);
      wdata = $urandom;
      #1;
      check(ovf == (push && q.size() == D), "overflow pulse");
      check(unf == (pop && q.size() == 0), "underflow pulse");
      if (ovf) n_ovf++;
      if (unf) n_unf++;
      if (full) n_full++;
      @(posedge clk);
      begin
        automatic int sz = q.size();
        if (pop && sz != 0) void'(q.pop_front());
        if (push && sz < D) q.push_back(wdata);
      end
    end
    @(negedge clk);
    push = 0; pop = 0;
    // fill a few and clear
    for (int i = 0; i < 3; i++) begin
      push = 1; wdata = i; @(posedge clk); #1;
    end
    push = 0; clr = 1; @(posedge clk); #1; clr = 0;
    check(empty && count == 0, "clr empties");
    check(n_full > 0 && n_ovf > 0 && n_unf > 0, "full, overflow and underflow all exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
