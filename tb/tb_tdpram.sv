// tb_tdpram: self-checking test of the true dual-port RAM.
// Both ports write and read random addresses against a reference array, with the two ports on
// clocks of different periods. Checks the registered read (data one edge after the enable),
// read-before-write on a written address, that a disabled port holds its output, and that a
// word written through one port is read back through the other.
module tb_tdpram;
  localparam int unsigned W = 32, D = 64, AWD = $clog2(D);
  logic clk_a = 0, clk_b = 0;
  logic en_a = 0, we_a = 0, en_b = 0, we_b = 0;
  logic [AWD-1:0] addr_a = 0, addr_b = 0;
  logic [W-1:0] wdata_a = 0, wdata_b = 0, rdata_a, rdata_b;
  logic [W-1:0] ref_mem [D];
  bit           known [D];
  int checks = 0, failures = 0;

  tdpram #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk_a = ~clk_a;
  always #7 clk_b = ~clk_b;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic op_a(bit we, logic [AWD-1:0] a, logic [W-1:0] d);
    logic [W-1:0] exp;
    bit k;
    @(negedge clk_a);
    en_a = 1; we_a = we; addr_a = a; wdata_a = d;
    exp = ref_mem[a];
    k = known[a];
    @(posedge clk_a);
    if (we) begin ref_mem[a] = d; known[a] = 1; end
    #1;
    en_a = 0; we_a = 0;
    if (k) check(rdata_a == exp, $sformatf("port A read %0d: %h vs %h", a, rdata_a, exp));
  endtask

  task automatic op_b(bit we, logic [AWD-1:0] a, logic [W-1:0] d);
    logic [W-1:0] exp;
    bit k;
    @(negedge clk_b);
    en_b = 1; we_b = we; addr_b = a; wdata_b = d;
    exp = ref_mem[a];
    k = known[a];
    @(posedge clk_b);
    if (we) begin ref_mem[a] = d; known[a] = 1; end
    #1;
    en_b = 0; we_b = 0;
    if (k) check(rdata_b == exp, $sformatf("port B read %0d: %h vs %h", a, rdata_b, exp));
  endtask

  initial begin
    logic [W-1:0] held;
    // initialise through A, read back through B
    for (int i = 0; i < D; i++) op_a(1, AWD'(i), W'(32'h1000_0000 + i * 3));
    for (int i = 0; i < D; i++) op_b(0, AWD'(i), '0);
    // initialise again through B, read through A
    for (int i = 0; i < D; i++) op_b(1, AWD'(i), $urandom);
    for (int i = 0; i < D; i++) op_a(0, AWD'(i), '0);
    // random traffic on both ports, interleaved (different addresses to avoid collisions)
    fork
      for (int i = 0; i < 400; i++) op_a($urandom % 2, AWD'(2 * ($urandom % (D / 2))), $urandom);
      for (int i = 0; i < 300; i++) op_b($urandom % 2, AWD'(2 * ($urandom % (D / 2)) + 1), $urandom);
    join
    // output holds while disabled
    held = rdata_a;
    repeat (3) @(posedge clk_a);
    check(rdata_a == held, "port A holds when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
