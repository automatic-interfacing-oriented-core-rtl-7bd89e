// Self-checking testbench for adder_core.
//
// Drives random and corner-case operand pairs, one per clock, and compares
// the registered sum and overflow flag one clock later with a reference
// computed in 64-bit signed arithmetic (overflow = the true sum does not
// fit in 32 signed bits). Also checks that reset clears both outputs and
// that the result appears after exactly one clock.
module tb_adder_core;

  logic        clk = 1'b0;
  logic        reset;
  logic [31:0] a, b, r;
  logic        intr1;
  int          checks = 0, failures = 0;
  int          overflows = 0;

  adder_core dut (.clk, .reset, .a, .b, .r, .intr1);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic apply(input logic [31:0] x, input logic [31:0] y);
    longint signed s;
    logic [31:0]   old_r;
    @(negedge clk);
    a = x;
    b = y;
    old_r = r;
    s = longint'(signed'(x)) + longint'(signed'(y));
    #1 check(r == old_r, "result changed before the clock edge");
    @(negedge clk);
    check(r == 32'(s), $sformatf("r=%h expected %h (a=%h b=%h)", r, 32'(s), x, y));
    check(intr1 == (s > 32'sh7fffffff || s < -64'sd2147483648),
          $sformatf("intr1=%0d for a=%h b=%h", intr1, x, y));
    if (intr1) overflows++;
  endtask

  initial begin
    reset = 1'b1;
    a = 32'h7fffffff;
    b = 32'h1;
    repeat (3) @(negedge clk);
    check(r == 0 && intr1 == 0, "outputs not cleared by reset");
    reset = 1'b0;
    apply(32'd1, 32'd2);
    apply(32'h7fffffff, 32'h1);          // positive overflow
    apply(32'h80000000, 32'hffffffff);   // negative overflow
    apply(32'hffffffff, 32'h1);          // unsigned carry, no signed overflow
    apply(32'h80000000, 32'h7fffffff);
    apply(32'h40000000, 32'h40000000);   // overflow
    for (int i = 0; i < 300; i++) apply($urandom, $urandom);
    @(negedge clk);
    reset = 1'b1;
    @(negedge clk);
    check(r == 0 && intr1 == 0, "outputs not cleared by reset after use");
    check(overflows > 2, "too few overflow cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
