// Self-checking testbench for counter_core.
//
// For a set of count lengths n, raises start and watches intr1 cycle by
// cycle: it must be high in exactly one cycle, n clocks after the cycle in
// which start was first seen high (n = 0 behaves like n = 1). Also checks
// that holding start high does not restart the count, that a new rising
// edge restarts it, and that reset stops a running count.
module tb_counter_core;

  logic        clk = 1'b0;
  logic        reset;
  logic [31:0] n;
  logic        start;
  logic        intr1;
  int          checks = 0, failures = 0;

  counter_core dut (.clk, .reset, .n, .start, .intr1);

  always #5 clk = ~clk;

  initial begin
    #500000;
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

  // Start a count of length len and check intr1 over len + 5 cycles.
  task automatic run(input int unsigned len);
    int unsigned expect_at;
    expect_at = (len == 0) ? 1 : len;
    @(negedge clk);
    n     = len;
    start = 1'b1;
    #1 check(intr1 == 1'b0, "intr1 high in the start cycle");
    for (int unsigned k = 1; k <= expect_at + 5; k++) begin
      @(negedge clk);
      check(intr1 == (k == expect_at),
            $sformatf("n=%0d: intr1=%0d at cycle %0d", len, intr1, k));
    end
    start = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    reset = 1'b1;
    n     = '0;
    start = 1'b0;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    @(negedge clk);
    check(intr1 == 1'b0, "intr1 high after reset");
    run(1);
    run(2);
    run(5);
    run(0);
    run(37);
    run($urandom_range(3, 60));

    // Restart by a new rising edge in the middle of a count.
    @(negedge clk);
    n = 20;
    start = 1'b1;
    repeat (8) begin
      @(negedge clk);
      check(intr1 == 1'b0, "early intr1 before restart");
    end
    start = 1'b0;
    @(negedge clk);            // cycle 9 of the first count
    check(intr1 == 1'b0, "early intr1 before restart");
    n = 4;
    start = 1'b1;              // new rising edge, count restarts at 4
    for (int k = 1; k <= 25; k++) begin
      @(negedge clk);
      check(intr1 == (k == 4), $sformatf("restart: intr1=%0d at cycle %0d", intr1, k));
    end
    start = 1'b0;

    // Reset stops a running count.
    @(negedge clk);
    n = 6;
    start = 1'b1;
    repeat (3) @(negedge clk);
    reset = 1'b1;
    start = 1'b0;
    @(negedge clk);
    reset = 1'b0;
    for (int k = 1; k <= 10; k++) begin
      @(negedge clk);
      check(intr1 == 1'b0, "intr1 after reset stopped the count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
