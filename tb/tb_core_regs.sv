// Self-checking testbench for core_regs.
//
// Uses three core inputs, two core outputs and three interrupt lines. A
// reference array in the testbench mirrors the input registers: random
// one-hot writes must land in exactly the addressed register and nowhere
// else, reads must return the addressed input register or core output,
// writes to output words must change nothing, reset must clear every
// register, and the interrupt lines must reach intr_event unchanged.
module tb_core_regs;

  localparam int NI = 3, NO = 2, NQ = 3, NC = NI + NO;

  logic                  clk = 1'b0;
  logic                  reset;
  logic [31:0]           bus_data;
  logic [NC-1:0]         rd_ce, wr_ce;
  logic [31:0]           ip_rdata;
  logic [NQ-1:0]         intr_event, core_intr;
  logic [NI-1:0][31:0]   core_in;
  logic [NO-1:0][31:0]   core_out;
  logic [31:0]           model [NI];
  int                    checks = 0, failures = 0;

  core_regs #(.NUM_IN(NI), .NUM_OUT(NO), .NUM_INTR(NQ)) dut (
    .clk, .reset, .bus_data, .rd_ce, .wr_ce, .ip_rdata, .intr_event,
    .core_in, .core_out, .core_intr
  );

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

  task automatic compare_all(input string when);
    for (int i = 0; i < NI; i++)
      check(core_in[i] == model[i], $sformatf("%s: reg %0d = %h, expected %h",
                                              when, i, core_in[i], model[i]));
  endtask

  initial begin
    reset = 1'b1;
    bus_data = '0;
    rd_ce = '0;
    wr_ce = '0;
    core_intr = '0;
    core_out = '0;
    repeat (2) @(negedge clk);
    reset = 1'b0;
    for (int i = 0; i < NI; i++) model[i] = '0;
    compare_all("after reset");

    for (int t = 0; t < 400; t++) begin
      int sel;
      @(negedge clk);
      sel = $urandom_range(0, NC - 1);
      core_out[0] = $urandom;
      core_out[1] = $urandom;
      core_intr = NQ'($urandom);
      #1 check(intr_event == core_intr, "interrupt lines not forwarded");
      if ($urandom_range(0, 1) == 1) begin
        // write cycle
        bus_data = $urandom;
        wr_ce = NC'(1) << sel;
        if (sel < NI) model[sel] = bus_data;
        @(negedge clk);
        wr_ce = '0;
        compare_all("after write");
      end else begin
        // read cycle: combinational data
        rd_ce = NC'(1) << sel;
        #1 check(ip_rdata == ((sel < NI) ? model[sel] : core_out[sel - NI]),
                 $sformatf("read word %0d returned %h", sel, ip_rdata));
        @(negedge clk);
        rd_ce = '0;
        #1 check(ip_rdata == '0, "read data not zero without a chip enable");
      end
    end

    // Reset clears all registers.
    @(negedge clk);
    reset = 1'b1;
    @(negedge clk);
    reset = 1'b0;
    for (int i = 0; i < NI; i++) model[i] = '0;
    compare_all("after second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
