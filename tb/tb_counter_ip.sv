// Self-checking testbench for counter_ip, the counter peripheral.
//
// Acts as the bus master. For several count lengths N it writes N, clears
// and enables the done interrupt, writes start = 1 and counts the clocks
// until device_intr rises: the register takes the write at the end of the
// access cycle t, the core sees start in t+1 and fires N clocks later, and
// the status register makes device_intr high in cycle t+N+2. Also checks
// register readback, that no interrupt arrives while the source is masked
// (though the status bit is set), and that a software reset aborts a count.
module tb_counter_ip;
  import ipif_pkg::*;

  localparam logic [31:0] BASE = 32'h4001_0000;

  logic     clk = 1'b0;
  logic     sys_reset;
  bus_req_t req;
  bus_rsp_t rsp;
  logic     device_intr;
  int       checks = 0, failures = 0;

  counter_ip #(.BASEADDR(BASE), .BLOCK_ID(8'h02)) dut (
    .clk, .sys_reset, .req, .rsp, .device_intr
  );

  always #5 clk = ~clk;

  initial begin
    #1000000;
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

  task automatic xfer(input logic rnw, input logic [31:0] addr, input logic [31:0] wdata,
                      output logic [31:0] rdata);
    int clocks;
    @(negedge clk);
    req = '{sel: 1'b1, rnw: rnw, addr: addr, wdata: wdata};
    clocks = 0;
    do begin
      @(posedge clk);
      #1 clocks++;
    end while (!rsp.ack && clocks < 8);
    check(clocks == 1, $sformatf("transfer to %h acked after %0d clocks", addr, clocks));
    rdata = rsp.rdata;
    @(negedge clk);
    req.sel = 1'b0;
  endtask

  task automatic wr(input logic [31:0] addr, input logic [31:0] data);
    logic [31:0] d;
    xfer(1'b0, addr, data, d);
  endtask

  task automatic rd(input logic [31:0] addr, output logic [31:0] data);
    xfer(1'b1, addr, '0, data);
  endtask

  // Start a count of n and return the cycle, counted from the access
  // cycle of the start write, in which device_intr is first high.
  task automatic timed_count(input logic [31:0] n, output int cycle);
    wr(BASE + 4, 32'h0);
    wr(BASE + 0, n);
    wr(BASE + 32'h40, 32'h1);
    wr(BASE + 4, 32'h1);       // returns in the middle of cycle t+1
    cycle = 1;
    while (!device_intr && cycle < 500) begin
      @(negedge clk);
      cycle++;
    end
  endtask

  initial begin
    logic [31:0] d;
    int cyc;
    sys_reset = 1'b1;
    req = '0;
    repeat (3) @(negedge clk);
    sys_reset = 1'b0;

    rd(BASE + 32'h48, d);
    check(d == 32'h3021_0201, $sformatf("mir=%h", d));
    wr(BASE + 0, 32'hDEAD_BEEF);
    rd(BASE + 0, d);
    check(d == 32'hDEAD_BEEF, "N readback");
    wr(BASE + 4, 32'h0000_0001);
    rd(BASE + 4, d);
    check(d == 32'h1, "start readback");
    rd(BASE + 8, d);
    check(d == 0, "unused word not zero");

    wr(BASE + 32'h44, 32'h1);
    for (int k = 0; k < 8; k++) begin
      logic [31:0] n;
      n = (k < 4) ? 32'(k + 1) : 32'($urandom_range(5, 120));
      timed_count(n, cyc);
      check(cyc == n + 2, $sformatf("N=%0d: interrupt in cycle %0d, expected %0d", n, cyc, n + 2));
      rd(BASE + 32'h40, d);
      check(d == 32'h1, "done status not set");
    end

    // Masked: status is set but device_intr stays low.
    wr(BASE + 32'h44, 32'h0);
    timed_count(32'd10, cyc);
    check(cyc == 500, "interrupt from a masked source");
    rd(BASE + 32'h40, d);
    check(d == 32'h1, "status not set while masked");

    // Software reset aborts a running count.
    wr(BASE + 32'h4, 32'h0);
    wr(BASE + 32'h40, 32'h1);
    wr(BASE + 32'h0, 32'd30);
    wr(BASE + 32'h4, 32'h1);
    wr(BASE + 32'h48, 32'hA);
    wr(BASE + 32'h44, 32'h1);
    repeat (60) @(negedge clk);
    check(!device_intr, "count survived the local reset");
    rd(BASE + 32'h40, d);
    check(d == 0, "status set after the local reset");
    rd(BASE + 32'h0, d);
    check(d == 0, "N not cleared by the local reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
