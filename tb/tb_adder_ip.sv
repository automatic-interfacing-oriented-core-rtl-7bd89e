// Self-checking testbench for adder_ip, the adder peripheral.
//
// Acts as the bus master. Writes operand pairs to A and B, reads them back
// and reads R, comparing with A + B worked out in the testbench. Enables the
// overflow interrupt and checks that device_intr rises exactly three clocks
// after the access cycle of the write that causes an overflow (operand
// register, core result register, interrupt status register), that the
// status bit reads back and that writing 1 clears it. Finally a software
// reset must clear A, B and R and the interrupt enable.
module tb_adder_ip;
  import ipif_pkg::*;

  localparam logic [31:0] BASE = 32'h4000_0000;

  logic     clk = 1'b0;
  logic     sys_reset;
  bus_req_t req;
  bus_rsp_t rsp;
  logic     device_intr;
  int       checks = 0, failures = 0;
  int       overflows = 0;

  adder_ip #(.BASEADDR(BASE), .BLOCK_ID(8'h01)) dut (
    .clk, .sys_reset, .req, .rsp, .device_intr
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

  function automatic bit ovf(input logic [31:0] x, input logic [31:0] y);
    longint signed s;
    s = longint'(signed'(x)) + longint'(signed'(y));
    return s > 64'sd2147483647 || s < -64'sd2147483648;
  endfunction

  initial begin
    logic [31:0] d, x, y;
    sys_reset = 1'b1;
    req = '0;
    repeat (3) @(negedge clk);
    sys_reset = 1'b0;

    rd(BASE + 8, d);
    check(d == 0, "R not zero after reset");
    rd(BASE + 32'h48, d);
    check(d == 32'h3021_0101, $sformatf("mir=%h", d));

    // Sums through the bus.
    for (int t = 0; t < 80; t++) begin
      x = (t < 4) ? 32'h7fff_fff0 : $urandom;
      y = (t < 4) ? 32'h0000_0100 : $urandom;
      wr(BASE + 0, x);
      wr(BASE + 4, y);
      rd(BASE + 0, d);
      check(d == x, "A readback");
      rd(BASE + 4, d);
      check(d == y, "B readback");
      rd(BASE + 8, d);
      check(d == x + y, $sformatf("R=%h expected %h", d, x + y));
      if (ovf(x, y)) overflows++;
    end
    check(overflows > 4, "too few overflowing sums");

    // Overflow interrupt path with its latency.
    wr(BASE + 0, 32'h0);
    wr(BASE + 4, 32'h0);
    wr(BASE + 32'h40, 32'h1);            // clear anything captured so far
    wr(BASE + 32'h44, 32'h1);            // enable the overflow interrupt
    check(!device_intr, "interrupt with no overflow");
    wr(BASE + 0, 32'h8000_0000);
    wr(BASE + 4, 32'h8000_0000);         // overflow: access cycle t
    check(!device_intr, "interrupt too early (t+1)");
    @(negedge clk);
    check(!device_intr, "interrupt too early (t+2)");
    @(negedge clk);
    check(device_intr, "interrupt missing at t+3");
    rd(BASE + 32'h40, d);
    check(d == 32'h1, "overflow status bit not set");
    wr(BASE + 32'h40, 32'h1);
    @(negedge clk);
    check(!device_intr, "interrupt not cleared");
    // A held overflow does not fire again; a new one does.
    repeat (4) @(negedge clk);
    check(!device_intr, "held overflow fired again");
    wr(BASE + 4, 32'h0);
    wr(BASE + 4, 32'h8000_0001);
    repeat (3) @(negedge clk);
    check(device_intr, "second overflow not signalled");

    // Software reset.
    wr(BASE + 32'h48, 32'hA);
    @(negedge clk);
    check(!device_intr, "interrupt survived the local reset");
    rd(BASE + 0, d);
    check(d == 0, "A not cleared by the local reset");
    rd(BASE + 4, d);
    check(d == 0, "B not cleared by the local reset");
    rd(BASE + 8, d);
    check(d == 0, "R not cleared by the local reset");
    rd(BASE + 32'h44, d);
    check(d == 0, "enable not cleared by the local reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
