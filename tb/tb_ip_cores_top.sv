// End-to-end testbench for ip_cores_top at its default parameters.
//
// A bus master drives both peripherals on the shared bus. It interleaves
// adder and counter work, comparing sums with its own arithmetic and count
// intervals with the expected N + 2 clocks, and makes each mechanism of the
// design happen, counting how often:
//   sums          adder results read back and checked
//   overflow_irq  overflow interrupts delivered to adder_intr
//   count_irq     counter interrupts delivered to counter_intr
//   masked        interrupts captured in status but held off by the enable
//   cleared       status bits cleared by writing 1
//   soft_reset    local resets of one peripheral (the other keeps its state)
//   mir_reads     module information reads from each peripheral
//   no_ack        requests outside both windows, never acknowledged
//   back_to_back  transfers issued with sel held high across an ack
// A mechanism that never happened counts as a failure. The end-to-end
// result is the adder computing while the counter runs: a sum is read while
// a count is in progress and the count still ends on time.
module tb_ip_cores_top;
  import ipif_pkg::*;

  localparam logic [31:0] ADDER   = 32'h4000_0000;
  localparam logic [31:0] COUNTER = 32'h4001_0000;

  logic     clk = 1'b0;
  logic     sys_reset;
  bus_req_t req;
  bus_rsp_t rsp;
  logic     adder_intr, counter_intr;
  int       checks = 0, failures = 0;
  int       sums = 0, overflow_irq = 0, count_irq = 0, masked = 0, cleared = 0;
  int       soft_reset = 0, mir_reads = 0, no_ack = 0, back_to_back = 0;

  ip_cores_top dut (.clk, .sys_reset, .req, .rsp, .adder_intr, .counter_intr);

  always #5 clk = ~clk;

  initial begin
    #2000000;
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
                      output logic [31:0] rdata, output int clocks);
    @(negedge clk);
    req = '{sel: 1'b1, rnw: rnw, addr: addr, wdata: wdata};
    clocks = 0;
    do begin
      @(posedge clk);
      #1 clocks++;
    end while (!rsp.ack && clocks < 8);
    rdata = rsp.rdata;
    @(negedge clk);
    req.sel = 1'b0;
  endtask

  task automatic wr(input logic [31:0] addr, input logic [31:0] data);
    logic [31:0] d;
    int c;
    xfer(1'b0, addr, data, d, c);
    check(c == 1, $sformatf("write %h acked after %0d clocks", addr, c));
  endtask

  task automatic rd(input logic [31:0] addr, output logic [31:0] data);
    int c;
    xfer(1'b1, addr, '0, data, c);
    check(c == 1, $sformatf("read %h acked after %0d clocks", addr, c));
  endtask

  task automatic add_and_check(input logic [31:0] x, input logic [31:0] y);
    logic [31:0] d;
    wr(ADDER + 0, x);
    wr(ADDER + 4, y);
    rd(ADDER + 8, d);
    check(d == x + y, $sformatf("sum %h + %h read %h", x, y, d));
    sums++;
  endtask

  // Adder overflow interrupt, delivered and cleared.
  task automatic overflow_round(input logic [31:0] x, input logic [31:0] y);
    logic [31:0] d;
    wr(ADDER + 4, 32'h0);
    wr(ADDER + 32'h40, 32'h1);
    wr(ADDER + 0, x);
    wr(ADDER + 4, y);
    repeat (2) @(negedge clk);
    check(adder_intr, "overflow interrupt missing");
    if (adder_intr) overflow_irq++;
    wr(ADDER + 32'h40, 32'h1);
    @(negedge clk);
    check(!adder_intr, "overflow interrupt not cleared");
    rd(ADDER + 32'h40, d);
    check(d == 0, "adder status not cleared");
    if (!adder_intr && d == 0) cleared++;
  endtask

  initial begin
    logic [31:0] d;
    int c, cyc;
    sys_reset = 1'b1;
    req = '0;
    repeat (4) @(negedge clk);
    sys_reset = 1'b0;

    // Identify both peripherals.
    rd(ADDER + 32'h48, d);
    check(d == 32'h3021_0101, $sformatf("adder mir=%h", d));
    rd(COUNTER + 32'h48, d);
    check(d == 32'h3021_0201, $sformatf("counter mir=%h", d));
    mir_reads += 2;

    // Plain sums.
    for (int i = 0; i < 20; i++) add_and_check($urandom, $urandom);

    // Enable both interrupts.
    wr(ADDER + 32'h44, 32'h1);
    wr(COUNTER + 32'h44, 32'h1);
    overflow_round(32'h7fff_ffff, 32'h0000_0001);
    overflow_round(32'h8000_0000, 32'hffff_ffff);

    // Counter running while the adder works.
    for (int k = 0; k < 4; k++) begin
      int n;
      n = 40 + 10 * k;
      wr(COUNTER + 4, 32'h0);
      wr(COUNTER + 0, 32'(n));
      wr(COUNTER + 32'h40, 32'h1);
      wr(COUNTER + 4, 32'h1);               // access cycle t
      cyc = 1;                              // now in the middle of t+1
      // three transfers of sum work, six clocks, while counting
      add_and_check($urandom, $urandom);
      cyc += 6;
      check(!counter_intr, "counter interrupt early");
      while (!counter_intr && cyc < 400) begin
        @(negedge clk);
        cyc++;
      end
      check(cyc == n + 2, $sformatf("count %0d ended in cycle %0d", n, cyc));
      if (counter_intr) count_irq++;
      wr(COUNTER + 32'h40, 32'h1);
      @(negedge clk);
      check(!counter_intr, "counter interrupt not cleared");
      if (!counter_intr) cleared++;
    end

    // Masked: counter fires with its enable off.
    wr(COUNTER + 32'h44, 32'h0);
    wr(COUNTER + 4, 32'h0);
    wr(COUNTER + 0, 32'd5);
    wr(COUNTER + 4, 32'h1);
    repeat (10) @(negedge clk);
    rd(COUNTER + 32'h40, d);
    check(d == 32'h1 && !counter_intr, "masked counter interrupt");
    if (d == 32'h1 && !counter_intr) masked++;
    wr(COUNTER + 32'h44, 32'h1);
    @(negedge clk);
    check(counter_intr, "pending interrupt not delivered once enabled");
    wr(COUNTER + 32'h40, 32'h1);
    cleared++;

    // Local reset of the adder leaves the counter alone.
    wr(ADDER + 0, 32'h1111_1111);
    wr(COUNTER + 0, 32'h2222_2222);
    wr(ADDER + 32'h48, 32'hA);
    rd(ADDER + 0, d);
    check(d == 0, "adder A not cleared by its local reset");
    rd(ADDER + 32'h44, d);
    check(d == 0, "adder enable not cleared by its local reset");
    rd(COUNTER + 0, d);
    check(d == 32'h2222_2222, "counter disturbed by the adder's local reset");
    rd(COUNTER + 32'h44, d);
    check(d == 32'h1, "counter enable disturbed by the adder's local reset");
    soft_reset++;
    wr(COUNTER + 32'h48, 32'hA);
    rd(COUNTER + 0, d);
    check(d == 0, "counter N not cleared by its local reset");
    soft_reset++;

    // Outside both windows: never acknowledged.
    xfer(1'b1, 32'h4002_0000, '0, d, c);
    check(c == 8 && d == 0, "request outside both windows answered");
    if (c == 8) no_ack++;

    // Back-to-back: sel held high, alternating peripherals.
    wr(ADDER + 0, 32'd100);
    wr(ADDER + 4, 32'd23);
    @(negedge clk);
    req = '{sel: 1'b1, rnw: 1'b1, addr: ADDER + 8, wdata: '0};
    @(posedge clk); #1 check(rsp.ack && rsp.rdata == 32'd123, "back-to-back first read");
    @(negedge clk);
    req.addr = COUNTER + 32'h48;
    // the counter has no ack pending, so it answers on the next clock
    @(posedge clk); #1 check(rsp.ack && rsp.rdata == 32'h3021_0201, "back-to-back second read");
    @(negedge clk);
    req.addr = COUNTER + 32'h48;
    // the same slave again: one idle clock before its next ack
    @(posedge clk); #1 check(!rsp.ack, "ack without an access cycle");
    @(posedge clk); #1 check(rsp.ack && rsp.rdata == 32'h3021_0201, "back-to-back third read");
    @(negedge clk);
    req.sel = 1'b0;
    back_to_back += 3;
    mir_reads++;

    $display("mechanisms: sums=%0d overflow_irq=%0d count_irq=%0d masked=%0d cleared=%0d soft_reset=%0d mir_reads=%0d no_ack=%0d back_to_back=%0d",
             sums, overflow_irq, count_irq, masked, cleared, soft_reset, mir_reads, no_ack, back_to_back);
    check(sums > 0, "no sums");
    check(overflow_irq > 0, "no overflow interrupt");
    check(count_irq > 0, "no counter interrupt");
    check(masked > 0, "no masked interrupt");
    check(cleared > 0, "no status clear");
    check(soft_reset > 0, "no local reset");
    check(mir_reads > 0, "no information register read");
    check(no_ack > 0, "no unanswered request");
    check(back_to_back > 0, "no back-to-back transfer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
