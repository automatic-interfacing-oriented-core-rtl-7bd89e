// Self-checking testbench for opb_ipif.
//
// The testbench plays both the bus master and the register layer: a small
// array behind ip_wrce / ip_rdce stands in for the core's registers. Checks:
//   * every transfer to the window is acknowledged exactly one clock after
//     its access cycle (two clocks per transfer, also back to back);
//   * a write raises exactly the addressed ip_wrce bit for exactly one clock
//     with the write data on ip_data; a read raises the addressed ip_rdce
//     bit and returns what the register array holds;
//   * requests outside the window are never acknowledged;
//   * interrupt events set the status register, the enable register masks
//     device_intr, and writing 1 clears status;
//   * writing the reset key makes ip_reset high for one clock; the module
//     information register reads 0x3021_0701 for block id 0x07.
module tb_opb_ipif;
  import ipif_pkg::*;

  localparam logic [31:0] BASE = 32'h4000_0000;
  localparam int          NCE  = 3;

  logic           clk = 1'b0;
  logic           sys_reset;
  bus_req_t       req;
  bus_rsp_t       rsp;
  logic           device_intr, ip_reset;
  logic [31:0]    ip_data, ip_rdata;
  logic [NCE-1:0] ip_rdce, ip_wrce;
  logic [1:0]     ip_intr_event;
  logic [31:0]    regs [NCE];
  int             checks = 0, failures = 0;
  int             wr_pulses = 0, rd_pulses = 0, reset_pulses = 0;

  opb_ipif #(.BASEADDR(BASE), .NUM_USER_CE(NCE), .NUM_INTR(2), .BLOCK_ID(8'h07)) dut (
    .clk, .sys_reset, .req, .rsp, .device_intr, .ip_reset, .ip_data,
    .ip_rdce, .ip_wrce, .ip_rdata, .ip_intr_event
  );

  always #5 clk = ~clk;

  // Register array standing in for the register layer.
  always_comb begin
    ip_rdata = '0;
    for (int i = 0; i < NCE; i++) if (ip_rdce[i]) ip_rdata = regs[i];
  end
  always_ff @(posedge clk) begin
    for (int i = 0; i < NCE; i++) if (ip_wrce[i]) regs[i] <= ip_data;
    if (|ip_wrce) wr_pulses <= wr_pulses + 1;
    if (|ip_rdce) rd_pulses <= rd_pulses + 1;
    if (ip_reset && !sys_reset) reset_pulses <= reset_pulses + 1;
  end

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

  // One bus transfer; returns the read data and the clocks until ack.
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

  initial begin
    logic [31:0] d;
    int c, w0, r0, p0;
    sys_reset = 1'b1;
    req = '0;
    ip_intr_event = '0;
    repeat (3) @(negedge clk);
    sys_reset = 1'b0;
    for (int i = 0; i < NCE; i++) regs[i] = '0;

    // Register writes and reads through the chip enables.
    for (int t = 0; t < 60; t++) begin
      int sel;
      logic [31:0] v;
      sel = $urandom_range(0, NCE - 1);
      v = $urandom;
      w0 = wr_pulses;
      wr(BASE + 4 * sel, v);
      check(wr_pulses == w0 + 1, "write did not give exactly one chip-enable clock");
      check(regs[sel] == v, $sformatf("register %0d holds %h, wrote %h", sel, regs[sel], v));
      r0 = rd_pulses;
      rd(BASE + 4 * sel, d);
      check(rd_pulses == r0 + 1, "read did not give exactly one chip-enable clock");
      check(d == v, $sformatf("read %h from register %0d, expected %h", d, sel, v));
    end

    // Back-to-back transfers: sel stays high, each takes two clocks.
    @(negedge clk);
    req = '{sel: 1'b1, rnw: 1'b1, addr: BASE + 4, wdata: '0};
    @(posedge clk); #1 check(rsp.ack, "first back-to-back transfer not acked");
    @(posedge clk); #1 check(!rsp.ack, "ack held for two clocks");
    @(posedge clk); #1 check(rsp.ack && rsp.rdata == regs[1], "second back-to-back transfer");
    @(negedge clk);
    req.sel = 1'b0;
    @(posedge clk); #1 check(!rsp.ack && rsp.rdata == '0, "response not idle");

    // Unused word inside the window: acked, reads zero.
    rd(BASE + 4 * 10, d);
    check(d == '0, "unused word did not read zero");

    // Outside the window: no ack at all.
    w0 = wr_pulses;
    xfer(1'b0, BASE + 32'h1000, 32'h1, d, c);
    check(c == 8 && !rsp.ack, "request outside the window was acked");
    check(wr_pulses == w0, "request outside the window raised a chip enable");

    // Interrupts: event, status, mask, clear.
    rd(BASE + 32'h40, d);
    check(d == 0, "status not clear at start");
    @(negedge clk);
    ip_intr_event = 2'b10;
    @(negedge clk);
    ip_intr_event = 2'b00;
    rd(BASE + 32'h40, d);
    check(d == 32'h2, $sformatf("status %h after event 1", d));
    check(!device_intr, "device interrupt while all sources disabled");
    wr(BASE + 32'h44, 32'h1);
    rd(BASE + 32'h44, d);
    check(d == 32'h1, "enable register readback");
    check(!device_intr, "device interrupt from a masked source");
    wr(BASE + 32'h44, 32'h2);
    @(negedge clk);
    check(device_intr, "device interrupt missing for an enabled source");
    wr(BASE + 32'h40, 32'h2);
    @(negedge clk);
    check(!device_intr, "device interrupt not cleared by writing status");
    rd(BASE + 32'h40, d);
    check(d == 0, "status not cleared");

    // Module information and software reset.
    rd(BASE + 32'h48, d);
    check(d == 32'h3021_0701, $sformatf("mir=%h", d));
    p0 = reset_pulses;
    wr(BASE + 32'h48, 32'h5);
    @(negedge clk);
    check(reset_pulses == p0, "reset without the key");
    wr(BASE + 32'h48, 32'hA);
    @(negedge clk);
    check(reset_pulses == p0 + 1, "no reset pulse after the key");
    rd(BASE + 32'h44, d);
    check(d == 0, "soft reset did not clear the enable register");
    repeat (3) @(negedge clk);
    check(reset_pulses == p0 + 1, "reset pulse longer than one clock");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
