// Self-checking testbench for ipif_reset_mir.
//
// Checks the module information word against the value assembled by hand
// from its fields (version 3.01b, block id 0x5A, slave type 0x01 gives
// 0x30215A01), that a write of the key 0xA produces exactly one clock of
// soft_reset and ip_reset in the following cycle, that other values do
// not, and that the system reset also appears on ip_reset.
module tb_ipif_reset_mir;

  logic        clk = 1'b0;
  logic        sys_reset;
  logic [31:0] wdata;
  logic        wr;
  logic        soft_reset, ip_reset;
  logic [31:0] mir;
  int          checks = 0, failures = 0;

  ipif_reset_mir #(.BLOCK_ID(8'h5A)) dut (
    .clk, .sys_reset, .wdata, .wr, .soft_reset, .ip_reset, .mir
  );

  always #5 clk = ~clk;

  initial begin
    #100000;
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

  task automatic write_and_watch(input logic [31:0] value);
    bit key;
    key = (value[3:0] == 4'hA);
    @(negedge clk);
    wdata = value;
    wr = 1'b1;
    #1 check(!soft_reset && !ip_reset, "reset during the write cycle");
    @(negedge clk);
    wr = 1'b0;
    check(soft_reset == key && ip_reset == key,
          $sformatf("value %h: soft_reset=%0d ip_reset=%0d", value, soft_reset, ip_reset));
    @(negedge clk);
    check(!soft_reset && !ip_reset, "reset pulse longer than one clock");
  endtask

  initial begin
    sys_reset = 1'b1;
    wdata = '0;
    wr = 1'b0;
    #1 check(ip_reset, "system reset not on ip_reset");
    repeat (2) @(negedge clk);
    sys_reset = 1'b0;
    #1 check(!ip_reset, "ip_reset stuck after system reset");
    check(mir == 32'h30215A01, $sformatf("mir=%h", mir));
    write_and_watch(32'h0000_000A);
    write_and_watch(32'h0000_0005);
    write_and_watch(32'h1234_567A);
    write_and_watch(32'h0000_00A0);
    for (int i = 0; i < 30; i++) write_and_watch($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
