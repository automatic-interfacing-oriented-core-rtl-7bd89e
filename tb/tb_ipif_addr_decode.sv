// Self-checking testbench for ipif_addr_decode.
//
// Sweeps every word of the window, addresses just outside it and random
// addresses, with and without the select and for both directions. The
// expected chip enables are worked out from the address arithmetic: the
// offset from BASEADDR must be below the window size and its word number
// selects the bit; reads drive only rd_ce, writes only wr_ce.
module tb_ipif_addr_decode;

  localparam logic [31:0] BASE = 32'h8001_2300;
  localparam int          WIN  = 256;
  localparam int          NCE  = 20;

  logic [31:0]    addr;
  logic           cs, rnw, hit;
  logic [NCE-1:0] rd_ce, wr_ce;
  int             checks = 0, failures = 0;

  ipif_addr_decode #(.BASEADDR(BASE), .WIN_BYTES(WIN), .NUM_CE(NCE)) dut (
    .addr, .cs, .rnw, .hit, .rd_ce, .wr_ce
  );

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

  task automatic probe(input logic [31:0] a, input logic c, input logic r);
    longint        off;
    bit            in_win;
    logic [NCE-1:0] exp_ce;
    addr = a;
    cs   = c;
    rnw  = r;
    #1;
    off    = longint'(a) - longint'(BASE);
    in_win = (off >= 0) && (off < WIN);
    exp_ce = '0;
    if (in_win && c && (off / 4) < NCE) exp_ce[off / 4] = 1'b1;
    check(hit == in_win, $sformatf("hit=%0d for %h", hit, a));
    check(rd_ce == (r ? exp_ce : '0), $sformatf("rd_ce=%h for %h cs=%0d rnw=%0d", rd_ce, a, c, r));
    check(wr_ce == (r ? '0 : exp_ce), $sformatf("wr_ce=%h for %h cs=%0d rnw=%0d", wr_ce, a, c, r));
  endtask

  initial begin
    for (int w = 0; w < WIN / 4; w++) begin
      probe(BASE + 4 * w, 1'b1, 1'b1);
      probe(BASE + 4 * w, 1'b1, 1'b0);
      probe(BASE + 4 * w, 1'b0, 1'b1);
    end
    probe(BASE - 4, 1'b1, 1'b1);
    probe(BASE + WIN, 1'b1, 1'b0);
    probe(BASE ^ 32'h8000_0000, 1'b1, 1'b1);
    for (int i = 0; i < 500; i++) probe({$urandom} & 32'hffff_fffc, 1'b1, 1'($urandom));
    for (int i = 0; i < 500; i++)
      probe(BASE + ($urandom_range(0, WIN / 4 - 1) * 4), 1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
