// Self-checking testbench for ipif_intr_ctrl.
//
// Three interrupt sources. A reference model in the testbench keeps its own
// status and enable registers with the same rules (set on a rising edge of
// a source, write-one-to-clear, an edge wins over a clear in the same cycle,
// enable written whole) and the device interrupt is the OR of enabled
// status bits. Random event waveforms and register writes are compared
// cycle by cycle; counters confirm that masking, clearing and set/clear
// collisions all happened.
module tb_ipif_intr_ctrl;

  localparam int NQ = 3;

  logic          clk = 1'b0;
  logic          reset;
  logic [NQ-1:0] intr_event;
  logic [31:0]   wdata;
  logic          isr_wr, ier_wr;
  logic [NQ-1:0] isr, ier;
  logic          irq;
  logic [NQ-1:0] m_isr, m_ier, m_prev;
  int            checks = 0, failures = 0;
  int            masked = 0, cleared = 0, collisions = 0, raised = 0;

  ipif_intr_ctrl #(.NUM_INTR(NQ)) dut (
    .clk, .reset, .intr_event, .wdata, .isr_wr, .ier_wr, .isr, .ier, .irq
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

  initial begin
    reset = 1'b1;
    intr_event = '0;
    wdata = '0;
    isr_wr = 1'b0;
    ier_wr = 1'b0;
    repeat (2) @(negedge clk);
    reset = 1'b0;
    m_isr = '0;
    m_ier = '0;
    m_prev = '0;
    for (int t = 0; t < 2000; t++) begin
      logic [NQ-1:0] rise, clr;
      // drive this cycle
      intr_event = ($urandom_range(0, 3) == 0) ? NQ'($urandom) : intr_event;
      wdata      = $urandom;
      isr_wr     = ($urandom_range(0, 5) == 0);
      ier_wr     = ($urandom_range(0, 9) == 0);
      // model the next state
      rise = intr_event & ~m_prev;
      clr  = isr_wr ? wdata[NQ-1:0] : '0;
      if (|(clr & m_isr & ~rise)) cleared++;
      if (|(clr & rise)) collisions++;
      m_isr  = (m_isr & ~clr) | rise;
      if (ier_wr) m_ier = wdata[NQ-1:0];
      m_prev = intr_event;
      @(negedge clk);
      check(isr == m_isr, $sformatf("isr=%b expected %b", isr, m_isr));
      check(ier == m_ier, $sformatf("ier=%b expected %b", ier, m_ier));
      check(irq == |(m_isr & m_ier), $sformatf("irq=%0d expected %0d", irq, |(m_isr & m_ier)));
      if (|m_isr && !(|(m_isr & m_ier))) masked++;
      if (irq) raised++;
    end
    // Reset clears everything.
    reset = 1'b1;
    @(negedge clk);
    check(isr == '0 && ier == '0 && !irq, "reset did not clear the controller");
    check(masked > 0 && cleared > 0 && collisions > 0 && raised > 0,
          $sformatf("mechanisms not all seen: masked=%0d cleared=%0d collisions=%0d raised=%0d",
                    masked, cleared, collisions, raised));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
