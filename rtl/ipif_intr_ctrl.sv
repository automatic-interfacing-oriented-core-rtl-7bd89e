// ipif_intr_ctrl: interrupt source controller for the interrupts of one core.
//
// The core may raise several interrupts (intr1 .. intrN); the component has a
// single device interrupt output. This controller sits between the two:
//   * status (ISR): bit i is set on each rising edge of intr_event[i] and
//     stays set until software writes a 1 to it (write-one-to-clear); an
//     edge in the same cycle as the clear wins;
//   * enable (IER): software-written mask, one bit per source;
//   * irq = OR over i of (status[i] AND enable[i]), the filtered device
//     interrupt.
// Timing: a rising edge of an event in cycle t sets status at the end of t,
// so irq rises in cycle t+1 if the source is enabled. reset is synchronous,
// active high, and clears status, enable and the edge detector.
//
// Capturing core interrupts, filtering them, and merging them into one
// device interrupt follow the described interrupt handling. Edge capture,
// write-one-to-clear and the register layout are this design's choices.
module ipif_intr_ctrl
  import ipif_pkg::*;
#(
  parameter int unsigned NUM_INTR = 1
) (
  input  logic                clk,
  input  logic                reset,
  input  logic [NUM_INTR-1:0] intr_event,
  input  logic [DWIDTH-1:0]   wdata,
  input  logic                isr_wr,   // write strobe of the status register
  input  logic                ier_wr,   // write strobe of the enable register
  output logic [NUM_INTR-1:0] isr,
  output logic [NUM_INTR-1:0] ier,
  output logic                irq
);

  logic [NUM_INTR-1:0] event_q;
  logic [NUM_INTR-1:0] rise;
  logic [NUM_INTR-1:0] clear;

  always_comb begin
    rise  = intr_event & ~event_q;
    clear = isr_wr ? wdata[NUM_INTR-1:0] : '0;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      event_q <= '0;
      isr     <= '0;
      ier     <= '0;
    end else begin
      event_q <= intr_event;
      isr     <= (isr & ~clear) | rise;
      if (ier_wr) ier <= wdata[NUM_INTR-1:0];
    end
  end

  assign irq = |(isr & ier);

endmodule
