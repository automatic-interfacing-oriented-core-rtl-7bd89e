// counter_core: interval counter that raises an interrupt N clocks after start.
//
// The functional core of the counter test component: custom inputs n and
// start, standard ports clk, reset and intr1. A rising edge of start (start
// seen high in a cycle after it was low) loads the count n; intr1 is then
// high for exactly one clock, n clock periods after the cycle in which start
// was first seen high. A new rising edge of start restarts the count, even
// while one is running. n = 0 is treated like n = 1. reset is synchronous,
// active high, stops the count and clears intr1; after reset a start that
// is already high counts as a rising edge.
//
// The ports and "start, then an interrupt after N clock periods" follow the
// described component; edge triggering, the one-clock interrupt pulse and
// the n = 0 case are this design's choices.
module counter_core #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             reset,
  input  logic [WIDTH-1:0] n,
  input  logic             start,
  output logic             intr1
);

  logic             start_q;  // start in the previous cycle
  logic             running;
  logic [WIDTH-1:0] remaining;  // clocks left, counting the current one

  always_ff @(posedge clk) begin
    if (reset) begin
      start_q   <= 1'b0;
      running   <= 1'b0;
      remaining <= '0;
    end else begin
      start_q <= start;
      if (start && !start_q) begin
        running   <= 1'b1;
        remaining <= n;
      end else if (running) begin
        if (remaining <= 1) running <= 1'b0;
        remaining <= remaining - 1'b1;
      end
    end
  end

  assign intr1 = running && (remaining <= 1);

endmodule
