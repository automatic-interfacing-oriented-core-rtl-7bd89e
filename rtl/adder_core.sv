// adder_core: registered two's-complement adder with an overflow interrupt.
//
// This is the functional core of the adder test component, written with no
// knowledge of the bus: two operand inputs a and b, the sum r, and the
// standard ports clk, reset and intr1. On every rising clock edge the core
// registers r = a + b (modulo 2^WIDTH) and sets intr1 when the addition
// overflows, that is when a and b have the same sign and the sum's sign
// differs. Latency from operands to result is one clock. reset is
// synchronous and active high and clears r and intr1.
//
// The ports, the 32-bit width and the meaning of intr1 (set when an overflow
// occurs) follow the described component. Registering the result, reading
// "overflow" as signed overflow and the reset value are this design's
// choices.
module adder_core #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             reset,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] r,
  output logic             intr1
);

  logic [WIDTH-1:0] sum;
  logic             ovf;

  always_comb begin
    sum = a + b;
    ovf = (a[WIDTH-1] == b[WIDTH-1]) && (sum[WIDTH-1] != a[WIDTH-1]);
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      r     <= '0;
      intr1 <= 1'b0;
    end else begin
      r     <= sum;
      intr1 <= ovf;
    end
  end

endmodule
