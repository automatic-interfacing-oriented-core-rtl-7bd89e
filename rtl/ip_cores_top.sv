// ip_cores_top: the adder and counter peripherals on one shared slave bus.
//
// Both test components sit on the same 32-bit peripheral bus, each in its
// own address window: each decodes the request itself and only the one
// whose window matches answers. Responses are combined by OR, which works
// because a slave drives zero read data whenever it is not acknowledging.
// Each peripheral keeps its own device interrupt output. A request to an
// address outside both windows is never acknowledged; the bus master has
// to time it out.
//
// The two components and their contents follow the described test cases;
// putting them on one bus, the base addresses and the OR combining of
// responses are this design's choices.
module ip_cores_top
  import ipif_pkg::*;
#(
  parameter logic [AWIDTH-1:0] ADDER_BASEADDR   = 32'h4000_0000,
  parameter logic [AWIDTH-1:0] COUNTER_BASEADDR = 32'h4001_0000
) (
  input  logic     clk,
  input  logic     sys_reset,
  input  bus_req_t req,
  output bus_rsp_t rsp,
  output logic     adder_intr,
  output logic     counter_intr
);

  bus_rsp_t adder_rsp;
  bus_rsp_t counter_rsp;

  adder_ip #(
    .BASEADDR(ADDER_BASEADDR),
    .BLOCK_ID(8'h01)
  ) u_adder (
    .clk        (clk),
    .sys_reset  (sys_reset),
    .req        (req),
    .rsp        (adder_rsp),
    .device_intr(adder_intr)
  );

  counter_ip #(
    .BASEADDR(COUNTER_BASEADDR),
    .BLOCK_ID(8'h02)
  ) u_counter (
    .clk        (clk),
    .sys_reset  (sys_reset),
    .req        (req),
    .rsp        (counter_rsp),
    .device_intr(counter_intr)
  );

  assign rsp = adder_rsp | counter_rsp;

  // Windows must not overlap, so at most one slave answers.
  single_responder: assert property (@(posedge clk) disable iff (sys_reset)
    !(adder_rsp.ack && counter_rsp.ack));

endmodule
