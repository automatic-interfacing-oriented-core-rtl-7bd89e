// adder_ip: the 32-bit adder as a complete bus peripheral.
//
// Three layers, outermost first: the bus interface (opb_ipif), the register
// layer (core_regs) and the bus-agnostic adder_core. Only the interface sees
// the bus; the register layer turns the two operand inputs and the result
// output into bus registers; clk and reset go straight to the core, and the
// core's overflow interrupt intr1 goes to the interface's interrupt
// controller and from there to device_intr.
//
// Register map (byte offsets from BASEADDR):
//   0x00  A, operand       read/write
//   0x04  B, operand       read/write
//   0x08  R = A + B        read only (one clock behind A and B)
//   0x40  interrupt status bit 0 = overflow (write 1 to clear)
//   0x44  interrupt enable bit 0 = overflow
//   0x48  write 0xA: local reset; read: module information
// A, B and R are the three register chip enables and intr1 the one
// interrupt of the described component. Bus timing is that of opb_ipif:
// two clocks per transfer.
module adder_ip
  import ipif_pkg::*;
#(
  parameter logic [AWIDTH-1:0] BASEADDR = 32'h4000_0000,
  parameter logic [7:0]        BLOCK_ID = 8'h01
) (
  input  logic     clk,
  input  logic     sys_reset,
  input  bus_req_t req,
  output bus_rsp_t rsp,
  output logic     device_intr
);

  localparam int unsigned NUM_CE   = 3;  // A, B, R
  localparam int unsigned NUM_INTR = 1;  // intr1: overflow

  logic                   ip_reset;
  logic [DWIDTH-1:0]      ip_data;
  logic [NUM_CE-1:0]      ip_rdce;
  logic [NUM_CE-1:0]      ip_wrce;
  logic [DWIDTH-1:0]      ip_rdata;
  logic [NUM_INTR-1:0]    intr_event;
  logic [1:0][DWIDTH-1:0] core_in;
  logic [DWIDTH-1:0]      r;
  logic                   intr1;

  opb_ipif #(
    .BASEADDR   (BASEADDR),
    .NUM_USER_CE(NUM_CE),
    .NUM_INTR   (NUM_INTR),
    .BLOCK_ID   (BLOCK_ID)
  ) u_ipif (
    .clk          (clk),
    .sys_reset    (sys_reset),
    .req          (req),
    .rsp          (rsp),
    .device_intr  (device_intr),
    .ip_reset     (ip_reset),
    .ip_data      (ip_data),
    .ip_rdce      (ip_rdce),
    .ip_wrce      (ip_wrce),
    .ip_rdata     (ip_rdata),
    .ip_intr_event(intr_event)
  );

  core_regs #(
    .NUM_IN  (2),
    .NUM_OUT (1),
    .NUM_INTR(NUM_INTR)
  ) u_regs (
    .clk       (clk),
    .reset     (ip_reset),
    .bus_data  (ip_data),
    .rd_ce     (ip_rdce),
    .wr_ce     (ip_wrce),
    .ip_rdata  (ip_rdata),
    .intr_event(intr_event),
    .core_in   (core_in),
    .core_out  (r),
    .core_intr (intr1)
  );

  adder_core #(
    .WIDTH(DWIDTH)
  ) u_core (
    .clk  (clk),
    .reset(ip_reset),
    .a    (core_in[0]),
    .b    (core_in[1]),
    .r    (r),
    .intr1(intr1)
  );

endmodule
