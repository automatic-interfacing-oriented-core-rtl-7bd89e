// counter_ip: the interval counter as a complete bus peripheral.
//
// Same three layers as the adder peripheral: bus interface (opb_ipif),
// register layer (core_regs) and the bus-agnostic counter_core. The counter
// has two custom inputs and no custom output, so the register layer holds
// two registers; its interrupt intr1 reaches device_intr through the
// interface's interrupt controller.
//
// Register map (byte offsets from BASEADDR):
//   0x00  N, count length in clocks    read/write
//   0x04  start, bit 0                 read/write (the whole word is kept)
//   0x40  interrupt status bit 0 = count done (write 1 to clear)
//   0x44  interrupt enable bit 0 = count done
//   0x48  write 0xA: local reset; read: module information
// Writing 1 to start when it was 0 starts a count; intr1 fires N clocks
// after the register changes, so the done bit is set N+1 clocks after the
// access cycle of the write. Write 0 to start before the next start.
module counter_ip
  import ipif_pkg::*;
#(
  parameter logic [AWIDTH-1:0] BASEADDR = 32'h4001_0000,
  parameter logic [7:0]        BLOCK_ID = 8'h02
) (
  input  logic     clk,
  input  logic     sys_reset,
  input  bus_req_t req,
  output bus_rsp_t rsp,
  output logic     device_intr
);

  localparam int unsigned NUM_CE   = 2;  // N, start
  localparam int unsigned NUM_INTR = 1;  // intr1: count done

  logic                   ip_reset;
  logic [DWIDTH-1:0]      ip_data;
  logic [NUM_CE-1:0]      ip_rdce;
  logic [NUM_CE-1:0]      ip_wrce;
  logic [DWIDTH-1:0]      ip_rdata;
  logic [NUM_INTR-1:0]    intr_event;
  logic [1:0][DWIDTH-1:0] core_in;
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
    .NUM_OUT (0),
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
    .core_out  ('0),
    .core_intr (intr1)
  );

  counter_core #(
    .WIDTH(DWIDTH)
  ) u_core (
    .clk  (clk),
    .reset(ip_reset),
    .n    (core_in[0]),
    .start(core_in[1][0]),
    .intr1(intr1)
  );

endmodule
