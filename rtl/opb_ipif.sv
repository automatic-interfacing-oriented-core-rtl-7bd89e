// opb_ipif: slave bus interface of one peripheral component.
//
// Everything that knows about the bus lives here, so that the core and its
// register layer never see an address, a read/write flag or a handshake.
// The interface provides three services:
//   * address decoding: the bus address becomes one-hot read and write
//     chip enables (ip_rdce, ip_wrce) for the NUM_USER_CE core registers,
//     plus internal enables for the service registers;
//   * interrupt source control (ipif_intr_ctrl): the core's interrupt
//     events are captured, masked and merged into device_intr;
//   * reset / module information (ipif_reset_mir): a software-triggered
//     local reset pulse and a read-only identification word.
//
// Bus handshake: the master raises req.sel with addr, rnw and wdata and
// holds them until it sees rsp.ack. The cycle in which sel is high, the
// address falls in the window and no ack is pending is the access cycle:
// the chip enables are high for that one cycle, a write is taken at its
// closing clock edge, and rsp.ack is high for the one cycle after it, with
// the read data in rsp.rdata. A transfer therefore takes two clocks, and
// rsp.rdata is zero whenever ack is low so that slave responses can be ORed.
// Word map inside the window (byte offsets):
//   0x00 + 4*i  core register i (i < NUM_USER_CE), through the register layer
//   0x40        interrupt status, write 1 to clear
//   0x44        interrupt enable
//   0x48        write 0x...A: local reset; read: module information
// Any other word in the window reads zero and ignores writes, but is acked.
//
// ip_reset goes to the core, the register layer and the interrupt
// controller; the handshake logic and the reset service see only sys_reset.
//
// The three services and the RdCE/WrCE form of the decoded address follow
// the described interface. The handshake, the word map and the register
// behaviour are this design's own choices.
module opb_ipif
  import ipif_pkg::*;
#(
  parameter logic [AWIDTH-1:0] BASEADDR    = 32'h4000_0000,
  parameter int unsigned       NUM_USER_CE = 3,   // core registers (<= 16)
  parameter int unsigned       NUM_INTR    = 1,   // core interrupt lines
  parameter logic [7:0]        BLOCK_ID    = 8'h00
) (
  input  logic                   clk,
  input  logic                   sys_reset,
  input  bus_req_t               req,
  output bus_rsp_t               rsp,
  output logic                   device_intr,
  // towards the register layer and the core
  output logic                   ip_reset,
  output logic [DWIDTH-1:0]      ip_data,
  output logic [NUM_USER_CE-1:0] ip_rdce,
  output logic [NUM_USER_CE-1:0] ip_wrce,
  input  logic [DWIDTH-1:0]      ip_rdata,
  input  logic [NUM_INTR-1:0]    ip_intr_event
);

  logic                 hit;
  logic                 access;
  logic                 ack_q;
  logic [DWIDTH-1:0]    rdata_q;
  logic [DWIDTH-1:0]    rdata_d;
  logic [NUM_WORDS-1:0] rd_ce;
  logic [NUM_WORDS-1:0] wr_ce;
  logic [NUM_INTR-1:0]  isr;
  logic [NUM_INTR-1:0]  ier;
  logic [DWIDTH-1:0]    mir;

  ipif_addr_decode #(
    .BASEADDR    (BASEADDR),
    .WIN_BYTES   (WINDOW_BYTES),
    .NUM_CE      (NUM_WORDS)
  ) u_decode (
    .addr (req.addr),
    .cs   (access),
    .rnw  (req.rnw),
    .hit  (hit),
    .rd_ce(rd_ce),
    .wr_ce(wr_ce)
  );

  // The first cycle of a request aimed at this window, not yet acked.
  assign access = req.sel && hit && !ack_q;

  assign ip_data = req.wdata;
  assign ip_rdce = rd_ce[NUM_USER_CE-1:0];
  assign ip_wrce = wr_ce[NUM_USER_CE-1:0];

  ipif_intr_ctrl #(
    .NUM_INTR(NUM_INTR)
  ) u_isc (
    .clk       (clk),
    .reset     (ip_reset),
    .intr_event(ip_intr_event),
    .wdata     (req.wdata),
    .isr_wr    (wr_ce[ISR_WORD]),
    .ier_wr    (wr_ce[IER_WORD]),
    .isr       (isr),
    .ier       (ier),
    .irq       (device_intr)
  );

  ipif_reset_mir #(
    .BLOCK_ID(BLOCK_ID)
  ) u_rst (
    .clk       (clk),
    .sys_reset (sys_reset),
    .wdata     (req.wdata),
    .wr        (wr_ce[RSTMIR_WORD]),
    .soft_reset(),
    .ip_reset  (ip_reset),
    .mir       (mir)
  );

  // Read data: core registers through the register layer, or a service.
  always_comb begin
    rdata_d = '0;
    if (|ip_rdce)            rdata_d = ip_rdata;
    if (rd_ce[ISR_WORD])     rdata_d = DWIDTH'(isr);
    if (rd_ce[IER_WORD])     rdata_d = DWIDTH'(ier);
    if (rd_ce[RSTMIR_WORD])  rdata_d = mir;
  end

  always_ff @(posedge clk) begin
    if (sys_reset) begin
      ack_q   <= 1'b0;
      rdata_q <= '0;
    end else begin
      ack_q   <= access;
      rdata_q <= (access && req.rnw) ? rdata_d : '0;
    end
  end

  assign rsp.ack   = ack_q;
  assign rsp.rdata = rdata_q;

  // An acknowledge only ever answers a request seen in the previous cycle.
  ack_follows_sel: assert property (@(posedge clk) disable iff (sys_reset)
    rsp.ack |-> $past(req.sel));
  // Chip enables select at most one register.
  ce_onehot: assert property (@(posedge clk) disable iff (sys_reset)
    $countones({rd_ce, wr_ce}) <= 1);

  initial begin
    assert (NUM_USER_CE >= 1 && NUM_USER_CE <= USER_WORDS)
      else $fatal(1, "opb_ipif: NUM_USER_CE must be 1..%0d", USER_WORDS);
    assert (NUM_INTR >= 1 && NUM_INTR <= DWIDTH)
      else $fatal(1, "opb_ipif: NUM_INTR must be 1..%0d", DWIDTH);
  end

endmodule
