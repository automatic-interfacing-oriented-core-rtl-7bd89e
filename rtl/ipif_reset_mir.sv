// ipif_reset_mir: software reset service and module information register.
//
// Lets the bus master reset one peripheral without resetting the system.
// A write strobe (wr) whose low nibble equals SOFT_RESET_KEY makes
// soft_reset high for exactly one clock, starting in the cycle after the
// write; other values are ignored. ip_reset, the reset seen by the core,
// by the register layer and by the other interface services, is the OR of
// the system reset and this pulse. The same register word reads back the
// module information register (mir), a constant that identifies the
// interface version and the component.
//
// The local software reset, its pulse to the core and the interface
// services, and an information register follow the described reset/MIR
// service. The key value, the single-clock pulse and the MIR fields are
// this design's choices. This module itself is reset only by sys_reset.
module ipif_reset_mir
  import ipif_pkg::*;
#(
  parameter logic [7:0] BLOCK_ID = 8'h00
) (
  input  logic              clk,
  input  logic              sys_reset,
  input  logic [DWIDTH-1:0] wdata,
  input  logic              wr,
  output logic              soft_reset,
  output logic              ip_reset,
  output logic [DWIDTH-1:0] mir
);

  // Interface version 3.01b.
  localparam mir_t MIR = '{major: 4'd3, minor: 7'd1, rev: 5'd1,
                           block_id: BLOCK_ID, block_type: MIR_TYPE_SLAVE};

  always_ff @(posedge clk) begin
    if (sys_reset) soft_reset <= 1'b0;
    else           soft_reset <= wr && (wdata[3:0] == SOFT_RESET_KEY);
  end

  assign ip_reset = sys_reset | soft_reset;
  assign mir      = MIR;

endmodule
