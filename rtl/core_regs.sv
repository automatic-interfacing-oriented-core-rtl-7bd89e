// core_regs: register layer between the bus interface and a bus-agnostic core.
//
// A core written for automatic interfacing has no bus ports, only custom data
// ports plus the standard clk, reset and intr1..intrN ports. This layer maps
// the custom ports onto bus registers:
//   * each core input is a register (word i, i = 0 .. NUM_IN-1) that a bus
//     write with wr_ce[i] loads from bus_data; the data-in path is thus a
//     demultiplexer from the one bus data line to many core inputs;
//   * each core output is a read-only word (word NUM_IN + j); a bus read
//     multiplexes the selected core output, or the selected input register,
//     onto the single ip_rdata line;
//   * reset clears every register to zero (the core has its own reset
//     state and sees reset directly);
//   * the core's interrupts are handed on unchanged as an event vector to
//     the interface's interrupt source controller, which masks and ORs them
//     into the single device interrupt.
// Clock and reset are wired straight through to the core by the component.
//
// Timing: a write is taken at the clock edge that ends the cycle in which
// its wr_ce bit is high; ip_rdata is combinational from rd_ce. Chip enables
// are one-hot or zero. Writes to an output word are ignored.
//
// The register/multiplexer structure and the reset-to-zero convention follow
// the described methodology; the word order (inputs first, then outputs)
// and full-width registers are this design's choices.
module core_regs
  import ipif_pkg::*;
#(
  parameter int unsigned NUM_IN   = 2,  // core inputs, one register each
  parameter int unsigned NUM_OUT  = 1,  // core outputs, one word each
  parameter int unsigned NUM_INTR = 1,  // core interrupt lines
  localparam int unsigned NUM_CE  = NUM_IN + NUM_OUT,
  localparam int unsigned OUT_W   = (NUM_OUT > 0) ? NUM_OUT : 1
) (
  input  logic                          clk,
  input  logic                          reset,
  // from the bus interface
  input  logic [DWIDTH-1:0]             bus_data,
  input  logic [NUM_CE-1:0]             rd_ce,
  input  logic [NUM_CE-1:0]             wr_ce,
  output logic [DWIDTH-1:0]             ip_rdata,
  output logic [NUM_INTR-1:0]           intr_event,
  // to and from the core
  output logic [NUM_IN-1:0][DWIDTH-1:0] core_in,
  input  logic [OUT_W-1:0][DWIDTH-1:0]  core_out,
  input  logic [NUM_INTR-1:0]           core_intr
);

  // Write side: one register per core input.
  always_ff @(posedge clk) begin
    if (reset) begin
      core_in <= '0;
    end else begin
      for (int i = 0; i < NUM_IN; i++) begin
        if (wr_ce[i]) core_in[i] <= bus_data;
      end
    end
  end

  // Read side: select the addressed input register or core output.
  always_comb begin
    ip_rdata = '0;
    for (int i = 0; i < NUM_IN; i++) begin
      if (rd_ce[i]) ip_rdata = core_in[i];
    end
    for (int j = 0; j < NUM_OUT; j++) begin
      if (rd_ce[NUM_IN + j]) ip_rdata = core_out[j];
    end
  end

  assign intr_event = core_intr;

  always_ff @(posedge clk) begin
    if (!reset) begin
      assert ($countones(rd_ce) <= 1) else $error("core_regs: rd_ce not one-hot");
      assert ($countones(wr_ce) <= 1) else $error("core_regs: wr_ce not one-hot");
    end
  end

endmodule
