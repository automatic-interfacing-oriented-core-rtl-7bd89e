// ipif_addr_decode: address decoder producing read and write chip enables.
//
// Translates a bus byte address into two chip-enable arrays, one for reads
// (rd_ce) and one for writes (wr_ce). Each bit stands for one 32-bit register
// word of the component: bit i is high when the address falls inside the
// component's window starting at BASEADDR and selects word i, the access is
// qualified by cs, and rnw matches the array. hit reports that the address
// falls inside the window at all, whether or not a register sits there.
// Purely combinational.
//
// The translation from address to separate RdCE/WrCE arrays follows the
// described address decoding service. The aligned power-of-two window and
// one-word-per-register layout are this design's choices. BASEADDR must be
// aligned to WIN_BYTES.
module ipif_addr_decode
  import ipif_pkg::*;
#(
  parameter logic [AWIDTH-1:0] BASEADDR     = 32'h4000_0000,
  parameter int unsigned       WIN_BYTES    = ipif_pkg::WINDOW_BYTES,
  parameter int unsigned       NUM_CE       = ipif_pkg::NUM_WORDS
) (
  input  logic [AWIDTH-1:0] addr,
  input  logic              cs,     // a transfer is being decoded this cycle
  input  logic              rnw,    // 1 = read, 0 = write
  output logic              hit,
  output logic [NUM_CE-1:0] rd_ce,
  output logic [NUM_CE-1:0] wr_ce
);

  localparam int unsigned OFFW = $clog2(WIN_BYTES);

  logic [OFFW-3:0] word;

  always_comb begin
    hit  = (addr[AWIDTH-1:OFFW] == BASEADDR[AWIDTH-1:OFFW]);
    word = addr[OFFW-1:2];
    for (int i = 0; i < NUM_CE; i++) begin
      rd_ce[i] = cs && hit &&  rnw && (word == i[OFFW-3:0]);
      wr_ce[i] = cs && hit && !rnw && (word == i[OFFW-3:0]);
    end
  end

endmodule
