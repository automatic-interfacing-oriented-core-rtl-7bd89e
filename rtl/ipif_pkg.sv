// Shared types and constants of the peripheral bus interface.
//
// A slave component on the 32-bit peripheral bus owns an address window of
// WINDOW_BYTES bytes. Inside it, word offsets 0 .. USER_WORDS-1 hold the
// registers that carry a core's custom ports; the words after them belong to
// the interface's own services (interrupt status, interrupt enable, and the
// reset / module-information register). The 32-bit data width and the split
// into address decoding, interrupt source controller and reset/MIR services
// follow the described interface; the window size, the offsets, the soft
// reset key and the MIR field layout are this design's own choices.
//
// Bit numbering: the bus here uses the usual [31:0] order with bit 0 as the
// least significant bit. A big-endian "(0 to 31)" vector maps bit k to bit
// 31-k of these types.
package ipif_pkg;

  localparam int unsigned DWIDTH = 32;  // peripheral bus data width
  localparam int unsigned AWIDTH = 32;  // peripheral bus address width

  // Address window of one component and the word offsets inside it.
  localparam int unsigned WINDOW_BYTES = 128;
  localparam int unsigned USER_WORDS   = 16;  // words 0..15: core registers
  localparam int unsigned ISR_WORD     = 16;  // byte 0x40: interrupt status
  localparam int unsigned IER_WORD     = 17;  // byte 0x44: interrupt enable
  localparam int unsigned RSTMIR_WORD  = 18;  // byte 0x48: W reset, R MIR
  localparam int unsigned NUM_WORDS    = 19;  // decoded words per window

  // Writing this value to the low nibble of RSTMIR_WORD resets the core.
  localparam logic [3:0] SOFT_RESET_KEY = 4'hA;

  // One request from the bus master. sel is held until ack is seen.
  typedef struct packed {
    logic              sel;    // transfer request for this cycle
    logic              rnw;    // 1 = read, 0 = write
    logic [AWIDTH-1:0] addr;   // byte address, word aligned
    logic [DWIDTH-1:0] wdata;  // write data
  } bus_req_t;

  // Response of a slave. rdata is all zero unless ack is high, so the
  // responses of several slaves can be combined with a bitwise OR.
  typedef struct packed {
    logic              ack;    // one-cycle transfer acknowledge
    logic [DWIDTH-1:0] rdata;  // read data, valid with ack
  } bus_rsp_t;

  // Module information register contents.
  typedef struct packed {
    logic [3:0] major;       // interface major version
    logic [6:0] minor;       // interface minor version
    logic [4:0] rev;         // interface revision (a = 0, b = 1, ...)
    logic [7:0] block_id;    // which component this is
    logic [7:0] block_type;  // kind of interface
  } mir_t;

  localparam logic [7:0] MIR_TYPE_SLAVE = 8'h01;

endpackage
