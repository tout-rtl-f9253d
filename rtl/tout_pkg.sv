// tout_pkg: constants and types shared by the fiber-link / on-board-bus
// interface.
//
// Every handshake in the design is guarded by the same 4-bit timeout
// counter: a state that waits for the other side gives up after 16 clock
// cycles.  The address word that arrives over the fiber has a fixed layout,
// captured here as a packed struct so that the decoder can name its fields:
//
//   bit 15      1 = address word, 0 = data word
//   bits 14:13  not used
//   bit 12      side select: compared with the chip's i_am_remote strap
//   bits 11:8   chip address: compared with the data and control addresses
//   bits 7:0    sub-address, latched for the on-board side
//                 (on a control address, bit 5 requests a FIFO reset)
//
// A byte on the fiber is 10 bits wide at the transmitter: bits 7:0 data,
// bit 8 the special-character (command) flag, bit 9 the send-violation flag.
package tout_pkg;

  localparam int unsigned TIMEOUT_W = 4;
  typedef logic [TIMEOUT_W-1:0] timeout_t;
  localparam timeout_t TIMEOUT_MAX = '1;

  typedef logic [15:0] word_t;

  typedef struct packed {
    logic       is_address;
    logic [1:0] unused;
    logic       remote;
    logic [3:0] chip;
    logic [7:0] sub;
  } addr_word_t;

  // bit of the sub-address that asks for a FIFO reset on a control address
  localparam int unsigned RESET_REQ_BIT = 5;

endpackage
