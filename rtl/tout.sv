// tout: bridge between a board's on-board bus and a bidirectional fiber
// link built from a serialising transmitter, a deserialising receiver and an
// external 9-bit FIFO.
//
// Bus to fiber:  the bus master writes a 16-bit word on the upper half of
//   the on-board data bus (id_upper, strobe AO_TO_PC_STROBE, acknowledge
//   AO_TO_PC_ACK).  read_from_ibus latches it and ibus_fo_action sends it to
//   the transmitter as two data bytes, low byte first.
// Fiber to bus:  fiber_rec writes each received byte (with its command
//   flag) into the external FIFO; fifo_data_pump reads the FIFO and packs
//   pairs of bytes into words; ibus_fi_port hands each word to read_from_fi,
//   which decodes address words (chip selection, soft FIFO reset) and puts
//   data words on the lower half of the bus (id_lower, strobe
//   AO_FROM_PC_STROBE, acknowledge AO_FROM_PC_ACK).
//
// Clocking: one system clock.  A toggle flop divides it by two to make the
// transmitter's byte clock fo_CKW, which also drives the receiver's
// reference clock fr_ref_clk, so the link carries one byte per two system
// clocks at most.  The receiver's outputs are sampled on the system clock.
//
// Strapped transceiver pins: fo_ENN_l = 1 (no second enable), fo_mode = 0,
// fo_foto = 0 (optical output on), fr_mode = 0, fr_rf = 1.  DEBUG mirrors
// AO_FROM_PC_STROBE.  The chip's identity is set by parameters: I_AM_REMOTE
// (side bit), MY_DATA_ADDRESS and MY_CTRL_ADDRESS; the defaults are the
// remote board's settings of the original design.  The receiver is always
// enabled.
//
// This implementation splits the original 32-bit bidirectional bus id into
// an input half (id_upper = id[31:16]) and a driven half (id_lower =
// id[15:0]), as the original only reads the upper half and only drives the
// lower half.  It also brings out the chip-selected flag, the latched
// sub-address, the code-violation count and the FIFO-write pulse as status
// ports, and leaves off the original's unused pins (fast, slow, in_strobe,
// fr_ckr, fo_RP_l, fifo_FULL_l, fifo_HALF_l).
module tout #(
  parameter logic       I_AM_REMOTE     = 1'b1,
  parameter logic [3:0] MY_DATA_ADDRESS = 4'b1111,
  parameter logic [3:0] MY_CTRL_ADDRESS = 4'b0010
) (
  input  logic        clk,
  input  logic        reset,
  output logic        DEBUG,
  // on-board bus
  input  logic [15:0] id_upper,
  output logic [15:0] id_lower,
  output logic        AO_FROM_PC_STROBE,
  input  logic        AO_FROM_PC_ACK,
  input  logic        AO_TO_PC_STROBE,
  output logic        AO_TO_PC_ACK,
  // fiber receiver
  input  logic [11:0] fr_d,
  output logic        fr_ref_clk,
  output logic        fr_rf,
  output logic        fr_mode,
  input  logic        fr_status,
  input  logic        fr_RDY_l,
  // fiber transmitter
  output logic [9:0]  fo_d,
  output logic        fo_ENN_l,
  output logic        fo_ENA_l,
  output logic        fo_CKW,
  output logic        fo_mode,
  output logic        fo_foto,
  // external FIFO
  output logic        fifo_reset_l,
  output logic        fifo_WRITE_l,
  output logic [8:0]  fifo_D,
  output logic        fifo_READ_l,
  input  logic        fifo_EMPTY_l,
  input  logic [8:0]  fifo_OUT,
  // status
  output logic        chip_selected,
  output logic [7:0]  fi_address,
  output logic [7:0]  violation_count,
  output logic        increment_fifo_count
);

  import tout_pkg::*;

  logic  fo_data_strobe;
  word_t data_to_fo;
  logic  write_to_fo_req, write_to_fo_ack;
  word_t fi_data;
  logic  fi_to_ibus_req, fi_to_ibus_ack;
  word_t fiber_to_ibus_buf;
  logic  data_pump_word_ready, refill_ibus_output_buf;
  logic  reset_fifo;

  // fiber byte clock: system clock divided by two
  always_ff @(posedge clk or posedge reset) begin
    if (reset) fo_data_strobe <= 1'b0;
    else       fo_data_strobe <= ~fo_data_strobe;
  end

  assign fo_CKW     = fo_data_strobe;
  assign fr_ref_clk = fo_data_strobe;
  assign fo_mode    = 1'b0;
  assign fo_foto    = 1'b0;
  assign fo_ENN_l   = 1'b1;
  assign fr_mode    = 1'b0;
  assign fr_rf      = 1'b1;
  assign DEBUG      = AO_FROM_PC_STROBE;

  // ---- bus to fiber ----
  read_from_ibus u_ibus_reader (
    .clk, .reset,
    .iu_req (AO_TO_PC_STROBE),
    .iu_ack (AO_TO_PC_ACK),
    .iu_io  (id_upper),
    .data   (data_to_fo),
    .req    (write_to_fo_req),
    .ack    (write_to_fo_ack)
  );

  ibus_fo_action u_ibus_fo (
    .clk, .reset,
    .fo_req    (write_to_fo_req),
    .fo_ack    (write_to_fo_ack),
    .data      (data_to_fo),
    .fiber_clk (fo_data_strobe),
    .fo_d,
    .fo_ENA_l
  );

  // ---- fiber to bus ----
  fiber_rec u_fr (
    .clk, .reset,
    .fr_d, .fr_RDY_l, .fr_status,
    .receive_enabled      (1'b1),
    .increment_fifo_count,
    .violation_count,
    .fifo_reset_l,
    .fifo_D,
    .fifo_WRITE_l,
    .reset_fifo_request   (reset_fifo)
  );

  fifo_data_pump u_pump (
    .clk, .reset,
    .fiber_to_ibus_buf,
    .fifo_OUT,
    .fifo_READ_l,
    .data_pump_word_ready,
    .refill_ibus_output_buf,
    .fifo_reset_l,
    .fifo_EMPTY_l
  );

  ibus_fi_port u_ibus_fi (
    .clk, .reset,
    .data                   (fi_data),
    .req                    (fi_to_ibus_req),
    .ack                    (fi_to_ibus_ack),
    .fiber_to_ibus_buf,
    .data_pump_word_ready,
    .refill_ibus_output_buf
  );

  read_from_fi u_fi_reader (
    .clk, .reset,
    .req               (fi_to_ibus_req),
    .ack               (fi_to_ibus_ack),
    .data              (fi_data),
    .il_io             (id_lower),
    .address           (fi_address),
    .il_req            (AO_FROM_PC_STROBE),
    .il_ack            (AO_FROM_PC_ACK),
    .i_am_remote       (I_AM_REMOTE),
    .my_data_address   (MY_DATA_ADDRESS),
    .my_ctrl_address   (MY_CTRL_ADDRESS),
    .request_reset     (reset_fifo),
    .fi_i_am_addressed (chip_selected)
  );

endmodule
