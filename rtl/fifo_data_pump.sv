// fifo_data_pump: reads received bytes out of the external FIFO and packs
// them into 16-bit words for the on-board bus.
//
// The FIFO holds 9-bit entries: a byte and, in bit 8, the fiber receiver's
// special-character (command) flag.  Two data bytes make one word; the first
// byte read becomes the low byte and the second the high byte, matching the
// order in which ibus_fo_action sends them.  An entry with bit 8 set is a
// word delimiter: it is discarded and a partly assembled word is restarted,
// so the two ends resynchronise on any command character.
//
// FIFO read cycle (asynchronous FIFO with an active-low read strobe):
//   STROBE     if the FIFO is empty go to WAIT_EMPTY, else drive
//              fifo_READ_l low for the next cycle
//   READ_DATA  fifo_READ_l is low, fifo_OUT is valid and is taken at the
//              end of the cycle; the FIFO advances as fifo_READ_l rises
// One byte takes two cycles.  When the second byte has been taken,
// data_pump_word_ready rises and stays high, and fiber_to_ibus_buf holds the
// word, until ibus_fi_port pulses refill_ibus_output_buf; the pump then
// fetches the next word.  While fifo_reset_l is low (the FIFO is being
// cleared) the pump drops any partial word and waits in IDLE.
//
// The states, byte order, byte count and the use of bit 8 as a delimiter
// follow the original design.  Holding the word until it is taken, and
// checking the empty flag again in STROBE (the flag seen in READ_DATA does
// not yet count the byte being read), are this implementation's choices.
module fifo_data_pump
  import tout_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  output word_t      fiber_to_ibus_buf,
  input  logic [8:0] fifo_OUT,
  output logic       fifo_READ_l,
  output logic       data_pump_word_ready,
  input  logic       refill_ibus_output_buf,
  input  logic       fifo_reset_l,
  input  logic       fifo_EMPTY_l
);

  typedef enum logic [1:0] {IDLE, WAIT_EMPTY, STROBE, READ_DATA} state_t;
  state_t state;
  logic   count;   // data bytes of the current word already taken

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state                <= IDLE;
      count                <= 1'b0;
      fifo_READ_l          <= 1'b1;
      data_pump_word_ready <= 1'b0;
      fiber_to_ibus_buf    <= '0;
    end else begin
      fifo_READ_l <= 1'b1;
      if (refill_ibus_output_buf) data_pump_word_ready <= 1'b0;
      if (!fifo_reset_l) begin
        count <= 1'b0;
        state <= IDLE;
      end else begin
        unique case (state)
          IDLE: begin
            count <= 1'b0;
            if (!data_pump_word_ready || refill_ibus_output_buf)
              state <= fifo_EMPTY_l ? STROBE : WAIT_EMPTY;
          end
          WAIT_EMPTY: if (fifo_EMPTY_l) state <= STROBE;
          STROBE: begin
            if (!fifo_EMPTY_l) begin
              state <= WAIT_EMPTY;
            end else begin
              fifo_READ_l <= 1'b0;
              state       <= READ_DATA;
            end
          end
          READ_DATA: begin
            if (fifo_OUT[8]) begin
              count <= 1'b0;
              state <= STROBE;
            end else begin
              fiber_to_ibus_buf <= {fifo_OUT[7:0], fiber_to_ibus_buf[15:8]};
              if (count) begin
                data_pump_word_ready <= 1'b1;
                count                <= 1'b0;
                state                <= IDLE;
              end else begin
                count <= 1'b1;
                state <= STROBE;
              end
            end
          end
          default: state <= IDLE;
        endcase
      end
    end
  end

endmodule
