// ibus_fo_action: sends one 16-bit word to the fiber transmitter as two
// bytes, low byte first.
//
// The transmitter latches its 10-bit input fo_d, and the enable fo_ENA_l
// (active low), on the rising edge of its clock fo_CKW.  That clock is made
// in the top level by toggling a flop every system clock, so it runs at half
// the system clock and is fed back here as fiber_clk.  This block changes
// fo_d and fo_ENA_l only at clock edges where fiber_clk falls, so both are
// stable for a whole system-clock cycle before and after each rising edge of
// fo_CKW.
//
// States:  IDLE -> BYTE1 -> WAIT1 -> BYTE2 -> WAIT2 -> IDLE
//   IDLE   waits for fo_req, puts the low byte on fo_d (flags 9:8 = 00)
//   BYTE1  waits until fiber_clk is high, then drives fo_ENA_l low and
//          raises fo_ack (the requester may now release fo_req)
//   WAIT1  fo_CKW is low; at the end of this cycle it rises and the low
//          byte is taken
//   BYTE2  puts the high byte on fo_d as fo_CKW falls
//   WAIT2  fo_CKW is low; the high byte is taken as it rises; fo_ENA_l
//          returns high
// fo_ack stays high until the block is back in IDLE, giving the requester
// time to see it; it falls one cycle after IDLE is entered.
//
// Timing: one word every 5 or 6 system clocks, i.e. one byte per fo_CKW
// period while words are back to back.  fo_d[8] (command flag) and fo_d[9]
// (send-violation flag) are always 0: only data characters are sent.
//
// The sequence, byte order and flag values follow the original design.  Two
// points are this implementation's: IDLE always passes through BYTE1 (a
// shortcut from IDLE straight to WAIT1 when fiber_clk is high would leave
// fo_ENA_l high for the low byte), and fo_ENA_l is high in every state in
// which it is not driven low.
module ibus_fo_action
  import tout_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic       fo_req,
  output logic       fo_ack,
  input  word_t      data,
  input  logic       fiber_clk,
  output logic [9:0] fo_d,
  output logic       fo_ENA_l
);

  typedef enum logic [2:0] {IDLE, BYTE1, WAIT1, BYTE2, WAIT2} state_t;
  state_t state;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state    <= IDLE;
      fo_d     <= '0;
      fo_ENA_l <= 1'b1;
      fo_ack   <= 1'b0;
    end else begin
      fo_ENA_l <= 1'b1;
      unique case (state)
        IDLE: begin
          fo_d[9:8] <= 2'b00;
          fo_ack    <= 1'b0;
          if (fo_req) begin
            fo_d[7:0] <= data[7:0];
            state     <= BYTE1;
          end
        end
        BYTE1: begin
          if (fiber_clk) begin
            fo_ENA_l <= 1'b0;
            fo_ack   <= 1'b1;
            state    <= WAIT1;
          end
        end
        WAIT1: begin
          fo_ENA_l <= 1'b0;
          state    <= BYTE2;
        end
        BYTE2: begin
          fo_ENA_l  <= 1'b0;
          fo_d[7:0] <= data[15:8];
          state     <= WAIT2;
        end
        WAIT2: state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

endmodule
