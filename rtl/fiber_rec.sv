// fiber_rec: stores every byte delivered by the fiber receiver in the
// external FIFO and counts code violations.
//
// The receiver presents a 12-bit output: bits 7:0 the byte, bit 8 the
// special-character (command) flag, bit 9 the received-violation flag; bits
// 11:10 are not used.  It pulls fr_RDY_l low when a new byte is present and
// raises fr_status while it has a valid signal.  When receive_enabled and
// fr_status are high and fr_RDY_l is low, the byte and its command flag (9
// bits) are latched onto fifo_D, increment_fifo_count pulses, and the next
// cycle fifo_WRITE_l is driven low for one cycle to write the FIFO.  Each
// byte with the violation flag set increments violation_count (8 bits,
// wrapping).
//
// A reset_fifo_request pulls fifo_reset_l low for a cycle and clears
// violation_count; a request that arrives while a write is pending turns
// that write into the reset.
//
// Timing: two cycles per byte (IDLE, LATCH), so fr_RDY_l must be low for at
// most two cycles per byte and bytes must be at least two cycles apart; the
// fiber clock runs at half the system clock, which meets both.  fr_d,
// fr_RDY_l and fr_status are sampled on the system clock.
//
// The two-state sequence, the 9 stored bits, the violation counter and the
// reset handling follow the original design; the asynchronous reset input
// (the original has none) is added so that every register starts known.
module fiber_rec (
  input  logic       clk,
  input  logic       reset,
  input  logic [11:0] fr_d,
  input  logic       fr_RDY_l,
  input  logic       fr_status,
  input  logic       receive_enabled,
  output logic       increment_fifo_count,
  output logic [7:0] violation_count,
  output logic       fifo_reset_l,
  output logic [8:0] fifo_D,
  output logic       fifo_WRITE_l,
  input  logic       reset_fifo_request
);

  typedef enum logic {IDLE, LATCH} state_t;
  state_t state;

  logic code_violation;
  assign code_violation = fr_d[9];

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state                <= IDLE;
      fifo_reset_l         <= 1'b1;
      increment_fifo_count <= 1'b0;
      fifo_WRITE_l         <= 1'b1;
      fifo_D               <= '0;
      violation_count      <= '0;
    end else begin
      fifo_reset_l         <= 1'b1;
      increment_fifo_count <= 1'b0;
      fifo_WRITE_l         <= 1'b1;
      unique case (state)
        IDLE: begin
          if (reset_fifo_request) begin
            fifo_reset_l    <= 1'b0;
            violation_count <= '0;
          end else if (fr_status && receive_enabled && !fr_RDY_l) begin
            if (code_violation) violation_count <= violation_count + 1'b1;
            fifo_D               <= fr_d[8:0];
            increment_fifo_count <= 1'b1;
            state                <= LATCH;
          end
        end
        LATCH: begin
          if (reset_fifo_request) fifo_reset_l <= 1'b0;
          else fifo_WRITE_l <= 1'b0;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
