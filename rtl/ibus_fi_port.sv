// ibus_fi_port: output buffer between the FIFO data pump and the fiber-word
// decoder (read_from_fi).
//
// When the pump signals data_pump_word_ready and the decoder is not still
// acknowledging a previous word, the pump's 16-bit buffer is copied into
// `data`, req is raised, and refill_ibus_output_buf pulses for one cycle to
// tell the pump that its buffer has been taken and may be refilled.  req is
// held until ack rises; the block then waits for ack to fall (four-phase
// handshake).  If ack does not come within 16 cycles, or does not fall
// within the remaining count, the block returns to IDLE and the word is
// given up.
//
// States: IDLE -> REQ -> END_CYCLE -> IDLE.
//
// Timing: data and req are registered and change together; data is held
// from the cycle req rises until the next word is taken.
//
// The three states, the req/ack sequence and the 16-cycle timeouts follow
// the original design.  The meaning of refill_ibus_output_buf as a
// one-cycle "buffer taken" pulse, which lets the pump hold a finished word
// until it is taken, is this implementation's choice.
module ibus_fi_port
  import tout_pkg::*;
(
  input  logic  clk,
  input  logic  reset,
  output word_t data,
  output logic  req,
  input  logic  ack,
  input  word_t fiber_to_ibus_buf,
  input  logic  data_pump_word_ready,
  output logic  refill_ibus_output_buf
);

  typedef enum logic [1:0] {IDLE, REQ, END_CYCLE} state_t;
  state_t   state;
  timeout_t timeout;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state                  <= IDLE;
      timeout                <= '0;
      data                   <= '0;
      req                    <= 1'b0;
      refill_ibus_output_buf <= 1'b0;
    end else begin
      refill_ibus_output_buf <= 1'b0;
      unique case (state)
        IDLE: begin
          timeout <= '0;
          if (data_pump_word_ready && !ack) begin
            data                   <= fiber_to_ibus_buf;
            req                    <= 1'b1;
            refill_ibus_output_buf <= 1'b1;
            state                  <= REQ;
          end
        end
        REQ: begin
          if (ack) begin
            req   <= 1'b0;
            state <= END_CYCLE;
          end else if (timeout == TIMEOUT_MAX) begin
            req   <= 1'b0;
            state <= IDLE;
          end else begin
            timeout <= timeout + 1'b1;
          end
        end
        END_CYCLE: begin
          if (!ack || timeout == TIMEOUT_MAX) state <= IDLE;
          else timeout <= timeout + 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // four-phase rule: req only rises while ack is low
  a_req_rise: assert property (@(posedge clk) disable iff (reset)
                               $rose(req) |-> !$past(ack));

endmodule
