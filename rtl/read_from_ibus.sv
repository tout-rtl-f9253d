// read_from_ibus: takes a word written by the on-board bus master onto the
// upper half of the on-board bus and passes it to the fiber transmitter side.
//
// Two four-phase handshakes meet here.  On the bus side the master raises
// iu_req with the word on iu_io; the word is latched, iu_ack is raised and
// held while iu_req stays high.  Towards the transmitter, req is raised in the
// same state (so the transmitter can start while the bus master is still
// finishing its strobe), held until ack arrives, and the block then waits
// for ack to fall before it accepts the next bus word.
//
// States:  IDLE -> BUS_HS (iu_ack=1, req=1) -> FO_REQ (req=1) -> FO_DONE.
// BUS_HS leaves when iu_req falls or after 16 cycles.  FO_REQ gives up and
// returns to IDLE after 16 cycles without ack (nothing listening).  FO_DONE
// has no timeout: once ack has been seen the other end is known to exist.
//
// Timing: all outputs are registered.  iu_ack rises one cycle after iu_req
// is sampled high; req rises one cycle later.  The bus master must release
// iu_req before the transmitter finishes its word (about 5 cycles), because
// req is already high while BUS_HS waits for iu_req to fall.
//
// The state machine, its outputs and the 16-cycle timeouts follow the
// original design; the reset values (everything low, state IDLE) are this
// implementation's choice.
module read_from_ibus
  import tout_pkg::*;
(
  input  logic  clk,
  input  logic  reset,
  input  logic  iu_req,
  output logic  iu_ack,
  input  word_t iu_io,
  output word_t data,
  output logic  req,
  input  logic  ack
);

  typedef enum logic [1:0] {IDLE, BUS_HS, FO_REQ, FO_DONE} state_t;
  state_t   state;
  timeout_t timeout;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state   <= IDLE;
      timeout <= '0;
      data    <= '0;
      req     <= 1'b0;
      iu_ack  <= 1'b0;
    end else begin
      req    <= 1'b0;
      iu_ack <= 1'b0;
      unique case (state)
        IDLE: begin
          if (iu_req) begin
            data    <= iu_io;
            iu_ack  <= 1'b1;
            timeout <= '0;
            state   <= BUS_HS;
          end
        end
        BUS_HS: begin
          iu_ack <= 1'b1;
          req    <= 1'b1;
          if (!iu_req || timeout == TIMEOUT_MAX) begin
            timeout <= '0;
            state   <= FO_REQ;
          end else begin
            timeout <= timeout + 1'b1;
          end
        end
        FO_REQ: begin
          req <= 1'b1;
          if (ack) begin
            req   <= 1'b0;
            state <= FO_DONE;
          end else if (timeout == TIMEOUT_MAX) begin
            state <= IDLE;
          end else begin
            timeout <= timeout + 1'b1;
          end
        end
        FO_DONE: begin
          if (!ack) state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
