// read_from_fi: decodes the words that arrive over the fiber and delivers
// data words to the lower half of the on-board bus.
//
// A transaction is normally an address word followed by a data word; a soft
// reset needs only the address word.  Address words (bit 15 set) carry a
// side bit (12), a 4-bit chip address (11:8) and an 8-bit sub-address (7:0);
// see tout_pkg.  When the side bit equals i_am_remote:
//   - chip address == my_ctrl_address: the chip is selected for a control
//     transaction, the sub-address is latched and sub-address bit 5 pulses
//     request_reset (one cycle) to clear the receive FIFO;
//   - chip address == my_data_address: the chip is selected for data and the
//     sub-address is latched;
//   - any other chip address deselects the chip.
// The address word is acknowledged in every one of these cases.  A word with
// bit 15 set but the other side bit is handled like a data word.  Any
// address word clears the previous selection first, so the chip stays
// selected until the next address word, and accepts the data words that
// follow.
//
// Data words: while the chip is selected for data they are put on il_io and
// offered to the bus with il_req, held until il_ack rises, then the block
// waits for il_ack to fall.  il_req is raised already while the fiber-side
// handshake is completing.  The data word of a control transaction is
// acknowledged and consumed here without reaching the bus (what a control
// word does is chip specific and nothing is defined for this chip).  Data
// words arriving while the chip is not selected are acknowledged and
// dropped.
//
// Fiber-side handshake (req/ack/data from ibus_fi_port): four-phase, data
// valid while req is high; ack is held while req stays high.  Every wait
// gives up after 16 cycles.
//
// States: IDLE -> DECODE -> {ACK_ADDR | ACK_DATA} -> {CTRL_DATA |
// BUS_REQ -> BUS_RELEASE} -> IDLE.
//
// The states, the address decode, the reset request, the early il_req and
// the timeouts follow the original design.  This implementation's choices:
// the chip-selected flag is set on a matching address (the original leaves
// it always clear) and gates data words; non-matching address words and
// unselected data words are acknowledged rather than left to time out; the
// control flag is cleared on every address word.
module read_from_fi
  import tout_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic       req,
  output logic       ack,
  input  word_t      data,
  output word_t      il_io,
  output logic [7:0] address,
  output logic       il_req,
  input  logic       il_ack,
  input  logic       i_am_remote,
  input  logic [3:0] my_data_address,
  input  logic [3:0] my_ctrl_address,
  output logic       request_reset,
  output logic       fi_i_am_addressed
);

  typedef enum logic [2:0] {
    IDLE, DECODE, ACK_ADDR, ACK_DATA, CTRL_DATA, BUS_REQ, BUS_RELEASE
  } state_t;

  state_t     state;
  timeout_t   timeout;
  logic       ctrl_txn;   // current selection is a control transaction
  addr_word_t aw;

  assign aw = addr_word_t'(data);

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state             <= IDLE;
      timeout           <= '0;
      ctrl_txn          <= 1'b0;
      fi_i_am_addressed <= 1'b0;
      il_io             <= '0;
      address           <= '0;
      ack               <= 1'b0;
      il_req            <= 1'b0;
      request_reset     <= 1'b0;
    end else begin
      ack           <= 1'b0;
      il_req        <= 1'b0;
      request_reset <= 1'b0;
      unique case (state)
        IDLE: begin
          if (req) begin
            il_io   <= data;
            timeout <= '0;
            state   <= DECODE;
          end
        end
        DECODE: begin
          if (aw.is_address && aw.remote == i_am_remote) begin
            fi_i_am_addressed <= 1'b0;
            ctrl_txn          <= 1'b0;
            state             <= ACK_ADDR;
            if (aw.chip == my_ctrl_address) begin
              fi_i_am_addressed <= 1'b1;
              ctrl_txn          <= 1'b1;
              request_reset     <= aw.sub[RESET_REQ_BIT];
              address           <= aw.sub;
            end else if (aw.chip == my_data_address) begin
              fi_i_am_addressed <= 1'b1;
              address           <= aw.sub;
            end
          end else if (aw.is_address) begin
            // address word for the other side: passed on as data
            fi_i_am_addressed <= 1'b0;
            ctrl_txn          <= 1'b0;
            state             <= ACK_DATA;
          end else if (fi_i_am_addressed) begin
            state <= ACK_DATA;
          end else begin
            state <= ACK_ADDR;   // not selected: acknowledge and drop
          end
        end
        ACK_ADDR: begin
          ack <= 1'b1;
          if (!req || timeout == TIMEOUT_MAX) state <= IDLE;
          else timeout <= timeout + 1'b1;
        end
        ACK_DATA: begin
          ack <= 1'b1;
          if (!req) begin
            timeout <= '0;
            state   <= ctrl_txn ? CTRL_DATA : BUS_REQ;
          end else if (timeout == TIMEOUT_MAX) begin
            state <= IDLE;
          end else begin
            timeout <= timeout + 1'b1;
          end
          if (!ctrl_txn) il_req <= 1'b1;   // start the bus cycle early
        end
        CTRL_DATA: state <= IDLE;
        BUS_REQ: begin
          il_req <= 1'b1;
          if (il_ack) begin
            il_req  <= 1'b0;
            timeout <= '0;
            state   <= BUS_RELEASE;
          end else if (timeout == TIMEOUT_MAX) begin
            state <= IDLE;
          end else begin
            timeout <= timeout + 1'b1;
          end
        end
        BUS_RELEASE: begin
          if (!il_ack || timeout == TIMEOUT_MAX) state <= IDLE;
          else timeout <= timeout + 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // the fiber side must keep the word stable while it is being decoded
  property p_data_held;
    @(posedge clk) disable iff (reset) (state == DECODE) |-> $stable(data);
  endproperty
  a_data_held: assert property (p_data_held);

endmodule
