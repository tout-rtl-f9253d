// fiber_tx_model: behavioural model of the parallel side of the fiber
// transmitter, for testbenches only.
//
// The transmitter takes its 10-bit input (byte in 7:0, command flag in 8,
// send-violation flag in 9) on each rising edge of its byte clock fo_CKW
// while fo_ENA_l is low.  fo_CKW is itself made from the system clock, so
// the model looks at the system clock edge at which fo_CKW goes from low to
// high and uses the values held during the preceding cycle.  Each byte taken
// is reported by a one-cycle pulse on byte_valid with the byte on byte_out.
module fiber_tx_model (
  input  logic       clk,
  input  logic       fo_CKW,
  input  logic       fo_ENA_l,
  input  logic [9:0] fo_d,
  output logic       byte_valid,
  output logic [9:0] byte_out
);
  initial begin
    byte_valid = 1'b0;
    byte_out   = '0;
  end

  always @(posedge clk) begin
    byte_valid <= !fo_CKW && !fo_ENA_l;
    byte_out   <= fo_d;
  end
endmodule
