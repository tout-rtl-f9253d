// tb_ibus_fo_action: self-checking test of ibus_fo_action.
//
// The testbench makes the half-rate fiber clock as the top level does and
// attaches the transmitter model.  A requester sends random words with the
// four-phase fo_req/fo_ack handshake, starting on both phases of the fiber
// clock.  Checked: exactly two bytes per word, low byte then high byte, both
// flags 0, and the high byte taken 4 or 5 cycles after the edge that samples
// fo_req (5 or 6 as seen through the model's output register).
module tb_ibus_fo_action;
  import tout_pkg::*;

  logic       clk = 0, reset = 0;
  logic       fo_req = 0, fo_ack, fo_ENA_l, fiber_clk;
  word_t      data = '0;
  logic [9:0] fo_d;
  logic       byte_valid;
  logic [9:0] byte_out;
  int         checks = 0, failures = 0;

  ibus_fo_action dut (.*);
  fiber_tx_model tx (.clk, .fo_CKW(fiber_clk), .fo_ENA_l, .fo_d,
                     .byte_valid, .byte_out);

  always #5 clk = ~clk;

  always_ff @(posedge clk or posedge reset)
    if (reset) fiber_clk <= 1'b0;
    else       fiber_clk <= ~fiber_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  logic [9:0] got_q[$];
  int         cycle = 0, last_byte_cycle = 0;
  always @(posedge clk) begin
    cycle++;
    if (byte_valid) begin
      got_q.push_back(byte_out);
      last_byte_cycle = cycle;
    end
  end

  word_t exp_q[$];
  int    start_cycle;
  int    phase_seen[2];

  initial begin
    #1 reset = 1;   // a real edge, so the asynchronous reset acts at once
    repeat (3) tick();
    reset = 0;
    for (int i = 0; i < 60; i++) begin
      word_t w;
      w = word_t'($urandom);
      repeat ($urandom_range(0, 3)) tick();
      exp_q.push_back(w);
      data   = w;
      fo_req = 1;
      start_cycle = cycle + 1;      // the edge that samples fo_req
      phase_seen[fiber_clk]++;
      while (!fo_ack) tick();
      fo_req = 0;
      while (fo_ack) tick();
      repeat (3) tick();
      check(last_byte_cycle - start_cycle inside {[5:6]},
            $sformatf("word latency %0d", last_byte_cycle - start_cycle));
      data = word_t'($urandom);
    end
    repeat (5) tick();
    check(got_q.size() == 2 * exp_q.size(),
          $sformatf("two bytes per word (%0d bytes for %0d words)",
                    got_q.size(), exp_q.size()));
    foreach (exp_q[i]) begin
      if (2 * i + 1 < got_q.size()) begin
        check(got_q[2*i]   == {2'b00, exp_q[i][7:0]},  "low byte first");
        check(got_q[2*i+1] == {2'b00, exp_q[i][15:8]}, "high byte second");
      end
    end
    check(phase_seen[0] > 0 && phase_seen[1] > 0, "both clock phases used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
