// tb_ibus_fi_port: self-checking test of ibus_fi_port.
//
// A pump model offers random words (data_pump_word_ready held with the word
// until refill_ibus_output_buf pulses); a decoder model answers req with
// ack after a random delay and releases ack a random time after req falls.
// Checked: every word passes once and in order, refill pulses once per word
// in the cycle after the word is taken, a word is only taken while ack is
// low, and with no decoder answering req falls after 16 cycles and the word
// is given up.
module tb_ibus_fi_port;
  import tout_pkg::*;

  logic  clk = 0, reset = 0;
  word_t data, fiber_to_ibus_buf = '0;
  logic  req, ack = 0;
  logic  data_pump_word_ready = 0, refill_ibus_output_buf;
  int    checks = 0, failures = 0;
  logic  decoder_on = 1;

  ibus_fi_port dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  // decoder model
  word_t got_q[$];
  always begin
    tick();
    if (decoder_on && req && !ack) begin
      repeat ($urandom_range(0, 5)) tick();
      got_q.push_back(data);
      ack = 1;
      tick();
      while (req) tick();
      repeat ($urandom_range(0, 4)) tick();
      ack = 0;
    end
  end

  // refill must come exactly one cycle after req rises
  logic req_d = 0, ack_d = 0;
  int   refills = 0;
  always @(posedge clk) begin
    req_d <= req;
    ack_d <= ack;
    if (refill_ibus_output_buf) begin
      refills++;
      checks++;
      if (!(req && !req_d)) begin failures++; $display("FAIL refill not with req rise"); end
    end
    if (req && !req_d && ack_d) begin failures++; $display("FAIL req raised while ack high"); end
  end

  word_t exp_q[$];
  int    req_cycles;

  initial begin
    #1 reset = 1;
    repeat (3) tick();
    reset = 0;
    for (int i = 0; i < 50; i++) begin
      word_t w;
      w = word_t'($urandom);
      exp_q.push_back(w);
      fiber_to_ibus_buf    = w;
      data_pump_word_ready = 1;
      while (!refill_ibus_output_buf) tick();
      data_pump_word_ready = 0;
      fiber_to_ibus_buf    = word_t'($urandom);
      repeat ($urandom_range(1, 4)) tick();
    end
    repeat (40) tick();
    check(got_q.size() == exp_q.size(),
          $sformatf("all words passed (%0d of %0d)", got_q.size(), exp_q.size()));
    foreach (exp_q[i]) if (i < got_q.size()) check(got_q[i] == exp_q[i], "word value");
    check(refills == 50, "one refill per word");

    // nobody answers: timeout
    decoder_on           = 0;
    fiber_to_ibus_buf    = 16'h1234;
    data_pump_word_ready = 1;
    tick();
    data_pump_word_ready = 0;
    req_cycles = int'(req);
    repeat (40) begin
      tick();
      if (req) req_cycles++;
    end
    check(req_cycles == 16, $sformatf("req given up after 16 cycles (%0d)", req_cycles));
    check(data == 16'h1234, "timed-out word was presented");
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
