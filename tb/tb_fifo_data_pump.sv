// tb_fifo_data_pump: self-checking test of fifo_data_pump with the FIFO
// chip model.
//
// A writer fills the FIFO with a random stream of data bytes and command
// characters (bit 8 set) at random times, so that the pump sometimes finds
// the FIFO empty and has to wait.  A consumer takes each finished word,
// sometimes at once and sometimes after a delay, and pulses
// refill_ibus_output_buf.  The expected words are worked out from the
// stream: two data bytes make a word, first byte low; a command character
// discards a half-built word.  Checked: the words and their order, that the
// word is held stable while data_pump_word_ready is high, that the FIFO is
// never read while empty, that a FIFO reset in the middle of a word
// restarts the word, and the rate: a full FIFO and an eager consumer give
// one word per 5 cycles.
module tb_fifo_data_pump;
  import tout_pkg::*;

  logic       clk = 0, reset = 0;
  logic       fifo_reset_l = 1, fifo_WRITE_l = 1;
  logic [8:0] fifo_D = '0, fifo_OUT;
  logic       fifo_READ_l, fifo_EMPTY_l, fifo_HALF_l, fifo_FULL_l;
  logic       data_pump_word_ready, refill_ibus_output_buf = 0;
  word_t      fiber_to_ibus_buf;
  int         checks = 0, failures = 0;

  fifo_data_pump dut (.*);
  fifo_chip_model #(.DEPTH(512)) fifo (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  // expected words
  word_t     exp_q[$];
  logic      half_valid = 0;
  logic [7:0] half_byte;
  task automatic expect_entry(input logic [8:0] e);
    if (e[8]) half_valid = 0;
    else if (!half_valid) begin half_byte = e[7:0]; half_valid = 1; end
    else begin exp_q.push_back({e[7:0], half_byte}); half_valid = 0; end
  endtask

  task automatic write_entry(input logic [8:0] e);
    fifo_D       = e;
    fifo_WRITE_l = 0;
    expect_entry(e);
    tick();
    fifo_WRITE_l = 1;
  endtask

  // consumer
  word_t got_q[$];
  int    consumer_delay_max = 4;
  int    cycle = 0, word_cycles[$];
  always begin
    tick();
    cycle++;
    refill_ibus_output_buf = 0;
    if (data_pump_word_ready) begin
      word_t held;
      held = fiber_to_ibus_buf;
      repeat ($urandom_range(0, consumer_delay_max)) begin
        tick();
        cycle++;
        checks++;
        if (fiber_to_ibus_buf !== held || !data_pump_word_ready) begin
          failures++;
          $display("FAIL word not held while ready");
        end
      end
      got_q.push_back(fiber_to_ibus_buf);
      word_cycles.push_back(cycle);
      refill_ibus_output_buf = 1;
    end
  end

  initial begin
    #1 reset = 1;
    repeat (3) tick();
    reset = 0;
    // phase 1: random trickle
    for (int i = 0; i < 400; i++) begin
      logic [8:0] e;
      e = {$urandom_range(0, 7) == 0, 8'($urandom)};
      repeat ($urandom_range(0, 6)) tick();
      write_entry(e);
    end
    repeat (50) tick();
    check(got_q.size() == exp_q.size(),
          $sformatf("%0d words, expected %0d", got_q.size(), exp_q.size()));
    foreach (exp_q[i]) if (i < got_q.size()) check(got_q[i] == exp_q[i], "word value");
    check(fifo.underflows == 0, "FIFO never read while empty");

    // phase 2: FIFO reset in the middle of a word
    write_entry(9'h0AA);
    repeat (10) tick();
    fifo_reset_l = 0;
    tick();
    fifo_reset_l = 1;
    half_valid = 0;
    write_entry(9'h011);
    write_entry(9'h022);
    repeat (20) tick();
    check(got_q.size() == exp_q.size() && got_q[$] == 16'h2211,
          "word restarted after FIFO reset");

    // phase 3: rate with a full FIFO and an eager consumer
    consumer_delay_max = 0;
    repeat (5) tick();
    got_q.delete(); exp_q.delete(); word_cycles.delete();
    fifo_reset_l = 0;   // hold the pump while the FIFO is filled
    tick();
    fifo_reset_l = 1;
    for (int i = 0; i < 200; i++) write_entry({1'b0, 8'(i)});
    repeat (600) tick();
    check(got_q.size() == 100, $sformatf("burst gives 100 words (%0d)", got_q.size()));
    foreach (exp_q[i]) if (i < got_q.size()) check(got_q[i] == exp_q[i], "burst word value");
    if (word_cycles.size() > 50)
      check(word_cycles[50] - word_cycles[40] == 50,
            $sformatf("5 cycles per word (%0d per 10 words)", word_cycles[50] - word_cycles[40]));
    check(fifo.underflows == 0, "FIFO never read while empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
