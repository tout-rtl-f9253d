// tb_read_from_ibus: self-checking test of read_from_ibus.
//
// A bus-master model writes words with short strobes; a transmitter-side
// responder acknowledges req after a random delay.  Checked: every word
// reaches `data` unchanged while req is high, iu_ack answers each strobe,
// req falls after ack, and no new word is taken while ack is still high.
// A second phase holds iu_req high with no responder and checks the two
// 16-cycle timeouts: iu_ack high for 17 cycles, req high for 32 (16 cycles
// waiting for iu_req to fall, 16 waiting for ack).
module tb_read_from_ibus;
  import tout_pkg::*;

  logic  clk = 0, reset = 0;
  logic  iu_req = 0, ack = 0;
  logic  iu_ack, req;
  word_t iu_io = '0, data;
  int    checks = 0, failures = 0;
  logic  responder_on = 1;

  read_from_ibus dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // transmitter-side responder: ack after a delay, release after req falls
  word_t sent_q[$];
  // all stimulus changes and all sampling happen 1 time unit after an edge
  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  always begin
    tick();
    if (responder_on && req && !ack) begin
      repeat ($urandom_range(0, 4)) tick();
      sent_q.push_back(data);
      ack = 1;
      tick();
      while (req) tick();
      repeat ($urandom_range(0, 3)) tick();
      ack = 0;
    end
  end

  task automatic bus_write(input word_t w);
    int n = 0;
    tick();
    iu_io  = w;
    iu_req = 1;
    do begin tick(); n++; end while (!iu_ack && n < 40);
    check(iu_ack, "iu_ack answers strobe");
    check(n == 1, "iu_ack one cycle after strobe");
    iu_req = 0;
    iu_io  = $urandom;
    n = 0;
    while (iu_ack && n < 40) begin tick(); n++; end
  endtask

  word_t exp_q[$];
  int ack_cycles, req_cycles;
  bit ack_done;

  initial begin
    #1 reset = 1;   // a real edge, so the asynchronous reset acts at once
    repeat (3) tick();
    reset = 0;
    for (int i = 0; i < 40; i++) begin
      word_t w;
      w = word_t'($urandom);
      exp_q.push_back(w);
      bus_write(w);
      // wait for the word to be handed over completely before the next
      while (req || ack || dut.state != dut.IDLE) tick();
    end
    repeat (5) tick();
    check(sent_q.size() == exp_q.size(), "all words handed over");
    foreach (exp_q[i])
      if (i < sent_q.size()) check(sent_q[i] == exp_q[i], "word value");

    // timeout phase: strobe held, nobody answers
    responder_on = 0;
    tick();
    iu_io  = 16'hA5C3;
    iu_req = 1;
    ack_cycles = 0; req_cycles = 0; ack_done = 0;
    repeat (60) begin
      tick();
      if (iu_ack && !ack_done) ack_cycles++;
      if (!iu_ack && ack_cycles > 0) ack_done = 1;
      if (req) req_cycles++;
      if (!req && req_cycles > 0) break;
    end
    iu_req = 0;
    check(ack_cycles == 17, $sformatf("iu_ack held 17 cycles (got %0d)", ack_cycles));
    check(req_cycles == 32, $sformatf("req held 32 cycles (got %0d)", req_cycles));
    check(data == 16'hA5C3, "word latched in timeout case");

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
