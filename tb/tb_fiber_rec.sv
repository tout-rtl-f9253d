// tb_fiber_rec: self-checking test of fiber_rec.
//
// A receiver model presents random bytes, with random command and
// violation flags, each for one cycle with fr_RDY_l low and at least two
// cycles apart.  fr_status and receive_enabled are switched off now and
// then; bytes presented while either is low must not be stored.  Checked:
// the sequence written with fifo_WRITE_l (9 bits per entry) equals the
// expected sequence, every write comes exactly one cycle after its
// increment_fifo_count pulse, violation_count equals the number of stored
// bytes with the violation flag, and reset_fifo_request pulls fifo_reset_l
// low and clears the count.
module tb_fiber_rec;
  logic        clk = 0, reset = 0;
  logic [11:0] fr_d = '0;
  logic        fr_RDY_l = 1, fr_status = 1, receive_enabled = 1;
  logic        reset_fifo_request = 0;
  logic        increment_fifo_count, fifo_reset_l, fifo_WRITE_l;
  logic [7:0]  violation_count;
  logic [8:0]  fifo_D;
  int          checks = 0, failures = 0;

  fiber_rec dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  logic [8:0] got_q[$];
  logic       inc_d = 0;
  int         resets_seen = 0;
  always @(posedge clk) begin
    if (!fifo_WRITE_l) begin
      got_q.push_back(fifo_D);
      checks++;
      if (!inc_d) begin failures++; $display("FAIL write without increment one cycle before"); end
    end
    if (!fifo_reset_l) resets_seen++;
    inc_d <= increment_fifo_count;
  end

  logic [8:0] exp_q[$];
  int         exp_viol = 0;

  task automatic send_byte(input logic [7:0] b, input logic cmd, input logic viol);
    fr_d     = {2'($urandom), viol, cmd, b};
    fr_RDY_l = 0;
    if (fr_status && receive_enabled) begin
      exp_q.push_back({cmd, b});
      if (viol) exp_viol++;
    end
    tick();
    fr_RDY_l = 1;
    fr_d     = 12'($urandom);
    repeat ($urandom_range(1, 3)) tick();
  endtask

  initial begin
    #1 reset = 1;
    repeat (3) tick();
    reset = 0;
    tick();
    for (int i = 0; i < 300; i++) begin
      fr_status       = ($urandom_range(0, 9) != 0);
      receive_enabled = ($urandom_range(0, 9) != 0);
      send_byte(8'($urandom), $urandom_range(0, 5) == 0, $urandom_range(0, 3) == 0);
    end
    repeat (4) tick();
    check(got_q.size() == exp_q.size(),
          $sformatf("stored %0d bytes, expected %0d", got_q.size(), exp_q.size()));
    foreach (exp_q[i])
      if (i < got_q.size()) check(got_q[i] == exp_q[i], "stored byte and flag");
    check(violation_count == 8'(exp_viol),
          $sformatf("violation count %0d, expected %0d", violation_count, exp_viol));
    check(exp_viol > 0 && got_q.size() < 300, "violations and gated bytes occurred");

    // soft reset of the FIFO
    reset_fifo_request = 1;
    tick();
    reset_fifo_request = 0;
    tick();
    check(resets_seen == 1, "one FIFO reset pulse");
    check(violation_count == 0, "violation count cleared");
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
