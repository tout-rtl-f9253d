// tb_read_from_fi: self-checking test of read_from_fi.
//
// A fiber-side model sends a random mix of address and data words with the
// four-phase req/ack handshake; a bus-side model answers il_req with il_ack
// after a random delay and records il_io.  A reference model of the
// decoding rules (chip selection by data or control address, side bit,
// control transactions, reset requests) predicts which words reach the bus.
// Checked: every word is acknowledged, the bus words and their order, the
// number of request_reset pulses, the latched sub-address, the
// chip-selected flag after every word, and, with the bus silent, that
// il_req is withdrawn after the 16-cycle timeout and the next word is still
// handled.
// Both settings of the side bit are exercised.
module tb_read_from_fi;
  import tout_pkg::*;

  logic       clk = 0, reset = 0;
  logic       req = 0, ack;
  word_t      data = '0, il_io;
  logic [7:0] address;
  logic       il_req, il_ack = 0;
  logic       i_am_remote = 1;
  logic [3:0] my_data_address = 4'hF, my_ctrl_address = 4'h2;
  logic       request_reset, fi_i_am_addressed;
  int         checks = 0, failures = 0;
  logic       bus_on = 1;

  read_from_fi dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  // bus-side model
  word_t bus_q[$];
  always begin
    tick();
    if (bus_on && il_req && !il_ack) begin
      repeat ($urandom_range(0, 5)) tick();
      bus_q.push_back(il_io);
      il_ack = 1;
      tick();
      while (il_req) tick();
      repeat ($urandom_range(0, 3)) tick();
      il_ack = 0;
    end
  end

  int resets = 0;
  int n_ilreq = 0, n_in_ack_data = 0;
  bit count_ilreq = 0;
  always @(posedge clk) if (count_ilreq) begin
    if (il_req) n_ilreq++;
    if (dut.state == dut.ACK_DATA) n_in_ack_data++;
  end
  always @(posedge clk) if (request_reset) resets++;

  // reference model
  word_t      exp_q[$];
  logic       m_sel = 0, m_ctrl = 0;
  logic [7:0] m_addr = '0;
  int         exp_resets = 0;
  int         n_ctrl = 0, n_data_sel = 0, n_drop = 0, n_other_side = 0;

  task automatic model(input word_t w);
    addr_word_t a;
    a = addr_word_t'(w);
    if (a.is_address && a.remote == i_am_remote) begin
      m_sel  = (a.chip == my_ctrl_address) || (a.chip == my_data_address);
      m_ctrl = (a.chip == my_ctrl_address);
      if (m_sel) m_addr = a.sub;
      if (m_ctrl) begin
        n_ctrl++;
        if (a.sub[RESET_REQ_BIT]) exp_resets++;
      end
    end else if (a.is_address) begin
      m_sel = 0; m_ctrl = 0;
      exp_q.push_back(w);
      n_other_side++;
    end else if (m_sel && !m_ctrl) begin
      exp_q.push_back(w);
      n_data_sel++;
    end else begin
      n_drop++;
    end
  endtask

  task automatic send(input word_t w);
    int n = 0;
    data = w;
    req  = 1;
    while (!ack && n < 20) begin tick(); n++; end
    check(ack, "word acknowledged");
    req = 0;
    n = 0;
    while (ack && n < 20) begin tick(); n++; end
    model(w);
    // wait for the bus cycle to finish before checking the flags
    n = 0;
    while (dut.state != dut.IDLE && n < 60) begin tick(); n++; end
    check(fi_i_am_addressed == m_sel, "chip-selected flag");
    check(address == m_addr, "latched sub-address");
    data = word_t'($urandom);
  endtask

  function automatic word_t random_word();
    addr_word_t a;
    a = addr_word_t'($urandom);
    if ($urandom_range(0, 2) == 0) begin
      a.is_address = 1;
      a.remote     = ($urandom_range(0, 5) == 0) ? !i_am_remote : i_am_remote;
      case ($urandom_range(0, 2))
        0: a.chip = my_ctrl_address;
        1: a.chip = my_data_address;
        default: ;
      endcase
    end else begin
      a.is_address = 0;
    end
    return word_t'(a);
  endfunction

  initial begin
    #1 reset = 1;
    repeat (3) tick();
    reset = 0;
    for (int cfg = 0; cfg < 2; cfg++) begin
      i_am_remote = cfg == 0;
      repeat (4) tick();
      for (int i = 0; i < 300; i++) begin
        send(random_word());
        repeat ($urandom_range(0, 2)) tick();
      end
    end
    repeat (20) tick();
    check(bus_q.size() == exp_q.size(),
          $sformatf("%0d bus words, expected %0d", bus_q.size(), exp_q.size()));
    foreach (exp_q[i]) if (i < bus_q.size()) check(bus_q[i] == exp_q[i], "bus word");
    check(resets == exp_resets, $sformatf("%0d reset requests, expected %0d", resets, exp_resets));
    check(n_ctrl > 0 && n_data_sel > 0 && n_drop > 0 && n_other_side > 0 && exp_resets > 0,
          "all kinds of word seen");

    // silent bus: il_req must be withdrawn by the timeout
    bus_on = 0;
    i_am_remote = 1;
    send(16'h8F00 | 16'h1000);     // select for data
    data = 16'h0BEE;
    req  = 1;
    n_ilreq = 0; n_in_ack_data = 0; count_ilreq = 1;
    while (!ack) tick();
    req = 0;
    begin
      int n = 0;
      while ((il_req || n == 0) && n < 60) begin tick(); n++; end
      check(!il_req && n < 60, "il_req withdrawn after timeout");
    end
    count_ilreq = 0;
    // il_req is set in every cycle of the fiber-side acknowledge and in the
    // 16 cycles of the bus wait
    check(n_ilreq == n_in_ack_data + 16,
          $sformatf("il_req high %0d cycles, expected %0d", n_ilreq, n_in_ack_data + 16));
    bus_on = 1;
    send(16'h0CAB);
    repeat (20) tick();
    check(bus_q.size() > 0 && bus_q[$] == 16'h0CAB, "next word handled after timeout");
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
