// tb_tout: end-to-end test of the whole interface, with the fiber looped
// back onto itself.
//
// Around the top level: a bus master writes words on the upper bus; the
// transmitter model turns the transmitter pins into bytes; a link model
// hands each byte to the receiver pins after a fixed delay, now and then
// setting the violation flag on a byte and inserting a command character
// between words; the FIFO chip model buffers the received bytes; a bus
// slave answers the lower-bus strobe after random delays.  Each word
// written thus goes out over the fiber, comes back in, is decoded by the
// same chip and, if it is meant for the bus, appears on the lower bus.
//
// The script selects the chip for data and streams data words, deselects it
// (data dropped), makes a control transaction with a FIFO reset, sends an
// address word for the other side (passed on as data), and lets the bus
// slave ignore one strobe (lower-bus timeout, word lost).  A reference model
// of the decoding rules predicts the lower-bus words.  Checked: the words
// and their order, the violation count, one FIFO reset, DEBUG, and that
// every mechanism happened at least once: bus-to-fiber transfers, FIFO
// writes, waits on an empty FIFO, command-character delimiters, code
// violations, data forwarding, dropped words, control transactions, FIFO
// reset, other-side words and the lower-bus timeout.
//
// The top is used with its default parameters (remote board, data address
// 4'hF, control address 4'h2).
module tb_tout;
  import tout_pkg::*;

  logic        clk = 0, reset = 0;
  logic        DEBUG;
  word_t       id_upper = '0, id_lower;
  logic        AO_FROM_PC_STROBE, AO_FROM_PC_ACK = 0;
  logic        AO_TO_PC_STROBE = 0, AO_TO_PC_ACK;
  logic [11:0] fr_d = '0;
  logic        fr_ref_clk, fr_rf, fr_mode, fr_status = 1, fr_RDY_l = 1;
  logic [9:0]  fo_d;
  logic        fo_ENN_l, fo_ENA_l, fo_CKW, fo_mode, fo_foto;
  logic        fifo_reset_l, fifo_WRITE_l, fifo_READ_l, fifo_EMPTY_l;
  logic        fifo_HALF_l, fifo_FULL_l;
  logic [8:0]  fifo_D, fifo_OUT;
  logic        chip_selected;
  logic [7:0]  fi_address, violation_count;
  logic        increment_fifo_count;
  int          checks = 0, failures = 0;

  tout dut (.*);
  fifo_chip_model #(.DEPTH(512)) fifo (.*);

  logic       tx_valid;
  logic [9:0] tx_byte;
  fiber_tx_model tx (.clk, .fo_CKW, .fo_ENA_l, .fo_d,
                     .byte_valid(tx_valid), .byte_out(tx_byte));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  // ---------------- link model ----------------
  localparam int LINK_DELAY = 7;
  logic [11:0] link_q[$];
  int          link_due[$];
  int          cycle = 0, tx_bytes = 0, exp_viol = 0;
  int          n_delim = 0, n_viol = 0;
  logic        link_errors = 1;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (tx_valid) begin
      logic viol;
      viol = link_errors && ($urandom_range(0, 19) == 0);
      check(tx_byte[9:8] == 2'b00, "transmitter sends data characters only");
      link_q.push_back({2'b00, viol, tx_byte[8:0]});
      link_due.push_back(cycle + LINK_DELAY);
      if (viol) begin exp_viol++; n_viol++; end
      tx_bytes++;
      if (link_errors && tx_bytes % 2 == 0 && $urandom_range(0, 3) == 0) begin
        link_q.push_back({3'b000, 1'b1, 8'hBC});      // command character
        link_due.push_back(cycle + LINK_DELAY + 2);
        n_delim++;
      end
    end
  end

  // receiver pins: one byte per RDY_l pulse, at least two cycles apart
  int rx_gap = 0;
  always @(posedge clk) begin
    fr_RDY_l <= 1'b1;
    rx_gap   <= rx_gap + 1;
    if (link_q.size() > 0 && link_due[0] <= cycle && rx_gap >= 1) begin
      fr_d     <= link_q.pop_front();
      void'(link_due.pop_front());
      fr_RDY_l <= 1'b0;
      rx_gap   <= 0;
    end
  end

  // ---------------- lower-bus slave ----------------
  word_t bus_q[$];
  logic  bus_ignore_next = 0;
  int    n_bus_timeout = 0;
  always begin
    tick();
    if (AO_FROM_PC_STROBE && !AO_FROM_PC_ACK) begin
      if (bus_ignore_next) begin
        bus_ignore_next = 0;
        while (AO_FROM_PC_STROBE) tick();
        n_bus_timeout++;
      end else begin
        repeat ($urandom_range(0, 4)) tick();
        bus_q.push_back(id_lower);
        AO_FROM_PC_ACK = 1;
        tick();
        while (AO_FROM_PC_STROBE) tick();
        repeat ($urandom_range(0, 2)) tick();
        AO_FROM_PC_ACK = 0;
      end
    end
  end

  // ---------------- monitors ----------------
  int n_fifo_writes = 0, n_fifo_resets = 0, n_wait_empty = 0, n_bus_words_in = 0;
  always @(posedge clk) begin
    if (!fifo_WRITE_l) n_fifo_writes++;
    if (!fifo_reset_l) begin n_fifo_resets++; exp_viol = 0; end
    if (dut.u_pump.state == dut.u_pump.WAIT_EMPTY) n_wait_empty++;
    checks++;
    if (DEBUG != AO_FROM_PC_STROBE) begin failures++; $display("FAIL DEBUG"); end
  end

  // ---------------- reference model of the decoder ----------------
  word_t exp_q[$];
  logic  m_sel = 0, m_ctrl = 0;
  int    n_forward = 0, n_drop = 0, n_ctrl = 0, n_other = 0;
  task automatic model(input word_t w);
    addr_word_t a;
    a = addr_word_t'(w);
    if (a.is_address && a.remote == 1'b1) begin
      m_sel  = a.chip inside {4'h2, 4'hF};
      m_ctrl = a.chip == 4'h2;
      if (m_ctrl) n_ctrl++;
    end else if (a.is_address) begin
      m_sel = 0; m_ctrl = 0;
      exp_q.push_back(w);
      n_other++;
    end else if (m_sel && !m_ctrl) begin
      exp_q.push_back(w);
      n_forward++;
    end else begin
      n_drop++;
    end
  endtask

  // ---------------- upper-bus master ----------------
  task automatic write_word(input word_t w);
    int n = 0;
    id_upper        = w;
    AO_TO_PC_STROBE = 1;
    while (!AO_TO_PC_ACK && n < 100) begin tick(); n++; end
    check(AO_TO_PC_ACK, "upper bus write acknowledged");
    AO_TO_PC_STROBE = 0;
    id_upper        = word_t'($urandom);
    while (AO_TO_PC_ACK) tick();
    n_bus_words_in++;
    model(w);
  endtask

  task automatic settle();
    repeat (150) tick();
  endtask

  word_t w;
  initial begin
    #1 reset = 1;
    repeat (3) tick();
    reset = 0;
    repeat (4) tick();

    // select for data, stream data words
    write_word(16'h9F42);
    for (int i = 0; i < 60; i++) begin
      w = word_t'($urandom) & 16'h7FFF;
      write_word(w);
      repeat ($urandom_range(0, 6)) tick();
    end
    settle();
    check(chip_selected && fi_address == 8'h42, "selected with sub-address 42");

    // deselect: address of another chip, data dropped
    write_word(16'h9700);
    for (int i = 0; i < 5; i++) write_word(16'h0100 + 16'(i));
    settle();
    check(!chip_selected, "deselected");

    // control transaction requesting a FIFO reset, then its data word
    write_word(16'h9220);
    settle();
    write_word(16'h0055);
    settle();
    check(n_fifo_resets == 1, $sformatf("one FIFO reset (%0d)", n_fifo_resets));
    check(violation_count == 8'(exp_viol), "violation count cleared by reset");

    // address for the other side is passed on as data
    write_word(16'h8F11);
    settle();

    // select again; the bus ignores one strobe
    write_word(16'h9F07);
    write_word(16'h1111);
    settle();
    bus_ignore_next = 1;
    write_word(16'h2222);
    settle();
    exp_q.delete(exp_q.size() - 1);    // lost to the bus timeout
    write_word(16'h3333);
    for (int i = 0; i < 40; i++) write_word(word_t'($urandom) & 16'h7FFF);
    settle();

    check(bus_q.size() == exp_q.size(),
          $sformatf("%0d lower-bus words, expected %0d", bus_q.size(), exp_q.size()));
    foreach (exp_q[i]) if (i < bus_q.size()) check(bus_q[i] == exp_q[i], "lower-bus word");
    check(violation_count == 8'(exp_viol),
          $sformatf("violation count %0d, expected %0d", violation_count, exp_viol));
    check(fifo.underflows == 0 && fifo.overflows == 0, "FIFO never under- or overflowed");
    check(tx_bytes == 2 * n_bus_words_in, "two fiber bytes per bus word");

    $display("mechanisms: words_in=%0d bytes=%0d fifo_writes=%0d wait_empty=%0d delimiters=%0d violations=%0d forwarded=%0d dropped=%0d ctrl=%0d fifo_resets=%0d other_side=%0d bus_timeouts=%0d",
             n_bus_words_in, tx_bytes, n_fifo_writes, n_wait_empty, n_delim, n_viol,
             n_forward, n_drop, n_ctrl, n_fifo_resets, n_other, n_bus_timeout);
    check(n_bus_words_in > 0, "bus-to-fiber transfers happened");
    check(n_fifo_writes > 0, "FIFO writes happened");
    check(n_wait_empty > 0, "pump waited on empty FIFO");
    check(n_delim > 0, "command-character delimiters happened");
    check(n_viol > 0, "code violations happened");
    check(n_forward > 0, "data words forwarded");
    check(n_drop > 0, "unselected words dropped");
    check(n_ctrl > 0, "control transactions happened");
    check(n_fifo_resets > 0, "FIFO reset happened");
    check(n_other > 0, "other-side address words happened");
    check(n_bus_timeout > 0, "lower-bus timeout happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
