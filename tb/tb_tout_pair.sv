// tb_tout_pair: two chips joined by a pair of fibers, one strapped as the
// local end (I_AM_REMOTE = 0) and one as the remote end (the defaults).
//
// Each chip has its own FIFO chip model, transmitter model and bus models;
// each transmitter feeds the other chip's receiver pins after a fixed link
// delay.  Both bus masters write at the same time: the local side addresses
// the remote chip's data address (side bit 1) and streams data words, the
// remote side addresses the local chip (side bit 0) and streams data words
// back.  Checked: each lower bus receives exactly the data words written on
// the other chip's upper bus, in order, while both directions run at once.
module tb_tout_pair;
  import tout_pkg::*;

  localparam logic [3:0] LOCAL_DATA = 4'h1, LOCAL_CTRL = 4'h3;
  localparam int LINK_DELAY = 5;

  logic clk = 0, reset = 0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  // per-chip signals, index 0 = local, 1 = remote
  word_t       id_upper[2], id_lower[2];
  logic        from_stb[2], from_ack[2], to_stb[2], to_ack[2];
  logic [11:0] fr_d[2];
  logic        fr_RDY_l[2];
  logic [9:0]  fo_d[2];
  logic        fo_ENA_l[2], fo_CKW[2];
  logic        f_rst_l[2], f_wr_l[2], f_rd_l[2], f_empty_l[2], f_half_l[2], f_full_l[2];
  logic [8:0]  f_d[2], f_out[2];
  logic        tx_valid[2];
  logic [9:0]  tx_byte[2];

  for (genvar g = 0; g < 2; g++) begin : side
    logic       debug, ref_clk, rf, frmode, enn, fomode, foto, sel, inc;
    logic [7:0] addr, viol;
    if (g == 0) begin : chip
      tout #(.I_AM_REMOTE(1'b0), .MY_DATA_ADDRESS(LOCAL_DATA),
             .MY_CTRL_ADDRESS(LOCAL_CTRL)) u (
        .clk, .reset, .DEBUG(debug), .id_upper(id_upper[g]), .id_lower(id_lower[g]),
        .AO_FROM_PC_STROBE(from_stb[g]), .AO_FROM_PC_ACK(from_ack[g]),
        .AO_TO_PC_STROBE(to_stb[g]), .AO_TO_PC_ACK(to_ack[g]),
        .fr_d(fr_d[g]), .fr_ref_clk(ref_clk), .fr_rf(rf), .fr_mode(frmode),
        .fr_status(1'b1), .fr_RDY_l(fr_RDY_l[g]),
        .fo_d(fo_d[g]), .fo_ENN_l(enn), .fo_ENA_l(fo_ENA_l[g]), .fo_CKW(fo_CKW[g]),
        .fo_mode(fomode), .fo_foto(foto),
        .fifo_reset_l(f_rst_l[g]), .fifo_WRITE_l(f_wr_l[g]), .fifo_D(f_d[g]),
        .fifo_READ_l(f_rd_l[g]), .fifo_EMPTY_l(f_empty_l[g]), .fifo_OUT(f_out[g]),
        .chip_selected(sel), .fi_address(addr), .violation_count(viol),
        .increment_fifo_count(inc));
    end else begin : chip
      tout u (
        .clk, .reset, .DEBUG(debug), .id_upper(id_upper[g]), .id_lower(id_lower[g]),
        .AO_FROM_PC_STROBE(from_stb[g]), .AO_FROM_PC_ACK(from_ack[g]),
        .AO_TO_PC_STROBE(to_stb[g]), .AO_TO_PC_ACK(to_ack[g]),
        .fr_d(fr_d[g]), .fr_ref_clk(ref_clk), .fr_rf(rf), .fr_mode(frmode),
        .fr_status(1'b1), .fr_RDY_l(fr_RDY_l[g]),
        .fo_d(fo_d[g]), .fo_ENN_l(enn), .fo_ENA_l(fo_ENA_l[g]), .fo_CKW(fo_CKW[g]),
        .fo_mode(fomode), .fo_foto(foto),
        .fifo_reset_l(f_rst_l[g]), .fifo_WRITE_l(f_wr_l[g]), .fifo_D(f_d[g]),
        .fifo_READ_l(f_rd_l[g]), .fifo_EMPTY_l(f_empty_l[g]), .fifo_OUT(f_out[g]),
        .chip_selected(sel), .fi_address(addr), .violation_count(viol),
        .increment_fifo_count(inc));
    end

    fifo_chip_model #(.DEPTH(512)) fifo (
      .clk, .fifo_reset_l(f_rst_l[g]), .fifo_WRITE_l(f_wr_l[g]), .fifo_D(f_d[g]),
      .fifo_READ_l(f_rd_l[g]), .fifo_OUT(f_out[g]), .fifo_EMPTY_l(f_empty_l[g]),
      .fifo_HALF_l(f_half_l[g]), .fifo_FULL_l(f_full_l[g]));

    fiber_tx_model tx (.clk, .fo_CKW(fo_CKW[g]), .fo_ENA_l(fo_ENA_l[g]),
                       .fo_d(fo_d[g]), .byte_valid(tx_valid[g]), .byte_out(tx_byte[g]));

    // link from this chip's transmitter to the other chip's receiver
    logic [11:0] q[$];
    int          due[$];
    int          cycle = 0;
    always @(posedge clk) begin
      cycle <= cycle + 1;
      fr_RDY_l[1-g] <= 1'b1;
      if (tx_valid[g]) begin
        q.push_back({2'b00, tx_byte[g]});
        due.push_back(cycle + LINK_DELAY);
      end
      if (q.size() > 0 && due[0] <= cycle && fr_RDY_l[1-g]) begin
        fr_d[1-g]     <= q.pop_front();
        void'(due.pop_front());
        fr_RDY_l[1-g] <= 1'b0;
      end
    end

    // lower-bus slave of this chip
    word_t got_q[$];
    initial from_ack[g] = 0;
    always begin
      tick();
      if (from_stb[g] && !from_ack[g]) begin
        repeat ($urandom_range(0, 3)) tick();
        got_q.push_back(id_lower[g]);
        from_ack[g] = 1;
        tick();
        while (from_stb[g]) tick();
        from_ack[g] = 0;
      end
    end

    // upper-bus master of this chip
    word_t sent_q[$];
    bit    done = 0;
    initial begin
      to_stb[g]   = 0;
      id_upper[g] = '0;
      @(negedge reset);
      repeat (5) tick();
      for (int i = 0; i <= 80; i++) begin
        word_t w;
        if (i == 0) w = (g == 0) ? 16'h9F00 : {4'h8, LOCAL_DATA, 8'h00};
        else begin
          w = word_t'($urandom) & 16'h7FFF;
          sent_q.push_back(w);
        end
        id_upper[g] = w;
        to_stb[g]   = 1;
        while (!to_ack[g]) tick();
        to_stb[g] = 0;
        while (to_ack[g]) tick();
        repeat ($urandom_range(0, 4)) tick();
      end
      repeat (200) tick();
      done = 1;
    end
  end

  initial begin
    fr_d     = '{default: '0};
    fr_RDY_l = '{default: 1'b1};
    #1 reset = 1;
    repeat (3) tick();
    reset = 0;
    wait (side[0].done && side[1].done);
    check(side[1].got_q.size() == side[0].sent_q.size(),
          $sformatf("remote bus got %0d of %0d words", side[1].got_q.size(), side[0].sent_q.size()));
    foreach (side[0].sent_q[i])
      if (i < side[1].got_q.size()) check(side[1].got_q[i] == side[0].sent_q[i], "local to remote word");
    check(side[0].got_q.size() == side[1].sent_q.size(),
          $sformatf("local bus got %0d of %0d words", side[0].got_q.size(), side[1].sent_q.size()));
    foreach (side[1].sent_q[i])
      if (i < side[0].got_q.size()) check(side[0].got_q[i] == side[1].sent_q[i], "remote to local word");
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
