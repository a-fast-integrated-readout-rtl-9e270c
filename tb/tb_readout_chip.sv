// tb_readout_chip: one readout chip used as a one-chip column (top chip,
// fin tied at its input) plus a second chip used below the top, fed and
// drained by the testbench.
//  - latency: an input pulse is latched only by a one-clock strobe placed
//    exactly 66 clocks (64 + 2) after the clock edge that first sees it;
//  - readout: hits come out channel 15 first, row 0, next-row on the last,
//    one per readout clock after one start clock, then one token-pass
//    clock in which busy falls; an empty chip gives one null word;
//  - strobe is ignored during readout;
//  - mode 3 loads a test pattern through xin that a strobe copies into the
//    latches; modes 4 and 5 force all / no hits; mode 2 loads the DAC code;
//  - fast-or follows the shaped input;
//  - a chip below the top sends its own words and then, in order, every word
//    it received, ending with fin, under random back-pressure (halt), and
//    raises buful when its FIFO is full.
module tb_readout_chip;
  import rr_pkg::*;
  logic fclock = 0, osc = 0, readclk = 0;
  logic reset = 1, readout = 0, strobe = 0;
  logic [15:0] din = '0;
  logic tl_n = 1, te_n = 1, dl_n = 1;
  logic [3:0] xin = 4'hF;
  logic nextin = 0, nullin = 1;
  logic [3:0] xout, dacout;
  logic nextout, nullout, buful, busy, outen, fastor;
  logic [5:0] rowout;
  int checks = 0, failures = 0;

  readout_chip dut (
    .fclock, .osc_clk(osc), .excken(1'b1), .readclk, .reset, .readout, .strobe, .din,
    .testload_n(tl_n), .testen_n(te_n), .dacload_n(dl_n), .toprow(1'b1),
    .xin, .nextin, .nullin, .halt(1'b0),
    .xout, .nextout, .nullout, .rowout, .buful, .busy, .outen, .dacout, .fastor);

  // Second chip, below the top.
  logic [3:0] bx_in = '0, bx_out;
  logic bn_in = 0, bz_in = 0, b_halt = 0, bn_out, bz_out, b_buful;
  logic [15:0] bdin = '0;
  logic b_readout = 0, b_strobe = 0, b_reset = 1;
  readout_chip dut_b (
    .fclock, .osc_clk(osc), .excken(1'b1), .readclk, .reset(b_reset), .readout(b_readout),
    .strobe(b_strobe), .din(bdin), .testload_n(1'b1), .testen_n(1'b1), .dacload_n(1'b1),
    .toprow(1'b0), .xin(bx_in), .nextin(bn_in), .nullin(bz_in), .halt(b_halt),
    .xout(bx_out), .nextout(bn_out), .nullout(bz_out), .rowout(), .buful(b_buful),
    .busy(), .outen(), .dacout(), .fastor());

  always #10 fclock = ~fclock;   // 50 MHz
  always #9  osc = ~osc;         // unused oscillator
  always #25 readclk = ~readclk; // 20 MHz

  task automatic fail(string s); failures++; $display("FAIL %s @%0t", s, $time); endtask
  task automatic chk(bit ok, string s); checks++; if (!ok) fail(s); endtask

  initial begin
    #5ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic do_reset();
    reset = 1; readout = 0; strobe = 0;
    repeat (3) @(posedge readclk);
    @(posedge fclock); #1 reset = 0;
  endtask

  // Input pulse on channels 'mask' 3 ns after an fclock edge, 30 ns long;
  // strobe one clock wide around edge number 'd' counted from the edge that
  // samples the input.
  task automatic pulse_and_strobe(logic [15:0] mask, int d);
    @(posedge fclock); #3 din = mask;
    fork
      begin #30 din = '0; end
      begin
        @(posedge fclock);              // edge 1 samples the input
        repeat (d - 2) @(posedge fclock);
        #2 strobe = 1;                  // high across edge d
        @(posedge fclock); #2 strobe = 0;
      end
    join
    repeat (3) @(posedge fclock);
  endtask

  // Read out the one-chip column and compare with the expected hits.
  task automatic read_and_check(logic [15:0] exp, string tag);
    int cyc, words;
    int ch;
    bit seen_first;
    @(posedge readclk); #1 readout = 1;
    #1 chk(busy, {tag, ": busy at readout"});
    ch = 15; words = 0; cyc = 0; seen_first = 0;
    while (busy && cyc < 40) begin
      @(posedge readclk); #1; cyc++;
      if (outen) begin
        words++;
        if (exp == '0) begin
          chk(nextout && nullout && rowout == 0, {tag, ": null word"});
        end else begin
          while (ch >= 0 && !exp[ch]) ch--;
          chk(xout == 4'(ch) && !nullout && rowout == 0, $sformatf("%s: word %0d ch=%0d exp %0d", tag, words, xout, ch));
          chk(nextout == ((exp & ((16'h1 << ch) - 1)) == 0), {tag, ": next flag"});
          ch--;
        end
      end
    end
    chk(words == ((exp == '0) ? 1 : $countones(exp)), $sformatf("%s: %0d words", tag, words));
    // start clock + one per word + token-pass clock
    chk(cyc == words + 1, $sformatf("%s: busy for %0d readout clocks", tag, cyc));
    chk(!outen && !busy, {tag, ": released"});
    readout = 0;
    do_reset();
  endtask

  initial begin
    logic [15:0] m;
    do_reset();
    // 1. Latency scan: only a strobe at edge 66 sees the hit.
    for (int d = 63; d <= 69; d++) begin
      m = 16'h0001 << (d - 60);
      pulse_and_strobe(m, d);
      read_and_check(d == 66 ? m : '0, $sformatf("delay %0d", d));
    end
    // 2. Random hit patterns.
    for (int t = 0; t < 20; t++) begin
      m = 16'($urandom) & 16'($urandom);
      pulse_and_strobe(m, 66);
      read_and_check(m, "random");
    end
    // 3. Strobe during readout is ignored.
    pulse_and_strobe(16'h0500, 66);
    @(posedge readclk); #1 readout = 1;
    @(posedge fclock); #2 strobe = 1; din = 16'hFFFF;
    repeat (200) @(posedge fclock);
    strobe = 0; din = '0; readout = 0;
    // The first readout clock has copied the latches; check them directly.
    chk(dut.hits == 16'h0500, "strobe during readout changed latches");
    do_reset();
    // 4. Mode 3: load 4 words into the test registers, strobe, read.
    tl_n = 0;
    for (int k = 0; k < 4; k++) begin
      @(posedge readclk); #1 xin = 4'(16'hA5C3 >> (4 * (3 - k)));
    end
    @(posedge readclk); #1 xin = 4'hF;
    @(posedge fclock); #2 strobe = 1; @(posedge fclock); #2 strobe = 0;
    chk(xout == 4'hA, "mode 3 chain output");
    tl_n = 1;
    read_and_check(16'hA5C3, "mode 3");
    // 5. Mode 4: all hits; mode 5: none even with inputs.
    te_n = 0;
    repeat (70) @(posedge fclock);
    @(posedge fclock); #2 strobe = 1; @(posedge fclock); #2 strobe = 0;
    te_n = 1;
    read_and_check(16'hFFFF, "mode 4");
    te_n = 0; tl_n = 0;
    for (int k = 0; k < 80; k++) begin
      @(posedge fclock); #3 din = 16'($urandom); strobe = 1;
    end
    strobe = 0; din = '0; te_n = 1; tl_n = 1;
    read_and_check('0, "mode 5");
    // 6. Mode 2: DAC code.
    dl_n = 0; xin = 4'h9;
    @(posedge readclk); #1;
    chk(dacout == 4'h9 && xout == 4'h9, "mode 2 DAC load");
    xin = 4'hF; dl_n = 1;
    do_reset();
    chk(dacout == 4'h9, "DAC code survives reset");
    // 7. Fast-or.
    @(posedge fclock); #3 din = 16'h0100;
    @(posedge fclock); #1 chk(fastor, "fast-or high");
    @(posedge fclock); #1 chk(!fastor, "fast-or one clock");
    din = '0;
    // 8. Chip below the top.
    below_chip();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------------
  task automatic below_chip();
    chain_word_t in_q [$];
    chain_word_t exp_q [$];
    chain_word_t got;
    logic [15:0] own;
    int cyc, n_in;
    bit full_seen;
    for (int trial = 0; trial < 6; trial++) begin
      own = (trial == 0) ? '0 : 16'($urandom) & 16'($urandom);
      in_q = {}; exp_q = {};
      for (int c = 15; c >= 0; c--) if (own[c])
        exp_q.push_back('{addr: 4'(c), next_row: (own & ((16'h1 << c) - 1)) == 0, null_f: 1'b0});
      if (own == '0) exp_q.push_back('{addr: 4'h0, next_row: 1'b1, null_f: 1'b1});
      // Words from below: random hits of a few chips, then fin.
      repeat (5 + $urandom % 30) begin
        chain_word_t w;
        w.addr = 4'($urandom); w.null_f = ($urandom % 8) == 0; w.next_row = w.null_f || ($urandom % 4) == 0;
        in_q.push_back(w);
      end
      in_q.push_back('{addr: 4'h3, next_row: 1'b0, null_f: 1'b1});
      foreach (in_q[i]) exp_q.push_back(in_q[i]);
      n_in = in_q.size();
      // Acquire 'own' through the shift register.
      b_reset = 1; repeat (3) @(posedge readclk); @(posedge fclock); #1 b_reset = 0;
      @(posedge fclock); #3 bdin = own;
      @(posedge fclock); #3 bdin = '0;
      repeat (64) @(posedge fclock);
      #2 b_strobe = 1; @(posedge fclock); #2 b_strobe = 0;
      // Readout with the testbench as the chips above and below.
      @(posedge readclk); #1 b_readout = 1;
      {bx_in, bn_in, bz_in} = in_q[0];
      cyc = 0; full_seen = 0;
      while (exp_q.size() > 0 && cyc < 400) begin
        b_halt = (trial % 2) ? (($urandom % 3) == 0) : (cyc < 40);
        #1;
        got = '{addr: bx_out, next_row: bn_out, null_f: bz_out};
        if (b_buful) full_seen = 1;
        @(posedge readclk);
        if (cyc > 0 && !b_halt) begin
          chk(got == exp_q[0], $sformatf("below: got %p exp %p", got, exp_q[0]));
          void'(exp_q.pop_front());
        end
        if (cyc > 0 && !b_buful && in_q.size() > 0) void'(in_q.pop_front());
        #1;
        if (in_q.size() > 0) {bx_in, bn_in, bz_in} = in_q[0];
        cyc++;
      end
      chk(exp_q.size() == 0, "below: stream incomplete");
      // Held for 40 clocks, the FIFO fills exactly when 16 or more words
      // come from below.
      if (trial % 2 == 0) chk(full_seen == (n_in >= 16), "below: buful under long halt");
      b_readout = 0; b_halt = 0;
    end
  endtask
endmodule
