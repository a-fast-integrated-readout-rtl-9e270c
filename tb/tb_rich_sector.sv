// tb_rich_sector: end-to-end test of a full sector (15 columns x 16 chips x
// 16 channels = 3840 pads) at its default size.
//
// Each event puts discriminator pulses on the chosen pads, strobes 66 clocks
// (64 + 2) of the 50 MHz clock later, raises readout and collects
// {column, row, channel} from the DAQ side on every readout clock where
// hit_valid is high.  The collected list must equal the applied pads in
// readout order: column 0..14, row 0..15, channel 15..0.  Events:
//  - thresholds loaded into all 240 DAC registers (mode 2);
//  - an empty sector, and every pad hit (mode 4, 3840 hits);
//  - 8 hits in every chip, one chip with 10 (the shape of the document's
//    logic-analyser example), and random sparse ring-like events;
//  - a test pattern loaded through the test registers (mode 3);
//  - mode 5 blocking real inputs; a strobe during readout being ignored.
// Readout clocks (readout high until the last column's busy falls) must be
// hits + 15 when every chip has hits (one per hit, one per token pass), and
// 15 + 14 + 15 for an empty sector (16 chips' null words for column 0 less
// the top one dropped while its own null is sent, one null word per other
// column, one pass clock per column).  Counts of each mechanism are printed:
// token passes, buffer-full stalls, nulls reaching the bus, nulls dropped in
// a top chip, test-mode events; one that never happened is a failure.
module tb_rich_sector;
  import rr_pkg::*;
  localparam int NC = 15, NH = 16, NP = NH * 16;
  logic fclock = 0, readclk = 0, reset = 1, readout = 0, strobe = 0;
  logic tl_n = 1, te_n = 1, dl_n = 1;
  logic [NP-1:0] din [NC];
  logic [3:0] col_xin [NC];
  logic [3:0] dacout [NC][NH];
  bus_word_t top_bus;
  logic outengen, hit_valid, readout_busy, fastor;
  logic [13:0] hit;
  logic [NC-1:0] col_busy;
  int checks = 0, failures = 0;
  int n_pass = 0, n_stall = 0, n_null_bus = 0, n_null_drop = 0, n_modes = 0, n_fastor = 0;

  rich_sector dut (
    .fclock, .osc_clk(fclock), .excken(1'b1), .readclk, .reset, .readout, .strobe,
    .testload_n(tl_n), .testen_n(te_n), .dacload_n(dl_n), .din, .col_xin, .dacout,
    .top_bus, .outengen, .hit_valid, .hit, .col_busy, .readout_busy, .fastor);

  always #10 fclock = ~fclock;   // 50 MHz
  always #25 readclk = ~readclk; // 20 MHz

  // Mechanism counters, sampled on the readout clock.
  logic outengen_q = 0;
  always @(posedge readclk) begin
    outengen_q <= outengen;
    if (outengen_q && !outengen) n_pass++;
    if (outengen && top_bus.null_f) n_null_bus++;
  end
  int stall_c [NC];
  int drop_c [NC];
  for (genvar c = 0; c < NC; c++) begin : g_mon
    initial begin stall_c[c] = 0; drop_c[c] = 0; end
    always @(posedge readclk) begin
      if (dut.g_col[c].u_col.g_chip[1].u_chip.buful) stall_c[c]++;
      if (dut.g_col[c].u_col.g_chip[0].u_chip.in_take &&
          dut.g_col[c].u_col.g_chip[0].u_chip.in_word.null_f &&
          dut.g_col[c].u_col.g_chip[0].u_chip.in_word.next_row &&
          !dut.g_col[c].u_col.g_chip[0].u_chip.bypass) drop_c[c]++;
    end
  end
  always @(posedge fclock) if (fastor) n_fastor++;

  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s @%0t", s, $time); end endtask

  initial begin
    #100ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [NP-1:0] pat [NC];

  task automatic clear_din();
    for (int c = 0; c < NC; c++) din[c] = '0;
  endtask

  task automatic do_reset();
    reset = 1; readout = 0; strobe = 0;
    repeat (3) @(posedge readclk); @(posedge fclock); #1 reset = 0;
  endtask

  task automatic acquire();   // pulses from pat, strobe at edge 66
    @(posedge fclock); #3 for (int c = 0; c < NC; c++) din[c] = pat[c];
    @(posedge fclock); #3 clear_din();
    repeat (64) @(posedge fclock);
    #2 strobe = 1; @(posedge fclock); #2 strobe = 0;
  endtask

  // Read out and compare with pat; exp_cycles < 0 skips the clock count.
  task automatic readout_check(string tag, int exp_cycles);
    int eq_c [$], eq_r [$], eq_ch [$];
    int cyc, got;
    for (int c = 0; c < NC; c++)
      for (int r = 0; r < NH; r++)
        for (int ch = 15; ch >= 0; ch--)
          if (pat[c][16*r + ch]) begin eq_c.push_back(c); eq_r.push_back(r); eq_ch.push_back(ch); end
    @(posedge readclk); #1 readout = 1;
    cyc = 0; got = 0;
    while ((readout_busy || cyc == 0) && cyc < 6000) begin
      #1;
      if (hit_valid) begin
        got++;
        if (eq_c.size() == 0) chk(0, {tag, ": extra hit"});
        else begin
          if (hit != {4'(eq_c[0]), 6'(eq_r[0]), 4'(eq_ch[0])}) begin
            chk(0, $sformatf("%s: hit %0d got c%0d r%0d ch%0d exp c%0d r%0d ch%0d", tag, got,
                hit[13:10], hit[9:4], hit[3:0], eq_c[0], eq_r[0], eq_ch[0]));
          end else checks++;
          void'(eq_c.pop_front()); void'(eq_r.pop_front()); void'(eq_ch.pop_front());
        end
      end
      @(posedge readclk); #1;
      cyc++;
    end
    chk(eq_c.size() == 0, $sformatf("%s: %0d hits not read", tag, eq_c.size()));
    if (exp_cycles >= 0) chk(cyc == exp_cycles, $sformatf("%s: %0d readout clocks, expected %0d", tag, cyc, exp_cycles));
    $display("%s: %0d hits in %0d readout clocks (%0d ns)", tag, got, cyc, cyc * 50);
    readout = 0;
    do_reset();
  endtask

  function automatic int count_hits();
    int n = 0;
    for (int c = 0; c < NC; c++) n += $countones(pat[c]);
    return n;
  endfunction

  initial begin
    clear_din();
    for (int c = 0; c < NC; c++) col_xin[c] = 4'hF;
    do_reset();

    // Thresholds: chip h of column c gets (c + 3*h) mod 16.
    dl_n = 0; n_modes++;
    for (int h = 0; h < NH; h++) begin
      @(posedge readclk); #1 for (int c = 0; c < NC; c++) col_xin[c] = 4'(c + 3 * h);
    end
    @(posedge readclk); #1 dl_n = 1;
    for (int c = 0; c < NC; c++) col_xin[c] = 4'hF;
    for (int c = 0; c < NC; c++) for (int h = 0; h < NH; h++)
      chk(dacout[c][h] == 4'(c + 3 * h), $sformatf("dac c%0d h%0d", c, h));

    // Empty sector.
    for (int c = 0; c < NC; c++) pat[c] = '0;
    acquire(); readout_check("empty sector", (NH - 1) + (NC - 1) + NC);

    // 8 hits per chip, one chip with 10.
    for (int c = 0; c < NC; c++) for (int h = 0; h < NH; h++)
      pat[c][16*h +: 16] = (c == 1 && h == 1) ? 16'h03FF : 16'h5555;
    acquire(); readout_check("8 hits per chip", count_hits() + NC);

    // Sparse events: about 20 photon hits.
    for (int t = 0; t < 4; t++) begin
      for (int c = 0; c < NC; c++) pat[c] = '0;
      repeat (20) begin
        int c, p;
        c = $urandom % NC; p = $urandom % NP;
        pat[c][p] = 1'b1;
      end
      acquire(); readout_check($sformatf("sparse %0d", t), -1);
    end

    // Mode 3: a test pattern in every chip, 64 clocks to load a column.
    for (int c = 0; c < NC; c++) for (int h = 0; h < NH; h++)
      pat[c][16*h +: 16] = 16'($urandom) & 16'($urandom) & 16'($urandom);
    tl_n = 0; n_modes++;
    for (int h = 0; h < NH; h++)          // top chip's pattern first
      for (int w = 3; w >= 0; w--) begin
        @(posedge readclk); #1 for (int c = 0; c < NC; c++) col_xin[c] = pat[c][16*h + 4*w +: 4];
      end
    @(posedge readclk); #1 for (int c = 0; c < NC; c++) col_xin[c] = 4'hF;
    @(posedge fclock); #2 strobe = 1; @(posedge fclock); #2 strobe = 0;
    tl_n = 1;
    readout_check("mode 3 test pattern", -1);

    // Mode 4: every pad hit.
    for (int c = 0; c < NC; c++) pat[c] = '1;
    te_n = 0; n_modes++;
    repeat (70) @(posedge fclock);
    #2 strobe = 1; @(posedge fclock); #2 strobe = 0;
    te_n = 1;
    readout_check("mode 4 all hits", NC * NP + NC);

    // Mode 5: real pulses must not register.
    for (int c = 0; c < NC; c++) pat[c] = '0;
    te_n = 0; tl_n = 0; n_modes++;
    for (int k = 0; k < 80; k++) begin
      @(posedge fclock); #3 for (int c = 0; c < NC; c++) din[c] = {NP/32{$urandom}};
      strobe = 1;
    end
    strobe = 0; clear_din(); te_n = 1; tl_n = 1;
    readout_check("mode 5 no hits", (NH - 1) + (NC - 1) + NC);

    // Strobe during readout: the second event must not appear.
    for (int c = 0; c < NC; c++) pat[c] = '0;
    pat[3][37] = 1; pat[9][200] = 1;
    acquire();
    fork
      readout_check("strobe during readout", -1);
      begin
        @(posedge readout); @(posedge fclock); #3 for (int c = 0; c < NC; c++) din[c] = '1;
        strobe = 1; repeat (100) @(posedge fclock); strobe = 0; clear_din();
      end
    join

    foreach (stall_c[c]) begin n_stall += stall_c[c]; n_null_drop += drop_c[c]; end
    $display("token passes %0d, buffer-full clocks %0d, nulls on bus %0d, nulls dropped %0d, test modes %0d, fast-or clocks %0d",
             n_pass, n_stall, n_null_bus, n_null_drop, n_modes, n_fastor);
    chk(n_pass > 0, "no token pass");
    chk(n_stall > 0, "no buffer-full stall");
    chk(n_null_bus > 0, "no null word on the bus");
    chk(n_null_drop > 0, "no null word dropped in a top chip");
    chk(n_modes >= 4, "test modes");
    chk(n_fastor > 0, "fast-or never high");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
