// tb_chip_column: one full column of 16 chips read out alone.  For random
// hit patterns (sparse, dense, empty chips, full chips) the words on the
// column bus while outen is high, with nulls dropped, must be every hit in
// row order (row 0 = top chip) and channel order 15..0, each with its row.
// Before the column gets the token its halt is held high for a random time
// so the FIFOs fill and stall (buful).  When every chip has hits the column
// must use exactly one bus clock per hit plus one token-pass clock.  The
// column's DAC registers are loaded through col_xin in mode 2.
module tb_chip_column;
  import rr_pkg::*;
  localparam int NCH = 16;
  logic fclock = 0, readclk = 0, reset = 1, readout = 0, strobe = 0, halt = 0;
  logic tl_n = 1, te_n = 1, dl_n = 1;
  logic [NCH*16-1:0] din = '0;
  logic [3:0] col_xin = 4'hF;
  bus_word_t bus;
  logic busy, outen, fastor;
  logic [3:0] dacout [NCH];
  int checks = 0, failures = 0, stalls = 0, nulls_on_bus = 0;

  chip_column #(.N_CHIPS(NCH)) dut (
    .fclock, .osc_clk(fclock), .excken(1'b1), .readclk, .reset, .readout, .strobe,
    .testload_n(tl_n), .testen_n(te_n), .dacload_n(dl_n), .din, .col_xin, .halt,
    .bus, .busy, .outen, .dacout, .fastor);

  always #10 fclock = ~fclock;
  always #25 readclk = ~readclk;

  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s @%0t", s, $time); end endtask

  initial begin
    #20ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic event_readout(logic [NCH*16-1:0] pat, int hold, string tag);
    int exp_r [$], exp_c [$];
    int cyc, data_cyc, n_hits;
    bit all_have;
    reset = 1; halt = 1; repeat (3) @(posedge readclk); @(posedge fclock); #1 reset = 0;
    @(posedge fclock); #3 din = pat;
    @(posedge fclock); #3 din = '0;
    repeat (64) @(posedge fclock);
    #2 strobe = 1; @(posedge fclock); #2 strobe = 0;
    all_have = 1;
    for (int r = 0; r < NCH; r++) begin
      if (pat[16*r +: 16] == '0) all_have = 0;
      for (int c = 15; c >= 0; c--) if (pat[16*r + c]) begin exp_r.push_back(r); exp_c.push_back(c); end
    end
    n_hits = exp_r.size();
    @(posedge readclk); #1 readout = 1;
    cyc = 0; data_cyc = 0;
    while ((busy || cyc == 0) && cyc < 2000) begin
      if (cyc >= hold) halt = 0;
      #1;
      if (dut.g_chip[1].u_chip.buful) stalls++;
      if (outen) begin
        data_cyc++;
        if (bus.null_f) nulls_on_bus++;
        else begin
          chk(exp_r.size() > 0, {tag, ": extra word"});
          if (exp_r.size() > 0) begin
            chk(bus.row == 6'(exp_r[0]) && bus.addr == 4'(exp_c[0]),
                $sformatf("%s: got r%0d c%0d exp r%0d c%0d", tag, bus.row, bus.addr, exp_r[0], exp_c[0]));
            void'(exp_r.pop_front()); void'(exp_c.pop_front());
          end
        end
      end
      @(posedge readclk); #1;
      cyc++;
    end
    chk(exp_r.size() == 0, $sformatf("%s: %0d hits missing", tag, exp_r.size()));
    if (all_have) chk(data_cyc == n_hits, $sformatf("%s: %0d bus clocks for %0d hits", tag, data_cyc, n_hits));
    readout = 0; halt = 1;
  endtask

  initial begin
    logic [NCH*16-1:0] p;
    // DAC loading: 16 codes, top chip's first.
    dl_n = 0;
    for (int i = 0; i < NCH; i++) begin @(posedge readclk); #1 col_xin = 4'(i * 7 + 3); end
    @(posedge readclk); #1 dl_n = 1; col_xin = 4'hF;
    for (int i = 0; i < NCH; i++) chk(dacout[i] == 4'(i * 7 + 3), $sformatf("dac chip %0d", i));
    event_readout('0, 0, "empty");
    p = '1; event_readout(p, 30, "full");
    for (int t = 0; t < 12; t++) begin
      for (int w = 0; w < NCH*16/32; w++) begin
        logic [31:0] r;
        r = $urandom;
        if (t % 3 == 0) r &= $urandom & $urandom;
        if (t % 3 == 2) r |= 32'h0001_0001;   // every chip has a hit
        p[32*w +: 32] = r;
      end
      event_readout(p, $urandom % 80, $sformatf("random %0d", t));
    end
    chk(stalls > 0, "buffer-full never happened");
    chk(nulls_on_bus > 0, "no null word reached the bus");
    $display("stall clocks %0d, null words on bus %0d", stalls, nulls_on_bus);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
