// tb_sector_2x4: the small two-column array of the document's logic-analyser
// measurement: 2 columns of 4 chips (a 64 x 2 pad matrix), 8 hits in every
// chip except the second chip of the second column, which has 10 (66 hits).
// Checked: all 66 hits arrive in order with their column and row; the
// readout takes 68 readout clocks (one per hit, one per token pass); the
// first column's top chip never raises buffer-full, while the second
// column's top chip, waiting for the bus, raises it on the 17th readout
// clock; busy of column 1 falls when its last word has gone, and column 2
// drives the bus only after one idle clock.
module tb_sector_2x4;
  import rr_pkg::*;
  localparam int NC = 2, NH = 4, NP = NH * 16;
  logic fclock = 0, readclk = 0, reset = 1, readout = 0, strobe = 0;
  logic [NP-1:0] din [NC];
  logic [NP-1:0] pat [NC];
  logic [3:0] col_xin [NC];
  logic [3:0] dacout [NC][NH];
  bus_word_t top_bus;
  logic outengen, hit_valid, readout_busy, fastor;
  logic [13:0] hit;
  logic [NC-1:0] col_busy;
  int checks = 0, failures = 0;

  rich_sector #(.N_COLS(NC), .N_CHIPS(NH)) dut (
    .fclock, .osc_clk(fclock), .excken(1'b1), .readclk, .reset, .readout, .strobe,
    .testload_n(1'b1), .testen_n(1'b1), .dacload_n(1'b1), .din, .col_xin, .dacout,
    .top_bus, .outengen, .hit_valid, .hit, .col_busy, .readout_busy, .fastor);

  always #10 fclock = ~fclock;
  always #25 readclk = ~readclk;

  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s @%0t", s, $time); end endtask

  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int eq [$];
    int cyc, first_buful2, last_out1, first_out2;
    bit buful1_seen;
    for (int c = 0; c < NC; c++) begin din[c] = '0; col_xin[c] = 4'hF; end
    for (int c = 0; c < NC; c++) for (int h = 0; h < NH; h++)
      pat[c][16*h +: 16] = (c == 1 && h == 1) ? 16'hF3F0 : 16'hA5A5;
    for (int c = 0; c < NC; c++) for (int h = 0; h < NH; h++) for (int ch = 15; ch >= 0; ch--)
      if (pat[c][16*h + ch]) eq.push_back({c[3:0], 6'(h), 4'(ch)});
    chk(eq.size() == 66, "66 hits applied");
    repeat (3) @(posedge readclk); @(posedge fclock); #1 reset = 0;
    @(posedge fclock); #3 for (int c = 0; c < NC; c++) din[c] = pat[c];
    @(posedge fclock); #3 for (int c = 0; c < NC; c++) din[c] = '0;
    repeat (64) @(posedge fclock);
    #2 strobe = 1; @(posedge fclock); #2 strobe = 0;
    @(posedge readclk); #1 readout = 1;
    cyc = 0; first_buful2 = -1; last_out1 = -1; first_out2 = -1; buful1_seen = 0;
    while ((readout_busy || cyc == 0) && cyc < 500) begin
      #1;
      if (dut.g_col[0].u_col.g_chip[0].u_chip.buful) buful1_seen = 1;
      if (dut.g_col[1].u_col.g_chip[0].u_chip.buful && first_buful2 < 0) first_buful2 = cyc;
      if (dut.g_col[0].u_col.outen) last_out1 = cyc;
      if (dut.g_col[1].u_col.outen && first_out2 < 0) first_out2 = cyc;
      if (hit_valid) begin
        if (eq.size() == 0) chk(0, "extra hit");
        else begin
          chk(hit == 14'(eq[0]), $sformatf("hit %h exp %h", hit, eq[0]));
          void'(eq.pop_front());
        end
      end
      @(posedge readclk); #1;
      cyc++;
    end
    chk(eq.size() == 0, "all hits read");
    chk(cyc == 68, $sformatf("readout took %0d clocks, expected 68", cyc));
    chk(!buful1_seen, "first column's top FIFO filled");
    chk(first_buful2 == 17, $sformatf("second column buffer-full at clock %0d, expected 17", first_buful2));
    chk(first_out2 == last_out1 + 2, "one idle clock at the token pass");
    $display("66 hits in %0d readout clocks; column 2 buffer full from clock %0d", cyc, first_buful2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
