// chip_column: one readout column of N_CHIPS daisy-chained readout chips.
//
// Chip 0 is the top chip (toprow high) and drives the column bus driver;
// chip N_CHIPS-1 is at the bottom.  Each chip's xout/nextout/nullout feeds the
// xin/nextin/nullin of the chip above, and each chip's buful is the halt of
// the chip below.  The bottom chip's flag inputs are tied to the fin
// combination (next-row false, null true); its xin is the column's loading
// bus col_xin, which carries test patterns and DAC codes in modes 2 and 3.
// The top chip's halt is the busy of the previous column (halt input).
// Chip i serves channels din[16*i +: 16] and sets the threshold of its two
// analog chips through dacout[i].  All chips share clocks, reset, readout,
// strobe and the mode pins, as on the detector's cards.
module chip_column
  import rr_pkg::*;
#(
  parameter int N_CHIPS = 16
) (
  input  logic                   fclock,
  input  logic                   osc_clk,
  input  logic                   excken,
  input  logic                   readclk,
  input  logic                   reset,
  input  logic                   readout,
  input  logic                   strobe,
  input  logic                   testload_n,
  input  logic                   testen_n,
  input  logic                   dacload_n,
  input  logic [N_CHIPS*16-1:0]  din,
  input  logic [ADDR_W-1:0]      col_xin,
  input  logic                   halt,
  output bus_word_t              bus,
  output logic                   busy,
  output logic                   outen,
  output logic [DAC_W-1:0]       dacout [N_CHIPS],
  output logic                   fastor
);
  logic [ADDR_W-1:0] x    [N_CHIPS+1];
  logic              nxt  [N_CHIPS+1];
  logic              nul  [N_CHIPS+1];
  logic              bful [N_CHIPS];
  logic [N_CHIPS-1:0] chip_fastor;
  logic [ROW_W-1:0]  top_row;
  logic              top_busy, top_outen;

  // Index N_CHIPS is the input of the bottom chip.
  assign x[N_CHIPS]   = col_xin;
  assign nxt[N_CHIPS] = 1'b0;
  assign nul[N_CHIPS] = 1'b1;

  for (genvar i = 0; i < N_CHIPS; i++) begin : g_chip
    logic [ROW_W-1:0] row_unused;
    logic             busy_o, outen_o;
    readout_chip #(.N_CH(16)) u_chip (
      .fclock, .osc_clk, .excken, .readclk, .reset, .readout, .strobe,
      .din(din[16*i +: 16]), .testload_n, .testen_n, .dacload_n,
      .toprow(i == 0),
      .xin(x[i+1]), .nextin(nxt[i+1]), .nullin(nul[i+1]),
      .halt(i == 0 ? halt : bful[i-1]),
      .xout(x[i]), .nextout(nxt[i]), .nullout(nul[i]),
      .rowout(row_unused), .buful(bful[i]), .busy(busy_o), .outen(outen_o),
      .dacout(dacout[i]), .fastor(chip_fastor[i]));
    if (i == 0) begin : g_top
      assign top_row   = row_unused;
      assign top_busy  = busy_o;
      assign top_outen = outen_o;
    end
  end

  column_bus_driver u_drv (
    .outen(top_outen),
    .word_in('{row: top_row, addr: x[0], next_row: nxt[0], null_f: nul[0]}),
    .word_out(bus));

  assign busy   = top_busy;
  assign outen  = top_outen;
  assign fastor = |chip_fastor;
endmodule
