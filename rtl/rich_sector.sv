// rich_sector: one sector of the fast RICH photon detector readout.
//
// N_COLS columns of N_CHIPS readout chips (15 x 16 chips x 16 channels = 3840
// pads at the defaults).  All columns acquire and encode in parallel; the
// top bus is shared by token passing: column 0 owns it first, and the busy
// output of column n is the halt input of column n+1, so the columns empty
// one after another while the others keep compacting their data.  The column
// drivers are combined by OR (wired bus) into top_bus; daq_interface appends
// the column number and flags the cycles that carry a hit.
//
// Operation: hold reset, load DAC codes (mode 2) and optionally test patterns
// (mode 3) through col_xin, then in mode 1 apply discriminator pulses on din;
// a strobe (64 + 2 fclk periods after the pulses) latches them; raise readout
// and clock readclk.  One hit is delivered per readclk cycle, one cycle is
// lost per token pass, and readout_busy (busy of the last column) falls when
// the sector is read out.  The hit word is {column, row, channel}: pad
// column is 2*column plus the channel's half (the card maps chip channels to
// two pad columns), pad row follows from row and channel.
module rich_sector
  import rr_pkg::*;
#(
  parameter int N_COLS  = 15,
  parameter int N_CHIPS = 16
) (
  input  logic                  fclock,
  input  logic                  osc_clk,
  input  logic                  excken,
  input  logic                  readclk,
  input  logic                  reset,
  input  logic                  readout,
  input  logic                  strobe,
  input  logic                  testload_n,
  input  logic                  testen_n,
  input  logic                  dacload_n,
  input  logic [N_CHIPS*16-1:0] din    [N_COLS],
  input  logic [ADDR_W-1:0]     col_xin [N_COLS],
  output logic [DAC_W-1:0]      dacout [N_COLS][N_CHIPS],
  output bus_word_t             top_bus,
  output logic                  outengen,
  output logic                  hit_valid,
  output logic [COL_W+ROW_W+ADDR_W-1:0] hit,
  output logic [N_COLS-1:0]     col_busy,
  output logic                  readout_busy,
  output logic                  fastor
);
  bus_word_t          col_bus [N_COLS];
  logic [N_COLS-1:0]  col_outen, col_fastor;
  logic [COL_W-1:0]   column_unused;

  for (genvar c = 0; c < N_COLS; c++) begin : g_col
    chip_column #(.N_CHIPS(N_CHIPS)) u_col (
      .fclock, .osc_clk, .excken, .readclk, .reset, .readout, .strobe,
      .testload_n, .testen_n, .dacload_n,
      .din(din[c]), .col_xin(col_xin[c]),
      .halt(c == 0 ? 1'b0 : col_busy[(c == 0) ? 0 : c-1]),
      .bus(col_bus[c]), .busy(col_busy[c]), .outen(col_outen[c]),
      .dacout(dacout[c]), .fastor(col_fastor[c]));
  end

  always_comb begin
    top_bus = '0;
    for (int c = 0; c < N_COLS; c++) top_bus = top_bus | col_bus[c];
  end

  assign outengen     = |col_outen;
  assign readout_busy = col_busy[N_COLS-1];
  assign fastor       = |col_fastor;

  daq_interface #(.CNT_W(COL_W)) u_daq (
    .clk(readclk), .rst(reset), .outengen, .bus(top_bus),
    .valid(hit_valid), .column(column_unused), .hit);
endmodule
