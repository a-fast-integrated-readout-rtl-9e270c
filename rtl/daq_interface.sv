// daq_interface: column addressing and cycle filtering at the end of the top
// bus, outside the chips.
//
// outengen is the OR of all columns' outen lines.  Every fall of outengen is
// a token pass, so a CNT_W-bit counter advanced on each fall gives the column
// that owns the bus: columns read out in order 0, 1, 2 ...  A bus cycle
// carries a hit when outengen is high and the null flag is false; token-pass
// cycles and null words that reached the bus are filtered out, as the
// document's acquisition clock filter does.  valid and hit are combinational
// from the bus and the counter; the counter is updated on readclk and
// cleared by reset.
module daq_interface
  import rr_pkg::*;
#(
  parameter int CNT_W = 4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             outengen,
  input  bus_word_t        bus,
  output logic             valid,
  output logic [CNT_W-1:0] column,
  output logic [CNT_W+ROW_W+ADDR_W-1:0] hit
);
  logic outen_prev_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      outen_prev_q <= 1'b0;
      column       <= '0;
    end else begin
      outen_prev_q <= outengen;
      if (outen_prev_q && !outengen) column <= column + 1'b1;
    end
  end

  assign valid = outengen && !bus.null_f;
  assign hit   = {column, bus.row, bus.addr};
endmodule
