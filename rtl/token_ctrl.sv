// token_ctrl: top-bus arbitration of one column's top chip.
//
// The columns of a sector share one top bus.  A single token is passed along
// them: the busy output of column n is the halt input of column n+1, and
// column 0 has halt tied low, so it owns the bus from the start.  One readout
// clock after halt is seen low (with readout high) the column takes the token;
// outen then enables its bus driver.  When the column's fin word reaches the
// top (fin_here, only meaningful while token is high) busy and outen drop in
// that same cycle, the bus is released for one clock, and the next column,
// which registers halt low at the end of that cycle, drives the following
// one.  Each token pass thus costs one clock, as in the document's timing
// measurement.  The column stays finished until reset.  All signals are active high
// here; the chip pins are active low.
module token_ctrl (
  input  logic clk,
  input  logic rst,
  input  logic readout,
  input  logic halt,
  input  logic fin_here,
  output logic token,
  output logic busy,
  output logic outen
);
  logic token_q, done_q, fin_now;

  always_ff @(posedge clk) begin
    if (rst) begin
      token_q <= 1'b0;
      done_q  <= 1'b0;
    end else begin
      if (readout && !halt) token_q <= 1'b1;
      if (fin_now)          done_q  <= 1'b1;
    end
  end

  assign fin_now = token_q && !done_q && fin_here;
  assign token   = token_q && !done_q;
  assign busy    = readout && !done_q && !fin_now;
  assign outen   = token_q && !done_q && !fin_now;
endmodule
