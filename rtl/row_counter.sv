// row_counter: row address counter of a column's top chip.
//
// Words arriving from the chips below carry no row; the top chip numbers them
// by counting the words with next-row set (last hit of a chip, or the null
// word of an empty chip).  The top chip itself is row 0, so the counter starts
// at 1 after reset and advances after each such word (inc high at a clock
// edge).  The start value is this design's choice.  W bits, wrapping.
module row_counter #(
  parameter int W = 6
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         inc,
  output logic [W-1:0] row
);
  always_ff @(posedge clk) begin
    if (rst)      row <= W'(1);
    else if (inc) row <= row + 1'b1;
  end
endmodule
