// mode_selector: decodes the three mode pins of the readout chip.
//
// The pins are active low (true = 0 V), as in the document's mode table:
//   mode  testload testen dacload
//    1       F       F      F     normal acquisition and readout
//    2       F       F      T     DAC registers shift up the column
//    3       T       F      F     test registers shift up the column
//    4       F       T      F     pulse shapers forced to "hit"
//    5       T       T      F     pulse shapers forced to "no hit"
// Combinations outside the table (dacload with testload or testen) decode to
// mode 1; that choice is this design's.  Purely combinational.
module mode_selector
  import rr_pkg::*;
(
  input  logic  testload_n,
  input  logic  testen_n,
  input  logic  dacload_n,
  output mode_t mode
);
  logic tl, te, dl;
  assign tl = !testload_n;
  assign te = !testen_n;
  assign dl = !dacload_n;

  always_comb begin
    unique case ({tl, te, dl})
      3'b001:  mode = MODE_DACLOAD;
      3'b100:  mode = MODE_TESTLOAD;
      3'b010:  mode = MODE_ALLHITS;
      3'b110:  mode = MODE_NOHITS;
      default: mode = MODE_NORMAL;
    endcase
  end
endmodule
