// column_bus_driver: the bus driver at the top of a chip column.
//
// The top chips of all columns share one top bus.  A column's driver passes
// its top chip's word (row, channel, next-row, null) to the bus while outen
// is high and releases the bus otherwise.  The release (high impedance on
// the real bus) is modelled as driving zeros, so the sector combines the
// drivers with an OR; the token protocol guarantees that at most one driver
// is enabled.  Purely combinational.
module column_bus_driver
  import rr_pkg::*;
(
  input  logic      outen,
  input  bus_word_t word_in,
  output bus_word_t word_out
);
  assign word_out = outen ? word_in : '0;
endmodule
