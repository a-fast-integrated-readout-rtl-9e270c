// dac_register: 4-bit threshold DAC register of a readout chip.
//
// In mode 2 (load high) the register takes xin on each control clock and its
// old contents move on toward the chip above (the chip's output multiplexer
// sends dacout up the column), so a column of N chips is loaded with N codes
// in N clocks, the code for the top chip first.  dacout drives, through four
// binary-weighted resistors, the threshold current of the chip set's two
// analog chips (I_th = 12.5 uA x code).  Not reset, as in the document.
module dac_register #(
  parameter int W = 4
) (
  input  logic         clk,
  input  logic         load,
  input  logic [W-1:0] din,
  output logic [W-1:0] dacout
);
  always_ff @(posedge clk) begin
    if (load) dacout <= din;
  end
endmodule
