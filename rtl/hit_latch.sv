// hit_latch: priority-encoder input multiplexer and data latches.
//
// While strobe is high, every channel whose input is high is set in a latch
// that stays set until reset: this is the moment a triggered event's hits are
// captured.  The input is the shift-register end pulse in normal operation
// and the 16-bit test-register pattern when sel_test is set (mode 3).  The
// strobe is ignored while readout is high so that a spurious trigger cannot
// overwrite hits that are being encoded, as the document requires.
// Timing: sampled on the 50 MHz clock; a channel high during any strobe cycle
// is set after that edge.
module hit_latch #(
  parameter int N_CH = 16
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            sel_test,
  input  logic [N_CH-1:0] sr_end,
  input  logic [N_CH-1:0] test_bits,
  input  logic            strobe,
  input  logic            readout,
  output logic [N_CH-1:0] hits
);
  logic [N_CH-1:0] src;
  assign src = sel_test ? test_bits : sr_end;

  always_ff @(posedge clk) begin
    if (rst)                     hits <= '0;
    else if (strobe && !readout) hits <= hits | src;
  end
endmodule
