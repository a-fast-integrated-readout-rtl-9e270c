// output_mux: chooses the word a readout chip sends to the chip above.
//
//   mode 2        the DAC register (flags 0)
//   mode 3        the last test register stage (flags 0)
//   other modes   the priority encoder word while it is active (live mode),
//                 otherwise the FIFO head (buffer mode)
// Driving the flags to 0 in modes 2 and 3 is this design's choice.
// Purely combinational.
module output_mux
  import rr_pkg::*;
(
  input  mode_t             mode,
  input  logic              live,
  input  chain_word_t       enc_word,
  input  chain_word_t       fifo_word,
  input  logic [ADDR_W-1:0] test_word,
  input  logic [DAC_W-1:0]  dac_word,
  output chain_word_t       out_word
);
  always_comb begin
    unique case (mode)
      MODE_DACLOAD:  out_word = '{addr: dac_word,  next_row: 1'b0, null_f: 1'b0};
      MODE_TESTLOAD: out_word = '{addr: test_word, next_row: 1'b0, null_f: 1'b0};
      default:       out_word = live ? enc_word : fifo_word;
    endcase
  end
endmodule
