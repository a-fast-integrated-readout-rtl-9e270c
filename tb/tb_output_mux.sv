// tb_output_mux: random inputs in every mode; the output must be the DAC
// code in mode 2, the test word in mode 3, otherwise the encoder word when
// live and the FIFO word when not.
module tb_output_mux;
  import rr_pkg::*;
  mode_t mode;
  logic live;
  chain_word_t enc, fifo, out, exp;
  logic [3:0] tw, dw;
  int checks = 0, failures = 0;

  output_mux dut (.mode, .live, .enc_word(enc), .fifo_word(fifo), .test_word(tw), .dac_word(dw), .out_word(out));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int k = 0; k < 500; k++) begin
      mode = mode_t'(1 + ($urandom % 5));
      live = 1'($urandom);
      enc = 6'($urandom); fifo = 6'($urandom); tw = 4'($urandom); dw = 4'($urandom);
      #1;
      if (mode == MODE_DACLOAD)       exp = {dw, 2'b00};
      else if (mode == MODE_TESTLOAD) exp = {tw, 2'b00};
      else                            exp = live ? enc : fifo;
      checks++;
      if (out !== exp) begin failures++; $display("FAIL mode=%0d out=%h exp=%h", mode, out, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
