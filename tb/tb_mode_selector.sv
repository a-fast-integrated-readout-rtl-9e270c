// tb_mode_selector: all eight pin combinations against the mode table
// (true = 0 V): testload, testen, dacload.
module tb_mode_selector;
  import rr_pkg::*;
  logic tl_n, te_n, dl_n;
  mode_t mode;
  int checks = 0, failures = 0;

  mode_selector dut (.testload_n(tl_n), .testen_n(te_n), .dacload_n(dl_n), .mode);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    mode_t exp;
    for (int v = 0; v < 8; v++) begin
      bit tl, te, dl;
      {tl, te, dl} = 3'(v);           // 1 = true
      tl_n = !tl; te_n = !te; dl_n = !dl;
      if      (!tl && !te && !dl) exp = MODE_NORMAL;
      else if (!tl && !te &&  dl) exp = MODE_DACLOAD;
      else if ( tl && !te && !dl) exp = MODE_TESTLOAD;
      else if (!tl &&  te && !dl) exp = MODE_ALLHITS;
      else if ( tl &&  te && !dl) exp = MODE_NOHITS;
      else                        exp = MODE_NORMAL;
      #1;
      checks++;
      if (mode !== exp) begin failures++; $display("FAIL v=%0d mode=%0d exp=%0d", v, mode, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
