// tb_column_bus_driver: the word passes when outen is high, zeros otherwise.
module tb_column_bus_driver;
  import rr_pkg::*;
  logic outen;
  bus_word_t wi, wo;
  int checks = 0, failures = 0;

  column_bus_driver dut (.outen, .word_in(wi), .word_out(wo));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int k = 0; k < 200; k++) begin
      outen = 1'($urandom); wi = 12'($urandom); #1;
      checks++;
      if (wo !== (outen ? wi : 12'h000)) begin failures++; $display("FAIL"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
