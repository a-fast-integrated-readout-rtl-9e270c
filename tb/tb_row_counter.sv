// tb_row_counter: starts at 1 after reset, advances on inc, wraps at 64.
module tb_row_counter;
  logic clk = 0, rst = 1, inc = 0;
  logic [5:0] row;
  int model, checks = 0, failures = 0;

  row_counter #(.W(6)) dut (.clk, .rst, .inc, .row);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(posedge clk); #1 rst = 0; model = 1;
    checks++; if (row !== 6'd1) begin failures++; $display("FAIL start %0d", row); end
    for (int k = 0; k < 400; k++) begin
      inc = 1'($urandom);
      @(posedge clk); #1;
      if (inc) model = (model + 1) % 64;
      checks++;
      if (row !== 6'(model)) begin failures++; $display("FAIL row=%0d exp=%0d", row, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
