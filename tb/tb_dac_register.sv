// tb_dac_register: a chain of three DAC registers, as in a column, is loaded
// with three codes in three clocks (top chip's code first) and must then
// hold them while load is low.
module tb_dac_register;
  logic clk = 0, load = 0;
  logic [3:0] xin = '0, d0, d1, d2;
  int checks = 0, failures = 0;

  // d2 is the bottom chip, d0 the top chip.
  dac_register #(.W(4)) u2 (.clk, .load, .din(xin), .dacout(d2));
  dac_register #(.W(4)) u1 (.clk, .load, .din(d2),  .dacout(d1));
  dac_register #(.W(4)) u0 (.clk, .load, .din(d1),  .dacout(d0));
  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 50; t++) begin
      logic [3:0] c0, c1, c2;
      c0 = 4'($urandom); c1 = 4'($urandom); c2 = 4'($urandom);
      load = 1;
      xin = c0; @(posedge clk); #1;
      xin = c1; @(posedge clk); #1;
      xin = c2; @(posedge clk); #1;
      load = 0; xin = 4'($urandom);
      repeat (3) begin
        checks++;
        if ({d0, d1, d2} !== {c0, c1, c2}) begin
          failures++; $display("FAIL %h%h%h exp %h%h%h", d0, d1, d2, c0, c1, c2);
        end
        @(posedge clk); #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
