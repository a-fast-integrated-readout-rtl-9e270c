// tb_test_register: shifts random words in; dout must be the word shifted in
// four shifts earlier, bits must hold the last four words with the newest
// in bits[3:0], and the contents must not change while shift is low.
module tb_test_register;
  logic clk = 0, shift = 0;
  logic [3:0] din = '0, dout;
  logic [15:0] bits;
  logic [3:0] h [$];
  int checks = 0, failures = 0;

  test_register #(.WORDS(4), .W(4)) dut (.clk, .shift, .din, .dout, .bits);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // Fill first.
    for (int k = 0; k < 4; k++) begin
      shift = 1; din = 4'($urandom); h.push_front(din); @(posedge clk); #1;
    end
    for (int k = 0; k < 400; k++) begin
      shift = ($urandom % 3) != 0;
      din = 4'($urandom);
      @(posedge clk); #1;
      if (shift) begin h.push_front(din); void'(h.pop_back()); end
      checks++;
      if (dout !== h[3] || bits !== {h[3], h[2], h[1], h[0]}) begin
        failures++; $display("FAIL dout=%h bits=%h exp %h %h%h%h%h", dout, bits, h[3], h[3], h[2], h[1], h[0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
