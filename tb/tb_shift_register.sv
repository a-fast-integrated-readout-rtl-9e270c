// tb_shift_register: random patterns enter a 64-stage pipeline; the output
// must equal the input applied exactly 64 clocks earlier (kept in a history
// array here).  Reset must clear every stage.
module tb_shift_register;
  localparam int N = 16, D = 64;
  logic clk = 0, rst = 1;
  logic [N-1:0] din = '0, dout;
  logic [N-1:0] hist [$];
  int checks = 0, failures = 0;

  shift_register #(.N_CH(N), .DEPTH(D)) dut (.clk, .rst, .din, .dout);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int k = 0; k < D; k++) hist.push_back('0);
    for (int k = 0; k < 500; k++) begin
      din = N'($urandom);
      hist.push_back(din);
      @(posedge clk); #1;
      void'(hist.pop_front());
      checks++;
      if (dout !== hist[0]) begin
        failures++; $display("FAIL k=%0d dout=%h exp=%h", k, dout, hist[0]);
      end
    end
    // A single pulse reappears after exactly 64 clocks.
    din = '0; repeat (D) @(posedge clk); #1;
    din = 16'h8001; @(posedge clk); #1; din = '0;
    for (int k = 1; k < D; k++) begin
      checks++; if (dout !== '0) begin failures++; $display("FAIL early at %0d", k); end
      @(posedge clk); #1;
    end
    checks++; if (dout !== 16'h8001) begin failures++; $display("FAIL latency"); end
    // Reset clears.
    din = '1; repeat (10) @(posedge clk);
    rst = 1; @(posedge clk); #1; rst = 0; din = '0;
    for (int k = 0; k < D; k++) begin
      checks++; if (dout !== '0) begin failures++; $display("FAIL reset"); end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
