// tb_hit_fifo: random push/pop against a queue model; checks order, the
// empty and full flags (full exactly at 16 words), that a push into a full
// FIFO without pop is ignored, and reset.
module tb_hit_fifo;
  localparam int D = 16, W = 12;
  logic clk = 0, rst = 1, push = 0, pop = 0, empty, full;
  logic [W-1:0] din = '0, dout;
  logic [W-1:0] q [$];
  int checks = 0, failures = 0;

  hit_fifo #(.DEPTH(D), .W(W)) dut (.clk, .rst, .push, .din, .pop, .dout, .empty, .full);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int k = 0; k < 3000; k++) begin
      int bias;
      bias = (k / 300) % 2;
      push = ($urandom % 4) < (bias ? 3 : 1);
      pop  = ($urandom % 4) < (bias ? 1 : 3);
      din  = W'($urandom);
      checks++;
      if (empty !== (q.size() == 0) || full !== (q.size() == D)) begin
        failures++; $display("FAIL flags size=%0d e=%b f=%b", q.size(), empty, full);
      end
      if (q.size() > 0) begin
        checks++;
        if (dout !== q[0]) begin failures++; $display("FAIL data %h exp %h", dout, q[0]); end
      end
      @(posedge clk); #1;
      begin
        bit dp, dw;
        dp = pop && q.size() > 0;
        dw = push && (q.size() < D || dp);
        if (dp) void'(q.pop_front());
        if (dw) q.push_back(din);
      end
    end
    rst = 1; @(posedge clk); #1; rst = 0; q = {};
    checks++; if (!empty || full) begin failures++; $display("FAIL reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
