// tb_pulse_shaper: checks the input synchroniser against a reference model.
// Random discriminator levels are applied; after every clock the shaped
// outputs must equal (sample now) & ~(sample one clock earlier), computed
// here from the applied stimulus.  A long input pulse must give exactly one
// one-clock output pulse, after the first edge that sees it.  Modes 4/5 must force all ones / all zeros, and fastor must be
// the OR of the outputs.
module tb_pulse_shaper;
  localparam int N = 16;
  logic clk = 0, rst = 1, fh = 0, fn = 0;
  logic [N-1:0] din = '0, pulse, prev1, prev2;
  logic fastor;
  int checks = 0, failures = 0;

  pulse_shaper #(.N_CH(N)) dut (.clk, .rst, .din, .force_hit(fh), .force_none(fn), .pulse, .fastor);
  always #5 clk = ~clk;

  task automatic chk(logic [N-1:0] exp, string what);
    checks++;
    if (pulse !== exp || fastor !== |exp) begin
      failures++;
      $display("FAIL %s: pulse=%h exp=%h fastor=%b", what, pulse, exp, fastor);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    prev1 = '0; prev2 = '0;
    // Random levels.
    for (int k = 0; k < 400; k++) begin
      din = N'($urandom);
      @(posedge clk); #1;
      prev2 = prev1; prev1 = din;
      chk(prev1 & ~prev2, "random");
    end
    // Long pulse on channel 3: one pulse only, in the clock after the edge
    // that first sees it.
    din = '0; repeat (2) @(posedge clk); #1;
    din = 16'h0008;
    @(posedge clk); #1; chk(16'h0008, "first edge");
    for (int k = 0; k < 10; k++) begin @(posedge clk); #1; chk('0, "held"); end
    // Test modes.
    fh = 1; #1 chk('1, "mode 4");
    fh = 0; fn = 1; din = '1; @(posedge clk); #1 chk('0, "mode 5");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
