// tb_hit_latch: random shift-register ends and strobes; the latches must
// hold the OR of all inputs seen during strobe since reset, must ignore the
// strobe while readout is high, and must take the test pattern when
// sel_test is set.
module tb_hit_latch;
  localparam int N = 16;
  logic clk = 0, rst = 1, sel = 0, strobe = 0, readout = 0;
  logic [N-1:0] sr = '0, tb = '0, hits, model;
  int checks = 0, failures = 0;

  hit_latch #(.N_CH(N)) dut (.clk, .rst, .sel_test(sel), .sr_end(sr), .test_bits(tb),
                             .strobe, .readout, .hits);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0; model = '0;
    for (int k = 0; k < 600; k++) begin
      sr = N'($urandom) & N'($urandom) & N'($urandom);
      tb = N'($urandom);
      strobe  = ($urandom % 4) == 0;
      readout = ($urandom % 3) == 0;
      sel     = ($urandom % 5) == 0;
      if (k % 100 == 99) rst = 1; else rst = 0;
      @(posedge clk); #1;
      if (rst) model = '0;
      else if (strobe && !readout) model |= sel ? tb : sr;
      checks++;
      if (hits !== model) begin failures++; $display("FAIL k=%0d hits=%h exp=%h", k, hits, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
