// tb_daq_interface: a random sequence of column bursts (outengen high for a
// number of clocks, then one low clock) with random bus words.  valid must be
// outengen and not null; the column must count the bursts from 0.
module tb_daq_interface;
  import rr_pkg::*;
  logic clk = 0, rst = 1, outengen = 0, valid;
  bus_word_t bus = '0;
  logic [3:0] column;
  logic [13:0] hit;
  int checks = 0, failures = 0;

  daq_interface #(.CNT_W(4)) dut (.clk, .rst, .outengen, .bus, .valid, .column, .hit);
  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(posedge clk); #1 rst = 0;
    for (int col = 0; col < 15; col++) begin
      int n = 1 + $urandom % 8;
      for (int k = 0; k < n; k++) begin
        outengen = 1; bus = 12'($urandom); #1;
        checks++;
        if (valid !== !bus.null_f || hit !== {4'(col), bus.row, bus.addr}) begin
          failures++; $display("FAIL col=%0d valid=%b hit=%h", col, valid, hit);
        end
        @(posedge clk); #1;
      end
      outengen = 0; bus = '0; #1;
      checks++; if (valid) begin failures++; $display("FAIL valid in gap"); end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
