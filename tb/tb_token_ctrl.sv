// tb_token_ctrl: three columns chained busy -> halt, column 0 with halt low.
// Each column reports fin a random number of clocks after it gets the token.
// Checked every clock: at most one outen high; outen only while the column
// holds the token; exactly one idle (token-pass) clock separates the last
// outen cycle of a column from the first of the next; busy of the last column falls in the
// cycle its fin is seen; column 0 drives the bus one clock after readout.
module tb_token_ctrl;
  localparam int NC = 3;
  logic clk = 0, rst = 1, readout = 0;
  logic [NC-1:0] halt, fin, token, busy, outen;
  int checks = 0, failures = 0;
  int len [NC];
  int held [NC];

  for (genvar c = 0; c < NC; c++) begin : g
    token_ctrl u (.clk, .rst, .readout, .halt(halt[c]), .fin_here(fin[c]),
                  .token(token[c]), .busy(busy[c]), .outen(outen[c]));
    assign halt[c] = (c == 0) ? 1'b0 : busy[c-1];
    assign fin[c]  = token[c] && (held[c] >= len[c]);
  end
  always #5 clk = ~clk;

  // held[c]: completed clocks with the token.
  always @(posedge clk)
    for (int c = 0; c < NC; c++)
      if (rst) held[c] <= 0;
      else if (token[c]) held[c] <= held[c] + 1;

  task automatic fail(string s); failures++; $display("FAIL %s @%0t", s, $time); endtask

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int run = 0; run < 20; run++) begin
      int first_on [NC];
      int last_on  [NC];
      int cyc;
      rst = 1; readout = 0;
      for (int c = 0; c < NC; c++) begin len[c] = 1 + $urandom % 6; first_on[c] = -1; last_on[c] = -1; end
      @(posedge clk); #1 rst = 0;
      @(posedge clk); #1 readout = 1;
      cyc = 0;
      while (busy[NC-1] || cyc == 0) begin
        checks++;
        if ($countones(outen) > 1) fail("two drivers");
        for (int c = 0; c < NC; c++) begin
          if (outen[c] && !token[c]) fail("outen without token");
          if (outen[c]) begin if (first_on[c] < 0) first_on[c] = cyc; last_on[c] = cyc; end
        end
        @(posedge clk); #1;
        cyc++;
        if (cyc > 100) break;
      end
      checks++;
      if (first_on[0] != 1) fail($sformatf("column 0 starts at %0d", first_on[0]));
      for (int c = 0; c < NC; c++) begin
        checks++;
        if (last_on[c] - first_on[c] + 1 != len[c]) fail($sformatf("col %0d held %0d want %0d", c, last_on[c]-first_on[c]+1, len[c]));
      end
      for (int c = 1; c < NC; c++) begin
        checks++;
        if (first_on[c] != last_on[c-1] + 2) fail($sformatf("token pass col %0d: %0d after %0d", c, first_on[c], last_on[c-1]));
      end
      // Clocks from readout until the last busy falls: the start clock plus
      // the data clocks plus one pass clock per column, less the final
      // pass clock in which busy already falls.
      begin
        int tot;
        tot = 0;
        for (int c = 0; c < NC; c++) tot += len[c] + 1;
        checks++;
        if (cyc != tot) fail($sformatf("readout took %0d clocks, expected %0d", cyc, tot));
      end
      readout = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
