// tb_priority_encoder: for random hit patterns (including none and all),
// the encoder must give the hit channels from 15 down to 0, one per clock,
// next_row only on the last, and a single next_row+null word for an empty
// pattern; it must hold its word while pop is low.  The number of clocks per
// pattern must equal the number of hits (at least one).
module tb_priority_encoder;
  import rr_pkg::*;
  localparam int N = 16;
  logic clk = 0, rst = 1, start = 0, pop = 0, active;
  logic [N-1:0] hits = '0;
  chain_word_t word;
  int checks = 0, failures = 0;

  priority_encoder #(.N_CH(N)) dut (.clk, .rst, .start, .hits, .pop, .word, .active);
  always #5 clk = ~clk;

  task automatic fail(string s); failures++; $display("FAIL %s", s); endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [N-1:0] pat;
    int exp_ch [$];
    int cycles;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 300; t++) begin
      pat = (t == 0) ? '0 : (t == 1) ? '1 : N'($urandom) & N'($urandom);
      hits = pat; start = 1; @(posedge clk); #1; start = 0;
      hits = N'($urandom);   // must not matter after start
      exp_ch = {};
      for (int c = N-1; c >= 0; c--) if (pat[c]) exp_ch.push_back(c);
      cycles = 0;
      checks++; if (!active) fail("not active after start");
      if (pat == '0) begin
        checks++;
        if (!(word.next_row && word.null_f)) fail("empty chip word");
      end
      while (active) begin
        pop = ($urandom % 4) != 0;
        if (pat != '0) begin
          checks++;
          if (word.addr != ADDR_W'(exp_ch[0]) || word.null_f ||
              word.next_row != (exp_ch.size() == 1))
            fail($sformatf("pat=%h word=%p exp ch %0d", pat, word, exp_ch[0]));
        end
        @(posedge clk); #1;
        if (pop) begin
          cycles++;
          if (pat != '0) void'(exp_ch.pop_front());
        end
        pop = 0;
        if (cycles > 20) break;
      end
      checks++;
      if (cycles != ((pat == '0) ? 1 : $countones(pat))) fail("word count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
