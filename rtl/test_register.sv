// test_register: the four 4-bit test registers of a readout chip.
//
// In mode 3 (shift high) the registers form a 4-word shift chain: on every
// control clock the word on din (xin from the chip below) enters stage 0 and
// stage 3 leaves on dout toward the chip above, so a column of 16 chips is
// filled in 16 x 4 clocks.  bits is the 16-bit pattern that the strobe copies
// into the encoder latches; stage i bit j is channel 4*i+j (this bit order is
// a design choice).  As the document states, these registers are not reset.
module test_register #(
  parameter int WORDS = 4,
  parameter int W     = 4
) (
  input  logic               clk,
  input  logic               shift,
  input  logic [W-1:0]       din,
  output logic [W-1:0]       dout,
  output logic [WORDS*W-1:0] bits
);
  logic [W-1:0] stage_q [WORDS];

  always_ff @(posedge clk) begin
    if (shift) begin
      stage_q[0] <= din;
      for (int i = 1; i < WORDS; i++) stage_q[i] <= stage_q[i-1];
    end
  end

  assign dout = stage_q[WORDS-1];
  always_comb
    for (int i = 0; i < WORDS; i++) bits[i*W +: W] = stage_q[i];
endmodule
