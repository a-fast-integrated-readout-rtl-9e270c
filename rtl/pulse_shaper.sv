// pulse_shaper: input synchroniser of the digital readout chip.
//
// Each discriminator output is asynchronous to the 50 MHz shift clock.  It is
// sampled by one flip-flop and compared with the previous sample held in a
// second one; a rising edge yields a pulse exactly one clock (20 ns) wide, so
// a channel enters the delay pipeline once per input pulse however long the
// pulse is.  Together with the 64-stage shift register this gives the
// document's total delay of 64 + 2 clocks.
//
// force_hit / force_none (test modes 4 and 5) hold every output at 1 or 0 so
// the shift register can be tested without the analog inputs.  fastor is the
// OR of the shaped pulses, the chip's contribution to a sector fast-or.
// Timing: din rising before clock edge k gives pulse high between edges k and
// k+1.  The two-flop structure and the fast-or tap point are design choices.
module pulse_shaper #(
  parameter int N_CH = 16
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [N_CH-1:0] din,
  input  logic            force_hit,
  input  logic            force_none,
  output logic [N_CH-1:0] pulse,
  output logic            fastor
);
  logic [N_CH-1:0] sample_q, prev_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      sample_q <= '0;
      prev_q   <= '0;
    end else begin
      sample_q <= din;
      prev_q   <= sample_q;
    end
  end

  always_comb begin
    if (force_hit)       pulse = '1;
    else if (force_none) pulse = '0;
    else                 pulse = sample_q & ~prev_q;
  end

  assign fastor = |pulse;
endmodule
