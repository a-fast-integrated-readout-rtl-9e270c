// shift_register: trigger-latency pipeline of the digital readout chip.
//
// One DEPTH-stage shift register per channel, clocked continuously at 50 MHz,
// delays every shaped pulse by DEPTH clocks (64 x 20 ns), long enough for the
// first-level trigger to decide whether the event is kept.  dout is the last
// stage ("end pulse").  Reset clears all stages.
// Timing: din high in the cycle before edge k appears on dout after edge
// k+DEPTH-1, i.e. DEPTH clocks later.
module shift_register #(
  parameter int N_CH  = 16,
  parameter int DEPTH = 64
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [N_CH-1:0] din,
  output logic [N_CH-1:0] dout
);
  logic [N_CH-1:0] stage_q [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) stage_q[i] <= '0;
    end else begin
      stage_q[0] <= din;
      for (int i = 1; i < DEPTH; i++) stage_q[i] <= stage_q[i-1];
    end
  end

  assign dout = stage_q[DEPTH-1];
endmodule
