// priority_encoder: zero-suppressing hit address encoder.
//
// At readout start (start high for one readout clock) the latched hit pattern
// is copied into a pending register.  From the next clock on, word presents
// the address of the highest-numbered pending channel (channel 15 first,
// channel 0 last); each cycle with pop high clears that channel, so one hit is
// encoded per clock and empty channels cost nothing.  The last hit carries
// next_row = 1.  A chip with no hits presents one word with next_row = 1 and
// null_f = 1, so every chip yields at least one word.  active stays high
// until the final word has been popped ("live mode"); afterwards the chip
// forwards its FIFO ("buffer mode").
// The copy-at-start register is this design's choice; the order, the rate
// and the flag rules are the document's.
module priority_encoder
  import rr_pkg::*;
#(
  parameter int N_CH = 16
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            start,
  input  logic [N_CH-1:0] hits,
  input  logic            pop,
  output chain_word_t     word,
  output logic            active
);
  logic [N_CH-1:0] pending_q;
  logic            active_q;
  logic [N_CH-1:0] rest;
  logic [ADDR_W-1:0] top_addr;

  always_comb begin
    top_addr = '0;
    for (int i = 0; i < N_CH; i++)
      if (pending_q[i]) top_addr = ADDR_W'(i);
    rest = pending_q;
    rest[top_addr] = 1'b0;
  end

  always_comb begin
    if (pending_q == '0) word = '{addr: '0, next_row: 1'b1, null_f: 1'b1};
    else                 word = '{addr: top_addr, next_row: (rest == '0), null_f: 1'b0};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pending_q <= '0;
      active_q  <= 1'b0;
    end else if (start) begin
      pending_q <= hits;
      active_q  <= 1'b1;
    end else if (pop && active_q) begin
      pending_q <= rest;
      if (rest == '0) active_q <= 1'b0;
    end
  end

  assign active = active_q;
endmodule
