// hit_fifo: the 16-word FIFO of each readout chip.
//
// Holds encoded addresses received from the chip below until they can be
// passed up the column.  Words are W bits (row, channel, next-row and null;
// the row field is used only in the top chip).  full is the chip's "buffer
// full" output: while it is high the chip below must hold its word.
// Simultaneous push and pop are allowed, also when full (the pop frees the
// place) and when empty is false.  dout shows the oldest word combinationally.
// Reset empties it.  Depth and width are the document's; the pointer
// structure is this design's.
module hit_fifo #(
  parameter int DEPTH = 16,
  parameter int W     = 12
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         empty,
  output logic         full
);
  localparam int AW = $clog2(DEPTH);

  logic [W-1:0]  mem_q [DEPTH];
  logic [AW-1:0] rd_q, wr_q;
  logic [AW:0]   count_q;
  logic          do_push, do_pop;

  assign empty   = (count_q == 0);
  assign full    = (count_q == (AW+1)'(DEPTH));
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign dout    = mem_q[rd_q];

  always_ff @(posedge clk) begin
    if (do_push) mem_q[wr_q] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_q    <= '0;
      wr_q    <= '0;
      count_q <= '0;
    end else begin
      if (do_push) wr_q <= (wr_q == AW'(DEPTH-1)) ? '0 : wr_q + 1'b1;
      if (do_pop)  rd_q <= (rd_q == AW'(DEPTH-1)) ? '0 : rd_q + 1'b1;
      count_q <= count_q + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end
endmodule
