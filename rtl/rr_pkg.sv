// rr_pkg: types and constants shared by the RICH pad readout chip and the
// sector it is built into.
//
// A chip talks to the chip above it through a 6-bit "chain word": a 4-bit
// channel address plus two flags.  The flag pair encodes four kinds of word:
//   next=0 null=0  an ordinary hit of some chip
//   next=1 null=0  the last hit of a chip (the row address advances after it)
//   next=1 null=1  a chip that had no hits at all (row advances, no data)
//   next=0 null=1  "fin": the column has no more data; the token moves on
// The top chip of a column adds a 6-bit row address, giving the 12-bit word
// stored in its FIFO and put on the sector's top bus.  The flag meanings and
// widths follow the chip's pin list; the address field of a fin word carries
// no information (the bottom chip takes it from its xin pins).
package rr_pkg;

  localparam int ADDR_W     = 4;   // channel address width, xin/xout
  localparam int ROW_W      = 6;   // row address width, rowout
  localparam int COL_W      = 4;   // column address from the external counter
  localparam int FIFO_DEPTH = 16;  // words per chip FIFO
  localparam int SR_DEPTH   = 64;  // trigger-latency shift register stages
  localparam int DAC_W      = 4;   // threshold DAC code width
  localparam int TEST_WORDS = 4;   // 4 x 4-bit test registers per chip


  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    logic              next_row;
    logic              null_f;
  } chain_word_t;

  typedef struct packed {
    logic [ROW_W-1:0]  row;
    logic [ADDR_W-1:0] addr;
    logic              next_row;
    logic              null_f;
  } bus_word_t;

  typedef struct packed {
    logic [COL_W-1:0]  column;
    logic [ROW_W-1:0]  row;
    logic [ADDR_W-1:0] chan;
  } hit_t;

  // Operating modes of Table "test structure codes".
  typedef enum logic [2:0] {
    MODE_NORMAL   = 3'd1,  // acquisition and readout
    MODE_DACLOAD  = 3'd2,  // shift DAC codes up the column
    MODE_TESTLOAD = 3'd3,  // shift test patterns up the column
    MODE_ALLHITS  = 3'd4,  // pulse shapers forced to "hit"
    MODE_NOHITS   = 3'd5   // pulse shapers forced to "no hit"
  } mode_t;

  // fin: next-row false with null true.
  function automatic logic is_fin(logic next_row, logic null_f);
    return !next_row && null_f;
  endfunction

endpackage
