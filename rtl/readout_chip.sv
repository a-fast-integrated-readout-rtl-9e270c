// readout_chip: the 16-channel digital readout chip of the RICH pad detector.
//
// Acquisition (50 MHz clock, fclk).  Each channel's discriminator output is
// shaped into a one-clock pulse, delayed 64 clocks in a shift register and,
// if the end pulse coincides with strobe, set in a hit latch: a hit is seen
// (64 + 2) clocks after the input pulse.  fclk is the external clock fclock
// when excken is high, otherwise the chip's own oscillator (osc_clk).
//
// Readout (readout clock, readclk, 20 MHz).  The first readclk edge with
// readout high copies the latches into the priority encoder.  From then on
// ("live mode") the chip sends one encoded address per clock to the chip
// above (xout, nextout, nullout) while it stores, in its 16-word FIFO, the
// words arriving from the chip below (xin, nextin, nullin).  Once its encoder
// is empty it forwards its FIFO ("buffer mode"), so the FIFOs of a column act
// as one long memory moving toward the top.  buful (FIFO full) stops the chip
// below; halt stops this chip.  A chip accepts at most one fin word from below
// and ignores its input afterwards; the bottom chip of a column has its input
// tied to the fin word, which therefore enters its FIFO once, behind nothing,
// and travels up behind the last hit.
//
// Top chip (toprow high).  halt is the busy of the previous column instead of
// the buffer-full of a chip above.  The chip adds a row address: 0 for its own
// hits, and the row counter (starting at 1, advanced by every next-row word)
// for words from below.  Null words from below are counted but never stored.
// While the column holds the token the chip puts one word per clock on its
// outputs toward the column bus driver: its own encoder words, then its FIFO,
// then, when the FIFO is empty, the word arriving from below directly.  When
// fin reaches it the token passes on (see token_ctrl).  outen enables the
// bus driver; busy goes low when the column is finished.
//
// Modes (testload_n, testen_n, dacload_n, active low): in mode 3 xin shifts
// through the test registers to xout and strobe copies their pattern into the
// hit latches; in mode 2 xin shifts through the DAC register to xout; modes 4
// and 5 force every pulse-shaper output to hit / no hit.  Test and DAC
// registers shift on readclk, which the control computer drives in those
// modes, and are not reset.
//
// The document gives the chip's functions, pins and timing; the flag encoding
// of fin, the bypass of an empty top FIFO, the use of readout as an enable
// instead of gating readclk, and all internal structure are this design's.
// Pins are active high here except the three mode pins.
module readout_chip
  import rr_pkg::*;
#(
  parameter int N_CH = 16
) (
  input  logic              fclock,
  input  logic              osc_clk,
  input  logic              excken,
  input  logic              readclk,
  input  logic              reset,
  input  logic              readout,
  input  logic              strobe,
  input  logic [N_CH-1:0]   din,
  input  logic              testload_n,
  input  logic              testen_n,
  input  logic              dacload_n,
  input  logic              toprow,
  input  logic [ADDR_W-1:0] xin,
  input  logic              nextin,
  input  logic              nullin,
  input  logic              halt,
  output logic [ADDR_W-1:0] xout,
  output logic              nextout,
  output logic              nullout,
  output logic [ROW_W-1:0]  rowout,
  output logic              buful,
  output logic              busy,
  output logic              outen,
  output logic [DAC_W-1:0]  dacout,
  output logic              fastor
);
  // ---------------------------------------------------------------- clocks
  logic fclk;
  assign fclk = excken ? fclock : osc_clk;

  // ---------------------------------------------------------------- modes
  mode_t mode;
  mode_selector u_mode (.testload_n, .testen_n, .dacload_n, .mode);

  // ---------------------------------------------------------- acquisition
  logic [N_CH-1:0] shaped, sr_end, test_bits, hits;
  logic [ADDR_W-1:0] test_out;

  pulse_shaper #(.N_CH(N_CH)) u_shaper (
    .clk(fclk), .rst(reset), .din,
    .force_hit(mode == MODE_ALLHITS), .force_none(mode == MODE_NOHITS),
    .pulse(shaped), .fastor);

  shift_register #(.N_CH(N_CH), .DEPTH(SR_DEPTH)) u_sr (
    .clk(fclk), .rst(reset), .din(shaped), .dout(sr_end));

  test_register #(.WORDS(TEST_WORDS), .W(ADDR_W)) u_test (
    .clk(readclk), .shift(mode == MODE_TESTLOAD), .din(xin),
    .dout(test_out), .bits(test_bits));

  dac_register #(.W(DAC_W)) u_dac (
    .clk(readclk), .load(mode == MODE_DACLOAD), .din(xin), .dacout);

  hit_latch #(.N_CH(N_CH)) u_latch (
    .clk(fclk), .rst(reset), .sel_test(mode == MODE_TESTLOAD),
    .sr_end, .test_bits, .strobe, .readout, .hits);

  // -------------------------------------------------------------- readout
  logic loaded_q, start, run;
  always_ff @(posedge readclk) begin
    if (reset)        loaded_q <= 1'b0;
    else if (readout) loaded_q <= 1'b1;
  end
  assign start = readout && !loaded_q;
  assign run   = readout && loaded_q;

  chain_word_t enc_word, in_word, chain_out, fifo_chain;
  bus_word_t   fifo_head, fifo_in;
  logic        live, enc_pop, fifo_pop, fifo_push, fifo_empty, fifo_full;
  logic        got_fin_q, in_take, bypass, adv, token, fin_here;
  logic [ROW_W-1:0] row_q;

  assign in_word = '{addr: xin, next_row: nextin, null_f: nullin};

  priority_encoder #(.N_CH(N_CH)) u_enc (
    .clk(readclk), .rst(reset), .start, .hits, .pop(enc_pop),
    .word(enc_word), .active(live));

  hit_fifo #(.DEPTH(FIFO_DEPTH), .W($bits(bus_word_t))) u_fifo (
    .clk(readclk), .rst(reset), .push(fifo_push), .din(fifo_in),
    .pop(fifo_pop), .dout(fifo_head), .empty(fifo_empty), .full(fifo_full));

  row_counter #(.W(ROW_W)) u_row (
    .clk(readclk), .rst(reset), .inc(toprow && in_take && in_word.next_row),
    .row(row_q));

  token_ctrl u_token (
    .clk(readclk), .rst(reset || !toprow), .readout, .halt,
    .fin_here, .token, .busy, .outen);

  // A word from below is taken whenever the FIFO has room (buful low), until
  // fin has been taken.  The chip below advances under the same condition.
  assign in_take = run && !got_fin_q && !fifo_full;

  always_ff @(posedge readclk) begin
    if (reset)                             got_fin_q <= 1'b0;
    else if (in_take && is_fin(in_word.next_row, in_word.null_f))   got_fin_q <= 1'b1;
  end

  // Advance: a chip below the top moves its output word when the chip above
  // has room; the top chip when its column holds the token.
  assign adv    = toprow ? (run && token) : (run && !halt);
  assign bypass = toprow && adv && !live && fifo_empty;
  assign enc_pop  = adv && live;
  assign fifo_pop = adv && !live && !fifo_empty;

  // Null words from below are dropped in the top chip (the row counter still
  // advances); a word that bypasses the empty FIFO is not stored either.
  assign fifo_push = in_take && !bypass &&
                     !(toprow && in_word.next_row && in_word.null_f);
  assign fifo_in   = '{row: toprow ? row_q : '0, addr: in_word.addr,
                       next_row: in_word.next_row, null_f: in_word.null_f};

  assign fin_here = !live && (fifo_empty ? (in_take && is_fin(in_word.next_row, in_word.null_f))
                                         : is_fin(fifo_chain.next_row, fifo_chain.null_f));

  assign fifo_chain = '{addr: fifo_head.addr, next_row: fifo_head.next_row,
                        null_f: fifo_head.null_f};

  output_mux u_omux (
    .mode, .live, .enc_word,
    .fifo_word((toprow && fifo_empty) ? in_word : fifo_chain),
    .test_word(test_out), .dac_word(dacout), .out_word(chain_out));

  assign xout    = chain_out.addr;
  assign nextout = chain_out.next_row;
  assign nullout = chain_out.null_f;
  assign buful   = fifo_full;

  always_comb begin
    if (!toprow || live || mode == MODE_DACLOAD || mode == MODE_TESTLOAD) rowout = '0;
    else if (fifo_empty)                                                   rowout = row_q;
    else                                                                   rowout = fifo_head.row;
  end

  // A chip below the top never runs dry before it has sent fin: its FIFO
  // receives a word every clock in which it has room.
  a_no_underflow: assert property (@(posedge readclk) disable iff (reset)
    (adv && !toprow && !live && !got_fin_q) |-> !fifo_empty);
endmodule
