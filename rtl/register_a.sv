// register_a: the 19-bit holding register for the word being inserted or
// deleted.
//
// Register A is outside the circulating store. When the microcomputer halts
// (STP) with OUT3 = 004, A is preset with the adder's 18-bit sum and the flag
// from OUT1 bit 7 (PST REG A). While OUT3 = 004 and STP is low, the
// microcomputer is between two modifiers and A is held clear. Otherwise A
// keeps its contents, except that on a store shift with from_d asserted
// (insert path D,A,B,C; delete path D into A; erase path A,B,C,D) it takes the
// word leaving register D.
//
// Timing: pst is a one-clock pulse on the first clock that sees
// STP.(OUT3=004); it has priority over a shift in the same clock (the
// insertion/deletion control also suppresses that shift). The clear acts on
// every clock while its condition holds.
//
// Follows the document: preset and clear conditions, the flag source and the
// D-to-A path. Own choices: the short preset pulse is an edge detector on
// the system clock, and there is a synchronous reset.
module register_a
  import vdu_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  stp,
  input  logic  out3_feed,   // OUT3 = 004
  input  addr_t sum,         // from the adder unit
  input  logic  flag,        // OUT1 bit 7
  input  logic  shift,       // store shift command
  input  logic  from_d,      // path D -> A selected
  input  word_t d_word,      // register D
  output word_t a_word,
  output logic  pst          // PST REG A pulse, used to hold off the shift
);

  logic feed_q;

  assign pst = stp && out3_feed && !feed_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      a_word <= WORD_ZERO;
      feed_q <= 1'b0;
    end else begin
      feed_q <= stp && out3_feed;
      if (pst)
        a_word <= '{flag: flag, addr: sum};
      else if (out3_feed && !stp)
        a_word <= WORD_ZERO;
      else if (shift && from_d)
        a_word <= d_word;
    end
  end

endmodule
