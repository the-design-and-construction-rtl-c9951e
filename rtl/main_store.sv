// main_store: the bulk of the refresh memory, DEPTH words of 19 bits that
// shift in step, followed by register D.
//
// The word from register C enters at the head; after DEPTH shifts it reaches
// register D, the last word position, whose contents are compared with the
// raster position and with register A. Register D is reset to zero; the
// bulk has no reset, as a shift-register store has none, and is cleared by
// the ERASE pass (register C forced to zero and shifted through).
//
// Timing: one clock; each shift moves every word one place.
//
// Follows the document: 19 parallel shift registers of 64 words (MC14517
// devices in the original), register D at the output. Own choices: register
// D is counted as a word position of its own after the 64, so that the
// erase path A,B,C,store,D is 68 words long as the document states; the
// store is written as an array.
module main_store
  import vdu_pkg::*;
#(
  parameter int DEPTH = 64
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  shift,
  input  word_t c_word,    // from register C
  output word_t d_word     // register D
);

  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (shift) begin
      mem[0] <= c_word;
      for (int i = 1; i < DEPTH; i++)
        mem[i] <= mem[i-1];
    end
  end

  always_ff @(posedge clk) begin
    if (rst)
      d_word <= WORD_ZERO;
    else if (shift)
      d_word <= mem[DEPTH-1];
  end

endmodule
