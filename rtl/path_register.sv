// path_register: one 19-bit word position of the store with a choice of two
// inputs; used for register B and register C.
//
// On a store shift the register loads in_main, or in_alt when sel_alt is
// set, or zero when brk is set (its normal input is broken and nothing
// replaces it). While clr is asserted it is held at zero on every clock.
//   Register B: in_main = D, in_alt = A (insert and erase paths),
//               brk = delete path (B's input from D is broken).
//   Register C: in_main = B, in_alt = D (delete path D,C).
// clr is ERASE for both: zeros are forced into B and C and shifted on
// through the rest of the store.
//
// Timing: one clock; shift is a one-clock enable.
//
// Follows the document: the two sources per register, ERASE forcing zero,
// B being zeroed by the delete path. Own choices: a synchronous clear in
// place of the board's direct clear, and a synchronous reset.
module path_register
  import vdu_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  clr,
  input  logic  shift,
  input  logic  sel_alt,
  input  logic  brk,
  input  word_t in_main,
  input  word_t in_alt,
  output word_t q
);

  always_ff @(posedge clk) begin
    if (rst || clr)
      q <= WORD_ZERO;
    else if (shift) begin
      if (brk)
        q <= WORD_ZERO;
      else if (sel_alt)
        q <= in_alt;
      else
        q <= in_main;
    end
  end

endmodule
