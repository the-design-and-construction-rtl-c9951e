// magnitude_comparators: the three comparator sections.
//
// Sections 1 and 2 compare the address of register A with those of registers
// B and D; the flag bits take no part. Their results steer the information
// path during INSERT and DELETE. Section 3 signals equivalence between the
// address in register D and the raster position (beam), which moves the
// store and changes the video during the read. The all-zero detectors
// (whole 19-bit word, flag included) mark empty words.
//
// Timing: purely combinational.
//
// Follows the document: what is compared and that the flag is excluded.
// Own choices: the zero detectors are placed here (the document does not
// say which board forms A=0, B=0, D=0); d_eq_beam is suppressed while D is
// empty, so an empty word never matches raster position 0.
module magnitude_comparators
  import vdu_pkg::*;
(
  input  word_t a_word,
  input  word_t b_word,
  input  word_t d_word,
  input  addr_t beam,       // line / intra-line counter
  output logic  a_lt_d,
  output logic  a_gt_b,
  output logic  a_eq_b,
  output logic  a_zero,
  output logic  b_zero,
  output logic  d_zero,
  output logic  d_eq_beam
);

  always_comb begin
    a_lt_d    = a_word.addr < d_word.addr;
    a_gt_b    = a_word.addr > b_word.addr;
    a_eq_b    = a_word.addr == b_word.addr;
    a_zero    = is_zero(a_word);
    b_zero    = is_zero(b_word);
    d_zero    = is_zero(d_word);
    d_eq_beam = !d_zero && (d_word.addr == beam);
  end

endmodule
