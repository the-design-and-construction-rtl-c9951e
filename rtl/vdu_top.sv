// vdu_top: a raster-scan display unit that stores a picture not as a bit map
// but as a sorted list of the screen addresses where the beam intensity
// changes ("begin-end+flag" image addressing).
//
// The refresh store is a ring of 19-bit words: register B, register C, the
// DEPTH-word main store and register D. The words hold the addresses of the
// intensity changes in ascending order, followed by empty (all-zero) words.
// While the picture is shown, the raster counter is compared with register D;
// at equality the video changes (permanently, or for one section when the
// word's flag is set) and the ring shifts once, bringing the next address
// into D. When D is empty the ring is shifted at the CLK II rate until the
// first address is back in D, ready for the next frame.
//
// The picture is changed one word at a time. The master computer loads a
// base address (base_clear, then base_load) and selects INSERT or DELETE; a
// microcomputer then presents address modifiers on OUT1/OUT2 and halts with
// STP and OUT3 = 004. The adder unit adds modifier and base, register A takes
// the result, and the insertion/deletion control steers the ring through A
// (insert) or around B (delete) while keeping the ascending order; int_out
// tells the microcomputer when the step is done. OUT3 = 002 instead moves the
// base address itself. ERASE clears the whole ring in one pass.
//
// Ports: clk is the line-section clock (8 MHz, one section per clock); rst
// is a synchronous reset of the counters and control bistables (the store
// itself is cleared by ERASE). Commands and the microcomputer ports are
// active high and sampled on clk. The display outputs are video (1 =
// bright), blank, line_sync, field_sync and comp_sync (active high). beam is
// the raster address being displayed, brought out for observation.
//
// Follows the document: the block structure and paths of its figure 2.6, the
// 19-bit word, the 64-word prototype store and every control rule described
// in the blocks below. Own choices: a single synchronous clock with enables,
// active-high ports, the reset, and the points listed in each block's
// header.
module vdu_top
  import vdu_pkg::*;
#(
  parameter int DEPTH        = 64,
  parameter int BASE_W       = 17,
  parameter int FBLANK_LINES = 57,
  parameter int FSYNC_DELAY  = 8000,
  parameter int FSYNC_WIDTH  = 9600
) (
  input  logic              clk,
  input  logic              rst,
  // master computer
  input  logic              erase,
  input  logic              insert,
  input  logic              delete,
  input  logic              base_clear,
  input  logic              base_load,
  input  logic [BASE_W-1:0] base_in,
  input  logic              master_int,
  input  logic              reverse,
  // microcomputer ports
  input  logic [7:0]        out1,
  input  logic [7:0]        out2,
  input  logic [7:0]        out3,
  input  logic              stp,
  output logic              int_out,
  // monitor
  output logic              video,
  output logic              blank,
  output logic              line_sync,
  output logic              field_sync,
  output logic              comp_sync,
  output addr_t             beam,
  // observation
  output word_t             reg_d,
  output logic              store_shift
);

  addr_t base_addr, sum;
  logic  flag, pst, int_set, set_int_store;
  word_t a_word, b_word, c_word, d_word;
  logic  shift, a_from_d, b_sel_a, b_brk, c_sel_d, bc_clr;
  logic  ins_path, del_path, empty_ff;
  logic  a_lt_d, a_gt_b, a_eq_b, a_zero, b_zero, d_zero, d_eq_beam;
  logic  clk2_tick, move_store, line_blank, field_blank;

  adder_unit #(.BASE_W(BASE_W)) u_adder (
    .clk, .rst, .base_in, .base_clear, .base_load, .out1, .out2, .out3, .stp,
    .set_int_store, .master_int, .base_addr, .sum, .flag, .int_set
  );

  register_a u_reg_a (
    .clk, .rst, .stp, .out3_feed(out3 == OUT3_FEED), .sum, .flag, .shift,
    .from_d(a_from_d), .d_word, .a_word, .pst
  );

  path_register u_reg_b (
    .clk, .rst, .clr(bc_clr), .shift, .sel_alt(b_sel_a), .brk(b_brk),
    .in_main(d_word), .in_alt(a_word), .q(b_word)
  );

  path_register u_reg_c (
    .clk, .rst, .clr(bc_clr), .shift, .sel_alt(c_sel_d), .brk(1'b0),
    .in_main(b_word), .in_alt(d_word), .q(c_word)
  );

  main_store #(.DEPTH(DEPTH)) u_store (
    .clk, .rst, .shift, .c_word, .d_word
  );

  magnitude_comparators u_cmp (
    .a_word, .b_word, .d_word, .beam, .a_lt_d, .a_gt_b, .a_eq_b,
    .a_zero, .b_zero, .d_zero, .d_eq_beam
  );

  insdel_control u_ctl (
    .clk, .rst, .insert, .delete, .erase, .stp,
    .out3_feed(out3 == OUT3_FEED), .out3_bit2(out3[2]), .clk2_tick,
    .move_store, .pst, .int_set, .a_lt_d, .a_gt_b, .a_eq_b, .a_zero, .b_zero,
    .d_zero, .shift, .a_from_d, .b_sel_a, .b_brk, .c_sel_d, .bc_clr,
    .set_int_store, .ins_path, .del_path, .empty_ff
  );

  monitor_control #(
    .FBLANK_LINES(FBLANK_LINES), .FSYNC_DELAY(FSYNC_DELAY), .FSYNC_WIDTH(FSYNC_WIDTH)
  ) u_mon (
    .clk, .rst, .reverse, .modifying(insert || delete), .d_eq_beam,
    .d_flag(d_word.flag), .beam, .clk2_tick, .move_store, .line_blank,
    .field_blank, .line_sync, .field_sync, .comp_sync, .video
  );

  assign int_out     = int_set;
  assign blank       = line_blank || field_blank;
  assign reg_d       = d_word;
  assign store_shift = shift;

endmodule
