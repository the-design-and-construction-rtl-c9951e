// insdel_control: the insertion/deletion control board. It decides, before
// every store shift, which path the words take, raises the interrupt that
// ends each INSERT or DELETE step, and generates the store shift command.
//
// Information path (words move B -> C -> store -> D -> B when reading):
//   insert path D,A,B,C  when INSERT and A is non-zero and
//        (i)   A < D and B = 0   (A smaller than every stored address), or
//        (ii)  B < A < D,        or
//        (iii) A > B and D = 0   (A larger than every stored address);
//        the path holds while these hold, so the words after the new one
//        ripple on through A until the first empty word has passed through A.
//   empty-store bistable: set by ERASE, forces the insert path until A next
//        goes to zero, so the first word enters an empty store.
//   delete path D,C with D also into A and B zeroed: a bistable set when
//        DELETE and A = B (A non-zero); cleared by A = 0 and D = 0.
//   erase path A,B,C,D with B and C held at zero.
// Interrupt: a bistable records that A has gone to zero (an edge, not the
// level); set_int_store is raised when that has happened, STP and OUT3 = 004
// are present, and either INSERT with A = 0 or DELETE with B = 0. The
// bistable is cleared by the adder unit's interrupt (int_set) and by ERASE.
// Shift command: one shift per MOVE STORE pulse (read), and one shift per
// CLK II period while D = 0, while ERASE, or while the STP.OUT3-bit-2
// bistable is set. That bistable is clocked by CLK II, so a new word in A
// is compared before the first shift; it is held reset while A = 0.
//
// Timing: one clock domain; clk2_tick is a one-clock enable once per CLK II
// period. No shift is issued in the clock in which register A is preset.
//
// Follows the document: the three insert conditions, the delete set and
// reset conditions (figure 4.6 names A=0 and D=0 for the reset), the
// interrupt conditions of figure 4.7, the shift sources of figure 4.8 and the
// empty-store bistable reset by A going to zero (section 4.7.1, the later of
// two descriptions). Own choices: condition (iii) also requires B non-zero,
// so that a word presented while empty words pass D and B is not dropped
// into the empty run (an empty store is covered by the empty-store
// bistable); the empty-store bistable does not force the path during DELETE;
// all bistables are synchronous.
module insdel_control
  import vdu_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic insert,
  input  logic delete,
  input  logic erase,
  input  logic stp,
  input  logic out3_feed,    // OUT3 = 004
  input  logic out3_bit2,    // OUT3 bit 2
  input  logic clk2_tick,    // CLK II enable
  input  logic move_store,   // read shift from the monitor control
  input  logic pst,          // register A being preset this clock
  input  logic int_set,      // adder unit's interrupt bistable
  input  logic a_lt_d,
  input  logic a_gt_b,
  input  logic a_eq_b,
  input  logic a_zero,
  input  logic b_zero,
  input  logic d_zero,
  output logic shift,
  output logic a_from_d,     // D -> A
  output logic b_sel_a,      // A -> B
  output logic b_brk,        // D -> B broken, B zeroed
  output logic c_sel_d,      // D -> C
  output logic bc_clr,       // B and C forced to zero
  output logic set_int_store,
  output logic ins_path,
  output logic del_path,
  output logic empty_ff
);

  logic del_ff, del_set, ins_cond, a_zero_q, a_fell, edge_ff, bulk_ff;

  always_comb begin
    ins_cond = !a_zero &&
               ((a_lt_d && b_zero) ||
                (a_gt_b && a_lt_d) ||
                (a_gt_b && d_zero && !b_zero));
    ins_path = (insert && ins_cond) || (empty_ff && !delete);
    del_set  = delete && a_eq_b && !a_zero;
    del_path = del_ff || del_set;
    a_from_d = ins_path || del_path || erase;
    b_sel_a  = ins_path || erase;
    b_brk    = del_path && !erase;
    c_sel_d  = del_path && !erase;
    bc_clr   = erase;
    a_fell   = a_zero && !a_zero_q;
    set_int_store = edge_ff && stp && out3_feed &&
                    ((insert && a_zero) || (delete && b_zero));
    shift    = !pst && (move_store || (clk2_tick && (erase || d_zero || bulk_ff)));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      a_zero_q <= 1'b1;
      del_ff   <= 1'b0;
      empty_ff <= 1'b0;
      edge_ff  <= 1'b0;
      bulk_ff  <= 1'b0;
    end else begin
      a_zero_q <= a_zero;

      if (erase || (a_zero && d_zero))
        del_ff <= 1'b0;
      else if (del_set)
        del_ff <= 1'b1;

      if (erase)
        empty_ff <= 1'b1;
      else if (a_fell)
        empty_ff <= 1'b0;

      if (int_set || erase)
        edge_ff <= 1'b0;
      else if (a_fell)
        edge_ff <= 1'b1;

      if (a_zero)
        bulk_ff <= 1'b0;
      else if (clk2_tick)
        bulk_ff <= stp && out3_bit2;
    end
  end

endmodule
