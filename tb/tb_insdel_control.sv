// tb_insdel_control: self-checking test of the insertion/deletion control.
// Part 1 drives random register values through the three insert conditions
// and the delete condition and compares the selected path with the
// conditions written out from the register values. Part 2 runs short
// sequences on the bistables: the delete bistable (set by A=B, held, reset by
// A=0 and D=0), the empty-store bistable (set by ERASE, reset when A falls to
// zero), the interrupt (only on A going to zero, gated by STP.OUT3=004 and
// the INSERT/DELETE condition, released by int_set) and the shift command
// (MOVE STORE at once; D=0, ERASE and the STP bistable once per CLK II;
// the STP bistable only from the second CLK II; no shift during PST).
module tb_insdel_control;
  import vdu_pkg::*;

  logic clk = 0, rst;
  logic insert, delete, erase, stp, out3_feed, out3_bit2, clk2_tick, move_store, pst, int_set;
  logic a_lt_d, a_gt_b, a_eq_b, a_zero, b_zero, d_zero;
  logic shift, a_from_d, b_sel_a, b_brk, c_sel_d, bc_clr, set_int_store, ins_path, del_path, empty_ff;
  int checks = 0, failures = 0;
  int unsigned av, bv, dv;
  int phase = 0;

  insdel_control dut (.*);
  always #5 clk = ~clk;

  // comparator flags from register values
  always_comb begin
    a_lt_d = av < dv; a_gt_b = av > bv; a_eq_b = av == bv;
    a_zero = av == 0; b_zero = bv == 0; d_zero = dv == 0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (A=%0d B=%0d D=%0d)", what, av, bv, dv); end
  endtask

  task automatic idle();
    insert = 0; delete = 0; erase = 0; stp = 0; out3_feed = 0; out3_bit2 = 0;
    clk2_tick = 0; move_store = 0; pst = 0; int_set = 0;
  endtask

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int n_i = 0, n_ii = 0, n_iii = 0, n_del = 0;
    bit exp_ins;
    idle(); av = 0; bv = 0; dv = 0; rst = 1;
    repeat (2) @(posedge clk); #1 rst = 0;

    // ---- part 1: path selection (empty-store bistable is clear after reset)
    for (int i = 0; i < 4000; i++) begin
      av = ($urandom % 4 == 0) ? 0 : $urandom % 64;
      bv = ($urandom % 4 == 0) ? 0 : $urandom % 64;
      dv = ($urandom % 4 == 0) ? 0 : $urandom % 64;
      insert = 1'($urandom); delete = !insert && 1'($urandom);
      #1;
      exp_ins = 0;
      if (insert && av != 0) begin
        if (av < dv && bv == 0) begin exp_ins = 1; n_i++; end
        if (bv < av && av < dv) begin exp_ins = 1; n_ii++; end
        if (av > bv && dv == 0 && bv != 0) begin exp_ins = 1; n_iii++; end
      end
      check(ins_path == exp_ins, "insert path");
      check(b_sel_a == exp_ins, "A into B on insert");
      check(del_path == (delete && av == bv && av != 0), "delete path");
      if (delete && av == bv && av != 0) n_del++;
      check(a_from_d == (exp_ins || (delete && av == bv && av != 0)), "D into A");
    end
    check(n_i > 0 && n_ii > 0 && n_iii > 0 && n_del > 0, "all conditions exercised");
    insert = 0; delete = 0;

    // ---- part 2a: delete bistable
    phase = 1;
    av = 5; bv = 7; dv = 9; delete = 1; #1;
    check(!del_path, "no delete before match");
    bv = 5; #1; check(del_path && b_brk && c_sel_d, "delete path on A=B");
    @(posedge clk); #1 bv = 0; av = 9; dv = 11; #1;
    check(del_path && c_sel_d && b_brk, "delete path held by bistable");
    av = 0; dv = 3; @(posedge clk); #1;
    check(del_path, "delete path held while D non-zero");
    dv = 0; @(posedge clk); #1;
    check(!del_path, "delete bistable reset by A=0 and D=0");
    delete = 0;

    // ---- part 2b: empty-store bistable
    av = 0; bv = 0; dv = 0;
    erase = 1; @(posedge clk); #1 erase = 0; #1;
    check(empty_ff && ins_path, "ERASE forces insert path");
    av = 40; bv = 0; dv = 0; @(posedge clk); #1;
    check(ins_path, "path held while A non-zero");
    av = 0; @(posedge clk); #1;
    check(!empty_ff, "empty-store bistable reset when A falls to zero");

    // ---- part 2c: interrupt
    int_set = 1; @(posedge clk); #1 int_set = 0;   // clear the edge bistable
    insert = 1; stp = 1; out3_feed = 1; out3_bit2 = 1; av = 0; #1;
    check(!set_int_store, "no interrupt for A merely zero");
    av = 12; @(posedge clk); #1;
    check(!set_int_store, "no interrupt while A non-zero");
    av = 0; @(posedge clk); #1;
    check(set_int_store, "interrupt when A goes to zero (insert)");
    stp = 0; #1; check(!set_int_store, "interrupt needs STP");
    stp = 1; int_set = 1; @(posedge clk); #1 int_set = 0; #1;
    check(!set_int_store, "interrupt released by int_set");
    insert = 0; delete = 1; bv = 4; av = 8; @(posedge clk); #1 av = 0; @(posedge clk); #1;
    check(!set_int_store, "delete interrupt needs B=0");
    bv = 0; #1; check(set_int_store, "interrupt on delete with B=0");
    int_set = 1; @(posedge clk); #1 int_set = 0; delete = 0;

    // ---- part 2d: shift command
    idle(); av = 0; bv = 3; dv = 7; #1;
    check(!shift, "no shift when idle");
    move_store = 1; #1; check(shift, "MOVE STORE shifts at once");
    move_store = 0; dv = 0; #1; check(!shift, "D=0 waits for CLK II");
    clk2_tick = 1; #1; check(shift, "D=0 shifts on CLK II");
    pst = 1; #1; check(!shift, "no shift while A is preset");
    pst = 0; dv = 7; erase = 1; #1; check(shift && bc_clr, "ERASE shifts on CLK II and clears B, C");
    erase = 0; clk2_tick = 0;
    // STP.OUT3 bit 2 bistable: set on a CLK II tick, shifts from the next
    av = 20; stp = 1; out3_bit2 = 1; out3_feed = 1; #1;
    check(!shift, "STP alone does not shift");
    clk2_tick = 1; #1; check(!shift, "first CLK II after STP only sets the bistable");
    @(posedge clk); #1 clk2_tick = 0; #1;
    check(!shift, "no shift between ticks");
    clk2_tick = 1; #1; check(shift, "STP bistable shifts on next CLK II");
    av = 0; @(posedge clk); #1; av = 20; #1;
    check(!shift, "bistable cleared by A=0");
    idle();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
