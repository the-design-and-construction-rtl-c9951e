// tb_vdu_top: end-to-end test of the display unit at its default size
// (64-word store, full 625-line timing).
// The testbench plays the master computer and the microcomputer. The
// microcomputer is modelled only by its port protocol: put a modifier on
// OUT1/OUT2 with OUT3 = 004, halt (STP), wait for the interrupt, resume;
// OUT3 = 002 for a base address move. The picture is a horizontal
// inductor symbol (28 modifiers) with the start and end of a lead, and a
// character written three times, at three base addresses reached by
// moving the base, as a numeral of a component value would be.
// After each change the testbench waits for the picture to settle and then
// compares every visible section of a whole frame with a reference: the
// words are placed by integer arithmetic on the base address and modifier
// fields, and the expected intensity at a section is the background,
// inverted by every permanent word of the same field at or before it and
// by a temporary word at it.
// Sequence: ERASE, insert 48 words (first word into the empty store, then
// smaller-than-all, between, and larger-than-all insertions), frame check;
// delete the characters (18 words) and one inductor word, frame check;
// black-on-white frame check; ERASE, frame check of the empty screen.
// Each mechanism is counted and must occur at least once.
module tb_vdu_top;
  timeunit 1ns; timeprecision 1ps;
  import vdu_pkg::*;

  logic clk = 0, rst;
  logic erase, insert, delete, base_clear, base_load, master_int, reverse, stp;
  logic [16:0] base_in;
  logic [7:0] out1, out2, out3;
  logic int_out, video, blank, line_sync, field_sync, comp_sync, store_shift;
  addr_t beam;
  word_t reg_d;
  int checks = 0, failures = 0;

  vdu_top dut (.*);
  always #62.5 clk = ~clk;   // 8 MHz section clock

  // ---------------------------------------------------------------- model
  word_t shown [$];          // words that should be in the store
  logic [16:0] ref_base;

  function automatic word_t place(input logic [16:0] b, input logic [7:0] o1, input logic [7:0] o2);
    int unsigned a;
    word_t w;
    a = b + (o1 % 128) + (o2 % 128) * 512 + (o2 / 128) * 131072;
    w.flag = o1[7];
    w.addr = a[17:0];
    return w;
  endfunction

  function automatic logic expected_video(input addr_t e);
    logic v = reverse;
    foreach (shown[i]) begin
      if (shown[i].addr[17] == e[17]) begin
        if (!shown[i].flag && shown[i].addr <= e) v = !v;
        if (shown[i].flag && shown[i].addr == e) v = !v;
      end
    end
    return v;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (beam=%h t=%0t)", what, beam, $time);
    end
  endtask

  // ------------------------------------------------------ mechanism counts
  int n_erase_shift = 0, n_empty_ins = 0, n_ins_i = 0, n_ins_ii = 0, n_ins_iii = 0;
  int n_del = 0, n_base_move = 0, n_move = 0, n_temp = 0, n_field2 = 0, n_realign = 0;
  int n_int = 0, n_bright = 0;
  logic int_q = 0;

  always @(posedge clk) if (!rst) begin
    if (store_shift) begin
      if (erase) n_erase_shift++;
      if (dut.u_ctl.empty_ff && dut.u_ctl.ins_path && !dut.u_cmp.a_zero) n_empty_ins++;
      if (insert && dut.u_ctl.ins_path && !dut.u_ctl.empty_ff) begin
        if (dut.u_cmp.b_zero && dut.u_cmp.a_lt_d) n_ins_i++;
        else if (dut.u_cmp.d_zero) n_ins_iii++;
        else n_ins_ii++;
      end
      if (dut.u_ctl.del_path && dut.u_cmp.a_eq_b) n_del++;
      if (reg_d == WORD_ZERO && !erase) n_realign++;
    end
    if (dut.u_mon.move_store) begin
      n_move++;
      if (reg_d.flag) n_temp++;
      if (beam[17]) n_field2++;
    end
    if (int_out && !int_q) begin
      n_int++;
      if (out3 == OUT3_BASE) n_base_move++;
    end
    int_q <= int_out;
  end

  // ------------------------------------------------------------ protocol
  task automatic wait_int();
    int t = 0;
    while (!int_out && t < 20000) begin @(posedge clk); t++; end
    check(int_out, "interrupt arrived");
  endtask

  task automatic set_base(input logic [16:0] b);
    @(posedge clk); #1 base_clear = 1;
    @(posedge clk); #1 base_clear = 0; base_in = b; base_load = 1;
    @(posedge clk); #1 base_load = 0;
    ref_base = b;
  endtask

  task automatic feed(input logic [7:0] o1, input logic [7:0] o2, input bit del);
    word_t w;
    out1 = o1; out2 = o2; out3 = OUT3_FEED;
    repeat (3) @(posedge clk);
    #1 stp = 1;
    wait_int();
    @(posedge clk); #1 stp = 0;
    repeat (2) @(posedge clk);
    w = place(ref_base, o1, o2);
    if (!del) shown.push_back(w);
    else foreach (shown[i]) if (shown[i].addr == w.addr) begin shown.delete(i); break; end
  endtask

  task automatic move_base(input logic [7:0] o1, input logic [7:0] o2);
    word_t w;
    out1 = o1; out2 = o2; out3 = OUT3_BASE;
    repeat (3) @(posedge clk);
    #1 stp = 1;
    wait_int();
    @(posedge clk); #1 stp = 0; out3 = OUT3_IDLE;
    w = place(ref_base, o1, o2);
    ref_base = w.addr[16:0];
  endtask

  task automatic do_erase();
    @(posedge clk); #1 erase = 1;
    repeat (68 * 4 + 8) @(posedge clk);
    #1 erase = 0;
    shown.delete();
  endtask

  // one frame: two fields after the picture has settled
  task automatic check_frame(input string what);
    int nb = 0;
    repeat (3) @(posedge dut.u_mon.field_blank);
    fork
      begin
        repeat (2) @(posedge dut.u_mon.field_blank);
      end
      begin
        forever begin
          @(posedge clk);
          if (!blank && beam[16:9] != 0) begin
            logic e;
            e = expected_video(beam);
            if (e != reverse) nb++;
            checks++;
            if (video != e) begin
              failures++;
              if (failures < 20) $display("FAIL %s video at beam=%h got %0b", what, beam, video);
            end
          end
        end
      end
    join_any
    disable fork;
    n_bright += nb;
    if (shown.size() > 0) check(nb > 0, {what, ": picture visible"});
    else check(nb == 0, {what, ": screen empty"});
  endtask

  // printed inductor block: {flag, horizontal (octal)}, {field, vertical}
  localparam int NIND = 28;
  logic [7:0] ind1 [NIND] = '{8'o042, 8'o102, 8'o242, 8'o261, 8'o301, 8'o242, 8'o261, 8'o301,
                              8'o242, 8'o261, 8'o301, 8'o242, 8'o061, 8'o066, 8'o301, 8'o042,
                              8'o102, 8'o242, 8'o301, 8'o242, 8'o261, 8'o301, 8'o261, 8'o242,
                              8'o261, 8'o301, 8'o242, 8'o301};
  logic [7:0] ind2 [NIND] = '{8'o001, 8'o001, 8'o002, 8'o002, 8'o002, 8'o003, 8'o003, 8'o003,
                              8'o004, 8'o004, 8'o004, 8'o005, 8'o005, 8'o005, 8'o005, 8'o006,
                              8'o006, 8'o201, 8'o201, 8'o202, 8'o202, 8'o202, 8'o203, 8'o204,
                              8'o204, 8'o204, 8'o205, 8'o205};
  // a small character drawn at the moved base
  localparam int NCH = 6;
  logic [7:0] ch1 [NCH] = '{8'o202, 8'o202, 8'o202, 8'o202, 8'o000, 8'o005};
  logic [7:0] ch2 [NCH] = '{8'o001, 8'o201, 8'o002, 8'o202, 8'o003, 8'o003};

  initial begin
    #900ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [16:0] b0;
    rst = 1; erase = 0; insert = 0; delete = 0; base_clear = 0; base_load = 0; base_in = '0;
    master_int = 0; reverse = 0; stp = 0; out1 = 0; out2 = 0; out3 = OUT3_IDLE;
    repeat (4) @(posedge clk); #1 rst = 0;

    do_erase();
    // master computer: new symbol, line 100, section 200
    b0 = 17'(100 * 512 + 200);
    set_base(b0);
    insert = 1;
    stp = 1; master_int = 1; @(posedge clk); #1 master_int = 0;   // symbol info for the microcomputer
    wait_int(); @(posedge clk); #1 stp = 0;
    // lead start and end (field 2, line 3), then the inductor, then the character
    feed(8'o000, 8'o203, 0);
    feed(8'o043, 8'o203, 0);
    for (int i = 0; i < NIND; i++) feed(ind1[i], ind2[i], 0);
    out3 = OUT3_IDLE;
    // three characters from the same modifier set, each at its own base
    move_base(8'o020, 8'o012);
    for (int c = 0; c < 3; c++) begin
      if (c > 0) move_base(8'o010, 8'o000);
      for (int i = 0; i < NCH; i++) feed(ch1[i], ch2[i], 0);
    end
    out3 = OUT3_IDLE; insert = 0;
    check(shown.size() == 48, "48 words inserted");
    check_frame("after insert");

    // delete the three characters, then one word of the inductor
    delete = 1;
    set_base(b0);
    move_base(8'o020, 8'o012);
    for (int c = 0; c < 3; c++) begin
      if (c > 0) move_base(8'o010, 8'o000);
      for (int i = 0; i < NCH; i++) feed(ch1[i], ch2[i], 1);
    end
    set_base(b0);
    feed(ind1[12], ind2[12], 1);
    out3 = OUT3_IDLE; delete = 0;
    check(shown.size() == 29, "29 words left");
    check_frame("after delete");

    // black image on white
    reverse = 1;
    check_frame("reverse video");
    reverse = 0;

    // erase everything
    do_erase();
    check_frame("after erase");

    check(n_erase_shift >= 68, "ERASE pass");
    check(n_empty_ins > 0, "first word into empty store");
    check(n_ins_i > 0, "insert below all (A<D, B=0)");
    check(n_ins_ii > 0, "insert between (B<A<D)");
    check(n_ins_iii > 0, "insert above all (A>B, D=0)");
    check(n_del >= 19, "delete");
    check(n_base_move == 6, "base address moves");
    check(n_move > 0 && n_temp > 0 && n_field2 > 0, "read with temporary words in both fields");
    check(n_realign > 0, "realign shifts while D=0");
    check(n_int >= 48 + 19 + 6 + 1, "interrupts");
    $display("mechanisms: erase_shifts=%0d empty_ins=%0d ins_i=%0d ins_ii=%0d ins_iii=%0d del=%0d base_moves=%0d moves=%0d temp=%0d field2=%0d realign=%0d ints=%0d bright=%0d",
             n_erase_shift, n_empty_ins, n_ins_i, n_ins_ii, n_ins_iii, n_del, n_base_move, n_move, n_temp, n_field2, n_realign, n_int, n_bright);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
