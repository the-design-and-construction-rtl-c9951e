// tb_vdu_large_store: the display unit with a 1,024-word store, filled with
// a picture the size of a moderately complex circuit diagram.
// A circuit of this kind needs several hundred begin-end+flag words; the
// largest drawing considered for the unit needs about 941 words, which is
// the count used here. The addresses are distinct, random, anywhere in
// lines 1..254 of either field, with random flags, and are inserted in
// random order, so every insert condition occurs many times and the ring
// has to keep its order over long ripples.
// Each address is presented as a base address (its line and section) plus
// a modifier carrying only the flag and the field bit, through the same
// STP / OUT3 = 004 / interrupt protocol a microcomputer uses.
// Checks: after the fill, every move of the store during one whole frame is
// recorded, and the sequence of words read out of register D must equal the
// sorted list of inserted words, each exactly once. Then a random third of
// the words is deleted and the frame is checked again. Finally ERASE must
// leave a frame with no reads at all.
module tb_vdu_large_store;
  timeunit 1ns; timeprecision 1ps;
  import vdu_pkg::*;

  localparam int DEPTH = 1024;
  localparam int NWORDS = 941;

  logic clk = 0, rst;
  logic erase, insert, delete, base_clear, base_load, master_int, reverse, stp;
  logic [16:0] base_in;
  logic [7:0] out1, out2, out3;
  logic int_out, video, blank, line_sync, field_sync, comp_sync, store_shift;
  addr_t beam;
  word_t reg_d;
  int checks = 0, failures = 0;

  vdu_top #(.DEPTH(DEPTH)) dut (.*);
  always #62.5 clk = ~clk;

  word_t words [$];          // what the store should hold
  bit    used  [addr_t];          // addresses already taken

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // ------------------------------------------------------------ protocol
  task automatic wait_int();
    int t = 0;
    while (!int_out && t < 40000) begin @(posedge clk); t++; end
    check(int_out, "interrupt arrived");
  endtask

  task automatic put(input word_t w);
    // base = line and section of the word, modifier = flag and field only
    @(posedge clk); #1 base_clear = 1;
    @(posedge clk); #1 base_clear = 0; base_in = w.addr[16:0]; base_load = 1;
    @(posedge clk); #1 base_load = 0;
    out1 = {w.flag, 7'd0}; out2 = {w.addr[17], 7'd0}; out3 = OUT3_FEED;
    repeat (3) @(posedge clk);
    #1 stp = 1;
    wait_int();
    @(posedge clk); #1 stp = 0;
    repeat (2) @(posedge clk);
  endtask

  function automatic word_t random_word();
    word_t w;
    do begin
      w.addr = {1'($urandom), 8'(1 + $urandom_range(253)), 9'($urandom)};
    end while (used.exists(w.addr));
    w.flag = 1'($urandom);
    used[w.addr] = 1;
    return w;
  endfunction

  // ----------------------------------------------------------- frame read
  logic field_q = 0;
  always @(posedge clk) field_q <= dut.u_mon.field;

  task automatic check_frame(input string what);
    word_t got [$];
    word_t want [$];
    int bad = 0;
    want = words;
    want.sort() with (item.addr);
    // start of a frame: the field bit falls back to zero
    repeat (2) begin
      @(posedge clk);
      while (!(field_q && !dut.u_mon.field)) @(posedge clk);
    end
    @(posedge clk);
    while (!(field_q && !dut.u_mon.field)) begin
      if (dut.u_mon.move_store) got.push_back(reg_d);
      @(posedge clk);
    end
    check(got.size() == want.size(), {what, ": one read per stored word"});
    foreach (want[i])
      if (i < got.size() && got[i] != want[i]) bad++;
    check(bad == 0, {what, ": words read in ascending order"});
    $display("%s: %0d words stored, %0d read in the frame, %0d out of place",
             what, want.size(), got.size(), bad);
  endtask

  initial begin
    #4s; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int ndel;
    rst = 1; erase = 0; insert = 0; delete = 0; base_clear = 0; base_load = 0; base_in = '0;
    master_int = 0; reverse = 0; stp = 0; out1 = 0; out2 = 0; out3 = OUT3_IDLE;
    repeat (4) @(posedge clk); #1 rst = 0;

    // one ERASE pass over A, B, C, the store and D
    @(posedge clk); #1 erase = 1;
    repeat ((DEPTH + 4) * 4 + 8) @(posedge clk);
    #1 erase = 0;

    insert = 1;
    for (int i = 0; i < NWORDS; i++) begin
      word_t w;
      w = random_word();
      put(w);
      words.push_back(w);
    end
    out3 = OUT3_IDLE; insert = 0;
    check_frame("after fill");

    delete = 1;
    words.shuffle();
    ndel = NWORDS / 3;
    for (int i = 0; i < ndel; i++) put(words.pop_front());
    out3 = OUT3_IDLE; delete = 0;
    check_frame("after delete");

    @(posedge clk); #1 erase = 1;
    repeat ((DEPTH + 4) * 4 + 8) @(posedge clk);
    #1 erase = 0;
    words.delete();
    check_frame("after erase");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
