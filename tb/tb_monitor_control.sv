// tb_monitor_control: self-checking test of the raster counters, the
// blanking and sync pulses, interlace, MOVE STORE and the video bistable,
// at the default (full television) timing.
// A small sorted address list stands in for register D: the testbench
// offers the next word, and moves on when move_store fires. The expected
// video at every visible section is computed directly from the list: the
// background, inverted by each permanent word of the same field at or
// before the beam, and by a temporary word at the beam itself.
// Checks: line period 512 clocks, one 1.5-line gap per frame, line blanking
// 96 clocks, line sync 12 clocks after it for 38 clocks, field lengths of
// 312 and 312.5 lines, field sync 8000 clocks after field blanking for 9600,
// composite sync, MOVE STORE inhibit while modifying, both video modes.
module tb_monitor_control;
  import vdu_pkg::*;

  logic clk = 0, rst, reverse, modifying, d_eq_beam, d_flag;
  addr_t beam;
  logic clk2_tick, move_store, line_blank, field_blank, line_sync, field_sync, comp_sync, video;
  int checks = 0, failures = 0;

  monitor_control dut (.*);
  always #5 clk = ~clk;

  word_t list [$];
  int ptr = 0;

  function automatic addr_t mk(input int f, input int l, input int s);
    return addr_t'(f * 131072 + l * 512 + s);
  endfunction

  always_comb begin
    d_eq_beam = (ptr < list.size()) && (list[ptr].addr == beam);
    d_flag    = (ptr < list.size()) ? list[ptr].flag : 1'b0;
  end

  function automatic logic expected_video(input addr_t e);
    logic v = reverse;
    for (int i = 0; i < list.size(); i++) begin
      if (list[i].addr[17] == e[17] && list[i].addr[16:9] != 0) begin
        if (!list[i].flag && list[i].addr <= e) v = !v;
        if (list[i].flag && list[i].addr == e) v = !v;
      end
    end
    return v;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at beam=%h t=%0t", what, beam, $time);
    end
  endtask

  int cyc = 0, last_ls = -1, gaps768 = 0, lb_start = -1, fb_start = -1, last_fb = -1;
  int field_lens [$];
  int n_moves = 0, n_inhibit = 0, n_temp = 0;
  logic ls_q = 0, lb_q = 0, fb_q = 0, fs_q = 0;

  always @(posedge clk) if (!rst) begin
    cyc++;
    // pulse timing
    if (line_blank && !lb_q) lb_start = cyc;
    if (!line_blank && lb_q) check(cyc - lb_start == 96, "line blanking width");
    if (line_sync && !ls_q) begin
      check(cyc - lb_start == 12, "line sync delay");
      if (last_ls >= 0) begin
        check(cyc - last_ls == 512 || cyc - last_ls == 768, "line sync period");
        if (cyc - last_ls == 768) gaps768++;
      end
      last_ls = cyc;
    end
    if (!line_sync && ls_q) check(cyc - last_ls == 38, "line sync width");
    if (field_blank && !fb_q) begin
      if (last_fb >= 0) field_lens.push_back(cyc - last_fb);
      last_fb = cyc; fb_start = cyc;
    end
    if (field_sync && !fs_q) check(cyc - fb_start == 8000, "field sync delay");
    if (!field_sync && fs_q) check(cyc - fb_start == 17600, "field sync width");
    check(comp_sync == (line_sync ^ field_sync), "composite sync");
    ls_q <= line_sync; lb_q <= line_blank; fb_q <= field_blank; fs_q <= field_sync;
    // read and video
    if (modifying && d_eq_beam) begin check(!move_store, "MOVE STORE inhibited"); n_inhibit++; end
    if (!modifying) check(move_store == d_eq_beam, "MOVE STORE on equivalence");
    if (!line_blank && !field_blank && beam[16:9] != 0 && !modifying)
      check(video == expected_video(beam), "video");
    if (line_blank || field_blank) check(!video, "video black while blanked");
    if (move_store) begin
      n_moves++;
      if (d_flag) n_temp++;
      ptr <= (ptr + 1 == list.size()) ? 0 : ptr + 1;
    end
  end

  initial begin
    #200000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // a box outline and some single-section dots in both fields
    list = '{
      '{flag:0, addr:mk(0, 10, 150)}, '{flag:0, addr:mk(0, 10, 300)},
      '{flag:1, addr:mk(0, 11, 150)}, '{flag:1, addr:mk(0, 11, 300)},
      '{flag:0, addr:mk(0, 12, 150)}, '{flag:0, addr:mk(0, 12, 300)},
      '{flag:1, addr:mk(0, 200, 100)}, '{flag:1, addr:mk(0, 200, 101)},
      '{flag:0, addr:mk(0, 250, 400)}, '{flag:0, addr:mk(0, 250, 402)},
      '{flag:0, addr:mk(1, 10, 150)}, '{flag:0, addr:mk(1, 10, 300)},
      '{flag:1, addr:mk(1, 11, 150)}, '{flag:1, addr:mk(1, 11, 300)},
      '{flag:0, addr:mk(1, 12, 150)}, '{flag:0, addr:mk(1, 12, 300)},
      '{flag:0, addr:mk(1, 254, 500)}};
    rst = 1; reverse = 0; modifying = 0;
    repeat (3) @(posedge clk); #1 rst = 0;
    repeat (2 * 320000) @(posedge clk);
    wait (field_blank); #1 reverse = 1;
    repeat (320000) @(posedge clk);
    #1 modifying = 1;
    repeat (160000) @(posedge clk);
    #1;
    // field lengths alternate 312 and 312.5 lines
    check(field_lens.size() >= 5, "fields seen");
    foreach (field_lens[i])
      check(field_lens[i] == 159744 || field_lens[i] == 160000, $sformatf("field length %0d", field_lens[i]));
    for (int i = 1; i < field_lens.size(); i++)
      check(field_lens[i] != field_lens[i-1], "field lengths alternate");
    check(gaps768 >= 3, "interlace gap once per frame");
    check(n_moves >= 3 * list.size(), "store moved for every word each frame");
    check(n_temp > 0 && n_inhibit > 0, "temporary words and inhibit seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
