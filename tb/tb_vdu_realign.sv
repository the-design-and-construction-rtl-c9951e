// tb_vdu_realign: the worst case for getting the store ready for the next
// frame, with the longest store the timing allows.
// The store holds only two words: one near the start of the frame and one
// at the last address the raster reaches. After the last word is read, the
// whole ring (all but the two occupied positions) must pass register D at
// the CLK II rate (one shift every four clocks) before the beam arrives at
// the first word again. Only the unused lines and the field blanking are
// available for this, about 3.7 ms here; 6,800 words need 6,801 shifts of
// 0.5 us = 3.4 ms, so the store is built with DEPTH = 6800.
// Both words are one-section (flag set) dots. For three frames the test
// checks that each word is read exactly once per frame, that the video is
// bright at exactly those two sections and nowhere else, and it measures the
// realignment time from the last read until the first word is back in D.
// Frames are counted from the fall of the field bit, which is also the
// moment the last word has just been read.
module tb_vdu_realign;
  timeunit 1ns; timeprecision 1ps;
  import vdu_pkg::*;

  localparam int DEPTH = 6800;

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

  // first visible section of line 1 of the first field; last section the
  // raster reaches in the second field
  localparam word_t LOW  = '{flag: 1'b1, addr: {1'b0, 8'd1, 9'd96}};
  localparam word_t HIGH = '{flag: 1'b1, addr: {1'b1, 8'd255, 9'd255}};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (beam=%h t=%0t)", what, beam, $time);
    end
  endtask

  task automatic put(input word_t w);
    int t = 0;
    @(posedge clk); #1 base_clear = 1;
    @(posedge clk); #1 base_clear = 0; base_in = w.addr[16:0]; base_load = 1;
    @(posedge clk); #1 base_load = 0;
    out1 = {w.flag, 7'd0}; out2 = {w.addr[17], 7'd0}; out3 = OUT3_FEED;
    repeat (3) @(posedge clk);
    #1 stp = 1;
    while (!int_out && t < 200000) begin @(posedge clk); t++; end
    check(int_out, "interrupt arrived");
    @(posedge clk); #1 stp = 0;
    repeat (2) @(posedge clk);
  endtask

  logic field_q = 0;
  always @(posedge clk) field_q <= dut.u_mon.field;

  initial begin
    #400ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int reads, bright, t_last, worst, cyc, frames;
    bit waiting;
    rst = 1; erase = 0; insert = 0; delete = 0; base_clear = 0; base_load = 0; base_in = '0;
    master_int = 0; reverse = 0; stp = 0; out1 = 0; out2 = 0; out3 = OUT3_IDLE;
    repeat (4) @(posedge clk); #1 rst = 0;

    @(posedge clk); #1 erase = 1;
    repeat ((DEPTH + 4) * 4 + 8) @(posedge clk);
    #1 erase = 0;

    insert = 1;
    put(HIGH);
    put(LOW);
    out3 = OUT3_IDLE; insert = 0;

    // skip to a frame start, then watch three frames
    @(posedge clk);
    while (!(field_q && !dut.u_mon.field)) @(posedge clk);
    @(posedge clk);
    while (!(field_q && !dut.u_mon.field)) @(posedge clk);
    worst = 0; reads = 0; bright = 0; waiting = 0; cyc = 0; frames = 0;
    while (frames < 3) begin
      @(posedge clk);
      cyc++;
      if (field_q && !dut.u_mon.field) frames++;
      if (dut.u_mon.move_store) begin
        reads++;
        check(reg_d == (beam[17] ? HIGH : LOW), "word read at its own address");
        if (reg_d == HIGH) begin t_last = cyc; waiting = 1; end
      end
      if (waiting && reg_d == LOW) begin
        waiting = 0;
        if (cyc - t_last > worst) worst = cyc - t_last;
      end
      if (video) begin
        bright++;
        check(beam == LOW.addr || beam == HIGH.addr, "bright only at the stored dots");
      end
    end
    check(reads == 6, "each word read once per frame");
    check(bright == 6, "two bright sections per frame");
    // 6,801 shifts at one per four clocks, plus up to one CLK II period
    $display("realignment: %0d clocks (%0d us) for a %0d-word store",
             worst, worst / 8, DEPTH);
    check(worst >= (DEPTH + 1) * 4 && worst <= (DEPTH + 2) * 4 + 4, "realignment time");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
