// tb_register_a: self-checking test of register A.
// Checks the preset from the adder sum and OUT1 flag on the first clock of
// STP.(OUT3=004) only, the hold while STP stays high, the clear while
// OUT3 = 004 and STP is low, the load from register D on a shift with the
// D-to-A path selected, and the priority of the preset over a shift.
module tb_register_a;
  import vdu_pkg::*;

  logic clk = 0, rst, stp, out3_feed, flag, shift, from_d, pst;
  addr_t sum;
  word_t d_word, a_word;
  int checks = 0, failures = 0;

  register_a dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    addr_t s; logic f; word_t dw;
    rst = 1; stp = 0; out3_feed = 0; flag = 0; shift = 0; from_d = 0; sum = '0; d_word = '0;
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 100; i++) begin
      s = addr_t'($urandom | 1); f = 1'($urandom);
      sum = s; flag = f; out3_feed = 1; stp = 0;
      @(posedge clk); #1;
      check(a_word == WORD_ZERO, "cleared while OUT3=004 and STP low");
      stp = 1; #1;
      check(pst == 1, "PST pulse on STP");
      @(posedge clk); #1;
      check(a_word.addr == s && a_word.flag == f, "preset from adder and flag");
      check(pst == 0, "PST only one clock");
      sum = ~s; @(posedge clk); #1;
      check(a_word.addr == s, "held while STP stays high");
      // shift without the D path keeps A
      d_word = '{flag: 1'($urandom), addr: addr_t'($urandom)};
      shift = 1; from_d = 0; @(posedge clk); #1;
      check(a_word.addr == s, "shift without path keeps A");
      from_d = 1; dw = d_word; @(posedge clk); #1;
      check(a_word == dw, "D into A on shift");
      shift = 0; from_d = 0;
      out3_feed = 0; stp = 0; @(posedge clk); #1;
      check(a_word == dw, "held when OUT3 is not 004");
    end
    // preset wins over a simultaneous shift
    out3_feed = 1; stp = 0; @(posedge clk); #1;
    sum = 18'h12345; flag = 1; shift = 1; from_d = 1; d_word = '{flag: 0, addr: 18'h00777};
    stp = 1; @(posedge clk); #1;
    check(a_word.addr == 18'h12345 && a_word.flag, "preset has priority");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
