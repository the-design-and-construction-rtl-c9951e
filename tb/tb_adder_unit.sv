// tb_adder_unit: self-checking test of the base address register, the
// modifier adder and the interrupt bistable.
// Drives random base addresses and OUT1/OUT2 modifiers and compares the sum
// with an arithmetic reference written here bit field by bit field; checks
// the clear-then-load protocol (load ORs into the register), the base change
// on STP.(OUT3=002) with its interrupt and release when STP falls, and the
// interrupt from the store control and from the master computer.
module tb_adder_unit;
  import vdu_pkg::*;

  logic clk = 0, rst;
  logic [16:0] base_in;
  logic base_clear, base_load, stp, set_int_store, master_int;
  logic [7:0] out1, out2, out3;
  addr_t base_addr, sum;
  logic flag, int_set;
  int checks = 0, failures = 0;

  adder_unit dut (.*);

  always #5 clk = ~clk;

  function automatic logic [17:0] ref_sum(input logic [16:0] b, input logic [7:0] o1, input logic [7:0] o2);
    int unsigned s;
    s = b + (o1 % 128) + (o2 % 128) * 512 + (o2 / 128) * 131072;
    return s[17:0];
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic load_base(input logic [16:0] b);
    base_clear = 1; @(posedge clk); #1 base_clear = 0;
    base_in = b; base_load = 1; @(posedge clk); #1 base_load = 0;
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [16:0] b, b2;
    logic [17:0] expect_sum;
    rst = 1; base_in = 0; base_clear = 0; base_load = 0; stp = 0;
    set_int_store = 0; master_int = 0; out1 = 0; out2 = 0; out3 = OUT3_IDLE;
    repeat (2) @(posedge clk); #1 rst = 0;

    // sums
    for (int i = 0; i < 200; i++) begin
      b = 17'($urandom);
      load_base(b);
      out1 = 8'($urandom); out2 = 8'($urandom); #1;
      check(base_addr == {1'b0, b}, "base load");
      check(sum == ref_sum(b, out1, out2), $sformatf("sum b=%0h o1=%0o o2=%0o got %0h", b, out1, out2, sum));
      check(flag == out1[7], "flag");
    end

    // load without a clear merges the addresses
    load_base(17'h00f0);
    base_in = 17'h0f00; base_load = 1; @(posedge clk); #1 base_load = 0;
    check(base_addr == 18'h0ff0, "load ORs into register");

    // base change with OUT3 = 002
    for (int i = 0; i < 50; i++) begin
      b = 17'($urandom);
      load_base(b);
      out1 = 8'($urandom); out2 = {1'b0, 7'($urandom % 64)}; out3 = OUT3_BASE; #1;
      expect_sum = ref_sum(b, out1, out2);
      check(int_set == 0, "no interrupt before STP");
      stp = 1; @(posedge clk); #1;
      b2 = expect_sum[16:0];
      check(base_addr == {1'b0, b2}, "base moved");
      repeat (3) @(posedge clk); #1;
      check(base_addr == {1'b0, b2}, "base moved only once per STP");
      check(int_set == 1, "interrupt after base change");
      stp = 0; @(posedge clk); #1;
      check(int_set == 0, "interrupt released when STP falls");
      out3 = OUT3_IDLE;
    end

    // interrupt from the store control, held until STP falls
    out3 = OUT3_FEED; stp = 1; @(posedge clk); #1;
    check(int_set == 0, "no interrupt without a source");
    set_int_store = 1; @(posedge clk); #1 set_int_store = 0;
    repeat (3) @(posedge clk); #1;
    check(int_set == 1, "store interrupt held");
    stp = 0; @(posedge clk); #1;
    check(int_set == 0, "store interrupt released");
    // master computer interrupt while halted awaiting data
    out3 = OUT3_IDLE; stp = 1; @(posedge clk); #1;
    master_int = 1; @(posedge clk); #1 master_int = 0;
    check(int_set == 1, "master interrupt");
    stp = 0; @(posedge clk); #1;
    check(int_set == 0, "master interrupt released");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
