// tb_path_register: self-checking test of the B/C word register.
// Random shifts with random input selection, break and clear; the expected
// contents are tracked by a reference variable updated from the same rules.
module tb_path_register;
  import vdu_pkg::*;

  logic clk = 0, rst, clr, shift, sel_alt, brk;
  word_t in_main, in_alt, q, expect_q;
  int checks = 0, failures = 0;
  int n_alt = 0, n_main = 0, n_brk = 0, n_clr = 0;

  path_register dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst = 1; clr = 0; shift = 0; sel_alt = 0; brk = 0; in_main = '0; in_alt = '0;
    @(posedge clk); #1 rst = 0;
    expect_q = WORD_ZERO;
    for (int i = 0; i < 2000; i++) begin
      clr = ($urandom % 10) == 0; shift = 1'($urandom); sel_alt = 1'($urandom);
      brk = ($urandom % 6) == 0;
      in_main = word_t'($urandom); in_alt = word_t'($urandom);
      if (clr) begin expect_q = WORD_ZERO; n_clr++; end
      else if (shift) begin
        if (brk) begin expect_q = WORD_ZERO; n_brk++; end
        else if (sel_alt) begin expect_q = in_alt; n_alt++; end
        else begin expect_q = in_main; n_main++; end
      end
      @(posedge clk); #1;
      checks++;
      if (q !== expect_q) begin failures++; $display("FAIL step %0d q=%h exp=%h", i, q, expect_q); end
    end
    if (n_alt == 0 || n_main == 0 || n_brk == 0 || n_clr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
