// tb_magnitude_comparators: self-checking test of the comparators.
// Random words (with many equal and zero cases) are compared; references
// are computed from integer values with the flag bit masked off.
module tb_magnitude_comparators;
  import vdu_pkg::*;

  word_t a_word, b_word, d_word;
  addr_t beam;
  logic a_lt_d, a_gt_b, a_eq_b, a_zero, b_zero, d_zero, d_eq_beam;
  int checks = 0, failures = 0;

  magnitude_comparators dut (.*);

  function automatic word_t rnd_word();
    int k = $urandom % 8;
    word_t w = word_t'($urandom);
    if (k == 0) w = WORD_ZERO;
    if (k == 1) w = '{flag: 1'b1, addr: '0};
    return w;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s a=%h b=%h d=%h e=%h", what, a_word, b_word, d_word, beam); end
  endtask

  initial begin
    int unsigned av, bv, dv;
    for (int i = 0; i < 5000; i++) begin
      a_word = rnd_word(); b_word = rnd_word(); d_word = rnd_word(); beam = addr_t'($urandom);
      case ($urandom % 5)
        0: b_word = '{flag: ~a_word.flag, addr: a_word.addr};
        1: beam = d_word.addr;
        2: d_word = '{flag: 1'($urandom), addr: a_word.addr + 1};
        default: ;
      endcase
      #1;
      av = a_word % (1 << 18); bv = b_word % (1 << 18); dv = d_word % (1 << 18);
      check(a_lt_d == (av < dv), "A<D");
      check(a_gt_b == (av > bv), "A>B");
      check(a_eq_b == (av == bv), "A=B");
      check(a_zero == (a_word == 0), "A=0");
      check(b_zero == (b_word == 0), "B=0");
      check(d_zero == (d_word == 0), "D=0");
      check(d_eq_beam == (d_word != 0 && dv == beam), "D=E");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
