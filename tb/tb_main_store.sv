// tb_main_store: self-checking test of the main store and register D.
// Shifts random words in at irregular intervals and checks that each word
// appears in register D exactly DEPTH+1 shifts after it entered, and that D
// holds still between shifts.
module tb_main_store;
  import vdu_pkg::*;

  localparam int DEPTH = 64;
  logic clk = 0, rst, shift;
  word_t c_word, d_word;
  word_t hist [$];
  int checks = 0, failures = 0;

  main_store #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    word_t prev;
    rst = 1; shift = 0; c_word = '0;
    @(posedge clk); #1 rst = 0;
    // fill with zeros (an ERASE pass)
    shift = 1; c_word = '0;
    repeat (DEPTH + 1) @(posedge clk);
    #1 shift = 0;
    checks++; if (d_word != WORD_ZERO) failures++;
    for (int i = 0; i < 1500; i++) begin
      shift = 1'($urandom);
      c_word = word_t'($urandom);
      prev = d_word;
      if (shift) hist.push_back(c_word);
      @(posedge clk); #1;
      checks++;
      if (!shift) begin
        if (d_word != prev) begin failures++; $display("FAIL D moved without shift"); end
      end else if (hist.size() >= DEPTH + 1) begin
        if (d_word != hist[hist.size() - DEPTH - 1]) begin
          failures++; $display("FAIL D=%h exp=%h", d_word, hist[hist.size() - DEPTH - 1]);
        end
      end else if (d_word != WORD_ZERO) begin
        failures++; $display("FAIL D should still be empty");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
