// tb_dispatcher: self-checking test of dispatcher.
// Pushes a numbered sequence of vectors with random stalls and bubbles and
// checks that lane i delivers, at every enabled step s, the vector pushed at
// step s - i (zero for bubbles and before the start).
module tb_dispatcher;
  import sas_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, in_valid = 0;
  word_t [LANES-1:0] in_vec, out_vec;
  word_t hist [$];   // per step: base value of the pushed vector, 0 = bubble
  int checks = 0, failures = 0;

  dispatcher dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_vec = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 400; s++) begin
      word_t base;
      @(negedge clk);
      en = ($urandom_range(4) != 0);
      in_valid = ($urandom_range(5) != 0);
      base = word_t'(s * 16 + 1);
      for (int i = 0; i < LANES; i++) in_vec[i] = base + word_t'(i);
      if (en) begin
        hist.push_back(in_valid ? base : '0);
        // combinational check of what the array sees this step
        #1;
        for (int i = 0; i < LANES; i++) begin
          word_t exp;
          automatic int idx = hist.size() - 1 - i;
          exp = (idx < 0 || hist[idx] == '0) ? '0 : hist[idx] + word_t'(i);
          checks++;
          if (out_vec[i] !== exp) begin
            failures++;
            $display("FAIL step %0d lane %0d: got %h exp %h", s, i, out_vec[i], exp);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
