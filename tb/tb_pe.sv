// tb_pe: self-checking test of pe.
// Feeds random sign-magnitude operand pairs, compares the accumulator with a
// sum computed in integer arithmetic, and checks operand forwarding, stall
// (en low keeps everything) and clear.
module tb_pe;
  import sas_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, clr = 0;
  word_t a_in = '0, w_in = '0, a_out, w_out;
  logic signed [47:0] acc;
  int checks = 0, failures = 0;

  pe dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sm_val(input word_t v);
    return v[15] ? -longint'(v[14:0]) : longint'(v[14:0]);
  endfunction

  task automatic chk(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    longint sum = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      en = ($urandom_range(3) != 0);
      a_in = word_t'($urandom); w_in = word_t'($urandom);
      if (n % 97 == 0) begin a_in = 16'h7fff; w_in = 16'hffff; end
      if (en) sum += sm_val(a_in) * sm_val(w_in);
      @(posedge clk); #1;
      chk(acc, sum, "accumulate");
      if (en) begin
        chk(a_out, a_in, "a forward");
        chk(w_out, w_in, "w forward");
      end
      if (n % 50 == 49) begin
        @(negedge clk); clr = 1; en = 1;
        @(negedge clk); clr = 0; en = 0; sum = 0;
        chk(acc, 0, "clear");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
