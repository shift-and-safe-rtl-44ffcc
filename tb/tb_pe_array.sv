// tb_pe_array: self-checking test of pe_array.
// Computes a 16 x 16 output tile of a random K-deep matrix product: feeds
// the operands with the systolic skew (row i and column j delayed by i and
// j steps), with random stalls, drains with ROWS + COLS - 2 zero steps and
// compares every accumulator with the product computed in the testbench.
// Also checks that the result is complete after exactly K + 30 steps.
module tb_pe_array;
  import sas_pkg::*;
  localparam int K = 24;
  logic clk = 0, rst_n = 0, en = 0, clr = 0;
  word_t [15:0] a_in, w_in;
  logic [15:0][15:0][47:0] acc;
  word_t A [16][K];
  word_t W [K][16];
  longint expv [16][16];
  int checks = 0, failures = 0;

  pe_array dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint smv(input word_t v);
    return v[15] ? -longint'(v[14:0]) : longint'(v[14:0]);
  endfunction

  initial begin
    a_in = '0; w_in = '0;
    for (int rep = 0; rep < 3; rep++) begin
      for (int i = 0; i < 16; i++)
        for (int k = 0; k < K; k++) begin
          A[i][k] = word_t'($urandom);
          W[k][i] = word_t'($urandom);
        end
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++) begin
          expv[i][j] = 0;
          for (int k = 0; k < K; k++) expv[i][j] += smv(A[i][k]) * smv(W[k][j]);
        end
      if (rep == 0) begin repeat (2) @(negedge clk); rst_n = 1; end
      @(negedge clk); clr = 1;
      @(negedge clk); clr = 0;
      for (int s = 0; s < K + 30; s++) begin
        // random stall cycles
        while ($urandom_range(3) == 0) begin
          @(negedge clk); en = 0;
          a_in = word_t'($urandom); w_in = word_t'($urandom);   // ignored while stalled
        end
        @(negedge clk);
        en = 1;
        for (int i = 0; i < 16; i++) begin
          a_in[i] = (s - i >= 0 && s - i < K) ? A[i][s-i] : '0;
          w_in[i] = (s - i >= 0 && s - i < K) ? W[s-i][i] : '0;
        end
        if (s == K + 29) begin
          // one step before the end, PE (15,15) must still miss its last term
          #1;
          checks++;
          if ($signed(acc[15][15]) == expv[15][15] && smv(A[15][K-1]) * smv(W[K-1][15]) != 0) begin
            failures++; $display("FAIL result complete too early");
          end
        end
      end
      @(negedge clk); en = 0;
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++) begin
          checks++;
          if ($signed(acc[i][j]) != expv[i][j]) begin
            failures++;
            $display("FAIL rep %0d (%0d,%0d) got %0d exp %0d", rep, i, j, $signed(acc[i][j]), expv[i][j]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
