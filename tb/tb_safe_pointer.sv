// tb_safe_pointer: self-checking test of safe_pointer.
// Checks the start at the last address, one decrement per use, restart on a
// role change, holding still without a use, and the overflow flag when a
// small safe bank (8 words) is used more than 8 times.
module tb_safe_pointer;
  localparam int AW = 8, SW = 8;
  logic clk = 0, rst_n = 0, restart = 0, advance = 0;
  logic [AW-1:0] sp;
  logic overflow;
  int checks = 0, failures = 0;

  safe_pointer #(.ADDR_W(AW), .SAFE_WORDS(SW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    int exp_sp;
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk(sp, 255, "reset value");
    exp_sp = 255;
    for (int n = 0; n < 5; n++) begin
      @(negedge clk); advance = 1;
      @(negedge clk); advance = 0; exp_sp--;
      chk(sp, exp_sp, "advance");
      @(negedge clk);
      chk(sp, exp_sp, "hold");
    end
    @(negedge clk); restart = 1;
    @(negedge clk); restart = 0;
    chk(sp, 255, "restart");
    // use all 8 entries: pointer stops at the lowest, no overflow yet
    for (int n = 0; n < SW; n++) begin
      @(negedge clk); advance = 1;
    end
    @(negedge clk); advance = 0;
    chk(sp, 256 - SW, "lowest entry");
    chk(overflow, 0, "no overflow at capacity");
    @(negedge clk); advance = 1;
    @(negedge clk); advance = 0;
    chk(overflow, 1, "overflow");
    @(negedge clk); restart = 1;
    @(negedge clk); restart = 0;
    chk(overflow, 0, "overflow cleared");
    chk(sp, 255, "restart after overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
