// tb_sram_bank: self-checking test of sram_bank.
// Writes random rows with random per-word enables into a small bank, keeps a
// reference copy in the testbench and reads every row back, checking the
// one-cycle read latency and that rdata holds between reads.
module tb_sram_bank;
  import sas_pkg::*;
  localparam int ROWS = 64;
  logic clk = 0, en = 0, we = 0;
  logic [5:0] row = '0;
  logic [LANES-1:0] wen = '0;
  row_t wdata = '0, rdata;
  row_t ref_mem [ROWS];
  int checks = 0, failures = 0;

  sram_bank #(.ROWS(ROWS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input row_t got, input row_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    // fill every row completely
    for (int r = 0; r < ROWS; r++) begin
      for (int i = 0; i < LANES; i++) begin
        ref_mem[r][i] = word_t'($urandom);
      end
      @(negedge clk); en = 1; we = 1; row = 6'(r); wen = '1; wdata = ref_mem[r];
    end
    // partial writes
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      en = 1; we = 1; row = 6'($urandom_range(ROWS-1)); wen = LANES'($urandom);
      for (int i = 0; i < LANES; i++) wdata[i] = word_t'($urandom);
      for (int i = 0; i < LANES; i++) if (wen[i]) ref_mem[row][i] = wdata[i];
    end
    // read back
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk); en = 1; we = 0; row = 6'(r);
      @(negedge clk); en = 0;
      chk(rdata, ref_mem[r], "read");
      @(negedge clk);
      chk(rdata, ref_mem[r], "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
