// tb_weight_memory: self-checking test of weight_memory.
// Loads random rows, reads them back in random order and checks the data one
// cycle after the read and that it holds until the next read.
module tb_weight_memory;
  import sas_pkg::*;
  localparam int ROWS = 256;
  logic clk = 0, ld_we = 0, rd_en = 0;
  logic [7:0] ld_row = '0, rd_row = '0;
  row_t ld_data = '0, rdata;
  row_t ref_mem [ROWS];
  int checks = 0, failures = 0;

  weight_memory #(.ROWS(ROWS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < ROWS; r++) begin
      for (int i = 0; i < LANES; i++) ref_mem[r][i] = word_t'($urandom);
      @(negedge clk); ld_we = 1; ld_row = 8'(r); ld_data = ref_mem[r];
    end
    @(negedge clk); ld_we = 0;
    for (int n = 0; n < 300; n++) begin
      automatic int r = $urandom_range(ROWS-1);
      @(negedge clk); rd_en = 1; rd_row = 8'(r);
      @(negedge clk); rd_en = 0;
      checks++;
      if (rdata !== ref_mem[r]) begin failures++; $display("FAIL row %0d", r); end
      @(negedge clk);
      checks++;
      if (rdata !== ref_mem[r]) begin failures++; $display("FAIL hold row %0d", r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
