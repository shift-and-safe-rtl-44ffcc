// tb_cbit_array: self-checking test of cbit_array.
// Programs random C bits into every row of a small array, then reads rows in
// random order and checks each against the programmed value one cycle later.
module tb_cbit_array;
  import sas_pkg::*;
  localparam int ROWS = 128;
  logic clk = 0, prog_we = 0, rd_en = 0;
  logic [6:0] prog_row = '0, rd_row = '0;
  crow_t prog_c, rd_c;
  crow_t ref_mem [ROWS];
  int checks = 0, failures = 0;

  cbit_array #(.ROWS(ROWS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prog_c = crow_t'('0);
    for (int r = 0; r < ROWS; r++) begin
      ref_mem[r] = crow_t'({$urandom, $urandom});
      @(negedge clk); prog_we = 1; prog_row = 7'(r); prog_c = ref_mem[r];
    end
    @(negedge clk); prog_we = 0;
    for (int n = 0; n < 300; n++) begin
      automatic int r = $urandom_range(ROWS-1);
      @(negedge clk); rd_en = 1; rd_row = 7'(r);
      @(negedge clk); rd_en = 0;
      checks++;
      if (rd_c !== ref_mem[r]) begin
        failures++;
        $display("FAIL row %0d got %h exp %h", r, rd_c, ref_mem[r]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
