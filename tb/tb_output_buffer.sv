// tb_output_buffer: self-checking test of output_buffer.
// Captures random accumulator matrices (small, large and saturating values),
// drains the 16 columns with random backpressure and checks every word
// against a rescaling done with integer division (floor) and saturation, as
// well as the column order and the end of valid after the last column.
module tb_output_buffer;
  import sas_pkg::*;
  logic clk = 0, rst_n = 0, capture = 0, out_ready = 0;
  logic [15:0][15:0][47:0] acc;
  logic [5:0] shift = '0;
  logic out_valid;
  logic [3:0] out_col;
  word_t [15:0] out_data;
  int checks = 0, failures = 0;

  output_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t model(input longint v, input int sh);
    longint d = longint'(1) << sh;
    longint q = (v >= 0) ? v / d : -((-v + d - 1) / d);
    longint m = (q < 0) ? -q : q;
    if (m > 32767) m = 32767;
    return {(q < 0 && m != 0), 15'(m)};
  endfunction

  initial begin
    longint vals [16][16];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 30; n++) begin
      automatic int sh = $urandom_range(0, 20);
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++) begin
          automatic int kind = $urandom_range(2);
          longint v;
          if (kind == 0)      v = longint'($signed($urandom_range(0, 65535))) - 32768;
          else if (kind == 1) v = longint'($signed($urandom)) ;
          else                v = (longint'($signed($urandom)) <<< 12);
          vals[i][j] = v;
          acc[i][j] = 48'(v);
        end
      @(negedge clk); capture = 1; shift = 6'(sh);
      @(negedge clk); capture = 0;
      for (int j = 0; j < 16; j++) begin
        while (1) begin
          out_ready = ($urandom_range(2) != 0);
          #1;
          if (out_valid && out_ready) break;
          @(negedge clk);
        end
        checks++;
        if (out_col != 4'(j)) begin failures++; $display("FAIL col %0d got %0d", j, out_col); end
        for (int i = 0; i < 16; i++) begin
          checks++;
          if (out_data[i] !== model(vals[i][j], sh)) begin
            failures++;
            $display("FAIL (%0d,%0d) v=%0d sh=%0d got %h exp %h", i, j, vals[i][j], sh,
                     out_data[i], model(vals[i][j], sh));
          end
        end
        @(negedge clk);
      end
      out_ready = 0;
      checks++;
      if (out_valid) begin failures++; $display("FAIL valid after last column"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
