// tb_sas_read_port: self-checking test of sas_read_port.
// The testbench plays the memory (one-cycle row reads that hold), the C-bit
// array and the Safe Pointer. Rows are filled with random stored words and
// C codes and the safe bank with the values of the C = 11 words, in row and
// lane order at descending addresses from the last word. Every row is then
// read in order with random backpressure and each output word is compared
// with the expected value: as stored (00), shifted back (01), unflipped and
// shifted back (10) or the safe-bank value (11). It also checks the latency
// from request to valid: 2 cycles without C = 11 words, n + 3 with n.
module tb_sas_read_port;
  import sas_pkg::*;
  localparam int NROWS = 120;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready;
  logic [15:0] req_row = '0;
  logic out_valid, out_ready = 0;
  row_t out_data;
  logic m_en;
  logic [15:0] m_row;
  row_t m_rdata;
  logic c_rd_en;
  logic [15:0] c_rd_row;
  crow_t c_rd;
  logic [19:0] sp = 20'hFFFFF;
  logic sp_adv;
  int checks = 0, failures = 0;

  sas_read_port dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t mem [int];
  crow_t ctab [int];

  always @(posedge clk) begin
    if (c_rd_en) c_rd <= ctab[int'(c_rd_row)];
    if (m_en)
      for (int i = 0; i < LANES; i++)
        m_rdata[i] <= mem.exists(int'(m_row) * 16 + i) ? mem[int'(m_row) * 16 + i] : 16'h0;
    if (sp_adv) sp <= sp - 1;
  end

  function automatic word_t rev(input word_t a);
    word_t r = '0;
    for (int i = 0; i < 16; i++) if (a[i]) r = r | word_t'(1 << (15 - i));
    return r;
  endfunction
  function automatic word_t shr2(input word_t a);
    return (a & 16'h8000) | ((a & 16'h7FFF) >> 2);
  endfunction

  word_t expd [NROWS][LANES];
  int    nlh  [NROWS];

  initial begin
    int safe_addr = 20'hFFFFF;
    for (int r = 0; r < NROWS; r++) begin
      crow_t c;
      nlh[r] = 0;
      for (int i = 0; i < LANES; i++) begin
        automatic word_t s = word_t'($urandom);
        c[i] = cbits_t'($urandom_range(3));
        if (r % 8 == 0) c[i] = C_OK;
        if (r % 8 == 1) c[i] = C_LH;
        mem[r * 16 + i] = s;
        case (c[i])
          C_OK: expd[r][i] = s;
          C_L:  expd[r][i] = shr2(s);
          C_H:  expd[r][i] = shr2(rev(s));
          default: begin
            expd[r][i] = word_t'($urandom);
            mem[safe_addr] = expd[r][i];
            safe_addr--;
            nlh[r]++;
          end
        endcase
      end
      ctab[r] = c;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < NROWS; r++) begin
      automatic int lat = 0;
      @(negedge clk); req_valid = 1; req_row = 16'(r);
      #1;
      while (!req_ready) begin @(negedge clk); #1; end
      @(negedge clk); req_valid = 0; lat = 1;
      while (!out_valid) begin @(negedge clk); lat++; end
      checks++;
      if (lat != (nlh[r] == 0 ? 2 : nlh[r] + 3)) begin
        failures++; $display("FAIL row %0d latency %0d with %0d L&H words", r, lat, nlh[r]);
      end
      while ($urandom_range(2) == 0) @(negedge clk);   // backpressure
      for (int i = 0; i < LANES; i++) begin
        checks++;
        if (out_data[i] !== expd[r][i]) begin
          failures++;
          $display("FAIL row %0d lane %0d: got %h exp %h", r, i, out_data[i], expd[r][i]);
        end
      end
      out_ready = 1;
      @(negedge clk); out_ready = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
