// tb_sas_write_port: self-checking test of sas_write_port.
// The testbench plays the memory (row array with word enables), the C-bit
// array (one-cycle read) and the Safe Pointer. It writes random blocks whose
// words carry random C codes and checks: every C = 00/01/10 word lands in its
// row in the expected representation (computed here with masks and a
// reversal loop), C = 11 cells of the row are left untouched, the C = 11
// values appear in the safe bank in order at descending addresses from the
// last word, and each block takes exactly 2 + (number of C = 11 words)
// cycles of the port.
module tb_sas_write_port;
  import sas_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  logic [15:0] in_row = '0;
  row_t in_data = '0;
  logic m_en, m_we;
  logic [15:0] m_row;
  logic [LANES-1:0] m_wen;
  row_t m_wdata;
  logic c_rd_en;
  logic [15:0] c_rd_row;
  crow_t c_rd;
  logic [19:0] sp = 20'hFFFFF;
  logic sp_adv;
  int checks = 0, failures = 0;

  sas_write_port dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // testbench memories
  word_t mem [int];          // word address -> value
  crow_t ctab [int];         // row -> C bits
  localparam word_t UNTOUCHED = 16'hDEAD;

  always @(posedge clk) begin
    if (c_rd_en) c_rd <= ctab.exists(int'(c_rd_row)) ? ctab[int'(c_rd_row)] : crow_t'('0);
    if (m_en && m_we)
      for (int i = 0; i < LANES; i++)
        if (m_wen[i]) mem[int'(m_row) * 16 + i] = m_wdata[i];
    if (sp_adv) sp <= sp - 1;
  end

  function automatic word_t rev(input word_t a);
    word_t r = '0;
    for (int i = 0; i < 16; i++) if (a[i]) r = r | word_t'(1 << (15 - i));
    return r;
  endfunction
  function automatic word_t shl2(input word_t a);
    return (a & 16'h8000) | ((a << 2) & 16'h7FFC);
  endfunction

  int busy_cycles;
  always @(posedge clk) if (!in_ready) busy_cycles <= busy_cycles + 1;

  initial begin
    word_t safe_exp [$];
    int nlh_total = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 100; b++) begin
      crow_t c;
      automatic int nlh = 0;
      automatic int row = b * 3 + 1;
      for (int i = 0; i < LANES; i++) begin
        c[i] = cbits_t'($urandom_range(3));
        if (b % 10 == 0) c[i] = C_OK;
        if (b % 10 == 1) c[i] = C_LH;
        in_data[i] = word_t'($urandom);
        mem[row * 16 + i] = UNTOUCHED;
        if (c[i] == C_LH) begin nlh++; safe_exp.push_back(in_data[i]); end
      end
      ctab[row] = c;
      @(negedge clk);
      in_valid = 1; in_row = 16'(row);
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      busy_cycles = 0;
      @(negedge clk); in_valid = 0;
      while (!in_ready) @(negedge clk);
      checks++;
      if (busy_cycles != 1 + nlh) begin
        failures++;
        $display("FAIL block %0d: port busy %0d cycles after accept, exp %0d", b, busy_cycles, 1 + nlh);
      end
      for (int i = 0; i < LANES; i++) begin
        word_t exp;
        case (c[i])
          C_OK: exp = in_data[i];
          C_L:  exp = shl2(in_data[i]);
          C_H:  exp = rev(shl2(in_data[i]));
          default: exp = UNTOUCHED;
        endcase
        checks++;
        if (mem[row * 16 + i] !== exp) begin
          failures++;
          $display("FAIL block %0d lane %0d c=%0d: got %h exp %h", b, i, c[i], mem[row*16+i], exp);
        end
      end
      nlh_total += nlh;
    end
    for (int n = 0; n < safe_exp.size(); n++) begin
      checks++;
      if (mem[20'hFFFFF - n] !== safe_exp[n]) begin
        failures++;
        $display("FAIL safe entry %0d: got %h exp %h", n, mem[20'hFFFFF - n], safe_exp[n]);
      end
    end
    checks++;
    if (sp != 20'(20'hFFFFF - nlh_total)) begin failures++; $display("FAIL final SP"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
