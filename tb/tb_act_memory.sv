// tb_act_memory: self-checking test of act_memory with stuck-at cells.
// A small memory (8 banks of 64 rows) gets a pseudo-random fault map: each
// cell of banks 0..6 is stuck with probability RATE/1000, at a value taken
// from the same hash. The C bits are programmed from that map as the
// fabrication test would (faults only in the low byte: 01, only in the high
// byte: 10, both: 11). A layer of NR rows of activations (mostly small
// magnitudes, random signs, some outliers) is written in output role, then
// read back in input role after a role change, with random backpressure.
// Every word is compared with a model of the path computed here: encoding,
// stuck cells, decoding, and exact values for C = 11 words from the safe
// bank. A second layer with every cell of every word faulty overflows the
// 1024-word safe bank and must raise safe_overflow.
module tb_act_memory;
  import sas_pkg::*;
  localparam int BANKS = 8, RPB = 64, ROWS = BANKS * RPB, RW = 9, AW = 13;
  localparam int NR = 300;
  int rate = 30;   // stuck cells per 1000
  bit all_faulty = 0;

  logic clk = 0, rst_n = 0, wr_mode = 0, restart = 0;
  logic w_valid = 0, w_ready;
  logic [RW-1:0] w_row = '0;
  row_t w_data = '0;
  logic r_req_valid = 0, r_req_ready;
  logic [RW-1:0] r_req_row = '0;
  logic r_valid, r_ready = 0;
  row_t r_data;
  logic cb_we = 0;
  logic [RW-1:0] cb_row = '0;
  crow_t cb_c;
  logic [RW-1:0] fi_row;
  row_t fi_mask, fi_val;
  logic [AW-1:0] sp;
  logic safe_overflow;
  int checks = 0, failures = 0;

  act_memory #(.BANKS(BANKS), .ROWS_PER_BANK(RPB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned hash(input int unsigned a);
    int unsigned x = a * 32'h9E3779B1;
    x ^= x >> 15; x *= 32'h85EBCA77; x ^= x >> 13; x *= 32'hC2B2AE3D; x ^= x >> 16;
    return x;
  endfunction

  // stuck-at map of one row: mask and stuck values
  // (fmap_raw drives the fault port for every row, the safe bank included,
  // so a memory that wrongly lets faults into the safe bank is caught; the
  // expected contents use fmap, which treats the safe bank as fault-free)
  function automatic void fmap_raw(input int row, output row_t m, output row_t v);
    m = '0; v = '0;
    for (int i = 0; i < LANES; i++)
      for (int b = 0; b < 16; b++) begin
        int unsigned h = hash(row * 256 + i * 16 + b);
        m[i][b] = all_faulty || (h % 1000 < rate);
        v[i][b] = h[20];
      end
  endfunction

  function automatic void fmap(input int row, output row_t m, output row_t v);
    m = '0; v = '0;
    if (row / RPB != BANKS - 1) fmap_raw(row, m, v);
  endfunction

  always_comb fmap_raw(int'(fi_row), fi_mask, fi_val);

  function automatic cbits_t classify(input word_t m);
    if (m[15:8] != 0 && m[7:0] != 0) return C_LH;
    if (m[15:8] != 0)                return C_H;
    if (m[7:0] != 0)                 return C_L;
    return C_OK;
  endfunction

  function automatic word_t rev(input word_t a);
    word_t r = '0;
    for (int i = 0; i < 16; i++) r[15-i] = a[i];
    return r;
  endfunction

  // value read back for value a written at (row, lane)
  function automatic word_t path(input int row, input int lane, input word_t a);
    row_t m, v;
    word_t s, st;
    fmap(row, m, v);
    case (classify(m[lane]))
      C_OK: return a;
      C_LH: return a;
      C_L: begin
        s  = (a & 16'h8000) | ((a << 2) & 16'h7FFC);
        st = (s & ~m[lane]) | (v[lane] & m[lane]);
        return (st & 16'h8000) | ((st & 16'h7FFF) >> 2);
      end
      default: begin
        s  = rev((a & 16'h8000) | ((a << 2) & 16'h7FFC));
        st = rev((s & ~m[lane]) | (v[lane] & m[lane]));
        return (st & 16'h8000) | ((st & 16'h7FFF) >> 2);
      end
    endcase
  endfunction

  function automatic word_t rand_act();
    word_t a;
    a[15] = 1'($urandom);
    a[14:0] = ($urandom_range(99) == 0) ? 15'($urandom) : 15'($urandom_range(0, 4095));
    return a;
  endfunction

  row_t data [NR];
  int n_exact_lh = 0, n_l = 0, n_h = 0;

  task automatic program_cbits();
    for (int r = 0; r < ROWS; r++) begin
      row_t m, v;
      fmap(r, m, v);
      @(negedge clk); cb_we = 1; cb_row = RW'(r);
      for (int i = 0; i < LANES; i++) cb_c[i] = classify(m[i]);
    end
    @(negedge clk); cb_we = 0;
  endtask

  task automatic write_layer(input int nrows);
    @(negedge clk); wr_mode = 1; restart = 1;
    @(negedge clk); restart = 0;
    for (int r = 0; r < nrows; r++) begin
      for (int i = 0; i < LANES; i++) data[r][i] = rand_act();
      w_valid = 1; w_row = RW'(r); w_data = data[r];
      #1;
      while (!w_ready) begin @(negedge clk); #1; end
      @(negedge clk); w_valid = 0;
    end
    while (!w_ready) @(negedge clk);
  endtask

  task automatic read_layer(input int nrows, input bit compare);
    @(negedge clk); wr_mode = 0; restart = 1;
    @(negedge clk); restart = 0;
    for (int r = 0; r < nrows; r++) begin
      r_req_valid = 1; r_req_row = RW'(r);
      #1;
      while (!r_req_ready) begin @(negedge clk); #1; end
      @(negedge clk); r_req_valid = 0;
      while (!r_valid) @(negedge clk);
      while ($urandom_range(3) == 0) @(negedge clk);
      if (compare)
        for (int i = 0; i < LANES; i++) begin
          row_t m, v;
          word_t exp = path(r, i, data[r][i]);
          fmap(r, m, v);
          case (classify(m[i]))
            C_LH: n_exact_lh++;
            C_L:  n_l++;
            C_H:  n_h++;
            default: ;
          endcase
          checks++;
          if (r_data[i] !== exp) begin
            failures++;
            $display("FAIL row %0d lane %0d c=%0d: wrote %h got %h exp %h", r, i,
                     classify(m[i]), data[r][i], r_data[i], exp);
          end
        end
      r_ready = 1;
      @(negedge clk); r_ready = 0;
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    program_cbits();
    write_layer(NR);
    checks++;
    if (safe_overflow) begin failures++; $display("FAIL unexpected overflow"); end
    read_layer(NR, 1);
    $display("words checked: L %0d, H %0d, L&H from the safe bank %0d", n_l, n_h, n_exact_lh);
    checks++;
    if (n_l == 0 || n_h == 0 || n_exact_lh == 0) begin failures++; $display("FAIL a word kind never occurred"); end
    // second layer: every word L&H, 70 rows = 1120 words > 1024 safe entries
    all_faulty = 1;
    program_cbits();
    write_layer(70);
    checks++;
    if (!safe_overflow) begin failures++; $display("FAIL no overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
