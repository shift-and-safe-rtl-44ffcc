// tb_vdd_sweep: one full-size activation memory at four supply voltages.
//
// For each of 0.54, 0.53, 0.52 and 0.51 V the per-cell stuck probability is
// chosen so that the share of words with at least one stuck cell matches
// the measured totals (1.11 %, 6.87 %, 23.79 %, 55.9 %): p = 1 - (1 - f)^(1/16),
// with cells failing independently. A layer of NR rows is written (output
// role) and read back (input role) through the Shift-and-Safe ports of a
// default-size act_memory, and every word is checked against a model of
// encoding, stuck cells, decoding and the safe bank. The test also checks
// the cost in cycles: writing takes exactly 2 cycles per row plus one per
// L&H word and reading 2 per row plus n + 1 for a row with n > 0 L&H words,
// and prints the word mix, the safe-bank use and the slowdown of the read
// stream, which is the source of the technique's performance cost.
module tb_vdd_sweep;
  import sas_pkg::*;
  localparam int NR = 512;
  localparam int RW = 16, AW = 20;
  // stuck cells per million, per voltage
  int ppm [4] = '{700, 4440, 16840, 49850};
  string vname [4] = '{"0.54 V", "0.53 V", "0.52 V", "0.51 V"};
  int lvl = 0;

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

  act_memory dut (.*);

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

  function automatic void fmap(input int row, output row_t m, output row_t v);
    m = '0; v = '0;
    if (row >= 7 * 8192) return;
    for (int i = 0; i < LANES; i++)
      for (int b = 0; b < 16; b++) begin
        int unsigned h = hash((lvl * 65536 + row) * 256 + i * 16 + b);
        m[i][b] = (h % 1000000 < ppm[lvl]);
        v[i][b] = h[23];
      end
  endfunction

  always_comb fmap(int'(fi_row), fi_mask, fi_val);

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

  function automatic word_t path(input int row, input int lane, input word_t a);
    row_t m, v;
    word_t s, st;
    fmap(row, m, v);
    case (classify(m[lane]))
      C_OK, C_LH: return a;
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

  row_t data [NR];
  int nlh_row [NR];

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (lvl = 0; lvl < 4; lvl++) begin
      automatic int cnt [4] = '{0, 0, 0, 0};
      automatic longint wcyc = 0, rcyc = 0, wexp = 0, rexp = 0;
      automatic int t0;
      // fabrication test: program the C bits of the rows in use
      for (int r = 0; r < NR; r++) begin
        row_t m, v;
        fmap(r, m, v);
        @(negedge clk); cb_we = 1; cb_row = RW'(r);
        nlh_row[r] = 0;
        for (int i = 0; i < LANES; i++) begin
          cb_c[i] = classify(m[i]);
          cnt[cb_c[i]]++;
          if (cb_c[i] == C_LH) nlh_row[r]++;
        end
      end
      @(negedge clk); cb_we = 0;
      // write the layer, back to back
      @(negedge clk); wr_mode = 1; restart = 1;
      @(negedge clk); restart = 0;
      t0 = $time / 10;
      for (int r = 0; r < NR; r++) begin
        for (int i = 0; i < LANES; i++) begin
          data[r][i][15] = 1'($urandom);
          data[r][i][14:0] = ($urandom_range(99) == 0) ? 15'($urandom) : 15'($urandom_range(0, 4095));
        end
        w_valid = 1; w_row = RW'(r); w_data = data[r];
        #1;
        while (!w_ready) begin @(negedge clk); #1; end
        @(negedge clk);
        wexp += 2 + nlh_row[r];
      end
      w_valid = 0;
      while (!w_ready) @(negedge clk);
      wcyc = $time / 10 - t0;
      checks++;
      if (wcyc != wexp) begin failures++; $display("FAIL %s write cycles %0d exp %0d", vname[lvl], wcyc, wexp); end
      // read it back
      @(negedge clk); wr_mode = 0; restart = 1;
      @(negedge clk); restart = 0;
      t0 = $time / 10;
      r_ready = 1;
      for (int r = 0; r < NR; r++) begin
        r_req_valid = 1; r_req_row = RW'(r);
        #1;
        while (!r_req_ready) begin @(negedge clk); #1; end
        @(negedge clk); r_req_valid = 0;
        while (!r_valid) @(negedge clk);
        for (int i = 0; i < LANES; i++) begin
          checks++;
          if (r_data[i] !== path(r, i, data[r][i])) begin
            failures++;
            $display("FAIL %s row %0d lane %0d got %h exp %h", vname[lvl], r, i, r_data[i], path(r, i, data[r][i]));
          end
        end
        @(negedge clk);
        rexp += 3 + ((nlh_row[r] == 0) ? 0 : nlh_row[r] + 1);
      end
      r_ready = 0;
      rcyc = $time / 10 - t0;
      checks++;
      if (rcyc != rexp) begin failures++; $display("FAIL %s read cycles %0d exp %0d", vname[lvl], rcyc, rexp); end
      checks++;
      if (safe_overflow) begin failures++; $display("FAIL %s overflow", vname[lvl]); end
      $display("%s: words ok %0d, L %0d, H %0d, L&H %0d (%0.2f%% faulty); safe entries %0d; write %0d cycles, read %0d cycles (%0.1f%% over %0d fault-free)",
               vname[lvl], cnt[0], cnt[1], cnt[2], cnt[3], 100.0 * (NR*16 - cnt[0]) / (NR*16),
               20'hFFFFF - int'(sp), wcyc, rcyc, 100.0 * (rcyc - 3*NR) / (3*NR), 3*NR);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
