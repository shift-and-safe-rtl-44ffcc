// tb_sas_accel: end-to-end test of the accelerator at its full default size.
//
// Both activation memories get their own pseudo-random stuck-at map (each
// cell of the undervolted banks stuck with probability RATE/1000, about 24%
// of words touched at RATE = 17) and their C bits are programmed from it.
// The off-chip side loads a 16 x 16 input block into memory 0 and the
// weights of three chained layers, runs the layers (16 -> 32 -> 32 -> 16
// features on a batch of 16 vectors, so both memories serve as input and as
// output) and reads the final block back. A reference model computed here
// follows every value through the memories (encoding, stuck cells, decoding,
// safe bank), the matrix products and the rescaling, and every output word
// must match it exactly. For information it also counts how many final
// words differ from a fault-free run and from a run with the same faults and
// no protection. It counts each mechanism of the design as it happens in the
// hardware (shifted-back and unflipped words, safe-bank writes and reads,
// array stalls while a row is completed from the safe bank, output-memory
// backpressure, role swaps, pointer restarts) and fails if one never does.
module tb_sas_accel;
  import sas_pkg::*;
  localparam int RATE = 17;
  localparam int SHIFT_FRAC = 8;

  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [15:0] k_rows = '0, n_tiles = '0, w_base = '0;
  logic [5:0] shift = 6'(SHIFT_FRAC);
  logic busy, done, in_sel;
  logic h_sel = 0, h_wr_mode = 0, h_restart = 0;
  logic h_w_valid = 0, h_w_ready;
  logic [15:0] h_w_row = '0;
  row_t h_w_data = '0;
  logic h_r_req_valid = 0, h_r_req_ready;
  logic [15:0] h_r_req_row = '0;
  logic h_r_valid, h_r_ready = 0;
  row_t h_r_data;
  logic wt_ld_we = 0;
  logic [15:0] wt_ld_row = '0;
  row_t wt_ld_data = '0;
  logic cb_we = 0, cb_sel = 0;
  logic [15:0] cb_row = '0;
  crow_t cb_c;
  logic [1:0][15:0] fi_row;
  row_t [1:0] fi_mask, fi_val;
  logic [1:0][19:0] safe_ptr;
  logic [1:0] safe_overflow;
  int checks = 0, failures = 0;

  sas_accel dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- fault maps ----------------
  function automatic int unsigned hash(input int unsigned a);
    int unsigned x = a * 32'h9E3779B1;
    x ^= x >> 15; x *= 32'h85EBCA77; x ^= x >> 13; x *= 32'hC2B2AE3D; x ^= x >> 16;
    return x;
  endfunction

  bit faults_on = 1;

  function automatic void fmap(input int mem, input int row, output row_t m, output row_t v);
    m = '0; v = '0;
    if (!faults_on || row >= 7 * 8192) return;
    for (int i = 0; i < LANES; i++)
      for (int b = 0; b < 16; b++) begin
        int unsigned h = hash((mem * 65536 + row) * 256 + i * 16 + b);
        m[i][b] = (h % 1000 < RATE);
        v[i][b] = h[20];
      end
  endfunction

  always_comb begin
    row_t m, v;
    for (int k = 0; k < 2; k++) begin
      fmap(k, int'(fi_row[k]), m, v);
      fi_mask[k] = m;
      fi_val[k]  = v;
    end
  end

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

  // value read back from memory `mem` at (row, lane) after writing a;
  // protect = 0 gives the unprotected memory for comparison
  function automatic word_t path(input int mem, input int row, input int lane,
                                 input word_t a, input bit protect);
    row_t m, v;
    word_t s, st;
    fmap(mem, row, m, v);
    if (!protect) return (a & ~m[lane]) | (v[lane] & m[lane]);
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

  function automatic longint smv(input word_t v);
    return v[15] ? -longint'(v[14:0]) : longint'(v[14:0]);
  endfunction

  function automatic word_t rescale(input longint acc, input int sh);
    longint d = longint'(1) << sh;
    longint q = (acc >= 0) ? acc / d : -((-acc + d - 1) / d);
    longint mg = (q < 0) ? -q : q;
    if (mg > 32767) mg = 32767;
    return {(q < 0 && mg != 0), 15'(mg)};
  endfunction

  // ---------------- network ----------------
  localparam int NL = 3;
  int LK [NL] = '{16, 32, 32};   // input rows per layer
  int LT [NL] = '{2, 2, 1};      // output tiles per layer
  int LW [NL] = '{0, 32, 96};    // weight base rows
  word_t X [16][16];             // input block: row k, lane i
  word_t WT [128][16];           // weight rows

  // model of the layer chain; returns final rows as stored
  typedef word_t blk_t [32][16];
  function automatic void model(input bit protect, output blk_t res);
    blk_t cur, nxt;
    int mem = 0;
    for (int k = 0; k < 16; k++) for (int i = 0; i < 16; i++) cur[k][i] = X[k][i];
    for (int l = 0; l < NL; l++) begin
      for (int t = 0; t < LT[l]; t++)
        for (int j = 0; j < 16; j++)
          for (int i = 0; i < 16; i++) begin
            longint acc = 0;
            for (int k = 0; k < LK[l]; k++)
              acc += smv(path(mem, k, i, cur[k][i], protect)) * smv(WT[LW[l] + t*LK[l] + k][j]);
            nxt[t*16 + j][i] = rescale(acc, SHIFT_FRAC);
          end
      cur = nxt;
      mem = 1 - mem;
    end
    res = cur;
  endfunction

  // ---------------- mechanism counters ----------------
  longint n_shift_back [2], n_unflip [2], n_safe_wr [2], n_safe_rd [2];
  longint n_safe_stall, n_out_bp, n_swap, n_restart, n_stall;
  logic in_sel_q;
  always @(posedge clk) if (rst_n) begin
    if (dut.g_mem[0].u_mem.u_rport.out_valid && dut.g_mem[0].u_mem.r_ready)
      for (int i = 0; i < 16; i++) begin
        if (dut.g_mem[0].u_mem.u_rport.c_q[i] == C_L) n_shift_back[0]++;
        if (dut.g_mem[0].u_mem.u_rport.c_q[i] == C_H) n_unflip[0]++;
      end
    if (dut.g_mem[1].u_mem.u_rport.out_valid && dut.g_mem[1].u_mem.r_ready)
      for (int i = 0; i < 16; i++) begin
        if (dut.g_mem[1].u_mem.u_rport.c_q[i] == C_L) n_shift_back[1]++;
        if (dut.g_mem[1].u_mem.u_rport.c_q[i] == C_H) n_unflip[1]++;
      end
    if (dut.g_mem[0].u_mem.u_wport.sp_adv) n_safe_wr[0]++;
    if (dut.g_mem[1].u_mem.u_wport.sp_adv) n_safe_wr[1]++;
    if (dut.g_mem[0].u_mem.u_rport.sp_adv) n_safe_rd[0]++;
    if (dut.g_mem[1].u_mem.u_rport.sp_adv) n_safe_rd[1]++;
    if (dut.u_ctrl.ad_ready && !dut.u_ctrl.ad_valid) begin
      n_stall++;
      if ((in_sel ? dut.g_mem[1].u_mem.u_rport.state : dut.g_mem[0].u_mem.u_rport.state) == 2'd2)
        n_safe_stall++;
    end
    if (dut.u_obuf.out_valid && !dut.u_obuf.out_ready) n_out_bp++;
    if (in_sel != in_sel_q) n_swap++;
    if (dut.m_restart != 0) n_restart++;
    in_sel_q <= in_sel;
  end

  // ---------------- off-chip side ----------------
  task automatic program_cbits();
    for (int mem = 0; mem < 2; mem++)
      for (int r = 0; r < 32; r++) begin
        row_t m, v;
        fmap(mem, r, m, v);
        @(negedge clk);
        cb_we = 1; cb_sel = 1'(mem); cb_row = 16'(r);
        for (int i = 0; i < LANES; i++) cb_c[i] = classify(m[i]);
      end
    @(negedge clk); cb_we = 0;
  endtask

  task automatic host_write(input int mem, input int nrows);
    @(negedge clk); h_sel = 1'(mem); h_wr_mode = 1; h_restart = 1;
    @(negedge clk); h_restart = 0;
    for (int r = 0; r < nrows; r++) begin
      h_w_valid = 1; h_w_row = 16'(r);
      for (int i = 0; i < 16; i++) h_w_data[i] = X[r][i];
      #1;
      while (!h_w_ready) begin @(negedge clk); #1; end
      @(negedge clk); h_w_valid = 0;
    end
    while (!h_w_ready) @(negedge clk);
  endtask

  task automatic host_read(input int mem, input int nrows, output blk_t res);
    @(negedge clk); h_sel = 1'(mem); h_wr_mode = 0; h_restart = 1;
    @(negedge clk); h_restart = 0;
    for (int r = 0; r < nrows; r++) begin
      h_r_req_valid = 1; h_r_req_row = 16'(r);
      #1;
      while (!h_r_req_ready) begin @(negedge clk); #1; end
      @(negedge clk); h_r_req_valid = 0;
      while (!h_r_valid) @(negedge clk);
      for (int i = 0; i < 16; i++) res[r][i] = h_r_data[i];
      h_r_ready = 1;
      @(negedge clk); h_r_ready = 0;
    end
  endtask

  function automatic word_t rand_word(input int maxmag);
    word_t a;
    a[15] = 1'($urandom);
    a[14:0] = 15'($urandom_range(0, maxmag));
    return a;
  endfunction

  initial begin
    blk_t got, exp_sas, exp_free, exp_base;
    longint dev_sas = 0, dev_base = 0;
    int cyc0, cyc1;
    for (int k = 0; k < 16; k++) for (int i = 0; i < 16; i++) X[k][i] = rand_word(2047);
    for (int r = 0; r < 128; r++) for (int j = 0; j < 16; j++) WT[r][j] = rand_word(160);
    repeat (3) @(negedge clk);
    rst_n = 1;
    program_cbits();
    for (int r = 0; r < 128; r++) begin
      @(negedge clk); wt_ld_we = 1; wt_ld_row = 16'(r);
      for (int j = 0; j < 16; j++) wt_ld_data[j] = WT[r][j];
    end
    @(negedge clk); wt_ld_we = 0;
    host_write(0, 16);
    checks++;
    if (in_sel != 0) begin failures++; $display("FAIL initial role"); end
    for (int l = 0; l < NL; l++) begin
      @(negedge clk);
      start = 1; k_rows = 16'(LK[l]); n_tiles = 16'(LT[l]); w_base = 16'(LW[l]);
      cyc0 = $time / 10;
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      cyc1 = $time / 10;
      $display("layer %0d: K=%0d T=%0d took %0d cycles", l, LK[l], LT[l],
               cyc1 - cyc0);
      checks++;
      if (in_sel != 1'((l + 1) % 2)) begin failures++; $display("FAIL role after layer %0d", l); end
    end
    host_read(in_sel, 16, got);
    model(1, exp_sas);
    model(0, exp_base);
    faults_on = 0;
    model(1, exp_free);
    faults_on = 1;
    for (int r = 0; r < 16; r++)
      for (int i = 0; i < 16; i++) begin
        automatic word_t e = path(NL % 2, r, i, exp_sas[r][i], 1);
        automatic longint ds = smv(e) - smv(exp_free[r][i]);
        automatic longint db = smv(path(NL % 2, r, i, exp_base[r][i], 0)) - smv(exp_free[r][i]);
        checks++;
        if (got[r][i] !== e) begin
          failures++;
          $display("FAIL out row %0d lane %0d: got %h exp %h", r, i, got[r][i], e);
        end
        dev_sas  += (ds < 0) ? -ds : ds;
        dev_base += (db < 0) ? -db : db;
      end
    $display("mean |deviation| of the final words from a fault-free run: %0d/256 with Shift-and-Safe, %0d/256 unprotected (LSB units)",
             dev_sas, dev_base);
    $display("mechanisms: shift-back %0d/%0d, unflip %0d/%0d, safe writes %0d/%0d, safe reads %0d/%0d",
             n_shift_back[0], n_shift_back[1], n_unflip[0], n_unflip[1],
             n_safe_wr[0], n_safe_wr[1], n_safe_rd[0], n_safe_rd[1]);
    $display("mechanisms: array stalls %0d (%0d during safe-bank reads), output backpressure %0d, role swaps %0d, pointer restarts %0d",
             n_stall, n_safe_stall, n_out_bp, n_swap, n_restart);
    for (int m = 0; m < 2; m++) begin
      checks += 4;
      if (n_shift_back[m] == 0) begin failures++; $display("FAIL no shift-back in memory %0d", m); end
      if (n_unflip[m] == 0)     begin failures++; $display("FAIL no unflip in memory %0d", m); end
      if (n_safe_wr[m] == 0)    begin failures++; $display("FAIL no safe write in memory %0d", m); end
      if (n_safe_rd[m] == 0)    begin failures++; $display("FAIL no safe read in memory %0d", m); end
    end
    checks += 5;
    if (n_safe_stall == 0) begin failures++; $display("FAIL no stall on the safe bank"); end
    if (n_out_bp == 0)     begin failures++; $display("FAIL no output backpressure"); end
    if (n_swap != NL)      begin failures++; $display("FAIL role swaps %0d", n_swap); end
    if (n_restart == 0)    begin failures++; $display("FAIL no pointer restart"); end
    if (safe_overflow != 0) begin failures++; $display("FAIL safe bank overflow"); end
    $display("simulated %0d cycles", $time / 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
