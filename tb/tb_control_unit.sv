// tb_control_unit: self-checking test of control_unit.
// The testbench plays the input memory (random request acceptance, rows
// returned 1..6 cycles later), the output buffer (16 columns after each
// capture, accepted at random) and the output memory's idle flag. For two
// layers with different K and T it checks the activation rows requested
// (0..K-1 for every tile), the weight rows read (w_base + t*K + k), that
// each operand step happens exactly when a row arrives, the number of
// drain steps, captures, clears and Safe Pointer restarts, the output rows
// (t*16 + column), one done pulse per layer and the swap of in_sel.
module tb_control_unit;
  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0] k_rows = '0, n_tiles = '0, w_base = '0;
  logic busy, done, in_sel, in_restart, out_restart;
  logic ar_valid, ar_ready = 0;
  logic [15:0] ar_row;
  logic ad_valid = 0, ad_ready;
  logic wt_rd_en;
  logic [15:0] wt_rd_row;
  logic step, feed_valid, clr, capture;
  logic ob_fire = 0;
  logic [3:0] ob_col = '0;
  logic [15:0] out_row;
  logic out_idle = 0;
  int checks = 0, failures = 0;

  control_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  // ---- environment models ----
  int pending = 0, delay = 0;
  bit ob_valid = 0;
  always @(posedge clk) begin
    // input memory
    if (ar_valid && ar_ready) begin pending = 1; delay = $urandom_range(1, 6); end
    if (ad_valid && ad_ready) ad_valid <= 0;
    else if (pending && delay == 0) begin ad_valid <= 1; pending = 0; end
    else if (pending) delay--;
    ar_ready <= ($urandom_range(2) != 0);
    // output buffer and output memory
    if (capture) begin ob_valid = 1; ob_col <= 0; end
    else if (ob_fire) begin
      if (ob_col == 15) ob_valid = 0;
      ob_col <= ob_col + 1;
    end
    ob_fire <= 0;
    out_idle <= ($urandom_range(3) != 0);
  end
  always @(negedge clk) ob_fire = ob_valid && !capture && ($urandom_range(2) != 0);

  // ---- observers ----
  longint n_step, n_feed, n_cap, n_clr, n_inr, n_outr, n_done, n_ar, n_wt, n_out;
  longint ar_log [$], wt_log [$], out_log [$];
  always @(posedge clk) if (rst_n) begin
    if (step) n_step++;
    if (step && feed_valid) begin
      n_feed++;
      checks++;
      if (!(ad_valid && ad_ready)) begin failures++; $display("FAIL operand step without a row"); end
    end
    if (capture) n_cap++;
    if (clr) n_clr++;
    if (in_restart) n_inr++;
    if (out_restart) n_outr++;
    if (done) n_done++;
    if (ar_valid && ar_ready) ar_log.push_back(ar_row);
    if (wt_rd_en) wt_log.push_back(wt_rd_row);
    if (ob_fire) out_log.push_back(out_row);
  end

  task automatic run_layer(input int K, input int T, input int wb);
    bit sel0 = in_sel;
    n_step = 0; n_feed = 0; n_cap = 0; n_clr = 0; n_inr = 0; n_outr = 0; n_done = 0;
    ar_log.delete(); wt_log.delete(); out_log.delete();
    @(negedge clk); start = 1; k_rows = 16'(K); n_tiles = 16'(T); w_base = 16'(wb);
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
    chk(n_step, T * (K + 30), "steps");
    chk(n_feed, T * K, "operand steps");
    chk(n_cap, T, "captures");
    chk(n_clr, T, "clears");
    chk(n_inr, T, "input pointer restarts");
    chk(n_outr, 1, "output pointer restarts");
    chk(n_done, 1, "done pulses");
    chk(in_sel, !sel0, "role swap");
    chk(ar_log.size(), T * K, "row requests");
    chk(wt_log.size(), T * K, "weight reads");
    chk(out_log.size(), T * 16, "output rows");
    for (int t = 0; t < T; t++)
      for (int k = 0; k < K; k++) begin
        chk(ar_log[t*K + k], k, "activation row");
        chk(wt_log[t*K + k], wb + t*K + k, "weight row");
      end
    for (int n = 0; n < T * 16; n++) chk(out_log[n], n, "output row");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk(in_sel, 0, "reset role");
    run_layer(5, 3, 100);
    run_layer(40, 1, 7);
    run_layer(1, 2, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
