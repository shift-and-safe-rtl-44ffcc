// pe_array: the ROWS x COLS output-stationary systolic PE array.
//
// PEs are connected in a 2D mesh: activations enter at the left edge (one
// per row, a_in[i]) and move one PE to the right per step; weights enter at
// the top edge (one per column, w_in[j]) and move one PE down per step.
// With the edge inputs skewed by the dispatchers (row i and column j delayed
// by i and j steps), PE (i, j) meets activation k of row i and weight k of
// column j at step k + i + j, so after K + ROWS + COLS - 2 steps every PE
// holds sum_k a[i][k] * w[k][j]. All PEs step together on en (the array
// stalls as a whole when operands are late) and clear together on clr. The
// 16 x 16 size, the 2D mesh and the output-stationary dataflow follow the
// document; the global step enable is this design's choice.
module pe_array
  import sas_pkg::*;
#(
  parameter int unsigned ROWS  = 16,
  parameter int unsigned COLS  = 16,
  parameter int unsigned ACC_W = 48
) (
  input  logic                                    clk,
  input  logic                                    rst_n,
  input  logic                                    en,
  input  logic                                    clr,
  input  word_t [ROWS-1:0]                        a_in,
  input  word_t [COLS-1:0]                        w_in,
  output logic [ROWS-1:0][COLS-1:0][ACC_W-1:0]    acc
);

  // a_h[i][j]: activation entering PE (i, j); w_v[i][j]: weight entering it
  word_t a_h [ROWS][COLS+1];
  word_t w_v [ROWS+1][COLS];

  for (genvar i = 0; i < ROWS; i++) begin : g_ain
    assign a_h[i][0] = a_in[i];
  end
  for (genvar j = 0; j < COLS; j++) begin : g_win
    assign w_v[0][j] = w_in[j];
  end

  for (genvar i = 0; i < ROWS; i++) begin : g_row
    for (genvar j = 0; j < COLS; j++) begin : g_col
      logic signed [ACC_W-1:0] acc_ij;
      pe #(.ACC_W(ACC_W)) u_pe (
        .clk, .rst_n, .en, .clr,
        .a_in  (a_h[i][j]),   .w_in (w_v[i][j]),
        .a_out (a_h[i][j+1]), .w_out(w_v[i+1][j]),
        .acc   (acc_ij)
      );
      assign acc[i][j] = acc_ij;
    end
  end

endmodule
