// output_buffer: the PE array's intermediate output buffer.
//
// At the end of a tile, capture copies the ROWS x COLS accumulators into the
// buffer, which frees the array for the next tile, and the buffer then
// offers the results one column at a time (out_valid/out_ready, column
// out_col = 0, 1, ...). Column j holds output j of all ROWS rows and becomes
// one 16-activation memory row of the next layer. Each value is rescaled to
// the 16-bit activation format: an arithmetic right shift by `shift` (the
// fraction bits of the weights, set per layer), rounding towards minus
// infinity, then conversion to sign-magnitude with the magnitude saturated
// at 2^15 - 1. One column per cycle while out_ready is high. The document
// says only that the array holds buffers that order output activations
// before they go to the dispatchers; the column order, rounding and
// saturation are this design's.
module output_buffer
  import sas_pkg::*;
#(
  parameter int unsigned ROWS  = 16,
  parameter int unsigned COLS  = 16,
  parameter int unsigned ACC_W = 48,
  parameter int unsigned COL_W = $clog2(COLS)
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 capture,
  input  logic [ROWS-1:0][COLS-1:0][ACC_W-1:0] acc,
  input  logic [5:0]                           shift,
  output logic                                 out_valid,
  input  logic                                 out_ready,
  output logic [COL_W-1:0]                     out_col,
  output word_t [ROWS-1:0]                     out_data
);

  localparam logic [ACC_W-1:0] MAXMAG = ACC_W'((1 << (ACT_W-1)) - 1);

  logic [ROWS-1:0][COLS-1:0][ACC_W-1:0] buf_q;

  function automatic word_t to_sm(input logic signed [ACC_W-1:0] v, input logic [5:0] sh);
    logic signed [ACC_W-1:0] q;
    logic        [ACC_W-1:0] mag;
    q   = v >>> sh;
    mag = q[ACC_W-1] ? ACC_W'(-q) : ACC_W'(q);
    if (mag > MAXMAG) mag = MAXMAG;
    return {q[ACC_W-1] && mag != '0, mag[ACT_W-2:0]};
  endfunction

  always_comb begin
    for (int i = 0; i < ROWS; i++) out_data[i] = to_sm(buf_q[i][out_col], shift);
  end

  // data registers: only read while out_valid, so they need no reset
  always_ff @(posedge clk) begin
    if (capture) buf_q <= acc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_col   <= '0;
    end else if (capture) begin
      out_valid <= 1'b1;
      out_col   <= '0;
    end else if (out_valid && out_ready) begin
      out_col <= out_col + 1'b1;
      if (out_col == COL_W'(COLS-1)) out_valid <= 1'b0;
    end
  end

endmodule
