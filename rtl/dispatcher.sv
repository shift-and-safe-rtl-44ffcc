// dispatcher: feeds one edge of the systolic PE array.
//
// Every step (en) it takes one vector of LANES words, the 16 activations of
// one memory row or the 16 weights of one weight row, and delivers lane i
// to the array i steps later, which creates the diagonal wavefront an
// output-stationary systolic array needs. Lane 0 passes straight through,
// lane i goes through a chain of i registers that advance only on en, so a
// stall of the whole array keeps the wavefront intact. A step without a new
// vector (in_valid low, used to drain the array at the end of a tile)
// injects zeros, which leave the accumulators unchanged. The document names
// the dispatchers and says they feed the PE array under the control unit;
// the skew chains are this design's way of doing that.
module dispatcher
  import sas_pkg::*;
#(
  parameter int unsigned LN = LANES
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          in_valid,
  input  word_t [LN-1:0] in_vec,
  output word_t [LN-1:0] out_vec
);

  assign out_vec[0] = in_valid ? in_vec[0] : '0;

  for (genvar i = 1; i < LN; i++) begin : g_lane
    word_t chain [i];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int k = 0; k < i; k++) chain[k] <= '0;
      end else if (en) begin
        chain[0] <= in_valid ? in_vec[i] : '0;
        for (int k = 1; k < i; k++) chain[k] <= chain[k-1];
      end
    end
    assign out_vec[i] = chain[i-1];
  end

endmodule
