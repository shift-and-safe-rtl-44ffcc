// pe: one processing element of the output-stationary systolic array.
//
// Each step (en) it multiplies the activation arriving from the left by the
// weight arriving from above, adds the product to its own accumulator, and
// passes both operands on, registered, to its right and lower neighbours.
// The accumulator stays in place for the whole tile (output stationary) and
// is zeroed by clr, which wins over en. Operands are 16-bit sign-magnitude
// fixed-point words; the product is formed in two's complement and the
// accumulator is ACC_W bits wide, enough for 2^16 full-scale products, with
// no rescaling (the output buffer rescales). One step per partial sum and
// accumulation, as the document's timing model assumes; the accumulator
// width and the sign-magnitude arithmetic are this design's choices.
module pe
  import sas_pkg::*;
#(
  parameter int unsigned ACC_W = 48
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    clr,
  input  word_t                   a_in,
  input  word_t                   w_in,
  output word_t                   a_out,
  output word_t                   w_out,
  output logic signed [ACC_W-1:0] acc
);

  // sign-magnitude to two's complement
  function automatic logic signed [ACT_W:0] sm2tc(input word_t v);
    logic signed [ACT_W:0] m;
    m = {2'b00, v[ACT_W-2:0]};
    return v[ACT_W-1] ? -m : m;
  endfunction

  logic signed [2*ACT_W+1:0] prod;
  assign prod = sm2tc(a_in) * sm2tc(w_in);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_out <= '0;
      w_out <= '0;
      acc   <= '0;
    end else begin
      if (en) begin
        a_out <= a_in;
        w_out <= w_in;
      end
      if (clr)     acc <= '0;
      else if (en) acc <= acc + ACC_W'(prod);
    end
  end

endmodule
