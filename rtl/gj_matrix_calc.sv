// gj_matrix_calc: Matrix Calculator of the Gauss-Jordan controller.
//
// Eliminates the pivot column from a non-pivot row: for each element,
// a' = a - f * p, where f is that row's element in the pivot column and p the
// normalised pivot row's element in the same column. Q16.16 product with
// floor rounding, difference saturated to +-(2^31 - 1). Registered output:
// result is valid the cycle after in_valid, flagged by out_valid.
//
// The elimination follows the published architecture; the fixed-point
// format and the saturation are this design's choices.
module gj_matrix_calc
  import svm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  fx_t  a,
  input  fx_t  f,
  input  fx_t  p,
  output logic out_valid,
  output fx_t  result
);

  logic signed [63:0] prod;
  logic signed [63:0] diff;
  always_comb begin
    prod = (64'(f) * 64'(p)) >>> FRAC;
    diff = 64'(a) - prod;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      result    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) result <= sat32(diff);
    end
  end

endmodule
