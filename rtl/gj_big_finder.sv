// gj_big_finder: Big Finder of the Gauss-Jordan controller.
//
// Finds the pivot: the element of largest magnitude among the K' entries
// whose row and column have not been pivoted yet. The controller streams the
// matrix one word per cycle (in_valid, value, row, col, eligible); the unit
// keeps the running maximum of |value| over eligible words and its position.
// A strictly larger magnitude replaces the maximum, so the first of equal
// maxima in stream order wins. clear restarts the search. Results are
// registered: they reflect all words presented up to the previous cycle.
//
// The unit's role follows the published architecture; the streaming
// interface and the tie rule are this design's own.
module gj_big_finder
  import svm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       in_valid,
  input  logic       eligible,
  input  fx_t        value,
  input  logic [5:0] row,
  input  logic [5:0] col,
  output logic [31:0] max_abs,
  output logic [5:0] max_row,
  output logic [5:0] max_col
);

  logic [31:0] mag;
  assign mag = value[31] ? 32'(-value) : 32'(value);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      max_abs <= '0;
      max_row <= '0;
      max_col <= '0;
    end else if (clear) begin
      max_abs <= '0;
      max_row <= '0;
      max_col <= '0;
    end else if (in_valid && eligible && mag > max_abs) begin
      max_abs <= mag;
      max_row <= row;
      max_col <= col;
    end
  end

endmodule
