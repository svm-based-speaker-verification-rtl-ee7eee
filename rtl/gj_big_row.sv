// gj_big_row: Big Row unit of the Gauss-Jordan controller.
//
// Normalises the pivot row: each element a of that row becomes a / p, where
// p is the pivot. Fixed-point division q = (a * 2^16) / p in Q16.16, done by a
// restoring divider on magnitudes, one quotient bit per cycle (48 bits),
// truncated toward zero and saturated to +-(2^31 - 1). Division by zero
// saturates as well (the controller stops before that on a singular matrix).
// Interface: pulse start with dividend and divisor held; done pulses after
// 49 cycles; quotient is valid from the done cycle until the next start.
//
// Normalising the pivot row follows the published architecture; the
// fixed-point format and the divider are this design's choices.
module gj_big_row
  import svm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fx_t  dividend,
  input  fx_t  divisor,
  output logic busy,
  output logic done,
  output fx_t  quotient
);

  localparam int unsigned QW = WORD_W + FRAC;   // 48 quotient bits

  logic [QW-1:0]   num;       // shifts out the dividend, shifts in quotient
  logic [WORD_W-1:0] rem;
  logic [WORD_W-1:0] den;
  logic            neg;
  logic [5:0]      cnt;
  logic [WORD_W:0] trial;

  assign busy  = (cnt != 0);
  assign trial = {rem, num[QW-1]} - {1'b0, den};

  // After the last step num holds the 48-bit magnitude of the quotient.
  always_comb begin
    if (den == 0 || num[QW-1:31] != 0) quotient = neg ? FX_MIN : FX_MAX;
    else                               quotient = neg ? -fx_t'({1'b0, num[30:0]}) : fx_t'({1'b0, num[30:0]});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      num      <= '0;
      rem      <= '0;
      den      <= '0;
      neg      <= 1'b0;
      cnt      <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && cnt == 0) begin
        num <= {(dividend[31] ? 32'(-dividend) : 32'(dividend)), 16'd0};
        den <= divisor[31] ? 32'(-divisor) : 32'(divisor);
        neg <= dividend[31] ^ divisor[31];
        rem <= '0;
        cnt <= 6'(QW);
      end else if (cnt != 0) begin
        if (!trial[WORD_W]) begin
          rem <= trial[WORD_W-1:0];
          num <= {num[QW-2:0], 1'b1};
        end else begin
          rem <= {rem[WORD_W-2:0], num[QW-1]};
          num <= {num[QW-2:0], 1'b0};
        end
        cnt <= cnt - 6'd1;
        if (cnt == 6'd1) done <= 1'b1;
      end
    end
  end

endmodule
