// exp_lut: the table that replaces the exponential of the RBF kernel.
//
// The kernel k = exp(-||x - xi||^2 / (2 sigma^2)) is not computed directly:
// the scaled squared distance u = ||x - xi||^2 / (2 sigma^2) is quantised to
// steps of 1/16 and looked up here. Entry i holds
// round(2^16 * exp(-i / 16)) as a Q16.16 value (entry 0 = 1.0);
// indices past the table give 0, as exp(-u) is then below one LSB.
// The table is built at elaboration from the constant r = exp(-1/16) by
// repeated fixed-point multiplication (32 fraction bits), so no real
// arithmetic is needed. Combinational read. Table length (256) and step (1/16)
// are this design's choice.
module exp_lut
  import svm_pkg::*;
#(
  parameter int unsigned SIZE = 256         // u covers [0, 16)
) (
  input  logic [31:0] idx,
  output fx_t         val
);

  // exp(-1/16) with 32 fraction bits
  localparam longint unsigned R_Q32 = 64'd4034748382;

  typedef logic [SIZE-1:0][16:0] tbl_t;

  function automatic tbl_t build();
    tbl_t t;
    longint unsigned v;
    v = 64'h1_0000_0000;                      // 1.0 with 32 fraction bits
    for (int i = 0; i < SIZE; i++) begin
      t[i] = 17'((v + 64'h8000) >> 16);
      v = (v * R_Q32 + 64'h8000_0000) >> 32;
    end
    return t;
  endfunction

  localparam tbl_t TABLE = build();

  always_comb begin
    if (idx < SIZE) val = fx_t'({15'd0, TABLE[idx[$clog2(SIZE)-1:0]]});
    else            val = '0;
  end

endmodule
