// svm_pkg: shared types, constants and the SRAM memory map of the SVM
// speaker-verification engine.
//
// All numbers are 32-bit two's-complement fixed point with 16 fraction bits
// (Q16.16); the sign bit of a Lagrange multiplier is bit 31, the "32nd bit"
// used to pick support vectors. Every controller talks to one single-port
// synchronous SRAM of 32-bit words through a mem_req_t bundle; read data
// returns on the cycle after the request.
//
// The memory map below is this design's own choice. The environment
// variables (vector count N, dimension D, base addresses, speaker ids) are
// written by the host before a run, as the configuration scheme requires.
package svm_pkg;

  localparam int unsigned WORD_W = 32;
  localparam int unsigned FRAC   = 16;
  localparam int unsigned ADDR_W = 12;          // 4096 words of SRAM

  typedef logic signed [WORD_W-1:0] fx_t;       // Q16.16 value
  typedef logic        [ADDR_W-1:0] addr_t;

  localparam fx_t FX_ONE     = 32'sh0001_0000;  // +1.0
  localparam fx_t FX_MAX     = 32'sh7fff_ffff;
  localparam fx_t FX_MIN     = -32'sh7fff_ffff; // symmetric saturation

  // Sizes of the presented configuration: 31 training vectors of 24 features.
  localparam int unsigned N_MAX   = 31;
  localparam int unsigned D_MAX   = 24;
  localparam int unsigned NUM_SPK = 4;           // speaker models kept in SRAM
  localparam int unsigned KCOLS   = N_MAX + 2;   // K' row stride: N+1 columns + y'

  // Environment variables (word addresses).
  localparam addr_t ENV_N          = 12'd0;   // number of training vectors
  localparam addr_t ENV_D          = 12'd1;   // vector dimension
  localparam addr_t ENV_TRAIN_BASE = 12'd2;   // first training record
  localparam addr_t ENV_SPK_ID     = 12'd3;   // speaker being enrolled
  localparam addr_t ENV_CLAIM_ID   = 12'd4;   // claimed speaker for a test
  localparam addr_t ENV_TEST_BASE  = 12'd5;   // test vector
  localparam addr_t ENV_THRESH     = 12'd6;   // decision threshold (Q16.16)
  localparam addr_t ENV_STATUS     = 12'd7;   // bit0 done, bit1 singular K'
  localparam addr_t ENV_SCORE      = 12'd8;   // last test score (Q16.16)
  localparam addr_t ENV_DECISION   = 12'd9;   // 1 = accepted

  // Per-speaker descriptor: SV-table start, SV count, bias (lambda).
  localparam addr_t DIR_BASE   = 12'd16;
  localparam int unsigned DIR_STRIDE = 3;
  // K' augmented matrix, (N+1) rows of KCOLS words.
  localparam addr_t KMAT_BASE  = 12'd32;
  // Solution alpha' = [lambda, alpha_1 .. alpha_N].
  localparam addr_t ALPHA_BASE = KMAT_BASE + 12'((N_MAX + 1) * KCOLS);
  // SV-tables, one region per speaker; entry = {vector address, alpha}.
  localparam addr_t SVT_BASE   = ALPHA_BASE + 12'(N_MAX + 1);
  localparam int unsigned SVT_STRIDE = 2 * N_MAX + 2;
  // First free word, where the host may place training and test vectors.
  localparam addr_t FREE_BASE  = SVT_BASE + 12'(NUM_SPK * SVT_STRIDE);

  typedef struct packed {
    logic  req;
    logic  we;
    addr_t addr;
    fx_t   wdata;
  } mem_req_t;

  localparam mem_req_t MEM_IDLE = '{req: 1'b0, we: 1'b0, addr: '0, wdata: '0};

  // Address of word c of row r of K'.
  function automatic addr_t kaddr(input logic [5:0] r, input logic [5:0] c);
    return KMAT_BASE + addr_t'(r) * addr_t'(KCOLS) + addr_t'(c);
  endfunction

  // Saturate a wide signed value to the Q16.16 range.
  function automatic fx_t sat32(input logic signed [63:0] v);
    if (v > 64'sd2147483647)       return FX_MAX;
    else if (v < -64'sd2147483647) return FX_MIN;
    else                           return fx_t'(v);
  endfunction

  // Fixed-point product, floor rounding, saturated.
  function automatic fx_t fx_mul(input fx_t a, input fx_t b);
    logic signed [63:0] p;
    p = 64'(a) * 64'(b);
    return sat32(p >>> FRAC);
  endfunction

endpackage
