// kernel_ctrl: kernel function controller, the RBF kernel unit.
//
// Given the SRAM addresses of two d-dimensional vectors, it reads them
// element by element, accumulates the squared distance
// S = sum (a_e - b_e)^2 in fixed point and returns
// k = exp(-S / (2 sigma^2)) through the exponential table (exp_lut).
// With sigma = 8, 2 sigma^2 = 128 = 2^SIGMA2_LOG2, so the table index is the
// Q16.16 distance shifted right by 16 + 7 - 4 (table step 1/16).
//
// Interface: pulse start with addr_a, addr_b and dim held; done pulses for one
// cycle with result valid (and held until the next start). The unit owns an
// SRAM request bundle (mreq / rdata, read data one cycle after request).
// Timing: three cycles per element (read a, read b, accumulate) plus two,
// i.e. 74 cycles for d = 24.
// Fixed-point arithmetic throughout (squared terms floored to Q16.16, sum
// saturated at 48 bits) is this design's choice; the table step and size are
// set in exp_lut.
module kernel_ctrl
  import svm_pkg::*;
#(
  parameter int unsigned SIGMA2_LOG2 = 7,   // log2(2 sigma^2), sigma = 8
  parameter int unsigned LUT_SIZE    = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  addr_t       addr_a,
  input  addr_t       addr_b,
  input  logic [5:0]  dim,
  output logic        busy,
  output logic        done,
  output fx_t         result,
  output mem_req_t    mreq,
  input  fx_t         rdata
);

  typedef enum logic [2:0] {K_IDLE, K_RD_A, K_RD_B, K_ACC, K_LUT} kstate_e;
  kstate_e state;

  logic [5:0]  e;
  fx_t         a_val;
  logic [47:0] acc;
  logic [31:0] lut_idx;
  fx_t         lut_val;

  // squared difference of the current pair, Q16.16
  logic signed [32:0] diff;
  logic signed [65:0] dx;
  logic        [65:0] sq;
  logic        [48:0] acc_next;
  always_comb begin
    diff     = 33'(rdata) - 33'(a_val);
    dx       = 66'(diff);
    sq       = $unsigned(dx * dx) >> FRAC;
    acc_next = 49'(acc) + ((sq > 66'({48{1'b1}})) ? 49'({48{1'b1}}) : 49'(sq));
  end

  always_comb begin
    logic [47:0] sh;
    sh      = acc >> (FRAC + SIGMA2_LOG2 - 4);
    lut_idx = (sh > 48'hFFFF_FFFF) ? 32'hFFFF_FFFF : sh[31:0];
  end

  exp_lut #(.SIZE(LUT_SIZE)) u_lut (.idx(lut_idx), .val(lut_val));

  always_comb begin
    mreq = MEM_IDLE;
    case (state)
      K_RD_A: begin mreq.req = 1'b1; mreq.addr = addr_a + addr_t'(e); end
      K_RD_B: begin mreq.req = 1'b1; mreq.addr = addr_b + addr_t'(e); end
      default: ;
    endcase
  end

  assign busy = (state != K_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= K_IDLE;
      e      <= '0;
      a_val  <= '0;
      acc    <= '0;
      result <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        K_IDLE: if (start) begin
          e     <= '0;
          acc   <= '0;
          state <= (dim == 0) ? K_LUT : K_RD_A;
        end
        K_RD_A: state <= K_RD_B;
        K_RD_B: begin
          a_val <= rdata;
          state <= K_ACC;
        end
        K_ACC: begin
          acc   <= acc_next[48] ? {48{1'b1}} : acc_next[47:0];
          e     <= e + 6'd1;
          state <= (e + 6'd1 == dim) ? K_LUT : K_RD_A;
        end
        K_LUT: begin
          result <= lut_val;
          done   <= 1'b1;
          state  <= K_IDLE;
        end
        default: state <= K_IDLE;
      endcase
    end
  end

endmodule
