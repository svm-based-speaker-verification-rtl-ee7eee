// test_vmm: test vector-matrix-multiplication controller.
//
// Verifies a test vector against the claimed speaker's model. It reads the
// speaker descriptor at DIR_BASE + 3 * claim_id (SV-table start, SV count,
// bias lambda), then for every SV-table entry reads the SV's address and
// alpha, has the kernel function controller compute k(x_test, x_sv) and
// accumulates
//     score = lambda + sum_sv alpha_sv * k(x_test, x_sv)
// in Q16.16 (products floored, running sum saturated). The claim is accepted
// when score >= threshold. Score and decision are written to the environment
// words ENV_SCORE and ENV_DECISION and also driven on ports.
// The score form follows the training system K' alpha' = y', whose rows state
// lambda + sum_j alpha_j k(x_i, x_j) = y_i; the threshold is this design's
// choice (default 0 from the environment).
// Interface: pulse start; done pulses once; score/accept then hold.
// Timing: 7 + S (3 D + 7) cycles for S support vectors; 2,456 cycles for 31 SVs
// of dimension 24.
module test_vmm
  import svm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [1:0] claim_id,
  input  addr_t      test_base,
  input  fx_t        threshold,
  output logic       busy,
  output logic       done,
  output fx_t        score,
  output logic       accept,
  // kernel function controller command
  output logic       k_start,
  output addr_t      k_addr_a,
  output addr_t      k_addr_b,
  input  logic       k_done,
  input  fx_t        k_result,
  // SRAM
  output mem_req_t   mreq,
  input  fx_t        rdata
);

  typedef enum logic [3:0] {
    X_IDLE, X_D0, X_D1, X_D2, X_D3, X_E_ADDR, X_E_ALPHA, X_E_LATCH, X_K_START,
    X_K_WAIT, X_ACC, X_W_SCORE, X_W_DEC
  } xstate_e;
  xstate_e state;

  addr_t      dir_base, tbl_ptr, sv_addr;
  logic [5:0] cnt, k;
  fx_t        alpha, kval;
  logic signed [63:0] prod, sum;

  assign busy     = (state != X_IDLE);
  assign dir_base = DIR_BASE + addr_t'(claim_id) * addr_t'(DIR_STRIDE);
  assign k_start  = (state == X_K_START);
  assign k_addr_a = test_base;
  assign k_addr_b = sv_addr;
  assign prod     = (64'(alpha) * 64'(kval)) >>> FRAC;
  assign sum      = 64'(score) + prod;

  always_comb begin
    mreq = MEM_IDLE;
    case (state)
      X_D0:      begin mreq.req = 1'b1; mreq.addr = dir_base; end
      X_D1:      begin mreq.req = 1'b1; mreq.addr = dir_base + addr_t'(1); end
      X_D2:      begin mreq.req = 1'b1; mreq.addr = dir_base + addr_t'(2); end
      X_E_ADDR:  begin mreq.req = 1'b1; mreq.addr = tbl_ptr; end
      X_E_ALPHA: begin mreq.req = 1'b1; mreq.addr = tbl_ptr + addr_t'(1); end
      X_W_SCORE: begin mreq.req = 1'b1; mreq.we = 1'b1; mreq.addr = ENV_SCORE; mreq.wdata = score; end
      X_W_DEC:   begin mreq.req = 1'b1; mreq.we = 1'b1; mreq.addr = ENV_DECISION;
                       mreq.wdata = fx_t'({31'd0, accept}); end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= X_IDLE;
      tbl_ptr <= '0;
      sv_addr <= '0;
      cnt     <= '0;
      k       <= '0;
      alpha   <= '0;
      kval    <= '0;
      score   <= '0;
      accept  <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        X_IDLE: if (start) state <= X_D0;
        X_D0: state <= X_D1;
        X_D1: begin
          tbl_ptr <= rdata[ADDR_W-1:0];
          state   <= X_D2;
        end
        X_D2: begin
          cnt   <= rdata[5:0];
          state <= X_D3;
        end
        X_D3: begin
          score <= rdata;                   // start from lambda
          k     <= '0;
          state <= (cnt == 0) ? X_W_SCORE : X_E_ADDR;
        end
        X_E_ADDR:  state <= X_E_ALPHA;
        X_E_ALPHA: begin
          sv_addr <= rdata[ADDR_W-1:0];
          state   <= X_E_LATCH;
        end
        X_E_LATCH: begin
          alpha <= rdata;
          state <= X_K_START;
        end
        X_K_START: state <= X_K_WAIT;
        X_K_WAIT: if (k_done) begin
          kval  <= k_result;
          state <= X_ACC;
        end
        X_ACC: begin
          score   <= sat32(sum);
          k       <= k + 6'd1;
          tbl_ptr <= tbl_ptr + addr_t'(2);
          state   <= (k + 6'd1 == cnt) ? X_W_SCORE : X_E_ADDR;
        end
        X_W_SCORE: begin
          accept <= (score >= threshold);
          state  <= X_W_DEC;
        end
        X_W_DEC: begin
          done  <= 1'b1;
          state <= X_IDLE;
        end
        default: state <= X_IDLE;
      endcase
    end
  end

endmodule
