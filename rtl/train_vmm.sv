// train_vmm: train vector-matrix-multiplication controller.
//
// Builds the augmented system [K' | y'] of the SVM training equations in SRAM:
//   row 0      : 0, y_1 .. y_N            | 0
//   row i >= 1 : 1, k(x_i,x_1) .. k(x_i,x_N) | y_i
// It reads the labels, writes the border of K', then walks the upper triangle
// i <= j, hands the two training vector addresses to the kernel function
// controller and writes each returned k_ij to both (i,j) and (j,i), since the
// RBF kernel is symmetric (this halving of kernel evaluations is this
// design's choice).
//
// Training records: record i (0-based) starts at train_base + i*(D+1) and
// holds D features followed by its label y (+1.0 or -1.0, Q16.16). N and D
// come from the environment variables (loaded by the sequencer). K' row r
// starts at KMAT_BASE + r*KCOLS; column N+1 holds y'.
// Interface: pulse start; done pulses once when the matrix is complete.
// Timing: 4 N + 3 + N (N + 1) / 2 * (3 D + 5) cycles; 38,319 for N = 31,
// D = 24.
module train_vmm
  import svm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [5:0] n_vec,        // N
  input  logic [5:0] dim,          // D
  input  addr_t      train_base,
  output logic       busy,
  output logic       done,
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
    T_IDLE, T_LBL_RD, T_LBL_W0, T_LBL_W1, T_LBL_W2, T_CORNER0, T_CORNER1,
    T_K_START, T_K_WAIT, T_K_W1, T_K_W2
  } tstate_e;
  tstate_e state;

  logic [5:0] i, j;
  addr_t      ptr_i, ptr_j;
  fx_t        val;
  addr_t      stride;
  logic [5:0] ncol;            // column of y' = N + 1

  assign stride   = addr_t'(dim) + addr_t'(1);
  assign ncol     = n_vec + 6'd1;
  assign busy     = (state != T_IDLE);
  assign k_addr_a = ptr_i;
  assign k_addr_b = ptr_j;
  assign k_start  = (state == T_K_START);

  always_comb begin
    mreq = MEM_IDLE;
    case (state)
      T_LBL_RD:  begin mreq.req = 1'b1; mreq.addr = ptr_j + addr_t'(dim); end
      T_LBL_W0:  begin mreq.req = 1'b1; mreq.we = 1'b1; mreq.addr = kaddr(6'd0, j); mreq.wdata = rdata; end
      T_LBL_W1:  begin mreq.req = 1'b1; mreq.we = 1'b1; mreq.addr = kaddr(j, 6'd0); mreq.wdata = FX_ONE; end
      T_LBL_W2:  begin mreq.req = 1'b1; mreq.we = 1'b1; mreq.addr = kaddr(j, ncol); mreq.wdata = val; end
      T_CORNER0: begin mreq.req = 1'b1; mreq.we = 1'b1; mreq.addr = kaddr(6'd0, 6'd0); mreq.wdata = '0; end
      T_CORNER1: begin mreq.req = 1'b1; mreq.we = 1'b1; mreq.addr = kaddr(6'd0, ncol); mreq.wdata = '0; end
      T_K_W1:    begin mreq.req = 1'b1; mreq.we = 1'b1; mreq.addr = kaddr(i, j); mreq.wdata = val; end
      T_K_W2:    begin mreq.req = 1'b1; mreq.we = 1'b1; mreq.addr = kaddr(j, i); mreq.wdata = val; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= T_IDLE;
      i     <= '0;
      j     <= '0;
      ptr_i <= '0;
      ptr_j <= '0;
      val   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        T_IDLE: if (start) begin
          j     <= 6'd1;
          ptr_j <= train_base;
          state <= (n_vec == 0) ? T_CORNER0 : T_LBL_RD;
        end
        T_LBL_RD: state <= T_LBL_W0;
        T_LBL_W0: begin
          val   <= rdata;
          state <= T_LBL_W1;
        end
        T_LBL_W1: state <= T_LBL_W2;
        T_LBL_W2: begin
          j     <= j + 6'd1;
          ptr_j <= ptr_j + stride;
          state <= (j == n_vec) ? T_CORNER0 : T_LBL_RD;
        end
        T_CORNER0: state <= T_CORNER1;
        T_CORNER1: begin
          i     <= 6'd1;
          j     <= 6'd1;
          ptr_i <= train_base;
          ptr_j <= train_base;
          if (n_vec == 0) begin
            done  <= 1'b1;
            state <= T_IDLE;
          end else begin
            state <= T_K_START;
          end
        end
        T_K_START: state <= T_K_WAIT;
        T_K_WAIT: if (k_done) begin
          val   <= k_result;
          state <= T_K_W1;
        end
        T_K_W1: state <= T_K_W2;
        T_K_W2: begin
          if (j == n_vec) begin
            if (i == n_vec) begin
              done  <= 1'b1;
              state <= T_IDLE;
            end else begin
              i     <= i + 6'd1;
              j     <= i + 6'd1;
              ptr_i <= ptr_i + stride;
              ptr_j <= ptr_i + stride;
              state <= T_K_START;
            end
          end else begin
            j     <= j + 6'd1;
            ptr_j <= ptr_j + stride;
            state <= T_K_START;
          end
        end
        default: state <= T_IDLE;
      endcase
    end
  end

endmodule
