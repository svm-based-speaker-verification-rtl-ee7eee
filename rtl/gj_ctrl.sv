// gj_ctrl: Gauss-Jordan controller.
//
// Solves K' alpha' = y' for the Lagrange multipliers, working in place on the
// augmented matrix [K' | y'] that the train VMM controller left in SRAM
// (n = N + 1 rows, N + 2 columns). Gauss-Jordan elimination with full
// pivoting, repeated once per row:
//   1. Big Finder   - scan the matrix, find the largest |a_rc| with row r and
//                     column c not yet pivoted;
//   2. Swap         - if r != c, exchange rows r and c so the pivot lands on
//                     the diagonal (c, c);
//   3. Big Row      - divide row c by the pivot;
//   4. Matrix Calc  - subtract f_r times row c from every other row r, where
//                     f_r is row r's element in column c.
// After n steps the pivot columns form the identity, so alpha'_i sits in
// column N + 1 of row i; it is copied to ALPHA_BASE (lambda first, then
// alpha_1 .. alpha_N). No column swaps are needed for the solution vector.
// A zero maximum (singular K') stops the run with singular = 1.
// Interface: pulse start with n_vec held; done pulses once.
// Timing per pivot step: n^2 + 3 scan cycles, 4 (N + 2) + 2 for a swap,
// (N + 2) x 53 for the division and (n - 1)(N + 2) x 4 for elimination; about
// 221 k cycles in all for N = 31 (4.4 ms at 50 MHz).
//
// The four units and their order follow the published architecture; the
// in-place SRAM layout, the restriction of the search to unpivoted rows and
// columns, the N + 1 step count and the stop on a singular matrix are this
// design's own choices.
module gj_ctrl
  import svm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [5:0] n_vec,         // N; the system has N + 1 unknowns
  output logic       busy,
  output logic       done,
  output logic       singular,
  output logic       swap_event,    // one-cycle pulse when a row swap starts
  output mem_req_t   mreq,
  input  fx_t        rdata
);

  typedef enum logic [4:0] {
    G_IDLE, G_FIND_INIT, G_FIND, G_FIND_DRAIN, G_FIND_CHK, G_SWAP, G_SWAP_WAIT,
    G_PIV_RD, G_PIV_LATCH, G_BR_RD, G_BR_DIV, G_BR_WAIT, G_BR_WR,
    G_MC_ROW, G_MC_F, G_MC_RD_P, G_MC_RD_A, G_MC_CALC, G_MC_WR, G_NEXT,
    G_OUT_RD, G_OUT_WR
  } gstate_e;
  gstate_e state;

  logic [5:0]  n, ncols;
  logic [5:0]  r, c, piv_cnt;
  logic [5:0]  irow, icol;
  logic [N_MAX:0] ipiv;
  fx_t         pivot, f, pv;

  assign n     = n_vec + 6'd1;
  assign ncols = n_vec + 6'd2;
  assign busy  = (state != G_IDLE);

  // ---- Big Finder: fed one cycle after each scan read ----
  logic        fnd_clear, fnd_valid, fnd_elig;
  logic [5:0]  fnd_r, fnd_c;
  logic [31:0] max_abs;
  logic [5:0]  max_row, max_col;

  assign fnd_clear = (state == G_FIND_INIT);
  assign fnd_elig  = !ipiv[fnd_r[4:0]] && !ipiv[fnd_c[4:0]];

  gj_big_finder u_finder (
    .clk, .rst_n, .clear(fnd_clear), .in_valid(fnd_valid), .eligible(fnd_elig),
    .value(rdata), .row(fnd_r), .col(fnd_c),
    .max_abs(max_abs), .max_row(max_row), .max_col(max_col)
  );

  // ---- Swap ----
  logic     swp_start, swp_busy, swp_done;
  mem_req_t swp_req;
  assign swp_start  = (state == G_SWAP);
  assign swap_event = swp_start;

  gj_swap u_swap (
    .clk, .rst_n, .start(swp_start), .row_a(irow), .row_b(icol), .ncols(ncols),
    .busy(swp_busy), .done(swp_done), .mreq(swp_req), .rdata(rdata)
  );

  // ---- Big Row divider ----
  logic div_start, div_busy, div_done;
  fx_t  quotient;
  assign div_start = (state == G_BR_DIV);

  gj_big_row u_bigrow (
    .clk, .rst_n, .start(div_start), .dividend(rdata), .divisor(pivot),
    .busy(div_busy), .done(div_done), .quotient(quotient)
  );

  // ---- Matrix calculator ----
  logic mc_valid;
  fx_t  mc_result;

  gj_matrix_calc u_calc (
    .clk, .rst_n, .in_valid(state == G_MC_CALC), .a(rdata), .f(f), .p(pv),
    .out_valid(mc_valid), .result(mc_result)
  );

  // ---- SRAM requests ----
  mem_req_t own_req;
  always_comb begin
    own_req = MEM_IDLE;
    case (state)
      G_FIND:    begin own_req.req = 1'b1; own_req.addr = kaddr(r, c); end
      G_PIV_RD:  begin own_req.req = 1'b1; own_req.addr = kaddr(icol, icol); end
      G_BR_RD:   begin own_req.req = 1'b1; own_req.addr = kaddr(icol, c); end
      G_BR_WR:   begin own_req.req = 1'b1; own_req.we = 1'b1; own_req.addr = kaddr(icol, c); own_req.wdata = quotient; end
      G_MC_ROW:  if (r != icol) begin own_req.req = 1'b1; own_req.addr = kaddr(r, icol); end
      G_MC_RD_P: begin own_req.req = 1'b1; own_req.addr = kaddr(icol, c); end
      G_MC_RD_A: begin own_req.req = 1'b1; own_req.addr = kaddr(r, c); end
      G_MC_WR:   begin own_req.req = 1'b1; own_req.we = 1'b1; own_req.addr = kaddr(r, c); own_req.wdata = mc_result; end
      G_OUT_RD:  begin own_req.req = 1'b1; own_req.addr = kaddr(r, ncols - 6'd1); end
      G_OUT_WR:  begin own_req.req = 1'b1; own_req.we = 1'b1; own_req.addr = ALPHA_BASE + addr_t'(r); own_req.wdata = rdata; end
      default: ;
    endcase
  end
  assign mreq = swp_busy ? swp_req : own_req;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= G_IDLE;
      r         <= '0;
      c         <= '0;
      piv_cnt   <= '0;
      irow      <= '0;
      icol      <= '0;
      ipiv      <= '0;
      pivot     <= FX_ONE;
      f         <= '0;
      pv        <= '0;
      fnd_valid <= 1'b0;
      fnd_r     <= '0;
      fnd_c     <= '0;
      done      <= 1'b0;
      singular  <= 1'b0;
    end else begin
      done      <= 1'b0;
      fnd_valid <= (state == G_FIND);
      fnd_r     <= r;
      fnd_c     <= c;
      case (state)
        G_IDLE: if (start) begin
          ipiv     <= '0;
          piv_cnt  <= '0;
          singular <= 1'b0;
          state    <= G_FIND_INIT;
        end
        G_FIND_INIT: begin
          r     <= '0;
          c     <= '0;
          state <= G_FIND;
        end
        G_FIND: begin
          if (c == n - 6'd1) begin
            c <= '0;
            r <= r + 6'd1;
            if (r == n - 6'd1) state <= G_FIND_DRAIN;
          end else begin
            c <= c + 6'd1;
          end
        end
        G_FIND_DRAIN: state <= G_FIND_CHK;
        G_FIND_CHK: begin
          if (max_abs == 0) begin
            singular <= 1'b1;
            done     <= 1'b1;
            state    <= G_IDLE;
          end else begin
            irow  <= max_row;
            icol  <= max_col;
            state <= (max_row != max_col) ? G_SWAP : G_PIV_RD;
          end
        end
        G_SWAP:      state <= G_SWAP_WAIT;
        G_SWAP_WAIT: if (swp_done) state <= G_PIV_RD;
        G_PIV_RD:    state <= G_PIV_LATCH;
        G_PIV_LATCH: begin
          pivot <= rdata;
          c     <= '0;
          state <= G_BR_RD;
        end
        G_BR_RD:   state <= G_BR_DIV;
        G_BR_DIV:  state <= G_BR_WAIT;
        G_BR_WAIT: if (div_done) state <= G_BR_WR;
        G_BR_WR: begin
          if (c == ncols - 6'd1) begin
            ipiv[icol[4:0]] <= 1'b1;
            r     <= '0;
            state <= G_MC_ROW;
          end else begin
            c     <= c + 6'd1;
            state <= G_BR_RD;
          end
        end
        G_MC_ROW: begin
          if (r == icol) begin
            r     <= r + 6'd1;
            state <= (r == n - 6'd1) ? G_NEXT : G_MC_ROW;
          end else begin
            state <= G_MC_F;
          end
        end
        G_MC_F: begin
          f     <= rdata;
          c     <= '0;
          state <= G_MC_RD_P;
        end
        G_MC_RD_P: state <= G_MC_RD_A;
        G_MC_RD_A: begin
          pv    <= rdata;
          state <= G_MC_CALC;
        end
        G_MC_CALC: state <= G_MC_WR;
        G_MC_WR: begin
          if (c == ncols - 6'd1) begin
            r     <= r + 6'd1;
            state <= (r == n - 6'd1) ? G_NEXT : G_MC_ROW;
          end else begin
            c     <= c + 6'd1;
            state <= G_MC_RD_P;
          end
        end
        G_NEXT: begin
          piv_cnt <= piv_cnt + 6'd1;
          r       <= '0;
          state   <= (piv_cnt == n - 6'd1) ? G_OUT_RD : G_FIND_INIT;
        end
        G_OUT_RD: state <= G_OUT_WR;
        G_OUT_WR: begin
          r <= r + 6'd1;
          if (r == n - 6'd1) begin
            done  <= 1'b1;
            state <= G_IDLE;
          end else begin
            state <= G_OUT_RD;
          end
        end
        default: state <= G_IDLE;
      endcase
    end
  end

  a_div_idle: assert property (@(posedge clk) disable iff (!rst_n)
    div_start |-> !div_busy);

  a_mc_on_time: assert property (@(posedge clk) disable iff (!rst_n)
    (state == G_MC_WR) |-> mc_valid);

endmodule
