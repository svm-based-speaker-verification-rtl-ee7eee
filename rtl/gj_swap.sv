// gj_swap: Swap unit of the Gauss-Jordan controller.
//
// Exchanges two rows of the K' matrix in SRAM: the row holding the pivot
// (maximum row) and the row whose index equals the pivot's column (maximum
// column), which moves the pivot onto the diagonal. For every column c it
// reads A[c], reads B[c], writes B's word to A and A's word to B: four SRAM
// cycles per column, so 4 * ncols + 1 cycles per swap.
// Interface: pulse start with row_a, row_b, ncols held; done pulses once.
//
// The row exchange follows the published architecture; doing it word by
// word over the SRAM port is this design's choice.
module gj_swap
  import svm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [5:0] row_a,
  input  logic [5:0] row_b,
  input  logic [5:0] ncols,
  output logic       busy,
  output logic       done,
  output mem_req_t   mreq,
  input  fx_t        rdata
);

  typedef enum logic [2:0] {S_IDLE, S_RD_A, S_RD_B, S_WR_A, S_WR_B} sstate_e;
  sstate_e state;
  logic [5:0] c;
  fx_t a_val;

  assign busy = (state != S_IDLE);

  always_comb begin
    mreq = MEM_IDLE;
    case (state)
      S_RD_A: begin mreq.req = 1'b1; mreq.addr = kaddr(row_a, c); end
      S_RD_B: begin mreq.req = 1'b1; mreq.addr = kaddr(row_b, c); end
      S_WR_A: begin mreq.req = 1'b1; mreq.we = 1'b1; mreq.addr = kaddr(row_a, c); mreq.wdata = rdata; end
      S_WR_B: begin mreq.req = 1'b1; mreq.we = 1'b1; mreq.addr = kaddr(row_b, c); mreq.wdata = a_val; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      c     <= '0;
      a_val <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          c     <= '0;
          state <= (ncols == 0) ? S_IDLE : S_RD_A;
          done  <= (ncols == 0);
        end
        S_RD_A: state <= S_RD_B;
        S_RD_B: begin
          a_val <= rdata;
          state <= S_WR_A;
        end
        S_WR_A: state <= S_WR_B;
        S_WR_B: begin
          c <= c + 6'd1;
          if (c + 6'd1 == ncols) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            state <= S_RD_A;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
