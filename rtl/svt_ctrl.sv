// svt_ctrl: support vector table controller.
//
// Turns the solved Lagrange multipliers into the speaker's SV-table. It reads
// alpha_1 .. alpha_N from ALPHA_BASE + 1 .. N; a training vector whose
// multiplier has bit 31 (the 32nd bit, the sign) equal to 0 is a support
// vector, and gets an SV-table entry {address of its training record,
// alpha}. Entries are packed from the speaker's table start
// SVT_BASE + spk_id * SVT_STRIDE. Finally it writes the speaker descriptor at
// DIR_BASE + 3 * spk_id: table start, number of SVs and the bias lambda
// (alpha'_0), which the test VMM controller needs for the score.
// Interface: pulse start; done pulses once; sv_count holds the SV count.
// Timing: 2 cycles per rejected and 4 per accepted vector, plus 5.
//
// The sign-bit rule and the {address, multiplier} entries follow the
// published architecture; storing lambda with the count, and the four
// speaker slots, are this design's additions.
module svt_ctrl
  import svm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [5:0] n_vec,
  input  logic [5:0] dim,
  input  addr_t      train_base,
  input  logic [1:0] spk_id,
  output logic       busy,
  output logic       done,
  output logic [5:0] sv_count,
  output logic       reject_event,   // pulse: a vector was not an SV
  output mem_req_t   mreq,
  input  fx_t        rdata
);

  typedef enum logic [3:0] {
    V_IDLE, V_RD, V_CHK, V_W_ADDR, V_W_ALPHA, V_LAM_RD, V_DIR0, V_DIR1, V_DIR2
  } vstate_e;
  vstate_e state;

  logic [5:0] i;
  addr_t      ptr, tbl_base, dir_base;
  fx_t        val;

  assign busy     = (state != V_IDLE);
  assign tbl_base = SVT_BASE + addr_t'(spk_id) * addr_t'(SVT_STRIDE);
  assign dir_base = DIR_BASE + addr_t'(spk_id) * addr_t'(DIR_STRIDE);
  assign reject_event = (state == V_CHK) && rdata[31];

  always_comb begin
    mreq = MEM_IDLE;
    case (state)
      V_RD:      begin mreq.req = 1'b1; mreq.addr = ALPHA_BASE + addr_t'(i) + addr_t'(1); end
      V_W_ADDR:  begin mreq.req = 1'b1; mreq.we = 1'b1;
                       mreq.addr = tbl_base + addr_t'({sv_count, 1'b0});
                       mreq.wdata = fx_t'({20'd0, ptr}); end
      V_W_ALPHA: begin mreq.req = 1'b1; mreq.we = 1'b1;
                       mreq.addr = tbl_base + addr_t'({sv_count, 1'b0}) + addr_t'(1);
                       mreq.wdata = val; end
      V_LAM_RD:  begin mreq.req = 1'b1; mreq.addr = ALPHA_BASE; end
      V_DIR0:    begin mreq.req = 1'b1; mreq.we = 1'b1; mreq.addr = dir_base;
                       mreq.wdata = fx_t'({20'd0, tbl_base}); end
      V_DIR1:    begin mreq.req = 1'b1; mreq.we = 1'b1; mreq.addr = dir_base + addr_t'(1);
                       mreq.wdata = fx_t'({26'd0, sv_count}); end
      V_DIR2:    begin mreq.req = 1'b1; mreq.we = 1'b1; mreq.addr = dir_base + addr_t'(2);
                       mreq.wdata = val; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= V_IDLE;
      i        <= '0;
      ptr      <= '0;
      val      <= '0;
      sv_count <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        V_IDLE: if (start) begin
          i        <= '0;
          ptr      <= train_base;
          sv_count <= '0;
          state    <= (n_vec == 0) ? V_LAM_RD : V_RD;
        end
        V_RD: state <= V_CHK;
        V_CHK: begin
          val <= rdata;
          if (!rdata[31]) begin
            state <= V_W_ADDR;
          end else begin
            i     <= i + 6'd1;
            ptr   <= ptr + addr_t'(dim) + addr_t'(1);
            state <= (i + 6'd1 == n_vec) ? V_LAM_RD : V_RD;
          end
        end
        V_W_ADDR: state <= V_W_ALPHA;
        V_W_ALPHA: begin
          sv_count <= sv_count + 6'd1;
          i        <= i + 6'd1;
          ptr      <= ptr + addr_t'(dim) + addr_t'(1);
          state    <= (i + 6'd1 == n_vec) ? V_LAM_RD : V_RD;
        end
        V_LAM_RD: state <= V_DIR0;
        V_DIR0: begin
          val   <= rdata;
          state <= V_DIR1;
        end
        V_DIR1: state <= V_DIR2;
        V_DIR2: begin
          done  <= 1'b1;
          state <= V_IDLE;
        end
        default: state <= V_IDLE;
      endcase
    end
  end

endmodule
