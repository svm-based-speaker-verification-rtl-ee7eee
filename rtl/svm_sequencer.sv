// svm_sequencer: runs the flow of training and testing.
//
// Training (start_train): load the environment variables from SRAM, then run
// the train VMM controller (builds K' with the kernel function controller),
// the Gauss-Jordan controller (solves for the Lagrange multipliers) and the
// support vector table controller, one after the other. Testing (start_test):
// load the environment variables, then run the test VMM controller.
// Each run ends by writing ENV_STATUS = {config_error, singular, done} and
// pulsing done. An environment with N = 0, N > N_MAX, D = 0 or D > D_MAX is
// refused with config_error set and nothing run. kernel_owner_test tells the
// top which VMM controller currently drives the kernel function controller.
// Interface: start pulses are ignored while busy. Timing: 14 cycles of
// environment loading, then the sum of the controllers' run times, plus 2.
//
// The order of the steps follows the published flow; the environment word
// set, the configuration check and the status word are this design's own.
module svm_sequencer
  import svm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start_train,
  input  logic       start_test,
  output logic       busy,
  output logic       done,
  output logic       singular,
  output logic       config_error,
  output logic       kernel_owner_test,
  // configuration from the environment variables
  output logic [5:0] n_vec,
  output logic [5:0] dim,
  output addr_t      train_base,
  output logic [1:0] spk_id,
  output logic [1:0] claim_id,
  output addr_t      test_base,
  output fx_t        threshold,
  // controller handshakes
  output logic       tv_start,
  input  logic       tv_done,
  output logic       gj_start,
  input  logic       gj_done,
  input  logic       gj_singular,
  output logic       svt_start,
  input  logic       svt_done,
  output logic       tst_start,
  input  logic       tst_done,
  // SRAM
  output mem_req_t   mreq,
  input  fx_t        rdata
);

  typedef enum logic [3:0] {
    Q_IDLE, Q_ENV_RD, Q_ENV_LATCH, Q_CHECK, Q_TV, Q_TV_WAIT, Q_GJ, Q_GJ_WAIT,
    Q_SVT, Q_SVT_WAIT, Q_TST, Q_TST_WAIT, Q_STATUS
  } qstate_e;
  qstate_e state;

  logic       mode_test;
  logic [2:0] e;              // environment word being loaded

  assign busy              = (state != Q_IDLE);
  assign kernel_owner_test = mode_test;
  assign tv_start  = (state == Q_TV);
  assign gj_start  = (state == Q_GJ);
  assign svt_start = (state == Q_SVT);
  assign tst_start = (state == Q_TST);

  always_comb begin
    mreq = MEM_IDLE;
    case (state)
      Q_ENV_RD: begin mreq.req = 1'b1; mreq.addr = ENV_N + addr_t'(e); end
      Q_STATUS: begin mreq.req = 1'b1; mreq.we = 1'b1; mreq.addr = ENV_STATUS;
                      mreq.wdata = fx_t'({29'd0, config_error, singular, 1'b1}); end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= Q_IDLE;
      mode_test    <= 1'b0;
      e            <= '0;
      n_vec        <= '0;
      dim          <= '0;
      train_base   <= '0;
      spk_id       <= '0;
      claim_id     <= '0;
      test_base    <= '0;
      threshold    <= '0;
      singular     <= 1'b0;
      config_error <= 1'b0;
      done         <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        Q_IDLE: if (start_train || start_test) begin
          mode_test    <= !start_train;
          singular     <= 1'b0;
          config_error <= 1'b0;
          e            <= '0;
          state        <= Q_ENV_RD;
        end
        Q_ENV_RD: state <= Q_ENV_LATCH;
        Q_ENV_LATCH: begin
          case (e)
            3'd0: n_vec      <= (rdata > 63) ? 6'd63 : rdata[5:0];
            3'd1: dim        <= (rdata > 63) ? 6'd63 : rdata[5:0];
            3'd2: train_base <= rdata[ADDR_W-1:0];
            3'd3: spk_id     <= rdata[1:0];
            3'd4: claim_id   <= rdata[1:0];
            3'd5: test_base  <= rdata[ADDR_W-1:0];
            default: threshold <= rdata;
          endcase
          e     <= e + 3'd1;
          state <= (e == 3'd6) ? Q_CHECK : Q_ENV_RD;
        end
        Q_CHECK: begin
          if (dim == 0 || dim > 6'(D_MAX) || (!mode_test && (n_vec == 0 || n_vec > 6'(N_MAX)))) begin
            config_error <= 1'b1;
            state        <= Q_STATUS;
          end else begin
            state <= mode_test ? Q_TST : Q_TV;
          end
        end
        Q_TV:      state <= Q_TV_WAIT;
        Q_TV_WAIT: if (tv_done) state <= Q_GJ;
        Q_GJ:      state <= Q_GJ_WAIT;
        Q_GJ_WAIT: if (gj_done) begin
          singular <= gj_singular;
          state    <= gj_singular ? Q_STATUS : Q_SVT;
        end
        Q_SVT:      state <= Q_SVT_WAIT;
        Q_SVT_WAIT: if (svt_done) state <= Q_STATUS;
        Q_TST:      state <= Q_TST_WAIT;
        Q_TST_WAIT: if (tst_done) state <= Q_STATUS;
        Q_STATUS: begin
          done  <= 1'b1;
          state <= Q_IDLE;
        end
        default: state <= Q_IDLE;
      endcase
    end
  end

endmodule
