// svm_top: SVM speaker-verification engine.
//
// Trains a speaker model from N labelled training vectors (time-averaged
// cepstral features, +1 for the speaker, -1 for impostors) and verifies test
// vectors against it, entirely in fixed-point hardware around one SRAM:
//   training: train VMM + kernel function controllers build the K' matrix of
//             the RBF kernel, the Gauss-Jordan controller solves
//             K' alpha' = y' for the Lagrange multipliers, and the support
//             vector table controller keeps the vectors with non-negative
//             alpha in the speaker's SV-table;
//   testing:  the test VMM controller scores a test vector against the
//             claimed speaker's SVs through the same kernel function
//             controller and compares the score with a threshold.
// A host (processor behind a bus bridge, outside this design) loads the
// environment variables, training and test vectors through the host SRAM port
// while the engine is idle, then pulses start_train or start_test and waits
// for done. Results: ENV_STATUS, ENV_SCORE, ENV_DECISION, the SV-tables and
// descriptors in SRAM, and the score/accept/sv_count/status ports.
// The memory map is in svm_pkg. One 50 MHz-class clock, active-low
// asynchronous reset.
module svm_top
  import svm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // host SRAM port (use only while busy = 0); read data one cycle later
  input  logic       host_req,
  input  logic       host_we,
  input  addr_t      host_addr,
  input  fx_t        host_wdata,
  output fx_t        host_rdata,
  // run control
  input  logic       start_train,
  input  logic       start_test,
  output logic       busy,
  output logic       done,
  output logic       singular,
  output logic       config_error,
  output fx_t        score,
  output logic       accept,
  output logic [5:0] sv_count
);

  localparam int unsigned M = 7;

  fx_t      rdata;
  mem_req_t reqs [M];
  mem_req_t grant;

  // configuration
  logic [5:0] n_vec, dim;
  addr_t      train_base, test_base;
  logic [1:0] spk_id, claim_id;
  fx_t        threshold;
  logic       kernel_owner_test;

  // handshakes
  logic tv_start, tv_done, gj_start, gj_done, gj_singular, svt_start, svt_done;
  logic tst_start, tst_done;
  logic tv_busy, gj_busy, svt_busy, tst_busy, k_busy;
  logic gj_swap_event, svt_reject_event;

  // kernel command sharing
  logic  tv_k_start, tst_k_start, k_start, k_done;
  addr_t tv_k_a, tv_k_b, tst_k_a, tst_k_b, k_a, k_b;
  fx_t   k_result;

  assign reqs[0] = '{req: host_req && !busy, we: host_we, addr: host_addr, wdata: host_wdata};
  assign host_rdata = rdata;

  svm_sequencer u_seq (
    .clk, .rst_n, .start_train, .start_test, .busy, .done, .singular, .config_error,
    .kernel_owner_test, .n_vec, .dim, .train_base, .spk_id, .claim_id, .test_base,
    .threshold, .tv_start, .tv_done, .gj_start, .gj_done, .gj_singular, .svt_start,
    .svt_done, .tst_start, .tst_done, .mreq(reqs[1]), .rdata
  );

  train_vmm u_train (
    .clk, .rst_n, .start(tv_start), .n_vec, .dim, .train_base, .busy(tv_busy),
    .done(tv_done), .k_start(tv_k_start), .k_addr_a(tv_k_a), .k_addr_b(tv_k_b),
    .k_done, .k_result, .mreq(reqs[2]), .rdata
  );

  assign k_start = kernel_owner_test ? tst_k_start : tv_k_start;
  assign k_a     = kernel_owner_test ? tst_k_a     : tv_k_a;
  assign k_b     = kernel_owner_test ? tst_k_b     : tv_k_b;

  kernel_ctrl u_kernel (
    .clk, .rst_n, .start(k_start), .addr_a(k_a), .addr_b(k_b), .dim, .busy(k_busy),
    .done(k_done), .result(k_result), .mreq(reqs[3]), .rdata
  );

  gj_ctrl u_gj (
    .clk, .rst_n, .start(gj_start), .n_vec, .busy(gj_busy), .done(gj_done),
    .singular(gj_singular), .swap_event(gj_swap_event), .mreq(reqs[4]), .rdata
  );

  svt_ctrl u_svt (
    .clk, .rst_n, .start(svt_start), .n_vec, .dim, .train_base, .spk_id,
    .busy(svt_busy), .done(svt_done), .sv_count, .reject_event(svt_reject_event),
    .mreq(reqs[5]), .rdata
  );

  test_vmm u_test (
    .clk, .rst_n, .start(tst_start), .claim_id, .test_base, .threshold,
    .busy(tst_busy), .done(tst_done), .score, .accept, .k_start(tst_k_start),
    .k_addr_a(tst_k_a), .k_addr_b(tst_k_b), .k_done, .k_result,
    .mreq(reqs[6]), .rdata
  );

  svm_arbiter #(.M(M)) u_arb (.clk, .reqs, .grant);

  svm_sram u_sram (.clk, .mreq(grant), .rdata);

  a_host_idle: assert property (@(posedge clk) disable iff (!rst_n)
    host_req |-> !busy) else $error("svm_top: host SRAM access while busy");

  a_one_controller: assert property (@(posedge clk) disable iff (!rst_n)
    $countones({tv_busy, gj_busy, svt_busy, tst_busy}) <= 1 && !(k_busy && (gj_busy || svt_busy)))
    else $error("svm_top: two controllers active at once");

endmodule
