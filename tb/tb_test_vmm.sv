// tb_test_vmm: builds speaker descriptors and SV-tables in SRAM (random SV
// vectors, multipliers and bias; one speaker with no SVs), runs the test VMM
// controller with the kernel function controller for random test vectors,
// claimed speakers and thresholds, and checks score, decision (both
// outcomes), the ENV_SCORE / ENV_DECISION words and the cycle count.
module tb_test_vmm;
  import svm_pkg::*;
  import svm_ref_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;   // a falling edge for the asynchronous reset
  always #5 clk = ~clk;

  logic       start, busy, done, accept, k_start, k_done, k_busy;
  logic [1:0] claim_id;
  addr_t      test_base, k_a, k_b;
  fx_t        threshold, score, k_result, rdata;
  mem_req_t   req_x, req_k, grant;
  mem_req_t   reqs [2];
  logic [5:0] dim;
  int checks = 0, failures = 0, n_acc = 0, n_rej = 0;

  test_vmm dut (.clk, .rst_n, .start, .claim_id, .test_base, .threshold, .busy, .done,
                .score, .accept, .k_start, .k_addr_a(k_a), .k_addr_b(k_b), .k_done,
                .k_result, .mreq(req_x), .rdata);
  kernel_ctrl u_k (.clk, .rst_n, .start(k_start), .addr_a(k_a), .addr_b(k_b), .dim,
                   .busy(k_busy), .done(k_done), .result(k_result), .mreq(req_k), .rdata);
  assign reqs[0] = req_x;
  assign reqs[1] = req_k;
  svm_arbiter #(.M(2)) u_arb (.clk, .reqs, .grant);
  svm_sram u_sram (.clk, .mreq(grant), .rdata);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  vec_t x [32];
  int   nsv [4];
  int   sv_idx [4][32];
  int   sv_alpha [4][32];
  int   lam [4];

  initial begin
    localparam int D = 24;
    localparam int TEST = int'(FREE_BASE) + 32 * (D + 1);
    start = 0; claim_id = 0; test_base = addr_t'(TEST); threshold = 0; dim = 6'(D);
    // 32 training records
    for (int i = 0; i < 32; i++) begin
      for (int e = 0; e < 64; e++) x[i][e] = 0;
      for (int e = 0; e < D; e++) begin
        x[i][e] = int'($urandom_range(0, 6 * 65536)) - 3 * 65536;
        u_sram.mem[int'(FREE_BASE) + i * (D + 1) + e] = x[i][e];
      end
    end
    // four speaker models; speaker 2 has no SVs
    for (int s = 0; s < 4; s++) begin
      automatic int tbl = int'(SVT_BASE) + s * int'(SVT_STRIDE);
      nsv[s] = (s == 2) ? 0 : (s == 0) ? 31 : $urandom_range(1, 31);
      lam[s] = int'($urandom_range(0, 4 * 65536)) - 2 * 65536;
      for (int k = 0; k < nsv[s]; k++) begin
        sv_idx[s][k]   = $urandom_range(0, 31);
        sv_alpha[s][k] = int'($urandom_range(0, 8 * 65536));
        if (k == 5) sv_alpha[s][k] = 32'sh7fff_ffff;     // drives saturation
        u_sram.mem[tbl + 2 * k]     = int'(FREE_BASE) + sv_idx[s][k] * (D + 1);
        u_sram.mem[tbl + 2 * k + 1] = sv_alpha[s][k];
      end
      u_sram.mem[int'(DIR_BASE) + 3 * s]     = tbl;
      u_sram.mem[int'(DIR_BASE) + 3 * s + 1] = nsv[s];
      u_sram.mem[int'(DIR_BASE) + 3 * s + 2] = lam[s];
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 24; t++) begin
      automatic vec_t tv;
      automatic int s = t % 4, sc, cyc;
      automatic int th = int'($urandom_range(0, 8 * 65536)) - 4 * 65536;
      automatic bit acc;
      for (int e = 0; e < 64; e++) tv[e] = 0;
      for (int e = 0; e < D; e++) begin
        tv[e] = x[t % 32][e] + int'($urandom_range(0, 2 * 65536)) - 65536;
        u_sram.mem[TEST + e] = tv[e];
      end
      sc = lam[s];
      for (int k = 0; k < nsv[s]; k++) begin
        automatic int kv = r_kval(r_dist(tv, x[sv_idx[s][k]], D));
        if (t < 8 && k == 5) continue;
        sc = r_sat(longint'(sc) + ((longint'(sv_alpha[s][k]) * longint'(kv)) >>> 16));
      end
      // the saturating SV is only kept from t = 8 on
      if (t == 8) for (int q = 0; q < 4; q++) if (nsv[q] > 5) u_sram.mem[int'(SVT_BASE) + q * int'(SVT_STRIDE) + 11] = sv_alpha[q][5];
      if (t == 0) for (int q = 0; q < 4; q++) if (nsv[q] > 5) u_sram.mem[int'(SVT_BASE) + q * int'(SVT_STRIDE) + 11] = 0;
      acc = (sc >= th);
      @(negedge clk);
      start = 1; claim_id = 2'(s); threshold = th;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      check(score == sc, $sformatf("t%0d score %0d exp %0d", t, score, sc));
      check(accept == acc, $sformatf("t%0d accept %0d exp %0d", t, accept, acc));
      check(u_sram.mem[int'(ENV_SCORE)] == sc && u_sram.mem[int'(ENV_DECISION)] == int'(acc),
            $sformatf("t%0d result words", t));
      check(cyc == 7 + nsv[s] * (3 * D + 7), $sformatf("t%0d cycles %0d for %0d SVs", t, cyc, nsv[s]));
      if (acc) n_acc++; else n_rej++;
    end
    check(n_acc > 0 && n_rej > 0, "both decisions seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
