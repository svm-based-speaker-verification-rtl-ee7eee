// tb_svm_top: end-to-end test of the whole engine at its default sizes
// (31 training vectors of 24 features, 4096-word SRAM).
//
// Through the host port it writes the environment variables and a training
// set (one enrolled speaker, several impostor groups, one far outlier), runs
// training, and compares the Lagrange multipliers, the SV-table, the speaker
// descriptor and the SV count with the reference model. It then verifies
// genuine and impostor test vectors against the model and checks score and
// decision. Further runs enrol a second speaker, hit a singular K' (two equal
// vectors) and a refused configuration. Training and testing cycle counts are
// checked against 48.8 ms and 0.66 ms at 50 MHz. Each mechanism (row swap,
// rejected and kept SVs, kernel past the table, accept, reject, singular,
// configuration error, several speakers) must occur at least once.
module tb_svm_top;
  import svm_pkg::*;
  import svm_ref_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;
  always #5 clk = ~clk;

  logic       host_req, host_we, start_train, start_test;
  addr_t      host_addr;
  fx_t        host_wdata, host_rdata, score;
  logic       busy, done, singular, config_error, accept;
  logic [5:0] sv_count;

  svm_top dut (.clk, .rst_n, .host_req, .host_we, .host_addr, .host_wdata, .host_rdata,
               .start_train, .start_test, .busy, .done, .singular, .config_error,
               .score, .accept, .sv_count);

  int checks = 0, failures = 0;
  int n_swap = 0, n_rej_sv = 0, n_kzero = 0;
  int n_keep_sv = 0, n_accept = 0, n_reject = 0, n_singular = 0, n_cfg = 0, n_speakers = 0;

  always @(posedge clk) begin
    if (dut.u_gj.swap_event) n_swap++;
    if (dut.u_svt.reject_event) n_rej_sv++;
    if (dut.u_kernel.done && dut.u_kernel.result == 0) n_kzero++;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic host_write(input int a, input int v);
    @(negedge clk);
    host_req = 1; host_we = 1; host_addr = addr_t'(a); host_wdata = v;
    @(negedge clk);
    host_req = 0; host_we = 0;
  endtask

  task automatic host_read(input int a, output int v);
    @(negedge clk);
    host_req = 1; host_we = 0; host_addr = addr_t'(a);
    @(negedge clk);
    host_req = 0;
    v = host_rdata;
  endtask

  task automatic run(input bit test, output int cycles);
    @(negedge clk);
    if (test) start_test = 1; else start_train = 1;
    @(negedge clk);
    start_test = 0; start_train = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  localparam int D = 24;
  localparam int N = 31;
  localparam int TB0 = int'(FREE_BASE);               // speaker 0 training set
  localparam int TB1 = TB0 + N * (D + 1);             // speaker 1 training set
  localparam int TST = TB1 + N * (D + 1);             // test vector

  vec_t x0 [32], x1 [32], centre [4];
  int   y0 [32], y1 [32];

  // reference training: returns alpha' and the SV list
  task automatic ref_train(const ref vec_t x [32], const ref int y [32], input int n,
                           output int alpha [32], output bit sing, output int nsw);
    automatic mat_t m;
    for (int r = 0; r < NM; r++) for (int c = 0; c < NC; c++) m[r][c] = 0;
    for (int j = 1; j <= n; j++) begin
      m[0][j] = y[j - 1]; m[j][0] = 65536; m[j][n + 1] = y[j - 1];
      for (int i = 1; i <= n; i++) m[i][j] = r_kval(r_dist(x[i - 1], x[j - 1], D));
    end
    r_gj(m, n + 1, sing, nsw);
    for (int i = 0; i <= n; i++) alpha[i] = m[i][n + 1];
  endtask

  function automatic int ref_score(const ref vec_t x [32], input int alpha [32], input int n,
                                   input vec_t t);
    int s = alpha[0];
    for (int i = 1; i <= n; i++)
      if (alpha[i] >= 0)
        s = r_sat(longint'(s) + ((longint'(alpha[i]) * longint'(r_kval(r_dist(t, x[i - 1], D)))) >>> 16));
    return s;
  endfunction

  task automatic load_set(input int base, const ref vec_t x [32], const ref int y [32], input int n);
    for (int i = 0; i < n; i++) begin
      for (int e = 0; e < D; e++) host_write(base + i * (D + 1) + e, x[i][e]);
      host_write(base + i * (D + 1) + D, y[i]);
    end
  endtask

  task automatic set_env(input int n, input int d, input int base, input int spk, input int claim,
                         input int th);
    host_write(int'(ENV_N), n);
    host_write(int'(ENV_D), d);
    host_write(int'(ENV_TRAIN_BASE), base);
    host_write(int'(ENV_SPK_ID), spk);
    host_write(int'(ENV_CLAIM_ID), claim);
    host_write(int'(ENV_TEST_BASE), TST);
    host_write(int'(ENV_THRESH), th);
  endtask

  // checks a finished training run against the reference
  task automatic check_training(input int spk, input int base, const ref vec_t x [32],
                                input int alpha [32], input int n);
    automatic int tbl = int'(SVT_BASE) + spk * int'(SVT_STRIDE);
    automatic int cnt = 0, bad = 0, v;
    for (int i = 0; i <= n; i++) begin
      host_read(int'(ALPHA_BASE) + i, v);
      if (v != alpha[i]) begin
        bad++;
        if (bad < 4) $display("FAIL: alpha[%0d] got %0d exp %0d", i, v, alpha[i]);
      end
    end
    check(bad == 0, $sformatf("speaker %0d Lagrange multipliers", spk));
    bad = 0;
    for (int i = 1; i <= n; i++)
      if (alpha[i] >= 0) begin
        host_read(tbl + 2 * cnt, v);
        if (v != base + (i - 1) * (D + 1)) bad++;
        host_read(tbl + 2 * cnt + 1, v);
        if (v != alpha[i]) bad++;
        cnt++;
      end
    check(bad == 0, $sformatf("speaker %0d SV-table", spk));
    check(sv_count == 6'(cnt), $sformatf("sv_count %0d exp %0d", sv_count, cnt));
    host_read(int'(DIR_BASE) + 3 * spk, v);     check(v == tbl, "descriptor start");
    host_read(int'(DIR_BASE) + 3 * spk + 1, v); check(v == cnt, "descriptor count");
    host_read(int'(DIR_BASE) + 3 * spk + 2, v); check(v == alpha[0], "descriptor bias");
    n_keep_sv += cnt;
    $display("INFO: speaker %0d enrolled with %0d of %0d vectors as SVs", spk, cnt, n);
  endtask

  task automatic do_test(input vec_t t, input int claim, input int th, const ref vec_t x [32],
                         input int alpha [32], input int n, input string what);
    automatic int sc, cyc, v;
    automatic bit acc;
    for (int e = 0; e < D; e++) host_write(TST + e, t[e]);
    host_write(int'(ENV_CLAIM_ID), claim);
    host_write(int'(ENV_THRESH), th);
    sc  = ref_score(x, alpha, n, t);
    acc = (sc >= th);
    run(1, cyc);
    check(score == sc, $sformatf("%s: score %0d exp %0d", what, score, sc));
    check(accept == acc, $sformatf("%s: decision %0d exp %0d", what, accept, acc));
    check(!singular && !config_error, "test status flags");
    host_read(int'(ENV_DECISION), v);
    check(v == int'(acc), "decision word");
    check(cyc <= 33000, $sformatf("testing took %0d cycles, more than 0.66 ms at 50 MHz", cyc));
    if (acc) n_accept++; else n_reject++;
    $display("INFO: %s claim %0d: score %0.3f, %s, %0d cycles", what, claim,
             real'(sc) / 65536.0, acc ? "accepted" : "rejected", cyc);
  endtask

  function automatic vec_t near(vec_t c, int spread);
    vec_t v;
    for (int e = 0; e < 64; e++) v[e] = 0;
    for (int e = 0; e < D; e++) v[e] = c[e] + int'($urandom_range(0, 2 * spread)) - spread;
    return v;
  endfunction

  initial begin
    automatic int alpha0 [32], alpha1 [32];
    automatic bit sing;
    automatic int nsw, cyc, v;
    host_req = 0; host_we = 0; host_addr = '0; host_wdata = 0;
    start_train = 0; start_test = 0;
    for (int k = 0; k < 4; k++) begin
      for (int e = 0; e < 64; e++) centre[k][e] = 0;
      for (int e = 0; e < D; e++) centre[k][e] = int'($urandom_range(0, 8 * 65536)) - 4 * 65536;
    end
    // speaker 0: vectors 0..11 genuine (centre 0), the rest impostors (centres 1..3)
    for (int i = 0; i < N; i++) begin
      x0[i] = near(centre[(i < 12) ? 0 : 1 + (i % 3)], 2 * 65536);
      y0[i] = (i < 12) ? 65536 : -65536;
    end
    for (int e = 0; e < D; e++) x0[N - 1][e] = x0[N - 1][e] + 30 * 65536;   // outlier
    // speaker 1: genuine = centre 1, impostors = centres 0, 2, 3
    for (int i = 0; i < N; i++) begin
      x1[i] = near(centre[(i < 10) ? 1 : ((i % 3 == 0) ? 0 : 2 + (i % 2))], 2 * 65536);
      y1[i] = (i < 10) ? 65536 : -65536;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- enrol speaker 0 ----
    load_set(TB0, x0, y0, N);
    set_env(N, D, TB0, 0, 0, 0);
    ref_train(x0, y0, N, alpha0, sing, nsw);
    run(0, cyc);
    $display("INFO: training speaker 0 took %0d cycles (%0.2f ms at 50 MHz)", cyc, real'(cyc) / 50000.0);
    check(cyc <= 2440000, "training within 48.8 ms at 50 MHz");
    check(!singular && !config_error && !sing, "training status");
    host_read(int'(ENV_STATUS), v);
    check(v == 1, "status word after training");
    check_training(0, TB0, x0, alpha0, N);

    // ---- enrol speaker 1 ----
    load_set(TB1, x1, y1, N);
    set_env(N, D, TB1, 1, 0, 0);
    ref_train(x1, y1, N, alpha1, sing, nsw);
    run(0, cyc);
    check(!singular && !sing, "speaker 1 training status");
    check_training(1, TB1, x1, alpha1, N);
    n_speakers = 2;

    // ---- verification ----
    for (int k = 0; k < 3; k++) begin
      do_test(near(centre[0], 65536), 0, 0, x0, alpha0, N, "genuine speaker 0");
      do_test(near(centre[2], 65536), 0, 0, x0, alpha0, N, "impostor vs speaker 0");
      do_test(near(centre[1], 65536), 1, 0, x1, alpha1, N, "genuine speaker 1");
      do_test(near(centre[3], 65536), 1, 0, x1, alpha1, N, "impostor vs speaker 1");
    end
    // thresholds at the extremes force both outcomes
    do_test(near(centre[0], 65536), 0, -32'sh7fff_ffff, x0, alpha0, N, "lowest threshold");
    do_test(near(centre[0], 65536), 0, 32'sh7fff_ffff, x0, alpha0, N, "highest threshold");

    // ---- singular K': two identical vectors ----
    for (int e = 0; e < D; e++) begin
      host_write(TB1 + e, 65536);
      host_write(TB1 + (D + 1) + e, 65536);
    end
    host_write(TB1 + D, 65536);
    host_write(TB1 + (D + 1) + D, -65536);
    set_env(2, D, TB1, 2, 0, 0);
    run(0, cyc);
    check(singular && !config_error, "singular K' reported");
    host_read(int'(ENV_STATUS), v);
    check(v == 3, "status word after singular matrix");
    if (singular) n_singular++;

    // ---- refused configuration ----
    set_env(0, D, TB1, 3, 0, 0);
    run(0, cyc);
    check(config_error, "N = 0 refused");
    host_read(int'(ENV_STATUS), v);
    check(v == 5, "status word after refused configuration");
    if (config_error) n_cfg++;

    // speaker 0's model survives the later runs
    set_env(N, D, TB0, 0, 0, 0);
    do_test(near(centre[0], 65536), 0, 0, x0, alpha0, N, "genuine speaker 0 again");

    $display("INFO: swaps=%0d rejected_svs=%0d kept_svs=%0d kernel_past_table=%0d accepts=%0d rejects=%0d singular=%0d config_errors=%0d speakers=%0d",
             n_swap, n_rej_sv, n_keep_sv, n_kzero, n_accept, n_reject, n_singular, n_cfg, n_speakers);
    check(n_swap > 0,     "row swap happened");
    check(n_rej_sv > 0,   "a vector was rejected as SV");
    check(n_keep_sv > 0,  "a vector was kept as SV");
    check(n_kzero > 0,    "kernel past the end of the exponential table");
    check(n_accept > 0,   "an accept decision");
    check(n_reject > 0,   "a reject decision");
    check(n_singular > 0, "singular matrix detection");
    check(n_cfg > 0,      "configuration refused");
    check(n_speakers > 1, "two speaker models");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
