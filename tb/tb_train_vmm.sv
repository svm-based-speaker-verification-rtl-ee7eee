// tb_train_vmm: loads labelled training records into the SRAM, runs the
// train VMM controller with the kernel function controller attached, and
// checks every word of the augmented matrix [K' | y'] against the reference
// (border of labels and ones, RBF kernel entries, right-hand side), that no
// word outside the matrix was written, and the cycle count.
module tb_train_vmm;
  import svm_pkg::*;
  import svm_ref_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;   // a falling edge for the asynchronous reset
  always #5 clk = ~clk;

  logic       start, busy, done, k_start, k_done, k_busy;
  logic [5:0] n_vec, dim;
  addr_t      train_base, k_a, k_b;
  fx_t        k_result, rdata;
  mem_req_t   req_t, req_k, grant;
  mem_req_t   reqs [2];
  int checks = 0, failures = 0;

  train_vmm dut (.clk, .rst_n, .start, .n_vec, .dim, .train_base, .busy, .done,
                 .k_start, .k_addr_a(k_a), .k_addr_b(k_b), .k_done, .k_result,
                 .mreq(req_t), .rdata);
  kernel_ctrl u_k (.clk, .rst_n, .start(k_start), .addr_a(k_a), .addr_b(k_b), .dim,
                   .busy(k_busy), .done(k_done), .result(k_result), .mreq(req_k), .rdata);
  assign reqs[0] = req_t;
  assign reqs[1] = req_k;
  svm_arbiter #(.M(2)) u_arb (.clk, .reqs, .grant);
  svm_sram u_sram (.clk, .mreq(grant), .rdata);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cfg_n [3] = '{3, 31, 8};
    int cfg_d [3] = '{5, 24, 24};
    start = 0; n_vec = 0; dim = 0; train_base = FREE_BASE;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3; t++) begin
      automatic int n = cfg_n[t], d = cfg_d[t];
      automatic vec_t x [32];
      automatic int y [32];
      automatic int cyc, bad = 0, exp_cyc;
      // sentinel in the whole K' region, records after it
      for (int a = int'(KMAT_BASE); a < int'(ALPHA_BASE); a++) u_sram.mem[a] = 32'h5A5A_5A5A;
      for (int i = 0; i < n; i++) begin
        for (int e = 0; e < 64; e++) x[i][e] = 0;
        y[i] = (i % 3 == 0) ? -65536 : 65536;
        for (int e = 0; e < d; e++) begin
          x[i][e] = int'($urandom_range(0, 6 * 65536)) - 3 * 65536 + ((y[i] > 0) ? 65536 : -65536);
          u_sram.mem[int'(FREE_BASE) + i * (d + 1) + e] = x[i][e];
        end
        u_sram.mem[int'(FREE_BASE) + i * (d + 1) + d] = y[i];
      end
      @(negedge clk);
      start = 1; n_vec = 6'(n); dim = 6'(d);
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      for (int r = 0; r < 32; r++)
        for (int c = 0; c < 33; c++) begin
          automatic int got = u_sram.mem[int'(KMAT_BASE) + r * 33 + c];
          automatic int ex;
          if (r > n || (c > n + 1)) ex = 32'h5A5A_5A5A;
          else if (r == 0 && c == 0) ex = 0;
          else if (r == 0 && c == n + 1) ex = 0;
          else if (r == 0) ex = y[c - 1];
          else if (c == 0) ex = 65536;
          else if (c == n + 1) ex = y[r - 1];
          else ex = r_kval(r_dist(x[r - 1], x[c - 1], d));
          if (got != ex) begin
            bad++;
            if (bad < 5) $display("FAIL: N=%0d K'[%0d][%0d] got %0d exp %0d", n, r, c, got, ex);
          end
        end
      check(bad == 0, $sformatf("K' matrix for N=%0d D=%0d", n, d));
      exp_cyc = 4 * n + 3 + (n * (n + 1) / 2) * (3 * d + 5);
      check(cyc == exp_cyc, $sformatf("N=%0d D=%0d took %0d cycles, expected %0d", n, d, cyc, exp_cyc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
