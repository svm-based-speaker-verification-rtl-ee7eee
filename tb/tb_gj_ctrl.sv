// tb_gj_ctrl: places augmented K' matrices in SRAM (kernel matrices of
// random training sets for N = 3, 8, 31, a random dense system, and a
// singular one built from two identical vectors), runs the Gauss-Jordan
// controller and compares the whole matrix after elimination, the
// multipliers copied to ALPHA_BASE, the number of row swaps and the singular
// flag with the reference elimination.
module tb_gj_ctrl;
  import svm_pkg::*;
  import svm_ref_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;   // a falling edge for the asynchronous reset
  always #5 clk = ~clk;

  logic       start, busy, done, singular, swap_event;
  logic [5:0] n_vec;
  mem_req_t   mreq;
  fx_t        rdata;
  int checks = 0, failures = 0, swaps = 0;

  gj_ctrl dut (.clk, .rst_n, .start, .n_vec, .busy, .done, .singular, .swap_event,
               .mreq, .rdata);
  svm_sram u_sram (.clk, .mreq, .rdata);

  always @(posedge clk) if (swap_event) swaps++;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cfg_n [5] = '{3, 8, 31, 12, 2};
    start = 0; n_vec = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5; t++) begin
      automatic int nv = cfg_n[t], n = cfg_n[t] + 1;
      automatic mat_t m;
      automatic vec_t x [32];
      automatic int y [32];
      automatic bit sing;
      automatic int nsw, bad = 0, cyc;
      for (int i = 0; i < nv; i++) begin
        y[i] = (i % 2) ? -65536 : 65536;
        for (int e = 0; e < 64; e++) x[i][e] = 0;
        for (int e = 0; e < 24; e++)
          x[i][e] = (t == 4) ? 65536 : int'($urandom_range(0, 8 * 65536)) - 4 * 65536;
      end
      for (int r = 0; r < NM; r++) for (int c = 0; c < NC; c++) m[r][c] = 0;
      for (int j = 1; j <= nv; j++) begin
        m[0][j] = y[j - 1]; m[j][0] = 65536; m[j][nv + 1] = y[j - 1];
        for (int i = 1; i <= nv; i++) m[i][j] = r_kval(r_dist(x[i - 1], x[j - 1], 24));
      end
      if (t == 3)   // dense random system
        for (int r = 0; r < n; r++) for (int c = 0; c <= n; c++)
          m[r][c] = int'($urandom_range(0, 4 * 65536)) - 2 * 65536;
      for (int r = 0; r < NM; r++) for (int c = 0; c < NC; c++)
        u_sram.mem[int'(KMAT_BASE) + r * 33 + c] = m[r][c];
      for (int i = 0; i < 32; i++) u_sram.mem[int'(ALPHA_BASE) + i] = 32'h1234_5678;
      r_gj(m, n, sing, nsw);
      swaps = 0;
      @(negedge clk);
      start = 1; n_vec = 6'(nv);
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      check(singular == sing, $sformatf("t%0d singular %0d exp %0d", t, singular, sing));
      check(swaps == nsw, $sformatf("t%0d swaps %0d exp %0d", t, swaps, nsw));
      if (!sing) begin
        for (int r = 0; r < n; r++)
          for (int c = 0; c <= n; c++)
            if (u_sram.mem[int'(KMAT_BASE) + r * 33 + c] != m[r][c]) begin
              bad++;
              if (bad < 4) $display("FAIL: t%0d A[%0d][%0d] got %0d exp %0d", t, r, c,
                                    u_sram.mem[int'(KMAT_BASE) + r * 33 + c], m[r][c]);
            end
        for (int i = 0; i < n; i++)
          if (u_sram.mem[int'(ALPHA_BASE) + i] != m[i][n]) bad++;
        check(bad == 0, $sformatf("t%0d matrix and alpha (N=%0d)", t, nv));
      end
      $display("INFO: N=%0d Gauss-Jordan %0d cycles, %0d swaps, singular=%0d", nv, cyc, swaps, singular);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
