// tb_kernel_ctrl: loads random vectors into the SRAM, asks the kernel
// function controller for k(a, b) on random pairs and dimensions (1..24,
// including identical vectors and far-apart ones that fall past the table),
// and compares each result and its latency (3 d + 2 cycles) with the
// reference model.
module tb_kernel_ctrl;
  import svm_pkg::*;
  import svm_ref_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;   // a falling edge for the asynchronous reset
  always #5 clk = ~clk;

  logic       start, busy, done;
  addr_t      addr_a, addr_b;
  logic [5:0] dim;
  fx_t        result, rdata;
  mem_req_t   mreq;
  int checks = 0, failures = 0;
  int n_far = 0, n_same = 0;

  kernel_ctrl dut (.clk, .rst_n, .start, .addr_a, .addr_b, .dim, .busy, .done,
                   .result, .mreq, .rdata);
  svm_sram u_sram (.clk, .mreq, .rdata);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; addr_a = '0; addr_b = '0; dim = '0;
    // 40 vectors of 24 words at FREE_BASE, stride 25; the last 4 far away
    for (int v = 0; v < 40; v++)
      for (int e = 0; e < 24; e++) begin
        automatic int x = int'($urandom_range(0, 8 * 65536)) - 4 * 65536;
        if (v >= 36) x = x + ((v % 2) ? 40 : -40) * 65536;
        u_sram.mem[int'(FREE_BASE) + v * 25 + e] = x;
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 120; t++) begin
      automatic int va = $urandom_range(0, 39), vb = $urandom_range(0, 39), d = $urandom_range(1, 24);
      automatic vec_t a, b;
      automatic int exp_k, cyc;
      if (t % 10 == 0) vb = va;
      if (t % 7 == 0) begin va = 36; vb = 37; end
      for (int e = 0; e < 64; e++) begin a[e] = 0; b[e] = 0; end
      for (int e = 0; e < d; e++) begin
        a[e] = u_sram.mem[int'(FREE_BASE) + va * 25 + e];
        b[e] = u_sram.mem[int'(FREE_BASE) + vb * 25 + e];
      end
      exp_k = r_kval(r_dist(a, b, d));
      if (exp_k == 0) n_far++;
      if (exp_k == 65536) n_same++;
      @(negedge clk);
      start = 1; dim = 6'(d);
      addr_a = FREE_BASE + addr_t'(va * 25);
      addr_b = FREE_BASE + addr_t'(vb * 25);
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      check(result == exp_k, $sformatf("k(%0d,%0d,d=%0d) got %0d exp %0d", va, vb, d, result, exp_k));
      check(cyc == 3 * d + 2, $sformatf("latency %0d for d=%0d", cyc, d));
    end
    check(n_far > 0 && n_same > 0, "far and identical pairs both exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
