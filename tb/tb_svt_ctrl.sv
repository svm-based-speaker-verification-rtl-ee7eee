// tb_svt_ctrl: writes random Lagrange multipliers (both signs, zero, the most
// negative value) to ALPHA_BASE, runs the support vector table controller
// for several speakers and vector counts, and checks the packed SV-table
// entries, the speaker descriptor (start, count, lambda), the SV count port,
// that no other word changed, and the cycle count.
module tb_svt_ctrl;
  import svm_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;   // a falling edge for the asynchronous reset
  always #5 clk = ~clk;

  logic       start, busy, done, reject_event;
  logic [5:0] n_vec, dim, sv_count;
  addr_t      train_base;
  logic [1:0] spk_id;
  mem_req_t   mreq;
  fx_t        rdata;
  int checks = 0, failures = 0, rejects = 0;

  svt_ctrl dut (.clk, .rst_n, .start, .n_vec, .dim, .train_base, .spk_id, .busy, .done,
                .sv_count, .reject_event, .mreq, .rdata);
  svm_sram u_sram (.clk, .mreq, .rdata);

  always @(posedge clk) if (reject_event) rejects++;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; n_vec = 0; dim = 0; train_base = '0; spk_id = 0;
    for (int a = 0; a < 4096; a++) u_sram.mem[a] = 32'h0BAD_0BAD;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 8; t++) begin
      automatic int n = (t == 0) ? 31 : $urandom_range(1, 31);
      automatic int d = (t == 0) ? 24 : $urandom_range(1, 24);
      automatic int sp = t % 4;
      automatic int tb_base = int'(FREE_BASE) + $urandom_range(0, 100);
      automatic int tbl = int'(SVT_BASE) + sp * int'(SVT_STRIDE);
      automatic int dir = int'(DIR_BASE) + sp * 3;
      automatic int alpha [32];
      automatic int cnt = 0, bad = 0, cyc, nrej = 0;
      automatic int snap [4096];
      for (int i = 0; i <= n; i++) begin
        alpha[i] = int'($urandom);
        if (i == 3) alpha[i] = 0;
        if (i == 4) alpha[i] = 32'sh8000_0000;
        u_sram.mem[int'(ALPHA_BASE) + i] = alpha[i];
      end
      for (int a = 0; a < 4096; a++) snap[a] = u_sram.mem[a];
      for (int i = 1; i <= n; i++)
        if (alpha[i] >= 0) begin
          snap[tbl + 2 * cnt]     = tb_base + (i - 1) * (d + 1);
          snap[tbl + 2 * cnt + 1] = alpha[i];
          cnt++;
        end
      snap[dir] = tbl; snap[dir + 1] = cnt; snap[dir + 2] = alpha[0];
      nrej = n - cnt;
      rejects = 0;
      @(negedge clk);
      start = 1; n_vec = 6'(n); dim = 6'(d); train_base = addr_t'(tb_base); spk_id = 2'(sp);
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      for (int a = 0; a < 4096; a++)
        if (u_sram.mem[a] != snap[a]) begin
          bad++;
          if (bad < 4) $display("FAIL: t%0d word %0d got %h exp %h", t, a, u_sram.mem[a], snap[a]);
        end
      check(bad == 0, $sformatf("t%0d SV-table and descriptor", t));
      check(sv_count == 6'(cnt), $sformatf("t%0d sv_count %0d exp %0d", t, sv_count, cnt));
      check(rejects == nrej, $sformatf("t%0d rejects %0d exp %0d", t, rejects, nrej));
      check(cyc == 2 * nrej + 4 * cnt + 5, $sformatf("t%0d cycles %0d", t, cyc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
