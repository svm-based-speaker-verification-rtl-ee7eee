// tb_gj_swap: fills K' in SRAM with random words, swaps random row pairs of
// random width through the Swap unit and checks the whole matrix region and
// the 4 * ncols + 1 cycle latency.
module tb_gj_swap;
  import svm_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;   // a falling edge for the asynchronous reset
  always #5 clk = ~clk;

  logic start, busy, done;
  logic [5:0] row_a, row_b, ncols;
  mem_req_t mreq;
  fx_t rdata;
  int checks = 0, failures = 0;
  int model [32][33];

  gj_swap dut (.clk, .rst_n, .start, .row_a, .row_b, .ncols, .busy, .done, .mreq, .rdata);
  svm_sram u_sram (.clk, .mreq, .rdata);

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
    start = 0; row_a = 0; row_b = 0; ncols = 0;
    for (int r = 0; r < 32; r++)
      for (int c = 0; c < 33; c++) begin
        model[r][c] = int'($urandom);
        u_sram.mem[int'(KMAT_BASE) + r * 33 + c] = model[r][c];
      end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      automatic int a = $urandom_range(0, 31), b = $urandom_range(0, 31), w = $urandom_range(1, 33);
      automatic int cyc;
      automatic bit ok = 1;
      for (int c = 0; c < w; c++) begin
        automatic int tmp = model[a][c]; model[a][c] = model[b][c]; model[b][c] = tmp;
      end
      @(negedge clk);
      start = 1; row_a = 6'(a); row_b = 6'(b); ncols = 6'(w);
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      check(cyc == 4 * w + 1, $sformatf("latency %0d for %0d columns", cyc, w));
      for (int r = 0; r < 32; r++)
        for (int c = 0; c < 33; c++)
          if (u_sram.mem[int'(KMAT_BASE) + r * 33 + c] != model[r][c]) ok = 0;
      check(ok, $sformatf("matrix after swapping rows %0d and %0d (%0d cols)", a, b, w));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
