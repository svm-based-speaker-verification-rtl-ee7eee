// tb_gj_big_finder: streams random matrices (with random ineligible rows and
// columns, ties and the most negative value) into the Big Finder and checks
// the reported maximum magnitude and its position against a software scan.
module tb_gj_big_finder;
  import svm_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;   // a falling edge for the asynchronous reset
  always #5 clk = ~clk;

  logic clear, in_valid, eligible;
  fx_t  value;
  logic [5:0] row, col, max_row, max_col;
  logic [31:0] max_abs;
  int checks = 0, failures = 0;

  gj_big_finder dut (.clk, .rst_n, .clear, .in_valid, .eligible, .value, .row, .col,
                     .max_abs, .max_row, .max_col);

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
    clear = 0; in_valid = 0; eligible = 0; value = 0; row = 0; col = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      automatic int n = $urandom_range(1, 32);
      automatic bit rp [32], cp [32];
      automatic longint best = 0;
      automatic int br = 0, bc = 0;
      for (int i = 0; i < 32; i++) begin rp[i] = ($urandom_range(0, 3) == 0); cp[i] = rp[i]; end
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
      for (int r = 0; r < n; r++)
        for (int c = 0; c < n; c++) begin
          automatic int v = int'($urandom_range(0, 2000)) - 1000;
          automatic longint mg;
          if (t == 5 && r == 0 && c == 0) v = 32'sh8000_0000;
          if (t % 4 == 1) v = (v > 0) ? 7 : -7;        // many ties
          mg = (v < 0) ? -longint'(v) : longint'(v);
          if (!rp[r] && !cp[c] && mg > best) begin best = mg; br = r; bc = c; end
          in_valid = ($urandom_range(0, 9) != 0) || 1'b1;
          eligible = !rp[r] && !cp[c];
          value = v; row = 6'(r); col = 6'(c);
          @(negedge clk);
        end
      in_valid = 0;
      @(negedge clk);
      check(max_abs == 32'(best), $sformatf("t%0d max %0d exp %0d", t, max_abs, best));
      if (best != 0)
        check(max_row == 6'(br) && max_col == 6'(bc),
              $sformatf("t%0d pos (%0d,%0d) exp (%0d,%0d)", t, max_row, max_col, br, bc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
