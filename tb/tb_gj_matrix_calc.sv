// tb_gj_matrix_calc: drives random a, f, p (including saturating cases) into
// the Matrix Calculator and checks a - f * p against the reference one cycle
// later.
module tb_gj_matrix_calc;
  import svm_pkg::*;
  import svm_ref_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;   // a falling edge for the asynchronous reset
  always #5 clk = ~clk;

  logic in_valid, out_valid;
  fx_t  a, f, p, result;
  int checks = 0, failures = 0;

  gj_matrix_calc dut (.clk, .rst_n, .in_valid, .a, .f, .p, .out_valid, .result);

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
    in_valid = 0; a = 0; f = 0; p = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      automatic int ea;
      @(negedge clk);
      in_valid = 1;
      a = int'($urandom);
      f = (t % 3 == 0) ? int'($urandom) : int'($urandom_range(0, 1 << 20)) - (1 << 19);
      p = (t % 3 == 0) ? int'($urandom) : int'($urandom_range(0, 1 << 20)) - (1 << 19);
      ea = r_calc(a, f, p);
      @(negedge clk);
      in_valid = 0;
      check(out_valid, "out_valid one cycle after in_valid");
      check(result == ea, $sformatf("%0d - %0d*%0d got %0d exp %0d", a, f, p, result, ea));
    end
    @(negedge clk);
    check(!out_valid, "out_valid drops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
