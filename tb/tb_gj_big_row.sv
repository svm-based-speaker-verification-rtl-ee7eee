// tb_gj_big_row: divides random Q16.16 pairs (small, large, negative,
// overflowing, zero divisor, pivot by itself) with the Big Row divider and
// checks quotient and the 49-cycle latency against the reference division.
module tb_gj_big_row;
  import svm_pkg::*;
  import svm_ref_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;   // a falling edge for the asynchronous reset
  always #5 clk = ~clk;

  logic start, busy, done;
  fx_t  dividend, divisor, quotient;
  int checks = 0, failures = 0;

  gj_big_row dut (.clk, .rst_n, .start, .dividend, .divisor, .busy, .done, .quotient);

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
    start = 0; dividend = 0; divisor = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      automatic int a, p, cyc;
      case (t % 6)
        0: begin a = int'($urandom); p = int'($urandom); end
        1: begin a = int'($urandom_range(0, 1 << 18)) - (1 << 17); p = int'($urandom_range(1, 1 << 18)) - (1 << 17); end
        2: begin a = int'($urandom); p = int'($urandom_range(1, 300)); end     // overflow
        3: begin a = int'($urandom_range(0, 1 << 20)); p = -a; end
        4: begin a = int'($urandom); p = (t % 12 == 4) ? 0 : a; end          // zero / self
        default: begin a = -int'($urandom_range(0, 1 << 24)); p = int'($urandom_range(1 << 10, 1 << 20)); end
      endcase
      if (p == 0 && a == 0) a = 1;
      @(negedge clk);
      start = 1; dividend = a; divisor = p;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      check(quotient == r_div(a, p), $sformatf("%0d / %0d got %0d exp %0d", a, p, quotient, r_div(a, p)));
      check(cyc == 49, $sformatf("latency %0d", cyc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
