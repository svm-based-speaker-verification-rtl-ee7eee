// tb_exp_lut: compares every table entry (and indices past the end) with
// round(65536 * exp(-i/16)) computed with the real-valued $exp.
module tb_exp_lut;
  import svm_pkg::*;
  import svm_ref_pkg::*;

  logic [31:0] idx;
  fx_t         val;
  int checks = 0, failures = 0;

  exp_lut dut (.idx, .val);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      idx = 32'(i);
      #1;
      checks++;
      if (val != r_exp(i)) begin
        failures++;
        $display("FAIL: idx %0d got %0d exp %0d", i, val, r_exp(i));
      end
    end
    idx = 32'hFFFF_FFFF;
    #1;
    checks++;
    if (val != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
