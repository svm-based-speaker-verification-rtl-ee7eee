// tb_svm_sram: checks the shared SRAM: writes land at the addressed word,
// reads return the word one cycle after the request and hold it while no
// other read is made (writes do not disturb rdata).
module tb_svm_sram;
  import svm_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  mem_req_t mreq;
  fx_t      rdata;
  int checks = 0, failures = 0;
  int model [int];

  svm_sram dut (.clk, .mreq, .rdata);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mreq = MEM_IDLE;
    // write 200 random words at random addresses
    for (int i = 0; i < 200; i++) begin
      automatic addr_t a = addr_t'($urandom);
      automatic int    v = int'($urandom);
      @(negedge clk);
      mreq = '{req: 1, we: 1, addr: a, wdata: v};
      model[int'(a)] = v;
    end
    @(negedge clk) mreq = MEM_IDLE;
    // read them back
    foreach (model[a]) begin
      @(negedge clk) mreq = '{req: 1, we: 0, addr: addr_t'(a), wdata: 0};
      @(negedge clk) mreq = MEM_IDLE;
      check(rdata == model[a], $sformatf("read %0d got %h exp %h", a, rdata, model[a]));
      // a write elsewhere must not change rdata; a later idle cycle holds it
      mreq = '{req: 1, we: 1, addr: addr_t'(a), wdata: model[a]};
      @(negedge clk) mreq = MEM_IDLE;
      check(rdata == model[a], "rdata held across write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
