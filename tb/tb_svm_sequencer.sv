// tb_svm_sequencer: runs the sequencer against simple responders standing in
// for the controllers (each answers its start pulse with done after a random
// delay). Checks the environment words it loads, the order of the training
// steps (train VMM, Gauss-Jordan, SV-table), the early stop on a singular
// matrix, the refusal of a bad configuration, the testing path, the kernel
// owner select and the ENV_STATUS word.
module tb_svm_sequencer;
  import svm_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;
  always #5 clk = ~clk;

  logic start_train, start_test, busy, done, singular, config_error, kernel_owner_test;
  logic [5:0] n_vec, dim;
  addr_t train_base, test_base;
  logic [1:0] spk_id, claim_id;
  fx_t threshold, rdata;
  logic tv_start, tv_done, gj_start, gj_done, gj_singular, svt_start, svt_done;
  logic tst_start, tst_done;
  mem_req_t mreq;
  int checks = 0, failures = 0;
  string trace;
  bit make_singular;

  svm_sequencer dut (.clk, .rst_n, .start_train, .start_test, .busy, .done, .singular,
    .config_error, .kernel_owner_test, .n_vec, .dim, .train_base, .spk_id, .claim_id,
    .test_base, .threshold, .tv_start, .tv_done, .gj_start, .gj_done, .gj_singular,
    .svt_start, .svt_done, .tst_start, .tst_done, .mreq, .rdata);
  svm_sram u_sram (.clk, .mreq, .rdata);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // responders: done 1 to 20 cycles after start
  int cnt_t, cnt_g, cnt_s, cnt_x;
  `define RESPOND(ST, DN, CNT, TAG) \
    always @(posedge clk or negedge rst_n) \
      if (!rst_n) begin DN <= 1'b0; CNT <= 0; end \
      else begin \
        DN <= (CNT == 1); \
        if (ST) begin trace = {trace, TAG}; CNT <= int'($urandom_range(1, 20)); end \
        else if (CNT > 0) CNT <= CNT - 1; \
      end
  `RESPOND(tv_start,  tv_done,  cnt_t, "T")
  `RESPOND(gj_start,  gj_done,  cnt_g, "G")
  `RESPOND(svt_start, svt_done, cnt_s, "S")
  `RESPOND(tst_start, tst_done, cnt_x, "X")
  assign gj_singular = make_singular;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bit test, input int n, input int d, input string exp_trace,
                     input int exp_status);
    u_sram.mem[int'(ENV_N)] = n;
    u_sram.mem[int'(ENV_D)] = d;
    u_sram.mem[int'(ENV_STATUS)] = 0;
    trace = "";
    @(negedge clk);
    if (test) start_test = 1; else start_train = 1;
    @(negedge clk);
    start_train = 0; start_test = 0;
    check(busy, "busy after start");
    check(kernel_owner_test == test, "kernel owner");
    while (!done) begin
      @(negedge clk);
      if (kernel_owner_test != test) check(0, "kernel owner");
    end
    check(trace == exp_trace, $sformatf("steps '%s' expected '%s'", trace, exp_trace));
    check(u_sram.mem[int'(ENV_STATUS)] == exp_status,
          $sformatf("status %0d expected %0d", u_sram.mem[int'(ENV_STATUS)], exp_status));
    @(negedge clk);
    check(!busy, "idle after done");
  endtask

  initial begin
    start_train = 0; start_test = 0; make_singular = 0;
    for (int a = 0; a < 16; a++) u_sram.mem[a] = 0;
    u_sram.mem[int'(ENV_TRAIN_BASE)] = 1500;
    u_sram.mem[int'(ENV_SPK_ID)]     = 3;
    u_sram.mem[int'(ENV_CLAIM_ID)]   = 2;
    u_sram.mem[int'(ENV_TEST_BASE)]  = 2222;
    u_sram.mem[int'(ENV_THRESH)]     = -12345;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(0, 31, 24, "TGS", 1);
    check(n_vec == 31 && dim == 24 && train_base == 1500 && spk_id == 3 && claim_id == 2 &&
          test_base == 2222 && threshold == -12345, "environment words loaded");
    run(1, 31, 24, "X", 1);
    make_singular = 1;
    run(0, 5, 24, "TG", 3);
    make_singular = 0;
    run(0, 32, 24, "", 5);      // too many vectors
    run(0, 4, 0, "", 5);        // zero dimension
    run(1, 0, 25, "", 5);       // dimension too large
    run(1, 0, 3, "X", 1);       // testing does not need N
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
