// svm_arbiter: joins the SRAM request bundles of several controllers onto the
// one SRAM port.
//
// The controllers run one after another (training: train VMM with kernel
// function, Gauss-Jordan, SV-table; testing: test VMM with kernel function),
// so at most one of them requests in any cycle. The arbiter is therefore a
// fixed-priority multiplexer (lowest index wins) and an assertion flags two
// simultaneous requests as a sequencing error. Combinational, no latency.
module svm_arbiter
  import svm_pkg::*;
#(
  parameter int unsigned M = 6
) (
  input  logic     clk,
  input  mem_req_t reqs [M],
  output mem_req_t grant
);

  always_comb begin
    grant = MEM_IDLE;
    for (int i = M - 1; i >= 0; i--) begin
      if (reqs[i].req) grant = reqs[i];
    end
  end

  int unsigned n_req;
  always_comb begin
    n_req = 0;
    for (int i = 0; i < M; i++) n_req += 32'(reqs[i].req);
  end

  a_one_master: assert property (@(posedge clk) n_req <= 1)
    else $error("svm_arbiter: %0d masters request the SRAM at once", n_req);

endmodule
