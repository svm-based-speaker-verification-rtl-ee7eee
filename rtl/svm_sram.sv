// svm_sram: single-port synchronous SRAM shared by all controllers.
//
// The engine keeps everything in one external SRAM: environment variables,
// training vectors, the K' matrix, the Lagrange multipliers and the SV-tables.
// This model is a plain word array with one port: a write (req & we) updates
// the addressed word at the clock edge; a read (req & !we) returns the word on
// rdata on the next cycle and rdata holds it until the next read. Word count
// and width are this design's choice; the SRAM part itself is not specified.
module svm_sram
  import svm_pkg::*;
#(
  parameter int unsigned WORDS = 1 << ADDR_W
) (
  input  logic     clk,
  input  mem_req_t mreq,
  output fx_t      rdata
);

  fx_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (mreq.req) begin
      if (mreq.we) mem[mreq.addr] <= mreq.wdata;
      else         rdata          <= mem[mreq.addr];
    end
  end

endmodule
