// mat_ram: on-chip matrix store, one binary32 word per element.
//
// A true dual-port RAM of DEPTH words with synchronous read: a request on
// either port in one cycle returns its word (the old contents on a write)
// in rdata the next cycle.  Each kernel keeps its working matrix and its
// eigenvector matrix in one of these, as the block-RAM kernels of the
// original design do.  A write and a read of the same word on the two
// ports in one cycle return the old word; two writes to the same word in
// one cycle are not allowed (the kernels never issue them).  The contents
// are not reset; the kernels write every word they later read.
module mat_ram
  import eig_pkg::*;
#(
  parameter int DEPTH = 500 * 500
) (
  input  logic            clk,
  input  ram_req_t [1:0]  req,
  output fp32_t    [1:0]  rdata
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  fp32_t mem [DEPTH];

  always_ff @(posedge clk) begin
    for (int p = 0; p < 2; p++) begin
      if (req[p].en) begin
        rdata[p] <= mem[req[p].addr[AW-1:0]];
        if (req[p].we) mem[req[p].addr[AW-1:0]] <= req[p].wdata;
      end
    end
  end

endmodule
