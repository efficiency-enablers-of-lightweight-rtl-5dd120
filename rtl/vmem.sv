// vmem: vector memory, 512 words of one vector (152 bits) each, with one
// read port and one write port, partitioned into two banks of 256 words.
// The address MSB selects the bank. Reads are synchronous: data appear one
// cycle after `re` and hold until the next read. A read and a write to the
// same word in one cycle return the old word. Size, width, port count and
// two banks follow the document; the bank mapping is this design's choice.
module vmem
  import napcore_pkg::*;
#(
  parameter int unsigned DEPTH = VM_DEPTH
) (
  input  logic                     clk,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output vec_t                     rdata,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  vec_t                     wdata
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned W  = $bits(vec_t);
  logic [1:0][W-1:0] bank_q;
  logic rsel_q;

  for (genvar b = 0; b < 2; b++) begin : g_bank
    vmem_bank #(.W(W), .DEPTH(DEPTH / 2)) u_bank (
      .clk, .re(re && raddr[AW-1] == 1'(b)), .raddr(raddr[AW-2:0]), .rdata(bank_q[b]),
      .we(we && waddr[AW-1] == 1'(b)), .waddr(waddr[AW-2:0]), .wdata(wdata));
  end

  always_ff @(posedge clk) if (re) rsel_q <= raddr[AW-1];
  assign rdata = bank_q[rsel_q];
endmodule
