// vmem_bank: one bank of the vector memory, a simple dual-port RAM with one
// synchronous read port and one write port (array, mapped to an SRAM macro
// in an implementation). Read data appear one cycle after `re` and hold
// until the next read. Helper of vmem.
module vmem_bank #(
  parameter int unsigned W     = 152,
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             rdata,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata
);
  logic [W-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
