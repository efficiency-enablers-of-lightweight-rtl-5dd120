// pmem: program memory, 1024 instruction words of 32 bits. The core reads
// it through a synchronous port (address in the pre-fetch stage, word
// available in the fetch stage one cycle later; the output holds while `re`
// is low). A second port writes the program from outside while the core is
// idle. Size and width follow the document; the write port is this
// design's own choice.
module pmem
  import napcore_pkg::*;
#(
  parameter int unsigned DEPTH = PM_DEPTH
) (
  input  logic                     clk,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [31:0]              rdata,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [31:0]              wdata
);
  logic [31:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
