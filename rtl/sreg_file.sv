// sreg_file: scalar register file of complex scalars, two read ports and
// one write port. Combinational reads, write at the rising edge, reset to
// zero; a read in the cycle of a write returns the old value. Used for
// scalar operations and vector arithmetic with a scalar operand. The port
// count follows the document; 16 registers is this design's own choice.
module sreg_file
  import napcore_pkg::*;
#(
  parameter int unsigned N = NSREG
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [$clog2(N)-1:0] ra, rb,
  output cplx_t                da, db,
  input  logic                 we,
  input  logic [$clog2(N)-1:0] wa,
  input  cplx_t                wd
);
  cplx_t r [N];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) r[i] <= C_ZERO;
    end else if (we) begin
      r[wa] <= wd;
    end
  end
  assign da = r[ra];
  assign db = r[rb];
endmodule
