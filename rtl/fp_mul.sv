// fp_mul: combinational real floating-point multiplier (s1m12e6 by default).
//
// Multiplies the two mantissas including their hidden ones, normalises the
// product by at most one position and adds the exponents. The result is
// truncated (no rounding): precision is governed by the mantissa-masking
// units that follow every arithmetic component. Zero inputs (exponent field
// zero) and exponent underflow give zero; exponent overflow saturates to the
// largest magnitude. The EX1 stage holds sixteen of these, four per lane.
// The document gives the function (floating-point multipliers in EX1); the
// rounding, underflow and overflow behaviour is this design's own choice.
module fp_mul
  import napcore_pkg::*;
(
  input  fp_t a,
  input  fp_t b,
  output fp_t y
);
  logic [MW:0]       ma, mb;
  logic [2*MW+1:0]   p;
  logic              norm;
  logic signed [EW+2:0] e;
  logic [MW-1:0]     man;

  always_comb begin
    ma   = {1'b1, a.man};
    mb   = {1'b1, b.man};
    p    = ma * mb;
    norm = p[2*MW+1];
    man  = norm ? p[2*MW -: MW] : p[2*MW-1 -: MW];
    e    = $signed({3'b000, a.exp}) + $signed({3'b000, b.exp})
         - $signed((EW+3)'(BIAS)) + $signed({{(EW+2){1'b0}}, norm});
    y.sgn = a.sgn ^ b.sgn;
    if (a.exp == '0 || b.exp == '0 || e <= 0) begin
      y = FP_ZERO;
    end else if (e > $signed((EW+3)'((1 << EW) - 1))) begin
      y.exp = '1;
      y.man = '1;
    end else begin
      y.exp = e[EW-1:0];
      y.man = man;
    end
  end
endmodule
