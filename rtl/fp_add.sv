// fp_add: combinational real floating-point adder/subtractor.
//
// Computes a + b, or a - b when `sub` is set. The operand with the larger
// magnitude is aligned against, the smaller one is shifted right with GW
// guard bits, the mantissas are added or subtracted and the sum is
// renormalised with a leading-zero search. The result is truncated; a zero
// result, exponent underflow or zero inputs follow the package's encoding
// (exponent field zero is zero), and overflow saturates. These are the
// floating-point adders of EX2, RED1 and RED2; the document names them, the
// algorithm and the rounding are this design's own choice.
module fp_add
  import napcore_pkg::*;
#(
  parameter int unsigned GW = 3   // guard bits kept during alignment
) (
  input  fp_t  a,
  input  fp_t  b,
  input  logic sub,
  output fp_t  y
);
  localparam int unsigned SW = MW + GW + 2;   // sum width: carry, hidden, mantissa, guard

  fp_t  bb, big, sml;
  logic [SW-1:0] mbig, msml, s;
  logic [EW-1:0] d;
  int            lz;
  logic signed [EW+1:0] e;

  always_comb begin
    bb     = b;
    bb.sgn = b.sgn ^ sub;
    if ({a.exp, a.man} >= {bb.exp, bb.man}) begin
      big = a;  sml = bb;
    end else begin
      big = bb; sml = a;
    end
    d    = big.exp - sml.exp;
    mbig = {1'b0, (big.exp != '0), big.man, {GW{1'b0}}};
    msml = {1'b0, (sml.exp != '0), sml.man, {GW{1'b0}}};
    msml = (d >= EW'(SW)) ? '0 : (msml >> d);
    if (big.sgn == sml.sgn) s = mbig + msml;
    else                    s = mbig - msml;

    lz = SW;
    for (int i = 0; i < SW; i++) if (s[i]) lz = SW - 1 - i;

    y = FP_ZERO;
    e = '0;
    if (big.exp == '0 || s == '0) begin
      y = FP_ZERO;
    end else if (lz == 0) begin
      // carry out: shift right by one
      e = $signed({2'b00, big.exp}) + 1;
      y.sgn = big.sgn;
      if (e > $signed((EW+2)'((1 << EW) - 1))) begin
        y.exp = '1; y.man = '1;
      end else begin
        y.exp = e[EW-1:0];
        y.man = s[SW-2 -: MW];
      end
    end else begin
      e = $signed({2'b00, big.exp}) - $signed((EW+2)'(lz - 1));
      s = s << (lz - 1);
      y.sgn = big.sgn;
      if (e <= 0) y = FP_ZERO;
      else begin
        y.exp = e[EW-1:0];
        y.man = s[SW-3 -: MW];
      end
    end
  end
endmodule
