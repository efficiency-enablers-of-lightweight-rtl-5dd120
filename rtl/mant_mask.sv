// mant_mask: mantissa masking unit for one complex scalar.
//
// Numerically aware processing: because a floating-point mantissa is
// normalised, clearing its least significant bits always leaves the same
// number of significant bits. This unit keeps the `keep` most significant
// mantissa bits of the real and the imaginary part and forces the remaining
// LSBs to zero, which removes switching activity in the logic that follows.
// `keep` comes from the precision register, which a configuration
// instruction changes at runtime; keep >= MW passes the value unchanged.
// Purely combinational. The principle is the document's; the range of the
// mask (any number of bits, 0..MW kept) is this design's own choice.
module mant_mask
  import napcore_pkg::*;
(
  input  cplx_t           d,
  input  logic [KW-1:0]   keep,
  output cplx_t           q
);
  logic [MW-1:0] m;
  always_comb begin
    m = keep_mask(keep);
    q = d;
    q.re.man = d.re.man & m;
    q.im.man = d.im.man & m;
  end
endmodule
