// cadd: complex floating-point adder/subtractor, two real fp_add units
// followed by a mantissa masking unit. y = x + s or x - s when `sub`.
// Combinational; helper of the reduction stages.
module cadd
  import napcore_pkg::*;
(
  input  cplx_t         x,
  input  cplx_t         s,
  input  logic          sub,
  input  logic [KW-1:0] keep,
  output cplx_t         y
);
  cplx_t sum;
  fp_add u_re (.a(x.re), .b(s.re), .sub(sub), .y(sum.re));
  fp_add u_im (.a(x.im), .b(s.im), .sub(sub), .y(sum.im));
  mant_mask u_m (.d(sum), .keep(keep), .q(y));
endmodule
