// perm_net: permutation networks in front of the EX1 multipliers.
//
// Vectors hold P = 4 complex elements; a 2x2 matrix is stored row-wise
// (lanes 0,1 = row 0, lanes 2,3 = row 1).
// Operand one: the left lane pair takes the row chosen by hilo1a and the
// right pair the row chosen by hilo2a; crossbar cb1 then passes them, repeats
// the even (DUPE) or odd (DUPO) element of each pair, or swaps the pair.
// Operand two: crossbar cb2 first transposes the 2x2 matrix (the right-hand
// factor of a matrix product is read column-wise), then the same row muxes
// (hilo1b, hilo2b) apply, then crossbar cb3 passes, reverses the vector,
// forms the adjugate pattern (x3, -x1, -x2, x0) used for 2x2 inversion, or
// swaps within pairs. Purely combinational.
// The structure (row muxes, cb1 repeat, cb2 transpose, cb3 for inversion)
// follows the document; the exact crossbar pattern sets are this design's.
module perm_net
  import napcore_pkg::*;
(
  input  vec_t      a,
  input  vec_t      b,
  input  perm_cfg_t cfg,
  output vec_t      pa,
  output vec_t      pb
);
  vec_t ta, tb, bt;

  always_comb begin
    // operand one: row muxes
    ta[0] = cfg.hilo1a ? a[2] : a[0];
    ta[1] = cfg.hilo1a ? a[3] : a[1];
    ta[2] = cfg.hilo2a ? a[2] : a[0];
    ta[3] = cfg.hilo2a ? a[3] : a[1];
    unique case (cfg.cb1)
      CB1_PASS: pa = ta;
      CB1_DUPE: pa = {ta[2], ta[2], ta[0], ta[0]};
      CB1_DUPO: pa = {ta[3], ta[3], ta[1], ta[1]};
      default:  pa = {ta[2], ta[3], ta[0], ta[1]};
    endcase

    // operand two: transpose, row muxes, crossbar
    bt = cfg.cb2 ? {b[3], b[1], b[2], b[0]} : b;
    tb[0] = cfg.hilo1b ? bt[2] : bt[0];
    tb[1] = cfg.hilo1b ? bt[3] : bt[1];
    tb[2] = cfg.hilo2b ? bt[2] : bt[0];
    tb[3] = cfg.hilo2b ? bt[3] : bt[1];
    unique case (cfg.cb3)
      CB3_PASS: pb = tb;
      CB3_REV:  pb = {tb[0], tb[1], tb[2], tb[3]};
      CB3_ADJ:  pb = {tb[0], cneg(tb[2]), cneg(tb[1]), tb[3]};
      default:  pb = {tb[2], tb[3], tb[0], tb[1]};
    endcase
  end
endmodule
