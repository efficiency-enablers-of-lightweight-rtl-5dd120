// red1_stage: first reduction stage (RED1), P configurable complex adders.
//
// Each adder i computes res[xsel] +/- y, where y is res[ysel] or the
// element vr[ysel] of the vector read by PrepOp-EX2; the input selection is
// the permutation (cfg_pi) in front of the adders. An adder that is not
// enabled (no_red) passes res[i] straight through. Typical settings:
// multiply-accumulate (out_i = res_i + vr_i, all four adders), first level
// of an inner-product tree (res0+res1, res2+res3), 2x2 pair sums, or a
// determinant (res0 - res1). Purely combinational.
// Four adders, inputs res0..3 / vr0..3 and no_red follow the document; the
// exact selection fields are this design's encoding.
module red1_stage
  import napcore_pkg::*;
(
  input  vec_t          res,
  input  vec_t          vr,
  input  red1_cfg_t     cfg,
  input  logic [KW-1:0] keep,
  output vec_t          out
);
  vec_t x, s, sum;

  always_comb begin
    for (int i = 0; i < P; i++) begin
      x[i] = res[cfg.add[i].xsel];
      s[i] = cfg.add[i].ysrc ? vr[cfg.add[i].ysel] : res[cfg.add[i].ysel];
    end
  end

  for (genvar i = 0; i < P; i++) begin : g_add
    cadd u_add (.x(x[i]), .s(s[i]), .sub(cfg.add[i].sub), .keep(keep), .y(sum[i]));
    assign out[i] = cfg.add[i].en ? sum[i] : res[i];
  end
endmodule
