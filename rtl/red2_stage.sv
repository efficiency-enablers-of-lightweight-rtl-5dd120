// red2_stage: second reduction stage (RED2), two configurable complex adders.
//
// Adder k computes in[xsel] +/- y with y = in[ysel] or the forwarded vector
// register element fw_vr[ysel]. Output lane j then takes in[j] (pass),
// adder 0 or adder 1, as given by omap[j]; mapping one adder to all lanes
// broadcasts a scalar result. For P = 4 one adder completes an inner
// product; the second serves 2x2 matrix-vector operations that add a
// vector register (fw_vr). Purely combinational.
// Two adders and fw_vr follow the document; the output mapping is this
// design's encoding.
module red2_stage
  import napcore_pkg::*;
(
  input  vec_t          in,
  input  vec_t          fw_vr,
  input  red2_cfg_t     cfg,
  input  logic [KW-1:0] keep,
  output vec_t          out
);
  cplx_t [1:0] x, s, sum, r;

  always_comb begin
    for (int k = 0; k < 2; k++) begin
      x[k] = in[cfg.add[k].xsel];
      s[k] = cfg.add[k].ysrc ? fw_vr[cfg.add[k].ysel] : in[cfg.add[k].ysel];
    end
  end

  for (genvar k = 0; k < 2; k++) begin : g_add
    cadd u_add (.x(x[k]), .s(s[k]), .sub(cfg.add[k].sub), .keep(keep), .y(sum[k]));
    assign r[k] = cfg.add[k].en ? sum[k] : x[k];
  end

  always_comb begin
    for (int j = 0; j < P; j++) begin
      unique case (cfg.omap[j])
        2'd1:    out[j] = r[0];
        2'd2:    out[j] = r[1];
        default: out[j] = in[j];
      endcase
    end
  end
endmodule
