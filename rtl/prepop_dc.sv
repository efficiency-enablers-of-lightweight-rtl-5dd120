// prepop_dc: operand acquisition in the decode stage (PrepOp-DC), one operand.
//
// Takes the vector register and scalar register read for this operand and
// replaces each lane by the bypassed value where the bypass unit reports a
// hit (is_bp). Then the selection switches of the acquisition network apply:
// s2 chooses whether a scalar comes from the scalar register or from one
// element of the vector register, s1 picks that element (el), s3 chooses
// scalar or vector operand (a scalar operand only uses lane 0, the other
// lanes are zero), and s4 broadcasts the scalar to all lanes, e.g. for a
// scalar-vector multiplication. The four lanes finally pass the mantissa
// masking units. Purely combinational.
// The switches and masking follow the document; encoding s1..s4 as one
// 2-bit selection is this design's own choice.
module prepop_dc
  import napcore_pkg::*;
(
  input  opsel_e        sel,
  input  logic [1:0]    el,
  input  vec_t          vrf,       // vector register file read
  input  cplx_t         srf,       // scalar register file read
  input  logic [P-1:0]  vbp_hit,
  input  vec_t          vbp_data,
  input  logic          sbp_hit,
  input  cplx_t         sbp_data,
  input  logic [KW-1:0] keep,
  output vec_t          op
);
  vec_t  vv, sel_v;
  cplx_t ss, sc;

  always_comb begin
    for (int l = 0; l < P; l++) vv[l] = vbp_hit[l] ? vbp_data[l] : vrf[l];
    ss = sbp_hit ? sbp_data : srf;
    sc = (sel == SEL_EBC) ? vv[el] : ss;                  // s2, s1
    unique case (sel)
      SEL_VEC:  sel_v = vv;                               // s3: vector
      SEL_SCAL: sel_v = {{(P-1){C_ZERO}}, sc};            // s3: scalar, lane 0
      default:  sel_v = {P{sc}};                          // s4: broadcast
    endcase
  end

  for (genvar l = 0; l < P; l++) begin : g_mask
    mant_mask u_m (.d(sel_v[l]), .keep(keep), .q(op[l]));
  end
endmodule
