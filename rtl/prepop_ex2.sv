// prepop_ex2: third operand acquisition in the EX2 stage (PrepOp-EX2).
//
// Supplies the vector that RED1 adds to the products (multiply-accumulate,
// vector addition) and that RED2 can take as fw_vr. It reads one vector from
// the vector register file and masks it to the current precision; it does
// no bypassing, so the decoder holds an instruction until the producer of
// this register has been written back. When the instruction uses no third
// operand the output is held at zero so that the adders see no switching.
// Purely combinational. The unit and its lack of bypassing follow the
// document; zeroing an unused operand is this design's own choice.
module prepop_ex2
  import napcore_pkg::*;
(
  input  logic          use_c,
  input  vec_t          vrf,
  input  logic [KW-1:0] keep,
  output vec_t          vr
);
  vec_t v;
  assign v = use_c ? vrf : '0;
  for (genvar l = 0; l < P; l++) begin : g_mask
    mant_mask u_m (.d(v[l]), .keep(keep), .q(vr[l]));
  end
endmodule
