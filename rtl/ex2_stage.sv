// ex2_stage: second arithmetic stage (EX2).
//
// Accumulates the four real partial products of each lane into the complex
// product: re = rr - ii, im = ri + ir. Conjugating operand one or two only
// changes the signs of the imaginary products, so the conj flags are applied
// here as sign flips before the adders (conj a: ii, ir negated; conj b:
// ii, ri negated). Eight real adders for P = 4, each result masked to the
// current precision. Purely combinational.
// The split of a complex multiplication over EX1 and EX2 follows the
// document; placing conjugation here is this design's own choice.
module ex2_stage
  import napcore_pkg::*;
(
  input  prodv_t        prod,
  input  logic          cja,
  input  logic          cjb,
  input  logic [KW-1:0] keep,
  output vec_t          res
);
  vec_t sum;
  prodv_t pp;

  always_comb begin
    for (int l = 0; l < P; l++) begin
      pp[l] = prod[l];
      pp[l].ii.sgn = prod[l].ii.sgn ^ cja ^ cjb;
      pp[l].ir.sgn = prod[l].ir.sgn ^ cja;
      pp[l].ri.sgn = prod[l].ri.sgn ^ cjb;
    end
  end

  for (genvar l = 0; l < P; l++) begin : g_lane
    fp_add u_re (.a(pp[l].rr), .b(pp[l].ii), .sub(1'b1), .y(sum[l].re));
    fp_add u_im (.a(pp[l].ri), .b(pp[l].ir), .sub(1'b0), .y(sum[l].im));
    mant_mask u_m (.d(sum[l]), .keep(keep), .q(res[l]));
  end
endmodule
