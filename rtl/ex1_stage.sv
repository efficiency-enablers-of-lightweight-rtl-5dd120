// ex1_stage: first arithmetic stage (EX1) of the napCore ALU.
//
// The two operand vectors pass the permutation networks and then feed
// P complex multiplications, each split into its four real products
// (re*re, im*im, re*im, im*re): sixteen real multipliers for P = 4. The
// products are masked to the current precision. Complex products are only
// completed by adding these partial products in EX2.
// The stage also holds P Newton-Raphson units (one per lane) that invert the
// real part of operand one; an inversion keeps EX1 busy for NR_ITER cycles
// and `busy` asks the pipeline to hold EX1 and the stages before it.
// Loaded vector-memory data and inversion results bypass the multipliers;
// they leave in the same product format as a pass-through value
// (rr = re, ri = im, ii = ir = 0), which EX2 turns back into the value.
// Combinational apart from the Newton-Raphson iteration registers.
module ex1_stage
  import napcore_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          valid,
  input  ctrl_t         ctrl,
  input  logic [KW-1:0] keep,
  input  vec_t          opa,
  input  vec_t          opb,
  input  vec_t          ld_data,
  output prodv_t        prod,
  output logic          busy
);
  vec_t pa, pb;
  prodv_t mp;
  fp_t [P-1:0] inv;
  logic [P-1:0] last;
  logic [MW-1:0] m;

  perm_net u_perm (.a(opa), .b(opb), .cfg(ctrl.perm), .pa(pa), .pb(pb));

  for (genvar l = 0; l < P; l++) begin : g_lane
    fp_mul u_rr (.a(pa[l].re), .b(pb[l].re), .y(mp[l].rr));
    fp_mul u_ii (.a(pa[l].im), .b(pb[l].im), .y(mp[l].ii));
    fp_mul u_ri (.a(pa[l].re), .b(pb[l].im), .y(mp[l].ri));
    fp_mul u_ir (.a(pa[l].im), .b(pb[l].re), .y(mp[l].ir));
    nr_inv u_nr (.clk(clk), .rst_n(rst_n), .act(valid && ctrl.is_inv),
                 .x(opa[l].re), .y(inv[l]), .last(last[l]));
  end

  always_comb begin
    m = keep_mask(keep);
    for (int l = 0; l < P; l++) begin
      if (ctrl.is_ld) begin
        prod[l] = '{rr: ld_data[l].re, ii: FP_ZERO, ri: ld_data[l].im, ir: FP_ZERO};
      end else if (ctrl.is_inv) begin
        prod[l] = '{rr: inv[l], ii: FP_ZERO, ri: FP_ZERO, ir: FP_ZERO};
      end else begin
        prod[l] = mp[l];
      end
      prod[l].rr.man &= m;
      prod[l].ii.man &= m;
      prod[l].ri.man &= m;
      prod[l].ir.man &= m;
    end
    busy = valid && ctrl.is_inv && !last[0];
  end
endmodule
