// tb_ex1_stage: real partial products for straight and matrix-style
// permutations, load pass-through, masking, and the Newton-Raphson path
// including its NR_ITER-cycle busy window.
module tb_ex1_stage;
  import napcore_pkg::*;
  import tb_fp_pkg::*;
  logic clk = 0, rst_n = 0, valid = 0;
  ctrl_t ctrl;
  logic [KW-1:0] keep = KW'(MW);
  vec_t opa, opb, ld;
  prodv_t prod;
  logic busy;
  int checks = 0, failures = 0;
  ex1_stage dut (.clk, .rst_n, .valid, .ctrl, .keep, .opa, .opb, .ld_data(ld), .prod, .busy);
  always #5 clk = ~clk;

  function automatic vec_t rvec();
    vec_t v;
    for (int l = 0; l < P; l++) v[l] = c2fp(rnd(), rnd());
    return v;
  endfunction

  task automatic chkp(input int l, input cplx_t x, input cplx_t y);
    real t = pow2(-(int'(MW) - 1));
    checks++;
    if (!near(fp2r(prod[l].rr), fp2r(x.re) * fp2r(y.re), t, 0.0) ||
        !near(fp2r(prod[l].ii), fp2r(x.im) * fp2r(y.im), t, 0.0) ||
        !near(fp2r(prod[l].ri), fp2r(x.re) * fp2r(y.im), t, 0.0) ||
        !near(fp2r(prod[l].ir), fp2r(x.im) * fp2r(y.re), t, 0.0)) begin
      failures++; $display("FAIL product lane %0d", l);
    end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int n;
    ctrl = '0; opa = '0; opb = '0; ld = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    // element-wise products
    for (int i = 0; i < 200; i++) begin
      @(negedge clk); valid = 1; ctrl = '0; ctrl.op = OP_VMUL;
      ctrl.perm.hilo2a = 1; ctrl.perm.hilo2b = 1;
      opa = rvec(); opb = rvec(); #1;
      for (int l = 0; l < P; l++) chkp(l, opa[l], opb[l]);
    end
    // first half of a 2x2 matrix product: [a0 a0 a2 a2] .* [b0 b1 b0 b1]
    ctrl = '0; ctrl.op = OP_MM2A; ctrl.perm.hilo2a = 1; ctrl.perm.cb1 = CB1_DUPE;
    opa = rvec(); opb = rvec(); #1;
    chkp(0, opa[0], opb[0]); chkp(1, opa[0], opb[1]); chkp(2, opa[2], opb[0]); chkp(3, opa[2], opb[1]);
    // masking of the products
    keep = 4; #1; checks++;
    if ((prod[1].rr.man & ~keep_mask(4)) != 0) failures++;
    keep = KW'(MW);
    // load pass-through
    ctrl = '0; ctrl.is_ld = 1; ld = rvec(); #1;
    for (int l = 0; l < P; l++) begin
      checks++;
      if (prod[l].rr !== ld[l].re || prod[l].ri !== ld[l].im || prod[l].ii.exp != 0) failures++;
    end
    // inversion: busy for NR_ITER-1 cycles, result in the last
    @(negedge clk);
    ctrl = '0; ctrl.op = OP_VINV; ctrl.is_inv = 1; opa = rvec(); #1;
    n = 1;
    while (busy) begin @(negedge clk); n++; end
    checks++; if (n != NR_ITER) begin failures++; $display("FAIL inv cycles %0d", n); end
    for (int l = 0; l < P; l++) begin
      checks++;
      if (!near(fp2r(prod[l].rr), 1.0 / fp2r(opa[l].re), pow2(-(int'(MW) - 2)), 0.0)) begin
        failures++; $display("FAIL inv lane %0d", l);
      end
    end
    @(negedge clk); valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
