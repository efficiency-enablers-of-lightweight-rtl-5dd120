// tb_ex2_stage: random partial products with all conjugation settings;
// the complex result is checked against the real-number sum in the bench.
module tb_ex2_stage;
  import napcore_pkg::*;
  import tb_fp_pkg::*;
  prodv_t prod;
  logic cja, cjb;
  logic [KW-1:0] keep;
  vec_t res;
  int checks = 0, failures = 0;
  ex2_stage dut (.prod, .cja, .cjb, .keep, .res);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real er, ei, sa, sb;
    for (int i = 0; i < 1000; i++) begin
      for (int l = 0; l < P; l++)
        prod[l] = '{rr: r2fp(rnd()), ii: r2fp(rnd()), ri: r2fp(rnd()), ir: r2fp(rnd())};
      cja = 1'($urandom); cjb = 1'($urandom);
      keep = (i < 500) ? KW'(MW) : KW'($urandom_range(1, MW));
      #1;
      sa = cja ? -1.0 : 1.0; sb = cjb ? -1.0 : 1.0;
      for (int l = 0; l < P; l++) begin
        er = fp2r(prod[l].rr) - sa * sb * fp2r(prod[l].ii);
        ei = sb * fp2r(prod[l].ri) + sa * fp2r(prod[l].ir);
        checks += 2;
        if (!near(fp2r(res[l].re), er, pow2(-(int'(keep) - 2)), 8.0)) begin
          failures++; $display("FAIL re lane %0d %f vs %f", l, fp2r(res[l].re), er); end
        if (!near(fp2r(res[l].im), ei, pow2(-(int'(keep) - 2)), 8.0)) begin
          failures++; $display("FAIL im lane %0d %f vs %f", l, fp2r(res[l].im), ei); end
        checks++;
        if ((res[l].re.man & ~keep_mask(keep)) != 0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
