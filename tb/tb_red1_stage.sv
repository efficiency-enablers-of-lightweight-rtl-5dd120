// tb_red1_stage: random adder configurations; each lane is checked against
// the sum the configuration selects, computed with reals in the bench.
module tb_red1_stage;
  import napcore_pkg::*;
  import tb_fp_pkg::*;
  vec_t res, vr, out;
  red1_cfg_t cfg;
  logic [KW-1:0] keep = KW'(MW);
  int checks = 0, failures = 0;
  red1_stage dut (.res, .vr, .cfg, .keep, .out);

  function automatic vec_t rvec();
    vec_t v;
    for (int l = 0; l < P; l++) v[l] = c2fp(rnd(), rnd());
    return v;
  endfunction

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real xr, xi, yr, yi, s;
    for (int i = 0; i < 1000; i++) begin
      res = rvec(); vr = rvec(); cfg = red1_cfg_t'($urandom);
      #1;
      for (int l = 0; l < P; l++) begin
        checks++;
        if (!cfg.add[l].en) begin
          if (out[l] !== res[l]) begin failures++; $display("FAIL pass lane %0d", l); end
        end else begin
          s  = cfg.add[l].sub ? -1.0 : 1.0;
          xr = fp2r(res[cfg.add[l].xsel].re); xi = fp2r(res[cfg.add[l].xsel].im);
          yr = cfg.add[l].ysrc ? fp2r(vr[cfg.add[l].ysel].re) : fp2r(res[cfg.add[l].ysel].re);
          yi = cfg.add[l].ysrc ? fp2r(vr[cfg.add[l].ysel].im) : fp2r(res[cfg.add[l].ysel].im);
          if (!near(fp2r(out[l].re), xr + s * yr, pow2(-(int'(MW) - 1)), 4.0) ||
              !near(fp2r(out[l].im), xi + s * yi, pow2(-(int'(MW) - 1)), 4.0)) begin
            failures++; $display("FAIL add lane %0d", l);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
