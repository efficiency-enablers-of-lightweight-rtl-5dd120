// tb_red2_stage: random adder and output-map configurations checked
// against a real-number model; includes the inner-product broadcast.
module tb_red2_stage;
  import napcore_pkg::*;
  import tb_fp_pkg::*;
  vec_t in, fw, out;
  red2_cfg_t cfg;
  logic [KW-1:0] keep = KW'(MW);
  int checks = 0, failures = 0;
  red2_stage dut (.in, .fw_vr(fw), .cfg, .keep, .out);

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
    real er[2], ei[2], s;
    int k;
    for (int i = 0; i < 1000; i++) begin
      in = rvec(); fw = rvec(); cfg = red2_cfg_t'({$urandom, $urandom});
      for (int l = 0; l < P; l++) if (cfg.omap[l] == 2'd3) cfg.omap[l] = 2'd1;
      #1;
      for (int a = 0; a < 2; a++) begin
        s = cfg.add[a].sub ? -1.0 : 1.0;
        er[a] = fp2r(in[cfg.add[a].xsel].re);
        ei[a] = fp2r(in[cfg.add[a].xsel].im);
        if (cfg.add[a].en) begin
          er[a] += s * (cfg.add[a].ysrc ? fp2r(fw[cfg.add[a].ysel].re) : fp2r(in[cfg.add[a].ysel].re));
          ei[a] += s * (cfg.add[a].ysrc ? fp2r(fw[cfg.add[a].ysel].im) : fp2r(in[cfg.add[a].ysel].im));
        end
      end
      for (int l = 0; l < P; l++) begin
        checks++;
        if (cfg.omap[l] == 2'd0) begin
          if (out[l] !== in[l]) begin failures++; $display("FAIL pass lane %0d", l); end
        end else begin
          k = int'(cfg.omap[l]) - 1;
          if (!near(fp2r(out[l].re), er[k], pow2(-(int'(MW) - 1)), 4.0) ||
              !near(fp2r(out[l].im), ei[k], pow2(-(int'(MW) - 1)), 4.0)) begin
            failures++; $display("FAIL lane %0d", l);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
