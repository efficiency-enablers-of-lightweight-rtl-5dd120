// tb_prepop_ex2: masked register value when used, zero when unused.
module tb_prepop_ex2;
  import napcore_pkg::*;
  logic use_c;
  vec_t vrf, vr;
  logic [KW-1:0] keep;
  int checks = 0, failures = 0;
  prepop_ex2 dut (.use_c, .vrf, .keep, .vr);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [MW-1:0] m;
    for (int i = 0; i < 500; i++) begin
      use_c = ($urandom_range(0, 3) != 0);
      vrf = vec_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
      keep = KW'($urandom_range(0, MW));
      #1;
      m = '0;
      for (int b = 0; b < int'(keep); b++) m[MW-1-b] = 1'b1;
      for (int l = 0; l < P; l++) begin
        checks++;
        if (!use_c) begin
          if (vr[l] !== C_ZERO) failures++;
        end else if (vr[l].re.man !== (vrf[l].re.man & m) || vr[l].im.man !== (vrf[l].im.man & m) ||
                     vr[l].re.exp !== vrf[l].re.exp || vr[l].im.sgn !== vrf[l].im.sgn) begin
          failures++; $display("FAIL lane %0d", l);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
