// tb_prepop_dc: all operand selections with and without bypass hits and
// with masking, against an expectation built lane by lane in the bench.
module tb_prepop_dc;
  import napcore_pkg::*;
  opsel_e sel;
  logic [1:0] el;
  vec_t vrf, vbd, op;
  cplx_t srf, sbd;
  logic [P-1:0] vh;
  logic sh;
  logic [KW-1:0] keep;
  int checks = 0, failures = 0;
  prepop_dc dut (.sel, .el, .vrf, .srf, .vbp_hit(vh), .vbp_data(vbd), .sbp_hit(sh),
                 .sbp_data(sbd), .keep, .op);

  function automatic cplx_t msk(input cplx_t c);
    cplx_t r = c;
    for (int b = 0; b < MW; b++) if (b >= int'(keep)) begin
      r.re.man[MW-1-b] = 1'b0; r.im.man[MW-1-b] = 1'b0;
    end
    return r;
  endfunction

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    cplx_t v [P]; cplx_t s; cplx_t e;
    for (int i = 0; i < 2000; i++) begin
      sel = opsel_e'($urandom_range(0, 3)); el = 2'($urandom);
      vrf = vec_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
      vbd = vec_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
      srf = cplx_t'({$urandom, $urandom}); sbd = cplx_t'({$urandom, $urandom});
      vh = P'($urandom); sh = 1'($urandom);
      keep = (i % 2 == 0) ? KW'(MW) : KW'($urandom_range(0, MW));
      #1;
      for (int l = 0; l < P; l++) v[l] = vh[l] ? vbd[l] : vrf[l];
      s = sh ? sbd : srf;
      if (sel == SEL_EBC) s = v[el];
      for (int l = 0; l < P; l++) begin
        case (sel)
          SEL_VEC:  e = v[l];
          SEL_SCAL: e = (l == 0) ? s : '0;
          default:  e = s;
        endcase
        checks++;
        if (op[l] !== msk(e)) begin failures++; $display("FAIL sel=%0d lane %0d", sel, l); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
