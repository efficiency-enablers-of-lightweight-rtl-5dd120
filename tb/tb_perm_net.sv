// tb_perm_net: random vectors and random configurations; the expected
// lane mapping is computed from index arithmetic in the bench, plus the
// three 2x2 patterns used by the matrix instructions.
module tb_perm_net;
  import napcore_pkg::*;
  vec_t a, b, pa, pb;
  perm_cfg_t cfg;
  int checks = 0, failures = 0;
  perm_net dut (.a, .b, .cfg, .pa, .pb);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int src_a(input int l);
    int k, h;
    unique case (cfg.cb1)
      CB1_PASS: k = l;
      CB1_DUPE: k = (l / 2) * 2;
      CB1_DUPO: k = (l / 2) * 2 + 1;
      default:  k = l ^ 1;
    endcase
    h = (k < 2) ? int'(cfg.hilo1a) : int'(cfg.hilo2a);
    return h * 2 + (k % 2);
  endfunction

  function automatic cplx_t exp_b(input int l);
    int k, h, s; bit ng;
    int tr[4] = '{0, 2, 1, 3};
    int adj[4] = '{3, 1, 2, 0};
    ng = 0;
    unique case (cfg.cb3)
      CB3_PASS: k = l;
      CB3_REV:  k = 3 - l;
      CB3_ADJ:  begin k = adj[l]; ng = (l == 1 || l == 2); end
      default:  k = l ^ 1;
    endcase
    h = (k < 2) ? int'(cfg.hilo1b) : int'(cfg.hilo2b);
    s = h * 2 + (k % 2);
    if (cfg.cb2) s = tr[s];
    return ng ? cneg(b[s]) : b[s];
  endfunction

  initial begin
    for (int i = 0; i < 400; i++) begin
      a = vec_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
      b = vec_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
      cfg = perm_cfg_t'($urandom);
      if (i == 0) cfg = '{hilo1a: 0, hilo2a: 1, cb1: CB1_DUPE, cb2: 0, hilo1b: 0, hilo2b: 0, cb3: CB3_PASS};
      #1;
      for (int l = 0; l < P; l++) begin
        checks += 2;
        if (pa[l] !== a[src_a(l)]) begin failures++; $display("FAIL a lane %0d cfg=%h", l, cfg); end
        if (pb[l] !== exp_b(l))    begin failures++; $display("FAIL b lane %0d cfg=%h", l, cfg); end
      end
    end
    // 2x2 adjugate pattern: [d, -b, -c, a]
    a = '0; b = {cplx_t'(4), cplx_t'(3), cplx_t'(2), cplx_t'(1)};
    cfg = '{hilo1a: 0, hilo2a: 1, cb1: CB1_PASS, cb2: 0, hilo1b: 0, hilo2b: 1, cb3: CB3_ADJ};
    #1; checks++;
    if (pb[0] !== b[3] || pb[3] !== b[0] || pb[1] !== cneg(b[1]) || pb[2] !== cneg(b[2])) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
