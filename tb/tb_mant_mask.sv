// tb_mant_mask: every kept-bit count against a mask computed in the bench.
module tb_mant_mask;
  import napcore_pkg::*;
  cplx_t d, q;
  logic [KW-1:0] keep;
  int checks = 0, failures = 0;
  mant_mask dut (.d(d), .keep(keep), .q(q));

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [MW-1:0] m;
    for (int i = 0; i < 500; i++) begin
      d = cplx_t'({$urandom, $urandom});
      keep = KW'($urandom_range(0, MW));
      #1;
      m = '0;
      for (int b = 0; b < int'(keep); b++) m = m | (MW'(1) << (MW - 1 - b));
      checks++;
      if (q.re.man !== (d.re.man & m) || q.im.man !== (d.im.man & m) ||
          q.re.exp !== d.re.exp || q.im.exp !== d.im.exp ||
          q.re.sgn !== d.re.sgn || q.im.sgn !== d.im.sgn) begin
        failures++; $display("FAIL keep=%0d d=%h q=%h", keep, d, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
