// tb_fp_mul: random products against a real-number reference, plus zero,
// underflow and overflow cases.
module tb_fp_mul;
  import napcore_pkg::*;
  import tb_fp_pkg::*;
  fp_t a, b, y;
  int checks = 0, failures = 0;
  fp_mul dut (.a(a), .b(b), .y(y));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s a=%h b=%h y=%h", what, a, b, y); end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real ra, rb;
    for (int i = 0; i < 2000; i++) begin
      ra = rnd(); rb = rnd();
      a = r2fp(ra); b = r2fp(rb); #1;
      chk(near(fp2r(y), fp2r(a) * fp2r(b), pow2(-(int'(MW) - 1)), 0.0), "random");
    end
    a = r2fp(1.5); b = FP_ZERO; #1; chk(y.exp == '0, "zero");
    a = r2fp(1.0); b = r2fp(-1.0); #1; chk(fp2r(y) == -1.0, "one");
    a = r2fp(pow2(-20)); b = r2fp(pow2(-20)); #1; chk(y.exp == '0, "underflow");
    a = r2fp(pow2(20)); b = r2fp(pow2(20)); #1; chk(y.exp == '1 && y.man == '1, "overflow");
    a = r2fp(1.5); b = r2fp(1.5); #1; chk(fp2r(y) == 2.25, "exact");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
