// tb_fp_add: random sums and differences against a real-number reference,
// plus cancellation and zero operands.
module tb_fp_add;
  import napcore_pkg::*;
  import tb_fp_pkg::*;
  fp_t a, b, y;
  logic sub;
  int checks = 0, failures = 0;
  fp_add dut (.a(a), .b(b), .sub(sub), .y(y));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s a=%h b=%h sub=%0d y=%h (%f)", what, a, b, sub, y, fp2r(y)); end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real ex, mx;
    for (int i = 0; i < 3000; i++) begin
      a = r2fp(rnd()); b = r2fp(rnd()); sub = 1'($urandom_range(0, 1)); #1;
      ex = sub ? fp2r(a) - fp2r(b) : fp2r(a) + fp2r(b);
      mx = (fp2r(a) < 0.0 ? -fp2r(a) : fp2r(a));
      if ((fp2r(b) < 0.0 ? -fp2r(b) : fp2r(b)) > mx) mx = (fp2r(b) < 0.0 ? -fp2r(b) : fp2r(b));
      // truncation error is relative to the larger operand
      chk(near(fp2r(y), ex, pow2(-(int'(MW) - 1)), mx), "random");
    end
    a = r2fp(1.25); b = r2fp(1.25); sub = 1; #1; chk(y.exp == '0, "cancel");
    a = r2fp(-3.5); b = FP_ZERO; sub = 0; #1; chk(fp2r(y) == -3.5, "b zero");
    a = FP_ZERO; b = r2fp(0.75); sub = 1; #1; chk(fp2r(y) == -0.75, "a zero");
    a = r2fp(1.0); b = r2fp(1.0); sub = 0; #1; chk(fp2r(y) == 2.0, "carry");
    a = r2fp(1.0); b = r2fp(pow2(-20)); sub = 0; #1; chk(fp2r(y) == 1.0, "tiny");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
