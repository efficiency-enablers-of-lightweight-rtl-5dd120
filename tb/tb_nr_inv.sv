// tb_nr_inv: inverts random values and checks the result against 1/x and
// that it arrives in the fourth cycle of `act` (one iteration per cycle);
// also back-to-back inversions and the zero input.
module tb_nr_inv;
  import napcore_pkg::*;
  import tb_fp_pkg::*;
  logic clk = 0, rst_n = 0, act = 0;
  fp_t x, y;
  logic last;
  int checks = 0, failures = 0;
  nr_inv dut (.clk, .rst_n, .act, .x, .y, .last);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int n;
    x = FP_ONE;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      x = r2fp(rnd() * 8.0); act = 1; n = 1;
      if (i == 5) x = r2fp(1.0);
      while (!last) begin @(negedge clk); n++; end
      checks++;
      if (n != NR_ITER) begin failures++; $display("FAIL latency %0d", n); end
      checks++;
      if (!near(fp2r(y), 1.0 / fp2r(x), pow2(-(int'(MW) - 2)), 0.0)) begin
        failures++; $display("FAIL x=%f y=%f", fp2r(x), fp2r(y));
      end
      if (i % 3 == 0) begin @(negedge clk); act = 0; end
    end
    @(negedge clk); x = FP_ZERO; act = 1;
    while (!last) @(negedge clk);
    checks++; if (!(y.exp == '1)) failures++;
    @(negedge clk); act = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
