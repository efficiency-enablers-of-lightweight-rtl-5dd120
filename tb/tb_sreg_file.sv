// tb_sreg_file: random writes and two-port reads against a shadow copy.
module tb_sreg_file;
  import napcore_pkg::*;
  logic clk = 0, rst_n = 0, we;
  logic [RW-1:0] ra, rb, wa;
  cplx_t da, db, wd;
  cplx_t sh [NSREG];
  int checks = 0, failures = 0;
  sreg_file dut (.clk, .rst_n, .ra, .rb, .da, .db, .we, .wa, .wd);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = 0; wa = 0; wd = '0; ra = 0; rb = 0;
    for (int r = 0; r < NSREG; r++) sh[r] = C_ZERO;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      ra = RW'($urandom); rb = RW'($urandom); we = 1'($urandom); wa = RW'($urandom);
      wd = cplx_t'({$urandom, $urandom});
      #1;
      checks += 2;
      if (da !== sh[ra]) failures++;
      if (db !== sh[rb]) failures++;
      @(posedge clk);
      if (we) sh[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
