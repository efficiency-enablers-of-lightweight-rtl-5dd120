// tb_vreg_file: random lane-masked writes and three-port reads against a
// shadow copy kept in the bench; checks reset to zero and read-old-on-write.
module tb_vreg_file;
  import napcore_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [RW-1:0] ra, rb, rc, wa;
  vec_t da, db, dc, wd;
  logic [P-1:0] we;
  cplx_t sh [NVREG][P];
  int checks = 0, failures = 0;
  vreg_file dut (.clk, .rst_n, .ra, .rb, .rc, .da, .db, .dc, .we_lane(we), .wa, .wd);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = '0; wa = '0; wd = '0; ra = 0; rb = 0; rc = 0;
    for (int r = 0; r < NVREG; r++) for (int l = 0; l < P; l++) sh[r][l] = C_ZERO;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      ra = RW'($urandom); rb = RW'($urandom); rc = RW'($urandom);
      we = P'($urandom); wa = RW'($urandom);
      wd = vec_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
      #1;
      for (int l = 0; l < P; l++) begin
        checks += 3;
        if (da[l] !== sh[ra][l]) failures++;
        if (db[l] !== sh[rb][l]) failures++;
        if (dc[l] !== sh[rc][l]) begin failures++; $display("FAIL r%0d lane %0d", rc, l); end
      end
      @(posedge clk);
      for (int l = 0; l < P; l++) if (we[l]) sh[wa][l] = wd[l];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
