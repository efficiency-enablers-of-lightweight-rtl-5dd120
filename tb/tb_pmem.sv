// tb_pmem: writes all 1024 words, reads them back in random order with
// one-cycle latency and checks that the output holds while re is low.
module tb_pmem;
  import napcore_pkg::*;
  logic clk = 0, re = 0, we = 0;
  logic [PM_AW-1:0] raddr = '0, waddr = '0;
  logic [31:0] rdata, wdata = '0;
  logic [31:0] sh [PM_DEPTH];
  int checks = 0, failures = 0;
  logic [PM_AW-1:0] a0;
  pmem dut (.clk, .re, .raddr, .rdata, .we, .waddr, .wdata);
  always #5 clk = ~clk;

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int a = 0; a < PM_DEPTH; a++) begin
      @(negedge clk); we = 1; waddr = PM_AW'(a); wdata = $urandom; sh[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk); re = 1; raddr = PM_AW'($urandom);
      @(negedge clk); re = 0;
      a0 = raddr;
      checks++; if (rdata !== sh[a0]) failures++;
      raddr = ~raddr;                 // read data must hold while re is low
      @(negedge clk);
      checks++; if (rdata !== sh[a0]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
