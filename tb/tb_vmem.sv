// tb_vmem: fills all 512 words (both banks), reads them back in random
// order with simultaneous writes elsewhere, checks one-cycle read latency,
// data hold while idle and read-old on a same-address write.
module tb_vmem;
  import napcore_pkg::*;
  logic clk = 0, re = 0, we = 0;
  logic [VM_AW-1:0] raddr = '0, waddr = '0;
  vec_t rdata, wdata = '0;
  vec_t sh [VM_DEPTH];
  int checks = 0, failures = 0;
  vmem dut (.clk, .re, .raddr, .rdata, .we, .waddr, .wdata);
  always #5 clk = ~clk;

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    vec_t old;
    for (int a = 0; a < VM_DEPTH; a++) begin
      @(negedge clk); we = 1; waddr = VM_AW'(a);
      wdata = vec_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
      sh[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      re = 1; raddr = VM_AW'($urandom);
      we = 1'($urandom); waddr = VM_AW'($urandom);
      if (i % 50 == 0) waddr = raddr;
      wdata = vec_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
      old = sh[raddr];
      @(posedge clk); if (we) sh[waddr] = wdata;
      @(negedge clk); re = 0; we = 0;
      checks++;
      if (rdata !== old) begin failures++; $display("FAIL addr %0d", raddr); end
      @(negedge clk); checks++;
      if (rdata !== old) failures++;   // holds while re is low
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
