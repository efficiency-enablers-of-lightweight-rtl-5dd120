// tb_fetch_unit: the bench plays program memory (word = its address) and
// the decode stage. With random holds and taken jumps it checks that DC
// receives exactly the program-order sequence, that a jump costs two
// cycles, and that HALT stops fetching.
module tb_fetch_unit;
  import napcore_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, hold = 0, redirect = 0, halt = 0;
  logic [PM_AW-1:0] target = '0, pm_addr;
  logic pm_re, dc_valid, running;
  logic [31:0] pm_rdata, dc_instr;
  int checks = 0, failures = 0, njump = 0, nhold = 0;
  fetch_unit dut (.clk, .rst_n, .start, .hold, .redirect, .target, .halt, .pm_re, .pm_addr,
                  .pm_rdata, .dc_valid, .dc_instr, .running);
  always #5 clk = ~clk;
  always_ff @(posedge clk) if (pm_re) pm_rdata <= 32'(pm_addr);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int expect_pc, consumed, cyc, jump_cyc;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    expect_pc = 0; consumed = 0; cyc = 0; jump_cyc = -1;
    while (consumed < 300 && cyc < 5000) begin
      if (jump_cyc >= 0 && dc_valid) begin
        checks++; if (cyc - jump_cyc != 3) begin failures++; $display("FAIL jump gap %0d", cyc - jump_cyc); end
        jump_cyc = -1;
      end
      hold = dc_valid && ($urandom_range(0, 3) == 0);
      redirect = 0; halt = 0;
      if (dc_valid && !hold) begin
        checks++;
        if (dc_instr != 32'(expect_pc % PM_DEPTH)) begin failures++; $display("FAIL got %0d want %0d", dc_instr, expect_pc); end
        consumed++;
        if (expect_pc % 7 == 3) begin
          redirect = 1; target = PM_AW'(expect_pc + 11); expect_pc = (expect_pc + 11) % PM_DEPTH; njump++;
          jump_cyc = cyc;
        end else begin
          expect_pc = (expect_pc + 1) % PM_DEPTH;
        end
        if (consumed == 300) halt = 1;
      end
      nhold += int'(hold);
      @(negedge clk); cyc++;
    end
    redirect = 0; halt = 0; hold = 0;
    repeat (4) @(negedge clk);
    checks++; if (running || dc_valid) failures++;
    checks++; if (njump == 0 || nhold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
