// tb_decoder: decodes one instruction of each kind and compares the
// control fields against expectations written out by hand in the bench.
module tb_decoder;
  import napcore_pkg::*;
  logic [31:0] instr;
  ctrl_t c;
  logic pipe, h, j, dj, slc, sp;
  logic [PM_AW-1:0] tgt;
  logic [15:0] imm;
  logic [KW-1:0] kimm;
  int checks = 0, failures = 0;
  decoder dut (.instr, .ctrl(c), .pipe, .is_halt(h), .is_jmp(j), .is_djnz(dj),
               .is_setlc(slc), .is_setprec(sp), .target(tgt), .imm16(imm), .keep_imm(kimm));

  function automatic logic [31:0] enc(input op_e op, input bit ds, input int rd, ra, rb, rc,
                                      input int mod);
    return {op, ds, 4'(rd), 4'(ra), 4'(rb), 4'(rc), 10'(mod)};
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    instr = enc(OP_VMAC, 0, 5, 1, 2, 3, 0); #1;
    chk(pipe && c.wr_v && !c.wr_s && c.rd == 5 && c.ra == 1 && c.rb == 2 && c.rc == 3, "vmac regs");
    chk(c.use_a && c.use_b && c.use_c && c.vstage == 3 && c.wmask == 4'hf, "vmac use");
    chk(c.red1.add[2].en && c.red1.add[2].ysrc && c.red1.add[2].xsel == 2 && !c.red1.add[2].sub, "vmac red1");
    instr = enc(OP_VDOT, 0, 7, 1, 2, 2, 0); #1;
    chk(c.wmask == 4'b0100 && c.vstage == 4 && !c.use_c && c.rc == 0, "vdot lane");
    chk(c.red2.add[0].en && c.red2.omap[3] == 1 && c.red1.add[1].xsel == 2 && c.red1.add[1].ysel == 3, "vdot tree");
    instr = enc(OP_VDOT, 1, 7, 1, 2, 0, 0); #1;
    chk(c.wr_s && !c.wr_v, "vdot scalar");
    instr = enc(OP_MM2B, 0, 4, 1, 2, 6, 'h10); #1;
    chk(c.perm.cb1 == CB1_DUPO && c.perm.hilo1b && c.perm.hilo2b && c.perm.cb2 && c.use_c, "mm2b");
    instr = enc(OP_MV2A, 0, 4, 1, 2, 6, 'h20); #1;
    chk(c.wmask == 4'b1100 && c.red2.omap[2] == 1 && c.red2.omap[3] == 2 && c.red2.add[1].ysrc && c.vstage == 4, "mv2a");
    instr = enc(OP_DET2, 1, 3, 8, 8, 0, 0); #1;
    chk(c.perm.cb3 == CB3_REV && c.red1.add[3].sub && c.vstage == 3 && c.wr_s, "det2");
    instr = enc(OP_ADJ2, 0, 3, 2, 8, 0, 'h100); #1;
    chk(c.perm.cb3 == CB3_ADJ && c.asel == SEL_SBC && c.bsel == SEL_VEC, "adj2");
    instr = enc(OP_VINV, 0, 3, 2, 0, 0, 0); #1;
    chk(c.is_inv && c.vstage == 1 && !c.use_b, "vinv");
    instr = enc(OP_MOV, 0, 3, 2, 9, 1, 'h20 | 'h100); #1;
    chk(c.b_one && c.wmask == 4'b0010 && c.asel == SEL_SBC && c.rb == 0, "mov insert");
    instr = {OP_LD, 1'b0, 4'd9, 4'd0, 9'd300, 9'd0}; #1;
    chk(c.is_ld && c.maddr == 300 && c.rd == 9 && c.wr_v && !c.use_a, "ld");
    instr = {OP_ST, 1'b0, 4'd0, 4'd6, 9'd17, 9'd0}; #1;
    chk(c.wr_m && !c.wr_v && !c.wr_s && c.maddr == 17 && c.ra == 6 && c.b_one, "st");
    instr = {OP_JMP, 17'd0, 10'd777}; #1;
    chk(!pipe && j && tgt == 777, "jmp");
    instr = {OP_SETPREC, 22'd0, 5'd7}; #1;
    chk(!pipe && sp && kimm == 7, "setprec");
    instr = {OP_SETPREC, 22'd0, 5'd31}; #1;
    chk(kimm == KW'(MW), "setprec clamp");
    instr = {OP_SETLC, 11'd0, 16'd1234}; #1;
    chk(slc && imm == 1234 && !pipe, "setlc");
    instr = {OP_HALT, 27'd0}; #1;
    chk(h && !pipe, "halt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
