// decoder: instruction decoder of the DC stage.
//
// Turns a 32-bit instruction word (format in napcore_pkg) into the control
// word that configures every later stage: operand selection for
// PrepOp-DC, the permutation networks, the conjugation flags, the RED1/RED2
// adder interconnect, the write-back target and the index of the
// arithmetic stage after which the result is valid (used for bypassing).
// Control-flow and configuration instructions (JMP, DJNZ, SETLC, SETPREC,
// HALT, NOP) are executed in DC and do not enter the pipeline (`pipe` = 0).
// Purely combinational.
//
// Scalar-result operations (VDOT, DET2) broadcast their result to all lanes;
// with ds = 0 they write only lane rc[1:0] of vREG[rd], with ds = 1 they
// write sREG[rd]. ST always stores the whole vector register ra. MOV with bit 5 set writes only lane rc[1:0] (element
// insert). For the 2x2 matrix operations bit 4 selects the transpose of
// operand two (MM2A/MM2B) or the source half of the 2-vector (MV2/MV2A),
// and bit 5 the destination half (MV2/MV2A).
// The stage structure follows the document; the instruction set and its
// encoding are this design's own.
module decoder
  import napcore_pkg::*;
(
  input  logic [31:0]      instr,
  output ctrl_t            ctrl,
  output logic             pipe,
  output logic             is_halt,
  output logic             is_jmp,
  output logic             is_djnz,
  output logic             is_setlc,
  output logic             is_setprec,
  output logic [PM_AW-1:0] target,
  output logic [15:0]      imm16,
  output logic [KW-1:0]    keep_imm
);
  op_e         op;
  logic        ds, m4, m5;
  logic [1:0]  lane, lo;
  logic [P-1:0] lane_mask;

  always_comb begin
    op        = op_e'(instr[31:27]);
    ds        = instr[26];
    m4        = instr[4];
    m5        = instr[5];
    lane      = instr[11:10];
    lane_mask = P'(1) << lane;
    target    = instr[PM_AW-1:0];
    imm16     = instr[15:0];
    keep_imm  = (instr[4:0] > 5'(MW)) ? KW'(MW) : KW'(instr[4:0]);

    is_halt    = (op == OP_HALT);
    is_jmp     = (op == OP_JMP);
    is_djnz    = (op == OP_DJNZ);
    is_setlc   = (op == OP_SETLC);
    is_setprec = (op == OP_SETPREC);

    ctrl       = '0;
    ctrl.op    = op;
    ctrl.rd    = instr[25:22];
    ctrl.ra    = instr[21:18];
    ctrl.rb    = instr[17:14];
    ctrl.rc    = instr[13:10];
    ctrl.asel  = opsel_e'(instr[9:8]);
    ctrl.ael   = instr[7:6];
    ctrl.bsel  = opsel_e'(instr[5:4]);
    ctrl.bel   = instr[3:2];
    ctrl.cja   = instr[1];
    ctrl.cjb   = instr[0];
    ctrl.maddr = instr[17:9];
    ctrl.wr_v  = !ds;
    ctrl.wr_s  = ds;
    ctrl.wmask = '1;
    ctrl.use_a = 1'b1;
    ctrl.perm.hilo2a = 1'b1;   // straight pass-through: right lane pair = row 1
    ctrl.perm.hilo2b = 1'b1;
    pipe       = 1'b1;
    lo         = m5 ? 2'd2 : 2'd0;

    unique case (op)
      OP_LD: begin
        ctrl.use_a = 1'b0; ctrl.is_ld = 1'b1; ctrl.vstage = 3'd1;
        ctrl.wr_v = 1'b1; ctrl.wr_s = 1'b0;
      end
      OP_ST: begin
        ctrl.b_one = 1'b1; ctrl.vstage = 3'd2; ctrl.asel = SEL_VEC;
        ctrl.wr_v = 1'b0; ctrl.wr_s = 1'b0; ctrl.wr_m = 1'b1;
        ctrl.cja = 1'b0; ctrl.cjb = 1'b0;
      end
      OP_MOV: begin
        ctrl.b_one = 1'b1; ctrl.vstage = 3'd2; ctrl.cjb = 1'b0;
        if (m5) ctrl.wmask = lane_mask;
      end
      OP_VADD, OP_VSUB: begin
        ctrl.b_one = 1'b1; ctrl.use_c = 1'b1; ctrl.vstage = 3'd3; ctrl.cjb = 1'b0;
        for (int i = 0; i < P; i++)
          ctrl.red1.add[i] = '{en: 1'b1, xsel: 2'(i), ysrc: 1'b1, ysel: 2'(i),
                               sub: (op == OP_VSUB)};
      end
      OP_VMUL: begin
        ctrl.use_b = 1'b1; ctrl.vstage = 3'd2;
      end
      OP_VMAC: begin
        ctrl.use_b = 1'b1; ctrl.use_c = 1'b1; ctrl.vstage = 3'd3;
        for (int i = 0; i < P; i++)
          ctrl.red1.add[i] = '{en: 1'b1, xsel: 2'(i), ysrc: 1'b1, ysel: 2'(i), sub: 1'b0};
      end
      OP_VDOT: begin
        ctrl.use_b = 1'b1; ctrl.vstage = 3'd4;
        if (!ds) ctrl.wmask = lane_mask;
        ctrl.red1.add[0] = '{en: 1'b1, xsel: 2'd0, ysrc: 1'b0, ysel: 2'd1, sub: 1'b0};
        ctrl.red1.add[1] = '{en: 1'b1, xsel: 2'd2, ysrc: 1'b0, ysel: 2'd3, sub: 1'b0};
        ctrl.red2.add[0] = '{en: 1'b1, xsel: 2'd0, ysrc: 1'b0, ysel: 2'd1, sub: 1'b0};
        for (int j = 0; j < P; j++) ctrl.red2.omap[j] = 2'd1;
      end
      OP_MM2A, OP_MM2B: begin
        ctrl.use_b = 1'b1; ctrl.bsel = SEL_VEC;
        ctrl.perm.hilo1a = 1'b0; ctrl.perm.hilo2a = 1'b1;
        ctrl.perm.cb1    = (op == OP_MM2A) ? CB1_DUPE : CB1_DUPO;
        ctrl.perm.cb2    = m4;
        ctrl.perm.hilo1b = (op == OP_MM2B);
        ctrl.perm.hilo2b = (op == OP_MM2B);
        ctrl.vstage = (op == OP_MM2A) ? 3'd2 : 3'd3;
        if (op == OP_MM2B) begin
          ctrl.use_c = 1'b1;
          for (int i = 0; i < P; i++)
            ctrl.red1.add[i] = '{en: 1'b1, xsel: 2'(i), ysrc: 1'b1, ysel: 2'(i), sub: 1'b0};
        end
      end
      OP_MV2, OP_MV2A: begin
        ctrl.use_b = 1'b1; ctrl.bsel = SEL_VEC;
        ctrl.perm.hilo1b = m4; ctrl.perm.hilo2b = m4;
        ctrl.wmask = m5 ? 4'b1100 : 4'b0011;
        ctrl.red1.add[lo]   = '{en: 1'b1, xsel: 2'd0, ysrc: 1'b0, ysel: 2'd1, sub: 1'b0};
        ctrl.red1.add[lo+1] = '{en: 1'b1, xsel: 2'd2, ysrc: 1'b0, ysel: 2'd3, sub: 1'b0};
        ctrl.vstage = 3'd3;
        if (op == OP_MV2A) begin
          ctrl.use_c = 1'b1; ctrl.vstage = 3'd4;
          ctrl.red2.add[0] = '{en: 1'b1, xsel: lo,   ysrc: 1'b1, ysel: lo,   sub: 1'b0};
          ctrl.red2.add[1] = '{en: 1'b1, xsel: lo+1, ysrc: 1'b1, ysel: lo+1, sub: 1'b0};
          ctrl.red2.omap[lo]   = 2'd1;
          ctrl.red2.omap[lo+1] = 2'd2;
        end
      end
      OP_DET2: begin
        ctrl.use_b = 1'b1; ctrl.bsel = SEL_VEC; ctrl.perm.cb3 = CB3_REV; ctrl.vstage = 3'd3;
        if (!ds) ctrl.wmask = lane_mask;
        for (int i = 0; i < P; i++)
          ctrl.red1.add[i] = '{en: 1'b1, xsel: 2'd0, ysrc: 1'b0, ysel: 2'd1, sub: 1'b1};
      end
      OP_ADJ2: begin
        ctrl.use_b = 1'b1; ctrl.bsel = SEL_VEC; ctrl.perm.cb3 = CB3_ADJ; ctrl.vstage = 3'd2;
      end
      OP_VINV: begin
        ctrl.is_inv = 1'b1; ctrl.vstage = 3'd1;
      end
      default: begin            // NOP, HALT, JMP, SETLC, DJNZ, SETPREC, undefined
        pipe = 1'b0;
        ctrl = '0;
        ctrl.op = op;
      end
    endcase
    if (!ctrl.use_b) begin
      ctrl.bsel = SEL_VEC;
      ctrl.rb   = '0;
    end
    if (!ctrl.use_c) ctrl.rc = '0;
    if (!ctrl.use_a) ctrl.ra = '0;
  end
endmodule
