// napcore_pkg: types and constants shared by the napCore SIMD processor.
//
// The core works on vectors of P complex floating-point scalars. Each real
// component uses the s1m12e6 format: one sign bit, a 6-bit biased exponent
// and a 12-bit mantissa with a hidden leading one (value =
// (-1)^s * 1.m * 2^(e-BIAS)). This is the format the layout configuration
// targets; a complex scalar is then 38 bits and a vector of four is 152 bits,
// which is the vector-memory word width. An exponent field of zero encodes
// the value zero (no subnormals, no infinities or NaNs; overflow saturates);
// these encoding details are this design's own choice.
//
// The instruction word (32 bits) is this design's own encoding:
//   [31:27] opcode  [26] ds (destination is the scalar register file)
//   [25:22] rd      [21:18] ra      [17:14] rb      [13:10] rc
//   [9:8] asel [7:6] ael [5:4] bsel [3:2] bel [1] conj a [0] conj b
// Immediates: LD/ST address [17:9]; JMP/DJNZ target [9:0];
// SETLC count [15:0]; SETPREC kept mantissa bits [4:0].
package napcore_pkg;

  // ---------------------------------------------------------------- format
  localparam int unsigned MW   = 12;               // mantissa bits (hidden one excluded)
  localparam int unsigned EW   = 6;                // exponent bits
  localparam int unsigned FW   = 1 + EW + MW;      // 19-bit real word
  localparam int unsigned BIAS = (1 << (EW - 1)) - 1;
  localparam int unsigned P    = 4;                // SIMD parallelism degree
  localparam int unsigned KW   = $clog2(MW + 1);   // width of a kept-bits count

  localparam int unsigned NVREG = 16;              // vector registers
  localparam int unsigned NSREG = 16;              // scalar registers
  localparam int unsigned RW    = $clog2(NVREG);

  localparam int unsigned PM_DEPTH = 1024;         // program memory words
  localparam int unsigned PM_AW    = $clog2(PM_DEPTH);
  localparam int unsigned VM_DEPTH = 512;          // vector memory words
  localparam int unsigned VM_AW    = $clog2(VM_DEPTH);
  localparam int unsigned NR_ITER  = 4;            // Newton-Raphson iterations

  typedef struct packed {
    logic          sgn;
    logic [EW-1:0] exp;
    logic [MW-1:0] man;
  } fp_t;

  typedef struct packed {
    fp_t re;
    fp_t im;
  } cplx_t;

  typedef cplx_t [P-1:0] vec_t;                    // 152 bits for P = 4

  // the four real products of one complex multiplication
  typedef struct packed {
    fp_t rr;  // a.re * b.re
    fp_t ii;  // a.im * b.im
    fp_t ri;  // a.re * b.im
    fp_t ir;  // a.im * b.re
  } prod_t;

  typedef prod_t [P-1:0] prodv_t;

  localparam fp_t   FP_ZERO = '0;
  localparam fp_t   FP_ONE  = '{sgn: 1'b0, exp: EW'(BIAS), man: '0};
  localparam cplx_t C_ZERO  = '0;
  localparam cplx_t C_ONE   = '{re: FP_ONE, im: FP_ZERO};

  // ---------------------------------------------------------------- opcodes
  typedef enum logic [4:0] {
    OP_NOP     = 5'd0,
    OP_HALT    = 5'd1,
    OP_JMP     = 5'd2,
    OP_SETLC   = 5'd3,   // load loop counter
    OP_DJNZ    = 5'd4,   // if loop counter != 0: decrement and jump
    OP_SETPREC = 5'd5,   // set number of kept mantissa bits (mantissa masking)
    OP_LD      = 5'd6,   // vREG[rd] <= VMEM[imm]
    OP_ST      = 5'd7,   // VMEM[imm] <= operand a
    OP_MOV     = 5'd8,   // rd <= a
    OP_VADD    = 5'd9,   // rd <= a + vREG[rc]
    OP_VSUB    = 5'd10,  // rd <= a - vREG[rc]
    OP_VMUL    = 5'd11,  // rd <= a .* b
    OP_VMAC    = 5'd12,  // rd <= a .* b + vREG[rc]
    OP_VDOT    = 5'd13,  // rd <= sum(a .* b)                 (scalar result)
    OP_MM2A    = 5'd14,  // 2x2 matrix product, first half
    OP_MM2B    = 5'd15,  // 2x2 matrix product, second half + vREG[rc]
    OP_MV2     = 5'd16,  // 2x2 matrix times 2-vector
    OP_MV2A    = 5'd17,  // 2x2 matrix times 2-vector + vREG[rc]
    OP_DET2    = 5'd18,  // determinant of 2x2 matrix          (scalar result)
    OP_ADJ2    = 5'd19,  // a .* adjugate(b) of 2x2 matrix
    OP_VINV    = 5'd20   // lane-wise 1/re(a), Newton-Raphson
  } op_e;

  // operand selection in PrepOp-DC (switches s1..s4 of the acquisition network)
  typedef enum logic [1:0] {
    SEL_VEC   = 2'd0,   // whole vector register
    SEL_SBC   = 2'd1,   // scalar register, broadcast to all lanes
    SEL_EBC   = 2'd2,   // one element of a vector register, broadcast
    SEL_SCAL  = 2'd3    // scalar register in lane 0 only, other lanes zero
  } opsel_e;

  // crossbar cb1 (operand one)
  typedef enum logic [1:0] {CB1_PASS = 2'd0, CB1_DUPE = 2'd1, CB1_DUPO = 2'd2, CB1_SWAP = 2'd3} cb1_e;
  // crossbar cb3 (operand two)
  typedef enum logic [1:0] {CB3_PASS = 2'd0, CB3_REV = 2'd1, CB3_ADJ = 2'd2, CB3_SWAP = 2'd3} cb3_e;

  typedef struct packed {
    logic hilo1a, hilo2a;   // row selects, operand one (0: row 0 = lanes 0,1)
    cb1_e cb1;
    logic cb2;              // transpose operand two
    logic hilo1b, hilo2b;   // row selects, operand two
    cb3_e cb3;
  } perm_cfg_t;

  // one RED1 adder: out = res[xsel] +/- (ysrc ? vr : res)[ysel]
  typedef struct packed {
    logic       en;      // 0: no_red, lane passes res[lane]
    logic [1:0] xsel;
    logic       ysrc;    // 0: pipeline result, 1: vector register (PrepOp-EX2)
    logic [1:0] ysel;
    logic       sub;
  } radd_t;

  typedef struct packed {
    radd_t [P-1:0] add;
  } red1_cfg_t;

  typedef struct packed {
    radd_t [1:0]      add;   // xsel/ysel index RED1 outputs, ysrc selects fw_vr
    logic [P-1:0][1:0] omap; // per lane: 0 pass, 1 adder0, 2 adder1
  } red2_cfg_t;

  // decoded control word, carried down the pipeline with the instruction
  typedef struct packed {
    op_e          op;
    logic         wr_v;      // write vector register file (lanes in wmask)
    logic         wr_s;      // write scalar register file (lane 0)
    logic         wr_m;      // write vector memory
    logic [RW-1:0] rd;
    logic [P-1:0] wmask;
    logic [VM_AW-1:0] maddr;
    logic [2:0]   vstage;    // arithmetic stages after which the result is valid
    logic         use_a, use_b, use_c;
    opsel_e       asel, bsel;
    logic [1:0]   ael, bel;
    logic [RW-1:0] ra, rb, rc;
    logic         cja, cjb;
    logic         b_one;     // operand two replaced by constant one
    logic         is_inv, is_ld;
    perm_cfg_t    perm;
    red1_cfg_t    red1;
    red2_cfg_t    red2;
  } ctrl_t;

  // one in-flight instruction as seen by the bypassing units, youngest first:
  // EX1, EX2, RED1, RED2 and writeback. `ready` is set where the producing
  // instruction has already passed the stage at which its result is valid.
  localparam int unsigned NBP = 5;
  typedef struct packed {
    logic          valid;
    logic          wr_v;
    logic          wr_s;
    logic [RW-1:0] rd;
    logic [P-1:0]  wmask;
    logic          ready;
    vec_t          data;
  } bp_slot_t;

  // ---------------------------------------------------------------- helpers
  // mask of the mantissa bits that survive when `keep` MSBs are kept
  function automatic logic [MW-1:0] keep_mask(input logic [KW-1:0] keep);
    logic [MW-1:0] m;
    for (int i = 0; i < MW; i++) m[MW-1-i] = (i < int'(keep));
    return m;
  endfunction

  function automatic cplx_t cneg(input cplx_t c);
    cplx_t r = c;
    r.re.sgn = ~c.re.sgn;
    r.im.sgn = ~c.im.sgn;
    return r;
  endfunction

endpackage
