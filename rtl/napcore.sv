// napcore: lightweight SIMD floating-point processor core for vector
// arithmetic (e.g. linear MIMO detection), P = 4 complex lanes.
//
// Pipeline: PFE (program-memory address) -> FE (instruction word) -> DC
// (decode, operand acquisition with bypassing and masking) -> EX1 (sixteen
// real multipliers behind the permutation networks, Newton-Raphson
// inverters) -> EX2 (complex accumulation of the partial products, third
// operand read) -> RED1 (four configurable complex adders) -> RED2 (two
// configurable complex adders) -> write-back into the vector or scalar
// register file or the vector memory.
//
// Hazards: every instruction carries the index of the arithmetic stage
// after which its result is valid. DC bypasses operands from EX2, RED1,
// RED2 and write-back where the producer is far enough; otherwise DC holds
// the instruction (bubble into EX1). The third operand (read in EX2) has no
// bypass, so DC waits until its producer is at least in RED2. A load waits
// for stores in flight. A Newton-Raphson inversion keeps EX1 for NR_ITER
// cycles and holds DC and fetch meanwhile.
// Mantissa masking: the SETPREC instruction sets the number of kept
// mantissa bits; the value travels with each instruction and masks the
// operands in DC and the output of every arithmetic component.
//
// Interface: load the program through pm_we/pm_waddr/pm_wdata and the data
// through the host port of the vector memory while the core is idle, pulse
// `start`; `busy` falls when HALT has been decoded and the pipeline has
// drained. Results are read back through the vector-memory host port
// (read data one cycle after host_vm_re). `cycles` counts the cycles of the
// last run, `stalls` the cycles DC was held.
// The pipeline, units and memory sizes follow the document; the instruction
// set, the host port and the hazard rules in detail are this design's own.
module napcore
  import napcore_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             busy,
  // program memory load port
  input  logic             pm_we,
  input  logic [PM_AW-1:0] pm_waddr,
  input  logic [31:0]      pm_wdata,
  // vector memory host port (use while idle)
  input  logic             host_vm_re,
  input  logic             host_vm_we,
  input  logic [VM_AW-1:0] host_vm_addr,
  input  vec_t             host_vm_wdata,
  output vec_t             vm_rdata,
  // status
  output logic [31:0]      cycles,
  output logic [31:0]      stalls
);
  // ------------------------------------------------------------ fetch / DC
  logic             pm_re;
  logic [PM_AW-1:0] pm_addr;
  logic [31:0]      pm_rdata, dc_instr;
  logic             dc_valid, running;
  logic             hold, redirect, halt_fire, dc_fire;

  ctrl_t            dc_c;
  logic             dc_pipe, d_halt, d_jmp, d_djnz, d_setlc, d_setprec;
  logic [PM_AW-1:0] d_target;
  logic [15:0]      d_imm16;
  logic [KW-1:0]    d_keep;
  logic [KW-1:0]    keep_q;
  logic [15:0]      lc_q;

  pmem u_pmem (.clk, .re(pm_re), .raddr(pm_addr), .rdata(pm_rdata),
               .we(pm_we), .waddr(pm_waddr), .wdata(pm_wdata));

  fetch_unit u_fetch (.clk, .rst_n, .start, .hold, .redirect, .target(d_target),
                      .halt(halt_fire), .pm_re, .pm_addr, .pm_rdata,
                      .dc_valid, .dc_instr, .running);

  decoder u_dec (.instr(dc_instr), .ctrl(dc_c), .pipe(dc_pipe), .is_halt(d_halt),
                 .is_jmp(d_jmp), .is_djnz(d_djnz), .is_setlc(d_setlc),
                 .is_setprec(d_setprec), .target(d_target), .imm16(d_imm16),
                 .keep_imm(d_keep));

  // ------------------------------------------------------------ pipeline registers
  logic   de_v, e1_v, e2_v, d1_v, wb_v;
  ctrl_t  de_c, e1_c, e2_c, d1_c, wb_c;
  logic [KW-1:0] de_k, e1_k, e2_k, d1_k;
  vec_t   de_a, de_b;       // DC -> EX1 operands
  prodv_t e1_p;             // EX1 -> EX2 partial products
  vec_t   e2_r, e2_vr;      // EX2 -> RED1
  vec_t   d1_r, d1_vr;      // RED1 -> RED2
  vec_t   wb_r;             // RED2 -> write-back

  // ------------------------------------------------------------ register files
  vec_t  vrf_a, vrf_b, vrf_c;
  cplx_t srf_a, srf_b;

  vreg_file u_vrf (.clk, .rst_n, .ra(dc_c.ra), .rb(dc_c.rb), .rc(e1_c.rc),
                   .da(vrf_a), .db(vrf_b), .dc(vrf_c),
                   .we_lane((wb_v && wb_c.wr_v) ? wb_c.wmask : '0),
                   .wa(wb_c.rd), .wd(wb_r));

  sreg_file u_srf (.clk, .rst_n, .ra(dc_c.ra), .rb(dc_c.rb), .da(srf_a), .db(srf_b),
                   .we(wb_v && wb_c.wr_s), .wa(wb_c.rd), .wd(wb_r[0]));

  // ------------------------------------------------------------ bypassing
  bp_slot_t [NBP-1:0] slots;
  vec_t e1_val;
  always_comb begin
    for (int l = 0; l < P; l++) e1_val[l] = '{re: e1_p[l].rr, im: e1_p[l].ri};
    slots[0] = '{valid: de_v, wr_v: de_c.wr_v, wr_s: de_c.wr_s, rd: de_c.rd,
                 wmask: de_c.wmask, ready: 1'b0, data: '0};
    slots[1] = '{valid: e1_v, wr_v: e1_c.wr_v, wr_s: e1_c.wr_s, rd: e1_c.rd,
                 wmask: e1_c.wmask, ready: (e1_c.vstage <= 3'd1), data: e1_val};
    slots[2] = '{valid: e2_v, wr_v: e2_c.wr_v, wr_s: e2_c.wr_s, rd: e2_c.rd,
                 wmask: e2_c.wmask, ready: (e2_c.vstage <= 3'd2), data: e2_r};
    slots[3] = '{valid: d1_v, wr_v: d1_c.wr_v, wr_s: d1_c.wr_s, rd: d1_c.rd,
                 wmask: d1_c.wmask, ready: (d1_c.vstage <= 3'd3), data: d1_r};
    slots[4] = '{valid: wb_v, wr_v: wb_c.wr_v, wr_s: wb_c.wr_s, rd: wb_c.rd,
                 wmask: wb_c.wmask, ready: 1'b1, data: wb_r};
  end

  logic [P-1:0] hit_a, hit_b;
  vec_t         bpd_a, bpd_b;
  logic         st_a, st_b, st_c, st_ld;
  logic         a_scal, b_scal;

  assign a_scal = (dc_c.asel == SEL_SBC) || (dc_c.asel == SEL_SCAL);
  assign b_scal = (dc_c.bsel == SEL_SBC) || (dc_c.bsel == SEL_SCAL);

  bypass_unit u_bpa (.need(dc_pipe && dc_c.use_a), .scalar(a_scal), .idx(dc_c.ra),
                     .slots, .hit(hit_a), .data(bpd_a), .stall(st_a));
  bypass_unit u_bpb (.need(dc_pipe && dc_c.use_b && !dc_c.b_one), .scalar(b_scal),
                     .idx(dc_c.rb), .slots, .hit(hit_b), .data(bpd_b), .stall(st_b));

  // third operand: no bypass, producer must have left RED1 before we read in EX2
  always_comb begin
    st_c  = 1'b0;
    st_ld = 1'b0;
    for (int s = 0; s < 3; s++)
      if (dc_pipe && dc_c.use_c && slots[s].valid && slots[s].wr_v && slots[s].rd == dc_c.rc)
        st_c = 1'b1;
    if (dc_pipe && dc_c.is_ld)
      st_ld = (de_v && de_c.wr_m) || (e1_v && e1_c.wr_m) || (e2_v && e2_c.wr_m) ||
              (d1_v && d1_c.wr_m) || (wb_v && wb_c.wr_m);
  end

  logic ex1_busy;
  assign hold      = dc_valid && (ex1_busy || (dc_pipe && (st_a || st_b || st_c || st_ld)));
  assign dc_fire   = dc_valid && !hold;
  assign halt_fire = dc_fire && d_halt;
  assign redirect  = dc_fire && (d_jmp || (d_djnz && lc_q != '0));

  // ------------------------------------------------------------ PrepOp-DC
  vec_t opa, opb;
  prepop_dc u_ppa (.sel(dc_c.asel), .el(dc_c.ael), .vrf(vrf_a), .srf(srf_a),
                   .vbp_hit(a_scal ? '0 : hit_a), .vbp_data(bpd_a),
                   .sbp_hit(a_scal && hit_a[0]), .sbp_data(bpd_a[0]),
                   .keep(keep_q), .op(opa));
  prepop_dc u_ppb (.sel(dc_c.bsel), .el(dc_c.bel), .vrf(vrf_b), .srf(srf_b),
                   .vbp_hit(b_scal ? '0 : hit_b), .vbp_data(bpd_b),
                   .sbp_hit(b_scal && hit_b[0]), .sbp_data(bpd_b[0]),
                   .keep(keep_q), .op(opb));

  // configuration registers executed in DC
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      keep_q <= KW'(MW);
      lc_q   <= '0;
    end else if (dc_fire) begin
      if (d_setprec) keep_q <= d_keep;
      if (d_setlc)   lc_q   <= d_imm16;
      else if (d_djnz && lc_q != '0) lc_q <= lc_q - 1'b1;
    end
  end

  // ------------------------------------------------------------ vector memory
  logic             vm_re, vm_we;
  logic [VM_AW-1:0] vm_raddr, vm_waddr;
  vec_t             vm_wdata;
  assign vm_re    = (dc_fire && dc_pipe && dc_c.is_ld) || host_vm_re;
  assign vm_raddr = (dc_fire && dc_pipe && dc_c.is_ld) ? dc_c.maddr : host_vm_addr;
  assign vm_we    = (wb_v && wb_c.wr_m) || host_vm_we;
  assign vm_waddr = (wb_v && wb_c.wr_m) ? wb_c.maddr : host_vm_addr;
  assign vm_wdata = (wb_v && wb_c.wr_m) ? wb_r : host_vm_wdata;

  vmem u_vmem (.clk, .re(vm_re), .raddr(vm_raddr), .rdata(vm_rdata),
               .we(vm_we), .waddr(vm_waddr), .wdata(vm_wdata));

  // ------------------------------------------------------------ EX1 .. RED2
  prodv_t ex1_out;
  vec_t   ex2_out, vr_ex2, red1_out, red2_out;
  vec_t   de_bb;
  assign de_bb = de_c.b_one ? {P{C_ONE}} : de_b;

  ex1_stage u_ex1 (.clk, .rst_n, .valid(de_v), .ctrl(de_c), .keep(de_k),
                   .opa(de_a), .opb(de_bb), .ld_data(vm_rdata), .prod(ex1_out),
                   .busy(ex1_busy));
  ex2_stage u_ex2 (.prod(e1_p), .cja(e1_c.cja), .cjb(e1_c.cjb), .keep(e1_k), .res(ex2_out));
  prepop_ex2 u_ppc (.use_c(e1_v && e1_c.use_c), .vrf(vrf_c), .keep(e1_k), .vr(vr_ex2));
  red1_stage u_red1 (.res(e2_r), .vr(e2_vr), .cfg(e2_c.red1), .keep(e2_k), .out(red1_out));
  red2_stage u_red2 (.in(d1_r), .fw_vr(d1_vr), .cfg(d1_c.red2), .keep(d1_k), .out(red2_out));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      de_v <= 1'b0; e1_v <= 1'b0; e2_v <= 1'b0; d1_v <= 1'b0; wb_v <= 1'b0;
      de_c <= '0;   e1_c <= '0;   e2_c <= '0;   d1_c <= '0;   wb_c <= '0;
      de_k <= '0;   e1_k <= '0;   e2_k <= '0;   d1_k <= '0;
      de_a <= '0;   de_b <= '0;   e1_p <= '0;
      e2_r <= '0;   e2_vr <= '0;  d1_r <= '0;   d1_vr <= '0;  wb_r <= '0;
    end else begin
      if (!ex1_busy) begin
        de_v <= dc_fire && dc_pipe;
        if (dc_fire && dc_pipe) begin
          de_c <= dc_c; de_k <= keep_q; de_a <= opa; de_b <= opb;
        end
        e1_v <= de_v;
        e1_c <= de_c; e1_k <= de_k; e1_p <= ex1_out;
      end else begin
        e1_v <= 1'b0;
      end
      e2_v <= e1_v; e2_c <= e1_c; e2_k <= e1_k; e2_r <= ex2_out; e2_vr <= vr_ex2;
      d1_v <= e2_v; d1_c <= e2_c; d1_k <= e2_k; d1_r <= red1_out; d1_vr <= e2_vr;
      wb_v <= d1_v; wb_c <= d1_c; wb_r <= red2_out;
    end
  end

  // ------------------------------------------------------------ status
  assign busy = running || dc_valid || de_v || e1_v || e2_v || d1_v || wb_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cycles <= '0;
      stalls <= '0;
    end else if (start) begin
      cycles <= '0;
      stalls <= '0;
    end else if (busy) begin
      cycles <= cycles + 1'b1;
      if (hold) stalls <= stalls + 1'b1;
    end
  end

  // the host may only use the vector memory while the core is idle
  a_host_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                (host_vm_re || host_vm_we) |-> !busy);
endmodule
