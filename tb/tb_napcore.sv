// tb_napcore: end-to-end test of the napCore at its default configuration.
//
// The bench assembles programs, loads them and their data through the host
// ports, runs the core and compares the vectors stored back to the vector
// memory with a reference computed in `real` arithmetic. Three programs:
//  1. mechanisms: loads/stores, bypassing from every pipeline point, operand
//     interlocks, the unbypassed third operand, load-after-store, scalar and
//     element broadcast, element insert, scalar register writes, inner
//     product, 2x2 matrix product / matrix-vector / determinant / adjugate,
//     Newton-Raphson inversion, a DJNZ loop and mantissa masking;
//  2. workload: open-loop MMSE equalisation x = (H^H H + N0 I)^-1 H^H y and
//     the SINR of each stream for 2x2 and 2x4 antenna setups and several
//     subcarriers, built from the 2x2 matrix instructions, one subcarrier at
//     a time and with two or three subcarriers interleaved, followed by one
//     iterative MMSE-PIC step (soft interference cancellation with given
//     prior symbol means and variances) for the same setups;
//  3. throughput: a 4x4 matrix times four vectors by sixteen inner products,
//     which must issue one instruction per cycle without stalls.
// Each mechanism is counted from the core's internal signals and must occur.
module tb_napcore;
  import napcore_pkg::*;
  import tb_fp_pkg::*;

  typedef struct { real re; real im; } cr_t;

  logic clk = 0, rst_n = 0, start = 0, busy;
  logic pm_we = 0;
  logic [PM_AW-1:0] pm_waddr = '0;
  logic [31:0] pm_wdata = '0;
  logic host_vm_re = 0, host_vm_we = 0;
  logic [VM_AW-1:0] host_vm_addr = '0;
  vec_t host_vm_wdata = '0, vm_rdata;
  logic [31:0] cycles, stalls;

  napcore dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ mechanism counters
  int n_bp_e1 = 0, n_bp_e2 = 0, n_bp_d1 = 0, n_bp_wb = 0, n_sbp = 0;
  int n_st_ab = 0, n_st_c = 0, n_st_ld = 0, n_nr = 0, n_jump = 0;
  int n_lane = 0, n_swr = 0, n_store = 0, n_load = 0, n_mask = 0, n_fwvr = 0;

  function automatic int youngest(input logic [RW-1:0] r, input bit sc);
    for (int s = 0; s < NBP; s++)
      if (dut.slots[s].valid && dut.slots[s].rd == r &&
          (sc ? dut.slots[s].wr_s : dut.slots[s].wr_v)) return s;
    return -1;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (dut.dc_fire && dut.dc_pipe) begin
      if (dut.dc_c.use_a && (dut.hit_a != 0)) begin
        case (youngest(dut.dc_c.ra, dut.a_scal))
          1: n_bp_e1++; 2: n_bp_e2++; 3: n_bp_d1++; 4: n_bp_wb++; default: ;
        endcase
        if (dut.a_scal) n_sbp++;
      end
      if (dut.dc_c.use_b && !dut.dc_c.b_one && (dut.hit_b != 0)) begin
        case (youngest(dut.dc_c.rb, dut.b_scal))
          1: n_bp_e1++; 2: n_bp_e2++; 3: n_bp_d1++; 4: n_bp_wb++; default: ;
        endcase
      end
      if (dut.dc_c.is_ld) n_load++;
    end
    if (dut.dc_valid && dut.dc_pipe && (dut.st_a || dut.st_b)) n_st_ab++;
    if (dut.dc_valid && dut.st_c) n_st_c++;
    if (dut.dc_valid && dut.st_ld) n_st_ld++;
    if (dut.ex1_busy) n_nr++;
    if (dut.redirect) n_jump++;
    if (dut.wb_v && dut.wb_c.wr_v && dut.wb_c.wmask != '1) n_lane++;
    if (dut.wb_v && dut.wb_c.wr_s) n_swr++;
    if (dut.wb_v && dut.wb_c.wr_m) n_store++;
    if (dut.de_v && dut.de_k != KW'(MW)) n_mask++;
    if (dut.d1_v && (dut.d1_c.red2.add[0].ysrc || dut.d1_c.red2.add[1].ysrc)) n_fwvr++;
  end

  // ------------------------------------------------------------ assembler
  function automatic logic [31:0] ins(input op_e op, input bit ds, input int rd, ra, rb, rc,
                                      input int mod = 0);
    return {op, ds, 4'(rd), 4'(ra), 4'(rb), 4'(rc), 10'(mod)};
  endfunction
  function automatic logic [31:0] ld(input int rd, input int addr);
    return {OP_LD, 1'b0, 4'(rd), 4'd0, 9'(addr), 9'd0};
  endfunction
  function automatic logic [31:0] st(input int ra, input int addr);
    return {OP_ST, 1'b0, 4'd0, 4'(ra), 9'(addr), 9'd0};
  endfunction
  localparam int M_SBC = 'h100, M_EBC = 'h200, M_CJA = 'h2, M_CJB = 'h1;

  logic [31:0] prog [$];

  // ------------------------------------------------------------ host access
  task automatic load_prog();
    foreach (prog[i]) begin
      @(negedge clk); pm_we = 1; pm_waddr = PM_AW'(i); pm_wdata = prog[i];
    end
    @(negedge clk); pm_we = 0;
  endtask

  task automatic vm_write(input int a, input vec_t v);
    @(negedge clk); host_vm_we = 1; host_vm_addr = VM_AW'(a); host_vm_wdata = v;
    @(negedge clk); host_vm_we = 0;
  endtask

  task automatic vm_read(input int a, output vec_t v);
    @(negedge clk); host_vm_re = 1; host_vm_addr = VM_AW'(a);
    @(negedge clk); host_vm_re = 0; v = vm_rdata;
  endtask

  task automatic run(output int ncyc);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (busy) @(negedge clk);
    ncyc = int'(cycles);
  endtask

  // ------------------------------------------------------------ reference arithmetic
  function automatic cr_t cr(input cplx_t c);
    cr_t r; r.re = fp2r(c.re); r.im = fp2r(c.im); return r;
  endfunction
  function automatic cr_t cm(input cr_t a, input cr_t b);
    cr_t r; r.re = a.re * b.re - a.im * b.im; r.im = a.re * b.im + a.im * b.re; return r;
  endfunction
  function automatic cr_t ca(input cr_t a, input cr_t b);
    cr_t r; r.re = a.re + b.re; r.im = a.im + b.im; return r;
  endfunction
  function automatic cr_t cs(input cr_t a, input cr_t b);
    cr_t r; r.re = a.re - b.re; r.im = a.im - b.im; return r;
  endfunction
  function automatic cr_t cj(input cr_t a);
    cr_t r; r.re = a.re; r.im = -a.im; return r;
  endfunction
  function automatic cr_t cdiv(input cr_t a, input cr_t b);
    cr_t r; real d;
    d = b.re * b.re + b.im * b.im;
    r.re = (a.re * b.re + a.im * b.im) / d; r.im = (a.im * b.re - a.re * b.im) / d;
    return r;
  endfunction

  function automatic vec_t rvec();
    vec_t v;
    for (int l = 0; l < P; l++) v[l] = c2fp(rnd(), rnd());
    return v;
  endfunction

  task automatic cmp(input string what, input int lane, input cplx_t got, input cr_t expv,
                     input real tol, input real scale);
    checks++;
    if (!near(fp2r(got.re), expv.re, tol, scale) || !near(fp2r(got.im), expv.im, tol, scale)) begin
      failures++;
      $display("FAIL %s lane %0d: got (%f,%f) expected (%f,%f)", what, lane,
               fp2r(got.re), fp2r(got.im), expv.re, expv.im);
    end
  endtask

  // ================================================================= program 1
  task automatic test_mechanisms();
    vec_t v1, v2, mm, got;
    cr_t a[P], b[P], m[P], e[P], r3[P], r4[P], dot, det, inv, mi[P], id, x;
    int nc;
    v1 = rvec(); v2 = rvec();
    // a well-conditioned 2x2 matrix: diagonal dominant
    mm[0] = c2fp(2.0 + rnd() / 8.0, rnd() / 8.0); mm[1] = c2fp(rnd() / 4.0, rnd() / 4.0);
    mm[2] = c2fp(rnd() / 4.0, rnd() / 4.0);       mm[3] = c2fp(-1.5 + rnd() / 8.0, rnd() / 8.0);
    vm_write(0, v1); vm_write(1, v2); vm_write(3, mm);
    for (int l = 0; l < P; l++) begin a[l] = cr(v1[l]); b[l] = cr(v2[l]); m[l] = cr(mm[l]); end

    prog.delete();
    prog.push_back(ld(1, 0));                              // 0
    prog.push_back(ld(2, 1));                              // 1
    prog.push_back(ins(OP_VMUL, 0, 3, 1, 2, 0));           // 2 r3 = r1.*r2
    prog.push_back(ins(OP_VADD, 0, 4, 3, 0, 1));           // 3 r4 = r3 + r1
    prog.push_back(ins(OP_VMAC, 0, 5, 1, 2, 4));           // 4 r5 = r1.*r2 + r4
    prog.push_back(ins(OP_VDOT, 0, 6, 1, 2, 2));           // 5 r6[2] = r1.r2
    prog.push_back(ins(OP_VDOT, 1, 1, 1, 2, 0));           // 6 s1 = r1.r2
    prog.push_back(ins(OP_VMUL, 0, 7, 1, 2, 0, M_SBC));    // 7 r7 = s1 * r2
    prog.push_back(ins(OP_MOV, 0, 8, 1, 0, 0, M_EBC | (3 << 6)));  // 8 r8 = r1[3] bcast
    prog.push_back(ld(9, 3));                              // 9 r9 = M
    prog.push_back(ins(OP_DET2, 1, 2, 9, 9, 0));           // 10 s2 = det M
    prog.push_back(ins(OP_VINV, 0, 10, 2, 0, 0, M_SBC));   // 11 r10 = 1/re(s2)
    prog.push_back(ins(OP_ADJ2, 0, 11, 10, 9, 0));         // 12 r11 = M^-1
    prog.push_back(ins(OP_MM2A, 0, 12, 9, 11, 0));         // 13
    prog.push_back(ins(OP_MM2B, 0, 12, 9, 11, 12));        // 14 r12 = M*M^-1
    prog.push_back(ins(OP_MV2, 0, 13, 9, 2, 0));           // 15 r13[0:1] = M*r2[0:1]
    prog.push_back(ins(OP_MV2A, 0, 13, 9, 2, 1, 'h20));    // 16 r13[2:3] = M*r2[0:1] + r1[2:3]
    prog.push_back({OP_SETLC, 11'd0, 16'd3});              // 17
    prog.push_back(ins(OP_VADD, 0, 14, 1, 0, 14));         // 18 r14 += r1 (4 times)
    prog.push_back({OP_DJNZ, 17'd0, 10'd18});              // 19
    prog.push_back({OP_SETPREC, 22'd0, 5'd4});             // 20
    prog.push_back(ins(OP_VMUL, 0, 15, 1, 2, 0));          // 21 r15 = r1.*r2 at 4 bits
    prog.push_back({OP_SETPREC, 22'd0, 5'd12});            // 22
    prog.push_back(ins(OP_MOV, 0, 6, 1, 0, 1, 'h20 | M_SBC)); // 23 r6[1] = s1 (insert)
    for (int r = 3; r <= 15; r++) prog.push_back(st(r, 16 + r));
    prog.push_back(ins(OP_MOV, 0, 0, 2, 0, 0, M_SBC));     // r0 = s2 bcast
    prog.push_back(st(0, 40));
    prog.push_back(ld(0, 19));                             // load-after-store
    prog.push_back(st(0, 41));
    prog.push_back({OP_HALT, 27'd0});
    load_prog();
    run(nc);
    $display("mechanism program: %0d cycles, %0d stall cycles", nc, stalls);

    dot.re = 0; dot.im = 0;
    for (int l = 0; l < P; l++) begin
      r3[l] = cm(a[l], b[l]); r4[l] = ca(r3[l], a[l]); dot = ca(dot, r3[l]);
    end
    vm_read(19, got); for (int l = 0; l < P; l++) cmp("vmul", l, got[l], r3[l], 0.01, 1.0);
    vm_read(20, got); for (int l = 0; l < P; l++) cmp("vadd", l, got[l], r4[l], 0.01, 1.0);
    vm_read(21, got); for (int l = 0; l < P; l++) cmp("vmac", l, got[l], ca(r3[l], r4[l]), 0.01, 1.0);
    vm_read(22, got); cmp("vdot lane", 2, got[2], dot, 0.01, 4.0);
    cmp("insert", 1, got[1], dot, 0.01, 4.0);
    checks++; if (got[0] != C_ZERO || got[3] != C_ZERO) failures++;
    vm_read(23, got); for (int l = 0; l < P; l++) cmp("scalar bcast", l, got[l], cm(dot, b[l]), 0.02, 8.0);
    vm_read(24, got); for (int l = 0; l < P; l++) cmp("elem bcast", l, got[l], a[3], 0.005, 1.0);
    det = cs(cm(m[0], m[3]), cm(m[1], m[2]));
    vm_read(40, got); for (int l = 0; l < P; l++) cmp("det", l, got[l], det, 0.01, 1.0);
    inv.re = 1.0 / fp2r(got[0].re); inv.im = 0.0;
    vm_read(26, got); for (int l = 0; l < P; l++) cmp("vinv", l, got[l], inv, 0.005, 0.0);
    mi[0] = cm(inv, m[3]); mi[1] = cs('{0.0, 0.0}, cm(inv, m[1]));
    mi[2] = cs('{0.0, 0.0}, cm(inv, m[2])); mi[3] = cm(inv, m[0]);
    vm_read(27, got); for (int l = 0; l < P; l++) cmp("adj2", l, got[l], mi[l], 0.01, 0.5);
    vm_read(28, got);
    for (int l = 0; l < P; l++) begin
      id.re = (l == 0 || l == 3) ? 1.0 : 0.0; id.im = 0.0;
      cmp("M*M^-1", l, got[l], id, 0.03, 1.0);
    end
    vm_read(29, got);
    x = ca(cm(m[0], b[0]), cm(m[1], b[1])); cmp("mv2", 0, got[0], x, 0.01, 1.0);
    x = ca(cm(m[2], b[0]), cm(m[3], b[1])); cmp("mv2", 1, got[1], x, 0.01, 1.0);
    x = ca(ca(cm(m[0], b[0]), cm(m[1], b[1])), a[2]); cmp("mv2a", 2, got[2], x, 0.01, 1.0);
    x = ca(ca(cm(m[2], b[0]), cm(m[3], b[1])), a[3]); cmp("mv2a", 3, got[3], x, 0.01, 1.0);
    vm_read(30, got);
    for (int l = 0; l < P; l++) begin
      x.re = 4.0 * a[l].re; x.im = 4.0 * a[l].im; cmp("loop", l, got[l], x, 0.01, 1.0);
    end
    vm_read(31, got);
    for (int l = 0; l < P; l++) begin
      cmp("masked", l, got[l], r3[l], 0.15, 1.0);
      checks++;
      if ((got[l].re.man & ~keep_mask(4)) != 0 || (got[l].im.man & ~keep_mask(4)) != 0) failures++;
    end
    begin
      vec_t g19;
      vm_read(19, g19); vm_read(41, got);
      checks++; if (got != g19) begin failures++; $display("FAIL load after store"); end
    end
  endtask

  // ================================================================= program 2
  // Open-loop MMSE equalisation and SINR with two transmit antennas and nr = 2
  // or 4 receive antennas. The 2-row blocks of H are stored transposed
  // (M_k = H_k^T), so H^H H = sum_k conj(M_k) M_k^T and H^H y = sum_k conj(M_k) y_k.
  localparam int NSC = 6;   // subcarriers
  // Subcarrier k uses vector registers o+1..o+4 (o+1..o+6 for nr = 4) and
  // scalar register sc; registers are reused as soon as their value is dead.
  // With ng > 1, the instruction streams of ng subcarriers are interleaved one
  // instruction at a time so that their dependency chains overlap.
  function automatic void emit_sc(ref logic [31:0] q [$], input int k, input int nr,
                                  input int o, input int sc);
    q.push_back(ld(o + 1, 64 + 4 * k));                                 // M_0
    q.push_back(ld(o + 2, 66 + 4 * k));                                 // y
    if (nr == 4) q.push_back(ld(o + 5, 65 + 4 * k));                    // M_1
    q.push_back(ins(OP_MM2A, 0, o + 3, o + 1, o + 1, 0, M_CJA | 'h10)); // conj(M) M^T
    if (nr == 4) q.push_back(ins(OP_MM2A, 0, o + 6, o + 5, o + 5, 0, M_CJA | 'h10));
    q.push_back(ins(OP_MM2B, 0, o + 3, o + 1, o + 1, o + 3, M_CJA | 'h10));
    if (nr == 4) q.push_back(ins(OP_MM2B, 0, o + 6, o + 5, o + 5, o + 6, M_CJA | 'h10));
    q.push_back(ins(OP_MV2, 0, o + 4, o + 1, o + 2, 0, M_CJA));         // H^H y
    if (nr == 4) begin
      q.push_back(ins(OP_VADD, 0, o + 3, o + 6, 0, o + 3));
      q.push_back(ins(OP_MV2A, 0, o + 4, o + 5, o + 2, o + 4, M_CJA | 'h10));
    end
    q.push_back(ins(OP_VADD, 0, o + 3, o + 3, 0, 15));                  // + N0 I
    q.push_back(ins(OP_DET2, 1, sc, o + 3, o + 3, 0));
    q.push_back(ins(OP_VINV, 0, o + 1, sc, 0, 0, M_SBC));
    q.push_back(ins(OP_ADJ2, 0, o + 2, o + 1, o + 3, 0));               // A^-1
    q.push_back(ins(OP_MV2, 0, o + 3, o + 2, o + 4, 0));                // x = A^-1 H^H y
    // SINR: 1 / (N0 [A^-1]_kk) - 1 in lanes 2, 3
    q.push_back(ins(OP_MOV, 0, o + 3, o + 2, 0, 2, M_EBC | 'h20));
    q.push_back(ins(OP_MOV, 0, o + 3, o + 2, 0, 3, M_EBC | (3 << 6) | 'h20));
    q.push_back(ins(OP_VMUL, 0, o + 1, o + 3, 15, 0, 'h20));            // times N0
    q.push_back(ins(OP_VINV, 0, o + 1, o + 1, 0, 0));
    q.push_back(ins(OP_VSUB, 0, o + 4, o + 1, 0, 14));
    q.push_back(ins(OP_MOV, 0, o + 3, o + 4, 0, 2, M_EBC | (2 << 6) | 'h20));
    q.push_back(ins(OP_MOV, 0, o + 3, o + 4, 0, 3, M_EBC | (3 << 6) | 'h20));
    q.push_back(st(o + 3, 128 + k));
  endfunction

  task automatic test_mmse(input real n0, input int nr, input int ng);
    vec_t hm [NSC][2], yv [NSC], nv, got;
    cr_t h[4][2], y[4], a[4], hy[2], det, xh[2], rho;
    logic [31:0] q [3][$];
    int nc, n;
    nv = '0; nv[0] = c2fp(n0, 0.0); nv[3] = c2fp(n0, 0.0);
    vm_write(2, nv);
    for (int l = 0; l < P; l++) nv[l] = C_ONE;
    vm_write(4, nv);
    prog.delete();
    prog.push_back({OP_SETPREC, 22'd0, 5'd12});
    prog.push_back(ld(15, 2));
    prog.push_back(ld(14, 4));                                          // ones
    for (int k = 0; k < NSC; k++) begin
      for (int b = 0; b < nr / 2; b++) begin
        hm[k][b] = rvec(); vm_write(64 + 4 * k + b, hm[k][b]);
      end
      yv[k] = rvec(); vm_write(66 + 4 * k, yv[k]);
    end
    for (int k = 0; k < NSC; k += ng) begin
      for (int g = 0; g < ng; g++) begin
        q[g].delete();
        emit_sc(q[g], k + g, nr, g * ((nr == 4) ? 6 : 4), 1 + g);
      end
      n = q[0].size();
      for (int i = 0; i < n; i++)
        for (int g = 0; g < ng; g++) prog.push_back(q[g][i]);
    end
    prog.push_back({OP_HALT, 27'd0});
    load_prog();
    run(nc);
    $display("MMSE 2x%0d, %0d subcarriers, %0d interleaved: %0d cycles (%0.1f per subcarrier)",
             nr, NSC, ng, nc, real'(nc) / NSC);
    for (int k = 0; k < NSC; k++) begin
      // H[r][j] = M_b[j][r - 2b]; M row-wise in lanes
      for (int b = 0; b < nr / 2; b++) begin
        h[2*b][0] = cr(hm[k][b][0]); h[2*b+1][0] = cr(hm[k][b][1]);
        h[2*b][1] = cr(hm[k][b][2]); h[2*b+1][1] = cr(hm[k][b][3]);
      end
      for (int r = 0; r < nr; r++) y[r] = cr(yv[k][r]);
      for (int i = 0; i < 2; i++) begin
        for (int j = 0; j < 2; j++) begin
          a[2*i+j] = '{0.0, 0.0};
          for (int r = 0; r < nr; r++) a[2*i+j] = ca(a[2*i+j], cm(cj(h[r][i]), h[r][j]));
        end
        hy[i] = '{0.0, 0.0};
        for (int r = 0; r < nr; r++) hy[i] = ca(hy[i], cm(cj(h[r][i]), y[r]));
      end
      a[0].re += n0; a[3].re += n0;
      det = cs(cm(a[0], a[3]), cm(a[1], a[2]));
      xh[0] = cdiv(cs(cm(a[3], hy[0]), cm(a[1], hy[1])), det);
      xh[1] = cdiv(cs(cm(a[0], hy[1]), cm(a[2], hy[0])), det);
      vm_read(128 + k, got);
      cmp("mmse", 0, got[0], xh[0], 0.05, 1.0);
      cmp("mmse", 1, got[1], xh[1], 0.05, 1.0);
      rho.re = det.re / (n0 * a[3].re) - 1.0; rho.im = 0.0;
      cmp("sinr", 0, got[2], rho, 0.05, 1.0);
      rho.re = det.re / (n0 * a[0].re) - 1.0;
      cmp("sinr", 1, got[3], rho, 0.05, 1.0);
    end
  endtask

  // ================================================================= program 2b
  // Iterative MMSE-PIC with two transmit antennas. With G = H^H H, the prior
  // symbol means s and variances lam, the program forms A = G diag(lam) + N0 I,
  // inverts it with DET2/VINV/ADJ2 and uses
  //   mu_k  = [A^-1 G]_kk = (1 - N0 [A^-1]_kk) / lam_k
  //   xh_k  = s_k + [A^-1 (H^H y - G s)]_k / mu_k
  //   rho_k = mu_k / (N0 [A^-1]_kk).
  // The reference below works from the filter definition instead: it cancels
  // the interference of the other stream, applies the rows of A^-1 H^H and
  // divides by w_k^H h_k. Output: xh in lanes 0, 1 and rho in lanes 2, 3.
  // One PIC subcarrier in vector registers o+1..o+6 and scalar register sc.
  function automatic void emit_pic(ref logic [31:0] q [$], input int k, input int nr,
                                   input int o, input int sc);
    int base = 300 + 8 * k;
    q.push_back(ld(o + 1, base));                                       // M_0
    q.push_back(ld(o + 2, base + 2));                                   // y
    if (nr == 4) q.push_back(ld(o + 3, base + 1));                      // M_1
    q.push_back(ins(OP_MM2A, 0, o + 5, o + 1, o + 1, 0, M_CJA | 'h10)); // G
    if (nr == 4) q.push_back(ins(OP_MM2A, 0, o + 4, o + 3, o + 3, 0, M_CJA | 'h10));
    q.push_back(ins(OP_MM2B, 0, o + 5, o + 1, o + 1, o + 5, M_CJA | 'h10));
    if (nr == 4) q.push_back(ins(OP_MM2B, 0, o + 4, o + 3, o + 3, o + 4, M_CJA | 'h10));
    q.push_back(ins(OP_MV2, 0, o + 6, o + 1, o + 2, 0, M_CJA));         // H^H y
    if (nr == 4) begin
      q.push_back(ins(OP_VADD, 0, o + 5, o + 4, 0, o + 5));
      q.push_back(ins(OP_MV2A, 0, o + 6, o + 3, o + 2, o + 6, M_CJA | 'h10));
    end
    q.push_back(ld(o + 3, base + 3));                                   // s
    q.push_back(ld(o + 4, base + 4));                                   // lam
    q.push_back(ins(OP_MV2, 0, o + 1, o + 5, o + 3, 0));                // G s
    q.push_back(ins(OP_VMUL, 0, o + 2, o + 5, o + 4, 0));               // G diag(lam)
    q.push_back(ins(OP_VSUB, 0, o + 6, o + 6, 0, o + 1));               // H^H (y - H s)
    q.push_back(ins(OP_VADD, 0, o + 2, o + 2, 0, 15));                  // A
    q.push_back(ins(OP_DET2, 1, sc, o + 2, o + 2, 0));
    q.push_back(ins(OP_VINV, 0, o + 1, sc, 0, 0, M_SBC));
    q.push_back(ins(OP_ADJ2, 0, o + 5, o + 1, o + 2, 0));               // A^-1
    q.push_back(ins(OP_MV2, 0, o + 1, o + 5, o + 6, 0));
    q.push_back(ins(OP_MOV, 0, o + 2, o + 5, 0, 0, M_EBC | 'h20));      // diag(A^-1)
    q.push_back(ins(OP_MOV, 0, o + 2, o + 5, 0, 1, M_EBC | (3 << 6) | 'h20));
    q.push_back(ins(OP_VMUL, 0, o + 2, o + 2, 15, 0, 'h20));            // N0 [A^-1]_kk
    q.push_back(ins(OP_VINV, 0, o + 6, o + 4, 0, 0));                   // 1 / lam
    q.push_back(ins(OP_VSUB, 0, o + 5, 14, 0, o + 2));
    q.push_back(ins(OP_VMUL, 0, o + 5, o + 5, o + 6, 0));               // mu
    q.push_back(ins(OP_VINV, 0, o + 6, o + 5, 0, 0));
    q.push_back(ins(OP_VMAC, 0, o + 1, o + 1, o + 6, o + 3));           // xh
    q.push_back(ins(OP_VINV, 0, o + 2, o + 2, 0, 0));
    q.push_back(ins(OP_VMUL, 0, o + 2, o + 5, o + 2, 0));               // rho
    q.push_back(ins(OP_MOV, 0, o + 1, o + 2, 0, 2, M_EBC | 'h20));
    q.push_back(ins(OP_MOV, 0, o + 1, o + 2, 0, 3, M_EBC | (1 << 6) | 'h20));
    q.push_back(st(o + 1, 400 + k));
  endfunction

  task automatic test_pic2(input real n0, input int nr, input int ng);
    vec_t hm [NSC][2], yv [NSC], sv [NSC], nv, got, lv;
    cr_t h[4][2], y[4], g[2][2], am[2][2], ai[2][2], wh[2][4], sc[2], det, mu, num, yk, rho;
    real lam [NSC][2];
    logic [31:0] q [2][$];
    int nc, base, n;
    nv = '0; nv[0] = c2fp(n0, 0.0); nv[3] = c2fp(n0, 0.0);
    vm_write(2, nv);
    for (int l = 0; l < P; l++) nv[l] = C_ONE;
    vm_write(4, nv);
    prog.delete();
    prog.push_back({OP_SETPREC, 22'd0, 5'd12});
    prog.push_back(ld(15, 2));
    prog.push_back(ld(14, 4));
    for (int k = 0; k < NSC; k++) begin
      base = 300 + 8 * k;
      for (int b = 0; b < nr / 2; b++) begin
        hm[k][b] = rvec(); vm_write(base + b, hm[k][b]);
      end
      yv[k] = rvec(); vm_write(base + 2, yv[k]);
      sv[k] = rvec(); vm_write(base + 3, sv[k]);
      for (int j = 0; j < 2; j++) lam[k][j] = 0.2 + 0.8 * real'($urandom_range(0, 1000)) / 1000.0;
      for (int l = 0; l < P; l++) lv[l] = c2fp(lam[k][l % 2], 0.0);
      vm_write(base + 4, lv);                                           // [l0 l1 l0 l1]
    end
    for (int k = 0; k < NSC; k += ng) begin
      for (int g = 0; g < ng; g++) begin
        q[g].delete();
        emit_pic(q[g], k + g, nr, 6 * g, 1 + g);
      end
      n = q[0].size();
      for (int i = 0; i < n; i++)
        for (int g = 0; g < ng; g++) prog.push_back(q[g][i]);
    end
    prog.push_back({OP_HALT, 27'd0});
    load_prog();
    run(nc);
    $display("MMSE-PIC 2x%0d, %0d subcarriers, %0d interleaved: %0d cycles (%0.1f per subcarrier)",
             nr, NSC, ng, nc, real'(nc) / NSC);
    for (int k = 0; k < NSC; k++) begin
      for (int b = 0; b < nr / 2; b++) begin
        h[2*b][0] = cr(hm[k][b][0]); h[2*b+1][0] = cr(hm[k][b][1]);
        h[2*b][1] = cr(hm[k][b][2]); h[2*b+1][1] = cr(hm[k][b][3]);
      end
      for (int r = 0; r < nr; r++) y[r] = cr(yv[k][r]);
      for (int j = 0; j < 2; j++) sc[j] = cr(sv[k][j]);
      for (int i = 0; i < 2; i++)
        for (int j = 0; j < 2; j++) begin
          g[i][j] = '{0.0, 0.0};
          for (int r = 0; r < nr; r++) g[i][j] = ca(g[i][j], cm(cj(h[r][i]), h[r][j]));
          am[i][j].re = g[i][j].re * lam[k][j] + ((i == j) ? n0 : 0.0);
          am[i][j].im = g[i][j].im * lam[k][j];
        end
      det = cs(cm(am[0][0], am[1][1]), cm(am[0][1], am[1][0]));
      ai[0][0] = cdiv(am[1][1], det); ai[1][1] = cdiv(am[0][0], det);
      ai[0][1] = cdiv(cs('{0.0, 0.0}, am[0][1]), det);
      ai[1][0] = cdiv(cs('{0.0, 0.0}, am[1][0]), det);
      for (int i = 0; i < 2; i++)
        for (int r = 0; r < nr; r++)
          wh[i][r] = ca(cm(ai[i][0], cj(h[r][0])), cm(ai[i][1], cj(h[r][1])));
      vm_read(400 + k, got);
      for (int i = 0; i < 2; i++) begin
        mu = '{0.0, 0.0}; num = '{0.0, 0.0};
        for (int r = 0; r < nr; r++) begin
          yk = cs(y[r], cm(h[r][1 - i], sc[1 - i]));              // other stream cancelled
          mu = ca(mu, cm(wh[i][r], h[r][i]));
          num = ca(num, cm(wh[i][r], yk));
        end
        cmp("pic", i, got[i], cdiv(num, mu), 0.05, 1.0);
        rho = cdiv(mu, cs('{1.0, 0.0}, '{lam[k][i] * mu.re, lam[k][i] * mu.im}));
        rho.im = 0.0;
        cmp("pic sinr", i, got[2 + i], rho, 0.05, 1.0);
      end
    end
  endtask

  // ================================================================= program 3
  task automatic test_throughput();
    vec_t hv [4], xv [4], got;
    cr_t s;
    int nc, ndot, nstall_dot;
    for (int i = 0; i < 4; i++) begin
      hv[i] = rvec(); xv[i] = rvec(); vm_write(200 + i, hv[i]); vm_write(204 + i, xv[i]);
    end
    prog.delete();
    for (int i = 0; i < 4; i++) prog.push_back(ld(1 + i, 200 + i));
    for (int i = 0; i < 4; i++) prog.push_back(ld(5 + i, 204 + i));
    for (int j = 0; j < 4; j++)
      for (int i = 0; i < 4; i++) prog.push_back(ins(OP_VDOT, 0, 9 + j, 1 + i, 5 + j, i));
    for (int j = 0; j < 4; j++) prog.push_back(st(9 + j, 210 + j));
    prog.push_back({OP_HALT, 27'd0});
    load_prog();
    ndot = 0; nstall_dot = 0;
    fork
      run(nc);
      while (ndot < 16) begin
        @(posedge clk);
        if (dut.dc_valid && dut.dc_c.op == OP_VDOT) begin
          if (dut.hold) nstall_dot++; else ndot++;
        end
      end
    join
    $display("4x4 matrix x 4 vectors by inner products: %0d cycles", nc);
    checks++;
    if (nstall_dot != 0) begin failures++; $display("FAIL %0d stall cycles in the inner products", nstall_dot); end
    for (int j = 0; j < 4; j++) begin
      vm_read(210 + j, got);
      for (int i = 0; i < 4; i++) begin
        s.re = 0; s.im = 0;
        for (int l = 0; l < P; l++) s = ca(s, cm(cr(hv[i][l]), cr(xv[j][l])));
        cmp("matvec", i, got[i], s, 0.01, 4.0);
      end
    end
  endtask

  // ================================================================= main
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    test_mechanisms();
    test_mmse(0.5, 2, 1);
    test_mmse(0.5, 4, 1);
    test_mmse(0.5, 2, 2);
    test_mmse(0.5, 2, 3);
    test_mmse(0.5, 4, 2);
    test_pic2(0.5, 2, 1);
    test_pic2(0.5, 4, 1);
    test_pic2(0.5, 2, 2);
    test_pic2(0.5, 4, 2);
    test_throughput();

    $display("bypass e1/e2/red1/red2-wb: %0d %0d %0d %0d, scalar bypass %0d", n_bp_e1, n_bp_e2, n_bp_d1, n_bp_wb, n_sbp);
    $display("operand stalls %0d, third-operand stalls %0d, load-after-store stalls %0d, NR cycles %0d",
             n_st_ab, n_st_c, n_st_ld, n_nr);
    $display("jumps %0d, lane writes %0d, scalar writes %0d, stores %0d, loads %0d, masked %0d, fw_vr %0d",
             n_jump, n_lane, n_swr, n_store, n_load, n_mask, n_fwvr);
    begin
      int cnt[16];
      cnt = '{n_bp_e1, n_bp_e2, n_bp_d1, n_bp_wb, n_sbp, n_st_ab, n_st_c, n_st_ld, n_nr,
                      n_jump, n_lane, n_swr, n_store, n_load, n_mask, n_fwvr};
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (cnt[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
