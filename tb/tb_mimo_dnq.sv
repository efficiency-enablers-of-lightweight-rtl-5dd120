// tb_mimo_dnq: linear MMSE detection with four transmit antennas on the
// napCore: open-loop, x = (H^H H + N0 I)^-1 H^H y, for 4 and 8 receive
// antennas, and one iteration of MMSE parallel interference cancellation
// (MMSE-PIC) for four or eight receive antennas (see test_pic).
//
// The 4x4 matrix A = H^H H + N0 I is kept as four 2x2 blocks [a b; c d], one
// per vector register, and inverted block-wise (divide and conquer):
//   ai = a^-1, e = c ai, S = d - e b, Si = S^-1, f = ai b,
//   A^-1 = [ ai + f Si e , -f Si ; -Si e , Si ].
// Each 2x2 inverse is DET2, VINV of the (real) determinant and ADJ2. The
// channel is stored as the transposed 2x2 blocks G_ki = (H_ki)^T of H, so
// H_ki^H H_kj = conj(G_ki) G_kj^T is one MM2A/MM2B pair with conjugated
// operand one and transposed operand two, and H_ki^H y_k is one MV2 with
// conjugated operand one. The result x and the blocks of A^-1 are stored to
// the vector memory and compared with a reference in `real` arithmetic
// (complex Gaussian elimination). The channel is generated diagonally
// dominant so that the 12-bit mantissa suffices; tolerances are relative.
// The SINR of each stream, 1 / (N0 [A^-1]_kk) - 1, is computed from the
// diagonal of the inverse. One run uses full precision; another switches the
// mantissa precision per algorithm section (multiplicative part, inversion,
// SINR) and checks that the results carry no more mantissa bits.
// The bench also reports the cycles per subcarrier of this straight-line
// program. Independent matrix products are interleaved; subcarriers are
// processed one after the other.
module tb_mimo_dnq;
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

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
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
  localparam int M_EBC = 'h200;
  localparam int M_SBC = 'h100, M_CJA = 'h2, M_TB = 'h10, M_HI = 'h20;

  logic [31:0] prog [$];

  function automatic logic [31:0] setprec(input int k);
    return {OP_SETPREC, 22'd0, 5'(k)};
  endfunction

  // 2x2 matrix product rd = A B (optionally conj(A) B^T), two instructions
  function automatic void mm(input int rd, input int ra, input int rb, input int mod = 0);
    prog.push_back(ins(OP_MM2A, 0, rd, ra, rb, 0, mod));
    prog.push_back(ins(OP_MM2B, 0, rd, ra, rb, rd, mod));
  endfunction
  // two independent products, interleaved so that neither second half waits
  function automatic void mm_x2(input int rd0, ra0, rb0, rd1, ra1, rb1);
    prog.push_back(ins(OP_MM2A, 0, rd0, ra0, rb0, 0));
    prog.push_back(ins(OP_MM2A, 0, rd1, ra1, rb1, 0));
    prog.push_back(ins(OP_MM2B, 0, rd0, ra0, rb0, rd0));
    prog.push_back(ins(OP_MM2B, 0, rd1, ra1, rb1, rd1));
  endfunction

  // ------------------------------------------------------------ program pieces
  // Gram matrix blocks a=r1 b=r2 c=r0 d=r3 of H^H H and z = H^H y in r4;
  // uses r5..r11
  function automatic void emit_gram(input int base, input int nb);
    for (int bk = 0; bk < nb; bk++) begin
      int src [4][2];
      int dst [4];
      src = '{'{5, 5}, '{5, 6}, '{6, 5}, '{6, 6}};
      dst = '{1, 2, 0, 3};
      prog.push_back(ld(5, base + 2 * bk));
      prog.push_back(ld(6, base + 2 * bk + 1));
      if (bk % 2 == 0) prog.push_back(ld(7, base + 16 + bk / 2));
      // the four block products interleaved: all first halves, then all second halves
      for (int j = 0; j < 4; j++)
        prog.push_back(ins(OP_MM2A, 0, (bk == 0) ? dst[j] : 8 + j, src[j][0], src[j][1], 0,
                           M_CJA | M_TB));
      for (int j = 0; j < 4; j++)
        prog.push_back(ins(OP_MM2B, 0, (bk == 0) ? dst[j] : 8 + j, src[j][0], src[j][1],
                           (bk == 0) ? dst[j] : 8 + j, M_CJA | M_TB));
      if (bk != 0)
        for (int j = 0; j < 4; j++) prog.push_back(ins(OP_VADD, 0, dst[j], 8 + j, 0, dst[j]));
      // half bk%2 of r7 holds y_k
      if (bk == 0) begin
        prog.push_back(ins(OP_MV2, 0, 4, 5, 7, 0, M_CJA));
        prog.push_back(ins(OP_MV2, 0, 4, 6, 7, 0, M_CJA | M_HI));
      end else begin
        prog.push_back(ins(OP_MV2A, 0, 4, 5, 7, 4, M_CJA | ((bk % 2 != 0) ? M_TB : 0)));
        prog.push_back(ins(OP_MV2A, 0, 4, 6, 7, 4, M_CJA | M_HI | ((bk % 2 != 0) ? M_TB : 0)));
      end
    end
  endfunction

  // block inversion of [a b; c d] in r1 r2 r0 r3: ai r6, Si r11 (= Z22),
  // -Z21 r13, -Z12 r14, Z11 r8
  function automatic void emit_inverse(input int k_inv);
    prog.push_back(setprec(k_inv));
    prog.push_back(ins(OP_DET2, 1, 1, 1, 1, 0));          // s1 = det a
    prog.push_back(ins(OP_VINV, 0, 5, 1, 0, 0, M_SBC));
    prog.push_back(ins(OP_ADJ2, 0, 6, 5, 1, 0));          // r6 = ai
    mm_x2(7, 0, 6, 12, 6, 2);                             // r7 = e = c ai, r12 = f = ai b
    mm(8, 7, 2);                                          // r8 = e b
    prog.push_back(ins(OP_VSUB, 0, 9, 3, 0, 8));          // r9 = S = d - e b
    prog.push_back(ins(OP_DET2, 1, 2, 9, 9, 0));
    prog.push_back(ins(OP_VINV, 0, 10, 2, 0, 0, M_SBC));
    prog.push_back(ins(OP_ADJ2, 0, 11, 10, 9, 0));        // r11 = Si
    mm_x2(13, 11, 7, 14, 12, 11);                         // r13 = Si e (= -Z21), r14 = f Si (= -Z12)
    mm(5, 12, 13);                                        // r5 = f Si e
    prog.push_back(ins(OP_VADD, 0, 8, 5, 0, 6));          // r8 = Z11 = ai + f Si e
  endfunction

  // r2 = A^-1 r4 with p = [Z11 z_t ; Si z_b], q = [-Z12 z_b ; -Z21 z_t], r2 = p - q
  function automatic void emit_apply();
    prog.push_back(ins(OP_MV2, 0, 0, 8, 4, 0, 0));
    prog.push_back(ins(OP_MV2, 0, 0, 11, 4, 0, M_TB | M_HI));
    prog.push_back(ins(OP_MV2, 0, 1, 14, 4, 0, M_TB));
    prog.push_back(ins(OP_MV2, 0, 1, 13, 4, 0, M_HI));
    prog.push_back(ins(OP_VSUB, 0, 2, 0, 0, 1));
  endfunction

  // r5 = diagonal of A^-1
  function automatic void emit_diag();
    prog.push_back(ins(OP_MOV, 0, 5, 8, 0, 0, M_EBC | (0 << 6) | M_HI));
    prog.push_back(ins(OP_MOV, 0, 5, 8, 0, 1, M_EBC | (3 << 6) | M_HI));
    prog.push_back(ins(OP_MOV, 0, 5, 11, 0, 2, M_EBC | (0 << 6) | M_HI));
    prog.push_back(ins(OP_MOV, 0, 5, 11, 0, 3, M_EBC | (3 << 6) | M_HI));
  endfunction

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
  function automatic real cabs2(input cr_t a);
    return a.re * a.re + a.im * a.im;
  endfunction

  // uniform in (-s, s)
  function automatic real urnd(input real s);
    return s * (real'($urandom_range(0, 2000)) - 1000.0) / 1000.0;
  endfunction

  task automatic cmp(input string what, input int idx, input cplx_t got, input cr_t expv,
                     input real tol, input real scale);
    checks++;
    if (!near(fp2r(got.re), expv.re, tol, scale) || !near(fp2r(got.im), expv.im, tol, scale)) begin
      failures++;
      $display("FAIL %s %0d: got (%f,%f) expected (%f,%f)", what, idx,
               fp2r(got.re), fp2r(got.im), expv.re, expv.im);
    end
  endtask

  // ================================================================= one antenna setup
  localparam int NT  = 4;
  localparam int NSC = 4;      // subcarriers per run
  localparam int REGION = 40;  // vector-memory words per subcarrier

  task automatic test_mmse(input int nr, input real n0, input int k_mul, input int k_inv,
                           input int k_llr, input real tol, input real tol_sinr);
    cr_t  h [8][4];            // H[row][col], nr x 4
    cr_t  y [8];
    cr_t  am [4][5];           // augmented [A | z]
    cr_t  ainv [4][4];
    cr_t  aug [4][8];
    cr_t  x [4], t, piv;
    vec_t v, got, nv;
    int   nc, base, nb;
    nb = nr / 2;               // 2-row blocks of H

    nv = '0; nv[0] = c2fp(n0, 0.0); nv[3] = c2fp(n0, 0.0);
    vm_write(0, nv);
    for (int l = 0; l < P; l++) nv[l] = C_ONE;
    vm_write(1, nv);
    prog.delete();
    prog.push_back(ld(15, 0));

    for (int k = 0; k < NSC; k++) begin
      base = 8 + k * REGION;
      prog.push_back(setprec(k_mul));
      // ---- channel and received vector
      for (int r = 0; r < nr; r++)
        for (int c = 0; c < NT; c++) begin
          h[r][c].re = urnd(0.4); h[r][c].im = urnd(0.4);
          if (r == c) h[r][c].re += (($urandom_range(0, 1) != 0) ? 1.5 : -1.5);
        end
      for (int r = 0; r < nr; r++) begin y[r].re = urnd(1.0); y[r].im = urnd(1.0); end
      // G_ki = transposed 2x2 block (k, i) of H, row-wise in the lanes
      for (int bk = 0; bk < nb; bk++)
        for (int bi = 0; bi < 2; bi++) begin
          v[0] = c2fp(h[2*bk][2*bi].re,     h[2*bk][2*bi].im);
          v[1] = c2fp(h[2*bk+1][2*bi].re,   h[2*bk+1][2*bi].im);
          v[2] = c2fp(h[2*bk][2*bi+1].re,   h[2*bk][2*bi+1].im);
          v[3] = c2fp(h[2*bk+1][2*bi+1].re, h[2*bk+1][2*bi+1].im);
          vm_write(base + 2 * bk + bi, v);
          // the reference uses exactly the stored values
          h[2*bk][2*bi] = cr(v[0]);   h[2*bk+1][2*bi] = cr(v[1]);
          h[2*bk][2*bi+1] = cr(v[2]); h[2*bk+1][2*bi+1] = cr(v[3]);
        end
      for (int q = 0; q < nr / 4; q++) begin
        for (int l = 0; l < 4; l++) begin
          v[l] = c2fp(y[4*q+l].re, y[4*q+l].im);
          y[4*q+l] = cr(v[l]);
        end
        vm_write(base + 16 + q, v);
      end

      emit_gram(base, nb);
      prog.push_back(ins(OP_VADD, 0, 1, 1, 0, 15));         // a += N0 I
      prog.push_back(ins(OP_VADD, 0, 3, 3, 0, 15));         // d += N0 I

      emit_inverse(k_inv);
      prog.push_back(setprec(k_mul));
      emit_apply();
      prog.push_back(st(2, base + 20));
      prog.push_back(st(8, base + 21));
      prog.push_back(st(14, base + 22));
      prog.push_back(st(13, base + 23));
      prog.push_back(st(11, base + 24));
      // ---- SINR rho_k = 1 / (N0 [A^-1]_kk) - 1 from the diagonal of A^-1
      prog.push_back(setprec(k_llr));
      emit_diag();
      prog.push_back(ld(9, 1));                             // ones
      prog.push_back(ins(OP_VMUL, 0, 5, 5, 15, 0, 'h20));   // times N0 (element 0 of r15)
      prog.push_back(ins(OP_VINV, 0, 5, 5, 0, 0));
      prog.push_back(ins(OP_VSUB, 0, 5, 5, 0, 9));
      prog.push_back(st(5, base + 25));
    end
    prog.push_back({OP_HALT, 27'd0});
    load_prog();
    run(nc);
    $display("MMSE %0dx%0d (4 tx, %0d rx), precision m%0d/m%0d/m%0d, %0d subcarriers, %0d instructions: %0d cycles (%0d per subcarrier), %0d stall cycles",
             NT, nr, nr, k_mul, k_inv, k_llr, NSC, prog.size(), nc, nc / NSC, stalls);
    checks++;
    if (prog.size() > PM_DEPTH) failures++;

    // The generated values are regenerated per subcarrier above, so the
    // reference is recomputed from the stored vector memory contents.
    for (int k = 0; k < NSC; k++) begin
      base = 8 + k * REGION;
      for (int bk = 0; bk < nb; bk++)
        for (int bi = 0; bi < 2; bi++) begin
          vm_read(base + 2 * bk + bi, v);
          h[2*bk][2*bi] = cr(v[0]);   h[2*bk+1][2*bi] = cr(v[1]);
          h[2*bk][2*bi+1] = cr(v[2]); h[2*bk+1][2*bi+1] = cr(v[3]);
        end
      for (int q = 0; q < nr / 4; q++) begin
        vm_read(base + 16 + q, v);
        for (int l = 0; l < 4; l++) y[4*q+l] = cr(v[l]);
      end
      // A = H^H H + N0 I, z = H^H y
      for (int i = 0; i < NT; i++) begin
        for (int j = 0; j < NT; j++) begin
          am[i][j] = '{0.0, 0.0};
          for (int r = 0; r < nr; r++) am[i][j] = ca(am[i][j], cm(cj(h[r][i]), h[r][j]));
          if (i == j) am[i][j].re += n0;
        end
        am[i][4] = '{0.0, 0.0};
        for (int r = 0; r < nr; r++) am[i][4] = ca(am[i][4], cm(cj(h[r][i]), y[r]));
      end
      // inverse by Gauss-Jordan elimination (A is Hermitian positive definite)
      for (int i = 0; i < NT; i++)
        for (int j = 0; j < 2 * NT; j++) begin
          if (j < NT) aug[i][j] = am[i][j];
          else begin
            aug[i][j].re = (j - NT == i) ? 1.0 : 0.0;
            aug[i][j].im = 0.0;
          end
        end
      for (int i = 0; i < NT; i++) begin
        piv = aug[i][i];
        for (int j = 0; j < 2 * NT; j++) aug[i][j] = cdiv(aug[i][j], piv);
        for (int r = 0; r < NT; r++)
          if (r != i) begin
            t = aug[r][i];
            for (int j = 0; j < 2 * NT; j++) aug[r][j] = cs(aug[r][j], cm(t, aug[i][j]));
          end
      end
      for (int i = 0; i < NT; i++)
        for (int j = 0; j < NT; j++) ainv[i][j] = aug[i][j + NT];
      for (int i = 0; i < NT; i++) begin
        x[i] = '{0.0, 0.0};
        for (int j = 0; j < NT; j++) x[i] = ca(x[i], cm(ainv[i][j], am[j][4]));
      end

      vm_read(base + 20, got);
      for (int i = 0; i < NT; i++) begin
        cmp("x", i, got[i], x[i], tol, 0.5);
        checks++;      // computed at the multiplicative precision
        if (((got[i].re.man | got[i].im.man) & ~keep_mask(KW'(k_mul))) != 0) failures++;
      end
      // blocks of the inverse: Z11, -Z12, -Z21, Z22
      vm_read(base + 21, got);
      for (int l = 0; l < 4; l++) cmp("Z11", l, got[l], ainv[l / 2][l % 2], tol, 0.1);
      vm_read(base + 22, got);
      for (int l = 0; l < 4; l++) cmp("-Z12", l, got[l], cs('{0.0, 0.0}, ainv[l / 2][2 + l % 2]), tol, 0.1);
      vm_read(base + 23, got);
      for (int l = 0; l < 4; l++) cmp("-Z21", l, got[l], cs('{0.0, 0.0}, ainv[2 + l / 2][l % 2]), tol, 0.1);
      vm_read(base + 24, got);
      for (int l = 0; l < 4; l++) cmp("Z22", l, got[l], ainv[2 + l / 2][2 + l % 2], tol, 0.1);
      vm_read(base + 25, got);
      for (int i = 0; i < NT; i++) begin
        cr_t rho;
        rho.re = 1.0 / (n0 * ainv[i][i].re) - 1.0; rho.im = 0.0;
        checks++;
        if ((got[i].re.man & ~keep_mask(KW'(k_llr))) != 0) failures++;
        checks++;
        if (!near(fp2r(got[i].re), rho.re, tol_sinr, 1.0)) begin
          failures++;
          $display("FAIL sinr %0d: got %f expected %f", i, fp2r(got[i].re), rho.re);
        end
      end
      if (k == 0) $display("  SINR subcarrier 0: %f %f %f %f (reference %f %f %f %f)",
                           fp2r(got[0].re), fp2r(got[1].re), fp2r(got[2].re), fp2r(got[3].re),
                           1.0 / (n0 * ainv[0][0].re) - 1.0, 1.0 / (n0 * ainv[1][1].re) - 1.0,
                           1.0 / (n0 * ainv[2][2].re) - 1.0, 1.0 / (n0 * ainv[3][3].re) - 1.0);
    end
  endtask

  // ================================================================= iterative detection
  // MMSE parallel interference cancellation for 4x4 with soft symbols s and
  // symbol variances lambda from a previous iteration:
  //   A = H^H H Lambda + N0 I,  W^H = A^-1 H^H,
  //   xh_k = w_k^H yh_k / (w_k^H h_k),  yh_k = y - sum_{j!=k} h_j s_j,
  //   rho_k = w_k^H h_k / (1 - lambda_k w_k^H h_k).
  // The program uses w_k^H yh_k = [W^H (y - H s)]_k + mu_k s_k with
  // mu_k = w_k^H h_k, and A^-1 H^H H Lambda = I - N0 A^-1, so that
  //   mu_k = (1 - N0 [A^-1]_kk) / lambda_k,  xh_k = s_k + [A^-1 H^H (y - H s)]_k / mu_k,
  //   rho_k = mu_k / (N0 [A^-1]_kk).
  // The reference evaluates the original formulas directly.
  task automatic test_pic(input int nr, input real n0);
    cr_t  h [8][4], y [8], sv [4], am [4][4], aug [4][8], ainv [4][4], wh [4][8];
    cr_t  t, piv, num, den, xh, rho;
    real  lam [4];
    vec_t v, got, nv;
    int   nc, base;

    nv = '0; nv[0] = c2fp(n0, 0.0); nv[3] = c2fp(n0, 0.0);
    vm_write(0, nv);
    for (int l = 0; l < P; l++) nv[l] = C_ONE;
    vm_write(1, nv);
    prog.delete();
    prog.push_back(setprec(12));     // the precision register keeps its value between runs
    prog.push_back(ld(15, 0));

    for (int k = 0; k < NSC; k++) begin
      base = 8 + k * REGION;
      for (int r = 0; r < nr; r++)
        for (int c = 0; c < NT; c++) begin
          h[r][c].re = urnd(0.4); h[r][c].im = urnd(0.4);
          if (r == c) h[r][c].re += (($urandom_range(0, 1) != 0) ? 1.5 : -1.5);
        end
      for (int bk = 0; bk < nr / 2; bk++)
        for (int bi = 0; bi < 2; bi++) begin
          v[0] = c2fp(h[2*bk][2*bi].re,     h[2*bk][2*bi].im);
          v[1] = c2fp(h[2*bk+1][2*bi].re,   h[2*bk+1][2*bi].im);
          v[2] = c2fp(h[2*bk][2*bi+1].re,   h[2*bk][2*bi+1].im);
          v[3] = c2fp(h[2*bk+1][2*bi+1].re, h[2*bk+1][2*bi+1].im);
          vm_write(base + 2 * bk + bi, v);
        end
      for (int q = 0; q < nr / 4; q++) begin
        for (int l = 0; l < 4; l++) v[l] = c2fp(urnd(1.0), urnd(1.0));
        vm_write(base + 16 + q, v);                            // y
      end
      for (int l = 0; l < 4; l++) v[l] = c2fp(urnd(0.8), urnd(0.8));
      vm_write(base + 30, v);                                  // s
      for (int l = 0; l < 4; l++) lam[l] = 0.2 + 0.8 * real'($urandom_range(0, 1000)) / 1000.0;
      for (int l = 0; l < 4; l++) v[l] = c2fp(lam[l % 2], 0.0);
      vm_write(base + 18, v);                                  // [l0 l1 l0 l1]
      for (int l = 0; l < 4; l++) v[l] = c2fp(lam[2 + l % 2], 0.0);
      vm_write(base + 19, v);                                  // [l2 l3 l2 l3]
      for (int l = 0; l < 4; l++) v[l] = c2fp(lam[l], 0.0);
      vm_write(base + 26, v);                                  // [l0 l1 l2 l3]

      emit_gram(base, nr / 2);
      // r4 = H^H y - H^H H s
      prog.push_back(ld(5, base + 30));
      prog.push_back(ins(OP_MV2, 0, 9, 1, 5, 0, 0));
      prog.push_back(ins(OP_MV2, 0, 9, 0, 5, 0, M_HI));
      prog.push_back(ins(OP_MV2A, 0, 9, 2, 5, 9, M_TB));
      prog.push_back(ins(OP_MV2A, 0, 9, 3, 5, 9, M_TB | M_HI));
      prog.push_back(ins(OP_VSUB, 0, 4, 4, 0, 9));
      // A = H^H H Lambda + N0 I: scale the block columns
      prog.push_back(ld(6, base + 18));
      prog.push_back(ld(7, base + 19));
      prog.push_back(ins(OP_VMUL, 0, 1, 1, 6, 0));
      prog.push_back(ins(OP_VMUL, 0, 2, 2, 7, 0));
      prog.push_back(ins(OP_VMUL, 0, 0, 0, 6, 0));
      prog.push_back(ins(OP_VMUL, 0, 3, 3, 7, 0));
      prog.push_back(ins(OP_VADD, 0, 1, 1, 0, 15));
      prog.push_back(ins(OP_VADD, 0, 3, 3, 0, 15));
      emit_inverse(12);
      emit_apply();                                            // r2 = A^-1 H^H (y - H s)
      emit_diag();                                             // r5 = diag A^-1
      prog.push_back(ld(9, 1));                                // ones
      prog.push_back(ld(10, base + 26));                       // lambda
      prog.push_back(ld(12, base + 30));                       // s
      prog.push_back(ins(OP_VMUL, 0, 6, 5, 15, 0, 'h20));      // N0 diag
      prog.push_back(ins(OP_VSUB, 0, 7, 9, 0, 6));             // 1 - N0 diag
      prog.push_back(ins(OP_VINV, 0, 10, 10, 0, 0));           // 1 / lambda
      prog.push_back(ins(OP_VMUL, 0, 7, 7, 10, 0));            // mu
      prog.push_back(ins(OP_VINV, 0, 13, 7, 0, 0));            // 1 / mu
      prog.push_back(ins(OP_VMAC, 0, 14, 2, 13, 12));          // xh = s + r2 / mu
      prog.push_back(ins(OP_VINV, 0, 6, 6, 0, 0));
      prog.push_back(ins(OP_VMUL, 0, 5, 7, 6, 0));             // rho
      prog.push_back(st(14, base + 27));
      prog.push_back(st(5, base + 28));
      prog.push_back(st(7, base + 29));
    end
    prog.push_back({OP_HALT, 27'd0});
    load_prog();
    run(nc);
    $display("MMSE-PIC 4x%0d, %0d subcarriers, %0d instructions: %0d cycles (%0d per subcarrier), %0d stall cycles",
             nr, NSC, prog.size(), nc, nc / NSC, stalls);

    for (int k = 0; k < NSC; k++) begin
      base = 8 + k * REGION;
      for (int bk = 0; bk < nr / 2; bk++)
        for (int bi = 0; bi < 2; bi++) begin
          vm_read(base + 2 * bk + bi, v);
          h[2*bk][2*bi] = cr(v[0]);   h[2*bk+1][2*bi] = cr(v[1]);
          h[2*bk][2*bi+1] = cr(v[2]); h[2*bk+1][2*bi+1] = cr(v[3]);
        end
      for (int q = 0; q < nr / 4; q++) begin
        vm_read(base + 16 + q, v); for (int l = 0; l < 4; l++) y[4 * q + l] = cr(v[l]);
      end
      vm_read(base + 30, v); for (int l = 0; l < 4; l++) sv[l] = cr(v[l]);
      vm_read(base + 26, v); for (int l = 0; l < 4; l++) lam[l] = fp2r(v[l].re);
      for (int i = 0; i < NT; i++)
        for (int j = 0; j < NT; j++) begin
          am[i][j] = '{0.0, 0.0};
          for (int r = 0; r < nr; r++) am[i][j] = ca(am[i][j], cm(cj(h[r][i]), h[r][j]));
          am[i][j].re *= lam[j]; am[i][j].im *= lam[j];
          if (i == j) am[i][j].re += n0;
        end
      for (int i = 0; i < NT; i++)
        for (int j = 0; j < 2 * NT; j++) begin
          if (j < NT) aug[i][j] = am[i][j];
          else begin aug[i][j].re = (j - NT == i) ? 1.0 : 0.0; aug[i][j].im = 0.0; end
        end
      for (int i = 0; i < NT; i++) begin
        piv = aug[i][i];
        for (int j = 0; j < 2 * NT; j++) aug[i][j] = cdiv(aug[i][j], piv);
        for (int r = 0; r < NT; r++)
          if (r != i) begin
            t = aug[r][i];
            for (int j = 0; j < 2 * NT; j++) aug[r][j] = cs(aug[r][j], cm(t, aug[i][j]));
          end
      end
      for (int i = 0; i < NT; i++)
        for (int j = 0; j < NT; j++) ainv[i][j] = aug[i][j + NT];
      for (int i = 0; i < NT; i++)
        for (int r = 0; r < nr; r++) begin
          wh[i][r] = '{0.0, 0.0};
          for (int j = 0; j < NT; j++) wh[i][r] = ca(wh[i][r], cm(ainv[i][j], cj(h[r][j])));
        end
      vm_read(base + 27, got);
      vm_read(base + 28, v);
      for (int i = 0; i < NT; i++) begin
        num = '{0.0, 0.0}; den = '{0.0, 0.0};
        for (int r = 0; r < nr; r++) begin
          t = y[r];
          for (int j = 0; j < NT; j++) if (j != i) t = cs(t, cm(h[r][j], sv[j]));
          num = ca(num, cm(wh[i][r], t));
          den = ca(den, cm(wh[i][r], h[r][i]));
        end
        xh = cdiv(num, den);
        cmp("pic x", i, got[i], xh, 0.03, 0.5);
        rho.re = den.re / (1.0 - lam[i] * den.re); rho.im = 0.0;
        checks++;
        if (!near(fp2r(v[i].re), rho.re, 0.03, 1.0)) begin
          failures++;
          $display("FAIL pic sinr %0d: got %f expected %f", i, fp2r(v[i].re), rho.re);
        end
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // full precision
    test_mmse(4, 0.5, 12, 12, 12, 0.03, 0.02);
    test_mmse(8, 0.5, 12, 12, 12, 0.03, 0.02);
    // 16QAM precision classes: multiplicative m10, inversion m11, SINR m4
    test_mmse(4, 0.5, 10, 11, 4, 0.05, 0.3);
    // iterative detection (MMSE-PIC)
    test_pic(4, 0.5);
    test_pic(8, 0.5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
