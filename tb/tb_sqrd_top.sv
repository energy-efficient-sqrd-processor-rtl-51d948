// tb_sqrd_top: end-to-end test of the SQRD vector processor.
//
// Loads a microcode program and the PE configurations, then runs a sequence
// of channel renewals on random 4x4 complex channels:
//   full-H renewal  -> sort all columns, brute-force Gram-Schmidt QRD
//   half-H renewal  -> only columns of antenna ports 0 and 1 change; sort,
//                      then branch: QR-update (one Givens rotation) if the
//                      changed columns sorted to the right-most positions,
//                      otherwise brute-force QRD
// with the sorting mode switched at run time (group sort, precise sort,
// fixed order) by reloading one PE4 configuration. Every result is checked
// against a floating-point model written independently here: the sort order,
// the update flag and the branch taken, Q^H Q = I, Q R = H P, R upper
// triangular, |r_kk| against the reference, and for the brute-force path Q
// and R element by element. A short CORDIC program (magnitude/angle and
// rotation of a Q element) exercises PE6. Cycle counts of the brute-force
// and QR-update programs are checked against the schedule worked out from
// the pipeline latency (3 cycles) and the PE5 latency (50 cycles).
// Each mechanism (both branch outcomes, sync stalls, each sort mode,
// PE3 accumulate/subtract, PE5 and PE6) must occur at least once.
module tb_sqrd_top;
  import sqrd_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic           start;
  logic [PCW-1:0] start_pc;
  logic           busy, done;
  events_t        ev;
  logic           imem_we;
  logic [PCW-1:0] imem_addr;
  logic [IW-1:0]  imem_wdata;
  logic           cfg_we;
  cfgsel_e        cfg_sel;
  logic [3:0]     cfg_addr;
  logic [CFGW-1:0] cfg_wdata;
  logic           h_vwe, h_swe;
  logic [3:0]     h_vaddr, h_saddr;
  vec_t           h_vwdata, h_vrdata;
  cplx_t          h_swdata, h_srdata;
  perm_t          perm;
  logic           upd_flag;

  sqrd_top dut (.*);

  int checks = 0, failures = 0;
  int n_full = 0, n_update = 0, n_fallback = 0, n_stall = 0, n_acc5 = 0, n_acc6 = 0;
  int n_sub = 0, n_group = 0, n_precise = 0, n_fixed = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ encoders
  function automatic logic [31:0] vi(bit s, int c2, int c3, int c4, int ra, int rb, int rd, int em);
    return {OP_VEC, s, 4'(c2), 4'(c3), 4'(c4), 4'(ra), 4'(rb), 4'(rd), 4'(em)};
  endfunction
  function automatic logic [31:0] ai(bit s, bit unit, int cfg);
    return {OP_ACC, s, unit, 4'(cfg), 23'd0};
  endfunction
  function automatic logic [31:0] bi(opcode_e op, int target);
    return {op, 1'b1, 21'd0, 7'(target)};
  endfunction
  localparam logic [31:0] HALT = {OP_HALT, 1'b1, 28'd0};

  function automatic pe2_cfg_t c2f(amode_e am, bit aconj, bit aperm, logic [3:0] akill,
                                   bmode_e bm, bit bconj, bit bperm, logic [3:0] bkill,
                                   logic [3:0] bneg, logic [7:0] bxsel, int ssel);
    pe2_cfg_t c;
    c.amode = am; c.aconj = aconj; c.aperm = aperm; c.akill = akill;
    c.bmode = bm; c.bconj = bconj; c.bperm = bperm; c.bkill = bkill;
    c.bneg = bneg; c.bxsel = bxsel; c.ssel = 4'(ssel);
    return c;
  endfunction
  function automatic pe4_cfg_t c4f(int sh, bit vwen, maskmode_e mm, bit swen, int selem,
                                   int sdst, sortmode_e so);
    pe4_cfg_t c;
    c = '0;
    c.shift = 5'(sh); c.vwen = vwen; c.mmode = mm; c.swen = swen;
    c.selem = 2'(selem); c.sdst = 4'(sdst); c.sort = so;
    return c;
  endfunction

  localparam logic [7:0] XID = 8'b11_10_01_00;   // bxsel identity
  localparam logic [7:0] XSW = 8'b10_11_01_00;   // elements 2 and 3 swapped

  task automatic load_cfg(cfgsel_e sel, int addr, logic [31:0] w);
    @(negedge clk);
    cfg_we = 1'b1; cfg_sel = sel; cfg_addr = 4'(addr); cfg_wdata = w;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  // program entry points
  localparam int FULL = 0, BF = 1, HALF = 30, CORD = 41;
  logic [31:0] prog [IMEM_WORDS];

  task automatic build_program();
    int p;
    for (int i = 0; i < IMEM_WORDS; i++) prog[i] = HALT;
    p = FULL;
    prog[p++] = vi(0, 0, 0, 4, 0, 0, 0, 0);              // column energies -> sort
    // brute-force Gram-Schmidt (entry BF == 1)
    prog[p++] = vi(1, 2, 0, 1, 0, 0, 12, 4'hf);          // v12 = h~0
    prog[p++] = vi(1, 0, 0, 3, 12, 12, 0, 0);            // s0 = |v12|^2
    prog[p++] = ai(1, 0, 0);                             // s1 = sqrt, s2 = 1/sqrt
    prog[p++] = vi(1, 5, 0, 5, 12, 0, 4, 4'hf);          // q0 = v12 * s2
    prog[p++] = vi(0, 6, 0, 1, 0, 0, 8, 4'h1);           // R col0 = [r00 0 0 0]
    for (int k = 1; k < 4; k++) begin
      prog[p++] = vi(1, 1, 0, 1, 4, k, 8 + k, (1 << k) - 1); // r_ik = q_i^H h~k, i<k
      prog[p++] = vi(0, 2, 0, 0, k, 0, 0, 0);            // acc = h~k
      prog[p++] = vi(1, 3, 1, 1, 4, 8 + k, 12, 4'hf);    // v12 = h~k - Q r_k
      prog[p++] = vi(1, 0, 0, 3, 12, 12, 0, 0);          // s0 = |v12|^2
      prog[p++] = ai(1, 0, 0);
      prog[p++] = vi(1, 5, 0, 5, 12, 0, 4 + k, 4'hf);    // q_k
      prog[p++] = vi(0, 6, 0, 2, 0, 0, 8 + k, 1 << k);   // r_kk
    end
    prog[p++] = HALT;
    if (p > HALF) $fatal(1, "program overlap");
    p = HALF;
    prog[p++] = vi(0, 0, 0, 4, 0, 0, 0, 0);              // sort -> perm, update flag
    prog[p++] = bi(OP_BRN, BF);                          // no update possible -> brute force
    prog[p++] = vi(0, 1, 0, 1, 4, 2, 12, 4'hf);          // v12 = Q_old^H h~2
    prog[p++] = vi(1, 7, 0, 3, 12, 12, 0, 0);            // s0 = |r22|^2 + |r32|^2
    prog[p++] = ai(1, 0, 0);                             // s1 = z, s2 = 1/z
    prog[p++] = vi(1, 8, 0, 5, 12, 0, 13, 4'hc);         // v13 = [0 0 c s]
    prog[p++] = vi(1, 10, 0, 1, 4, 13, 7, 4'hf);         // q3' = -s q2 + c q3
    prog[p++] = vi(0, 9, 0, 1, 4, 13, 6, 4'hf);          // q2' = c* q2 + s* q3
    prog[p++] = vi(1, 1, 0, 1, 4, 2, 10, 4'h7);          // R col2 = Q'^H h~2
    prog[p++] = vi(0, 1, 0, 1, 4, 3, 11, 4'hf);          // R col3 = Q'^H h~3
    prog[p++] = HALT;
    if (p > CORD) $fatal(1, "program overlap");
    p = CORD;
    prog[p++] = vi(0, 11, 0, 6, 4, 0, 0, 0);             // s3 = q0[1]
    prog[p++] = ai(1, 1, 0);                             // s4 = {|s3|, angle(s3)}
    prog[p++] = ai(1, 1, 1);                             // s6 = s3 * exp(j s5)
    prog[p++] = HALT;
  endtask

  task automatic set_sort(sortmode_e m);
    load_cfg(CSEL_PE4, 4, c4f(13, 0, MASK_NONE, 0, 0, 0, m));
  endtask

  task automatic load_all();
    pe5_cfg_t c5;
    pe6_cfg_t c6;
    build_program();
    for (int i = 0; i < IMEM_WORDS; i++) begin
      @(negedge clk);
      imem_we = 1'b1; imem_addr = PCW'(i); imem_wdata = prog[i];
    end
    @(negedge clk);
    imem_we = 1'b0;
    load_cfg(CSEL_PE2, 0,  c2f(A_ROWS,  1, 0, 4'h0, B_ROWS,   0, 0, 4'h0, 4'h0, XID, 0));
    load_cfg(CSEL_PE2, 1,  c2f(A_ROWS,  1, 0, 4'h0, B_BCAST,  0, 1, 4'h0, 4'h0, XID, 0));
    load_cfg(CSEL_PE2, 2,  c2f(A_DIAG,  0, 1, 4'h0, B_ONE,    0, 0, 4'h0, 4'h0, XID, 0));
    load_cfg(CSEL_PE2, 3,  c2f(A_TRANS, 0, 0, 4'h0, B_BCAST,  0, 0, 4'h0, 4'h0, XID, 0));
    load_cfg(CSEL_PE2, 5,  c2f(A_DIAG,  0, 0, 4'h0, B_SCALAR, 0, 0, 4'h0, 4'h0, XID, 2));
    load_cfg(CSEL_PE2, 6,  c2f(A_IDENT, 0, 0, 4'h0, B_SCALAR, 0, 0, 4'h0, 4'h0, XID, 1));
    load_cfg(CSEL_PE2, 7,  c2f(A_ROWS,  1, 0, 4'h3, B_ROWS,   0, 0, 4'h0, 4'h0, XID, 0));
    load_cfg(CSEL_PE2, 8,  c2f(A_DIAG,  1, 0, 4'h0, B_SCALAR, 0, 0, 4'h0, 4'h0, XID, 2));
    load_cfg(CSEL_PE2, 9,  c2f(A_TRANS, 0, 0, 4'h0, B_BCAST,  1, 0, 4'h3, 4'h0, XID, 0));
    load_cfg(CSEL_PE2, 10, c2f(A_TRANS, 0, 0, 4'h0, B_BCAST,  0, 0, 4'h3, 4'h4, XSW, 0));
    load_cfg(CSEL_PE2, 11, c2f(A_DIAG,  0, 0, 4'h0, B_ONE,    0, 0, 4'h0, 4'h0, XID, 0));
    load_cfg(CSEL_PE3, 0, 32'(ACC_NEW));
    load_cfg(CSEL_PE3, 1, 32'(ACC_SUB));
    load_cfg(CSEL_PE4, 0, c4f(13, 0, MASK_NONE,  0, 0, 0, SORT_NONE));
    load_cfg(CSEL_PE4, 1, c4f(13, 1, MASK_ZERO,  0, 0, 0, SORT_NONE));
    load_cfg(CSEL_PE4, 2, c4f(13, 1, MASK_WRITE, 0, 0, 0, SORT_NONE));
    load_cfg(CSEL_PE4, 3, c4f(13, 0, MASK_NONE,  1, 0, 0, SORT_NONE));
    load_cfg(CSEL_PE4, 5, c4f(11, 1, MASK_ZERO,  0, 0, 0, SORT_NONE));
    load_cfg(CSEL_PE4, 6, c4f(13, 0, MASK_NONE,  1, 1, 3, SORT_NONE));
    c5 = '0; c5.mode = DS_SQRTINV; c5.srca = 0; c5.dst1 = 1; c5.dst2 = 2; c5.ofrac = 11;
    load_cfg(CSEL_PE5, 0, c5);
    c6 = '0; c6.mode = CR_VECTOR; c6.srca = 3; c6.dst = 4;
    load_cfg(CSEL_PE6, 0, c6);
    c6 = '0; c6.mode = CR_ROTATE; c6.srca = 3; c6.srcb = 5; c6.dst = 6;
    load_cfg(CSEL_PE6, 1, c6);
  endtask

  // ------------------------------------------------------------ channel and reference
  int hre [4][4], him [4][4];          // [row][col], Q3.13 integers
  int pref [4];                        // reference permutation
  int pold [4];
  real qr_ [4][4], qi_ [4][4], rr_ [4][4], ri_ [4][4];   // float Q, R of H P

  function automatic real en(int j);
    real s = 0.0;
    for (int m = 0; m < 4; m++)
      s += (real'(hre[m][j]) ** 2 + real'(him[m][j]) ** 2) / (8192.0 * 8192.0);
    return s;
  endfunction

  // reference sort: ascending energy, weakest left
  function automatic void ref_sort(sortmode_e m, output int p [4]);
    real e [4];
    for (int j = 0; j < 4; j++) e[j] = en(j);
    if (m == SORT_PRECISE) begin
      int idx [4] = '{0, 1, 2, 3};
      for (int a = 0; a < 4; a++)
        for (int b = 0; b < 3 - a; b++)
          if (e[idx[b]] > e[idx[b+1]]) begin int t = idx[b]; idx[b] = idx[b+1]; idx[b+1] = t; end
      p = idx;
    end else begin
      int lo01 = (e[1] < e[0]) ? 1 : 0, hi01 = 1 - lo01;
      int lo23 = (e[3] < e[2]) ? 3 : 2, hi23 = 5 - lo23;
      if (m == SORT_FIXED || e[0] + e[1] >= e[2] + e[3]) p = '{lo23, hi23, lo01, hi01};
      else                                               p = '{lo01, hi01, lo23, hi23};
    end
  endfunction

  // float modified Gram-Schmidt of H P; returns min |r_kk|
  function automatic real ref_qr(int p [4]);
    real vr [4][4], vi_ [4][4];
    real mn = 10.0;
    for (int j = 0; j < 4; j++)
      for (int m = 0; m < 4; m++) begin
        vr[m][j] = real'(hre[m][p[j]]) / 8192.0;
        vi_[m][j] = real'(him[m][p[j]]) / 8192.0;
      end
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin rr_[i][j] = 0; ri_[i][j] = 0; end
    for (int k = 0; k < 4; k++) begin
      real nrm = 0.0;
      for (int m = 0; m < 4; m++) nrm += vr[m][k] ** 2 + vi_[m][k] ** 2;
      nrm = $sqrt(nrm);
      rr_[k][k] = nrm;
      if (nrm < mn) mn = nrm;
      for (int m = 0; m < 4; m++) begin qr_[m][k] = vr[m][k] / nrm; qi_[m][k] = vi_[m][k] / nrm; end
      for (int j = k + 1; j < 4; j++) begin
        real sr = 0.0, si = 0.0;
        for (int m = 0; m < 4; m++) begin     // q_k^H v_j
          sr += qr_[m][k] * vr[m][j] + qi_[m][k] * vi_[m][j];
          si += qr_[m][k] * vi_[m][j] - qi_[m][k] * vr[m][j];
        end
        rr_[k][j] = sr; ri_[k][j] = si;
        for (int m = 0; m < 4; m++) begin
          vr[m][j] -= sr * qr_[m][k] - si * qi_[m][k];
          vi_[m][j] -= sr * qi_[m][k] + si * qr_[m][k];
        end
      end
    end
    return mn;
  endfunction

  function automatic bit separated();
    real e [4];
    for (int j = 0; j < 4; j++) e[j] = en(j);
    for (int a = 0; a < 4; a++)
      for (int b = a + 1; b < 4; b++)
        if ((e[a] > e[b] ? e[a] - e[b] : e[b] - e[a]) < 0.02) return 0;
    if ((e[0] + e[1] > e[2] + e[3] ? e[0] + e[1] - e[2] - e[3] : e[2] + e[3] - e[0] - e[1]) < 0.02)
      return 0;
    return 1;
  endfunction

  function automatic int rnd_q();
    return int'($urandom_range(0, 8191)) - 4096;    // [-0.5, 0.5)
  endfunction

  // new channel columns lo..3 ... cols listed in mask; keep trying until usable
  task automatic gen_channel(logic [3:0] cols, sortmode_e m);
    int p [4];
    int tries = 0;
    int sre [4][4], sim [4][4];
    sre = hre; sim = him;
    forever begin
      hre = sre; him = sim;
      for (int j = 0; j < 4; j++)
        if (cols[j]) for (int m = 0; m < 4; m++) begin hre[m][j] = rnd_q(); him[m][j] = rnd_q(); end
      ref_sort(m, p);
      tries++;
      if (separated() && ref_qr(p) > 0.15) break;
      if (tries > 1000) $fatal(1, "no usable channel");
    end
    pref = p;
  endtask

  task automatic write_h();
    for (int j = 0; j < 4; j++) begin
      @(negedge clk);
      h_vwe = 1'b1; h_vaddr = 4'(j);
      for (int m = 0; m < 4; m++) begin
        h_vwdata[m].re = 16'(hre[m][j]);
        h_vwdata[m].im = 16'(him[m][j]);
      end
    end
    @(negedge clk);
    h_vwe = 1'b0;
  endtask

  int cyc;
  task automatic run(int entry);
    @(negedge clk);
    start = 1'b1; start_pc = PCW'(entry);
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
  endtask

  // read back Q (v4..v7) and R (v8..v11)
  real dqr [4][4], dqi [4][4], drr [4][4], dri [4][4];
  task automatic read_qr();
    for (int j = 0; j < 4; j++) begin
      @(negedge clk); h_vaddr = 4'(4 + j); #1;
      for (int m = 0; m < 4; m++) begin
        dqr[m][j] = real'(h_vrdata[m].re) / 8192.0; dqi[m][j] = real'(h_vrdata[m].im) / 8192.0;
      end
      @(negedge clk); h_vaddr = 4'(8 + j); #1;
      for (int m = 0; m < 4; m++) begin
        drr[m][j] = real'(h_vrdata[m].re) / 8192.0; dri[m][j] = real'(h_vrdata[m].im) / 8192.0;
        if (m > j) check(h_vrdata[m] == '0, $sformatf("R(%0d,%0d) not zero", m, j));
      end
    end
  endtask

  function automatic real absr(real x); return x < 0 ? -x : x; endfunction

  task automatic check_result(bit exact, string tag);
    real tol = 0.03;
    real maxe_rec = 0, maxe_orth = 0, maxe_q = 0, maxe_r = 0, maxe_d = 0;
    read_qr();
    for (int p = 0; p < 4; p++) check(perm[p] == 2'(pref[p]), $sformatf("%s perm[%0d]=%0d exp %0d", tag, p, perm[p], pref[p]));
    for (int m = 0; m < 4; m++)
      for (int j = 0; j < 4; j++) begin
        real sr = 0, si = 0, orr = 0, oi = 0, er, ei;
        for (int k = 0; k < 4; k++) begin
          sr += dqr[m][k] * drr[k][j] - dqi[m][k] * dri[k][j];
          si += dqr[m][k] * dri[k][j] + dqi[m][k] * drr[k][j];
          orr += dqr[k][m] * dqr[k][j] + dqi[k][m] * dqi[k][j];    // (Q^H Q)(m,j)
          oi  += dqr[k][m] * dqi[k][j] - dqi[k][m] * dqr[k][j];
        end
        er = sr - real'(hre[m][pref[j]]) / 8192.0;
        ei = si - real'(him[m][pref[j]]) / 8192.0;
        if (absr(er) > maxe_rec) maxe_rec = absr(er);
        if (absr(ei) > maxe_rec) maxe_rec = absr(ei);
        if (absr(orr - (m == j ? 1.0 : 0.0)) > maxe_orth) maxe_orth = absr(orr - (m == j ? 1.0 : 0.0));
        if (absr(oi) > maxe_orth) maxe_orth = absr(oi);
        if (exact) begin
          if (absr(dqr[m][j] - qr_[m][j]) > maxe_q) maxe_q = absr(dqr[m][j] - qr_[m][j]);
          if (absr(dqi[m][j] - qi_[m][j]) > maxe_q) maxe_q = absr(dqi[m][j] - qi_[m][j]);
          if (absr(drr[m][j] - rr_[m][j]) > maxe_r) maxe_r = absr(drr[m][j] - rr_[m][j]);
          if (absr(dri[m][j] - ri_[m][j]) > maxe_r) maxe_r = absr(dri[m][j] - ri_[m][j]);
        end
      end
    for (int k = 0; k < 4; k++) begin
      real d = $sqrt(drr[k][k] ** 2 + dri[k][k] ** 2) - rr_[k][k];
      if (absr(d) > maxe_d) maxe_d = absr(d);
    end
    check(maxe_rec < tol, $sformatf("%s |QR - HP| = %f", tag, maxe_rec));
    check(maxe_orth < tol, $sformatf("%s |Q^H Q - I| = %f", tag, maxe_orth));
    check(maxe_d < tol, $sformatf("%s |r_kk| error %f", tag, maxe_d));
    if (exact) begin
      check(maxe_q < tol, $sformatf("%s Q error %f", tag, maxe_q));
      check(maxe_r < tol, $sformatf("%s R error %f", tag, maxe_r));
    end
  endtask

  // event counters
  always @(posedge clk) if (rst_n) begin
    if (ev.stall) n_stall++;
    if (ev.acc5_issue) n_acc5++;
    if (ev.acc6_issue) n_acc6++;
    if (ev.vec_issue && dut.c3_w[1:0] == 2'(ACC_SUB)) n_sub++;
  end

  // Issue schedule of the programs, in cycles: the first instruction issues
  // in cycle 1; a sync instruction issues 3 cycles after a vector operation
  // (pipeline drained) and 51 cycles after a PE5 start (50-cycle latency);
  // any other instruction issues in the next cycle. HALT carries sync, done
  // is seen 2 cycles after it issues.
  localparam int SV = 3, SA = 51;
  localparam int CYC_COL0 = SV + SV + SA + 1;                 // NORM, ACC, SCALE, RKK after LOAD
  localparam int CYC_COLK = SV + 1 + SV + SV + SV + SA + 1;   // QH .. RKK after previous RKK
  localparam int CYC_FULL   = 1 + SV + CYC_COL0 + 3 * CYC_COLK + SV + 2;
  localparam int CYC_UPDATE = 1 + SV + 1 + SV + SV + SA + SV + 1 + SV + 1 + SV + 2;

  task automatic do_pair(sortmode_e m);
    int pr [4];
    bit upd_exp;
    // full-H renewal
    gen_channel(4'hf, m);
    write_h();
    run(FULL);
    n_full++;
    check_result(1, "full");
    check(cyc == CYC_FULL, $sformatf("full-H cycles %0d exp %0d", cyc, CYC_FULL));
    pold = pref;
    // half-H renewal: antenna ports 0 and 1
    gen_channel(4'h3, m);
    write_h();
    upd_exp = (pref[0] == pold[0]) && (pref[1] == pold[1]) && pref[0] >= 2 && pref[1] >= 2;
    run(HALF);
    check(upd_flag == upd_exp, $sformatf("update flag %0d exp %0d", upd_flag, upd_exp));
    if (upd_exp) begin
      n_update++;
      check(cyc == CYC_UPDATE, $sformatf("QR-update cycles %0d exp %0d", cyc, CYC_UPDATE));
      check_result(0, "update");
    end else begin
      n_fallback++;
      check(cyc == CYC_FULL + 1, $sformatf("fallback cycles %0d exp %0d", cyc, CYC_FULL + 1));
      check_result(1, "fallback");
    end
    case (m)
      SORT_GROUP:   n_group++;
      SORT_PRECISE: n_precise++;
      default:      n_fixed++;
    endcase
  endtask

  initial begin
    start = 0; start_pc = '0; imem_we = 0; imem_addr = '0; imem_wdata = '0;
    cfg_we = 0; cfg_sel = CSEL_PE2; cfg_addr = '0; cfg_wdata = '0;
    h_vwe = 0; h_swe = 0; h_vaddr = '0; h_saddr = '0; h_vwdata = '0; h_swdata = '0;
    for (int m = 0; m < 4; m++) for (int j = 0; j < 4; j++) begin hre[m][j] = 0; him[m][j] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load_all();
    set_sort(SORT_GROUP);
    for (int t = 0; t < 8; t++) do_pair(SORT_GROUP);
    set_sort(SORT_PRECISE);
    for (int t = 0; t < 3; t++) do_pair(SORT_PRECISE);
    set_sort(SORT_FIXED);
    for (int t = 0; t < 2; t++) do_pair(SORT_FIXED);

    // CORDIC on q0[1]
    begin
      real xr, xi, th, mag, ang;
      @(negedge clk);
      h_swe = 1'b1; h_saddr = 4'd5; h_swdata.re = 16'sd4096; h_swdata.im = '0;   // 0.5 rad
      @(negedge clk);
      h_swe = 1'b0;
      h_vaddr = 4'd4; #1;
      xr = real'(h_vrdata[1].re) / 8192.0; xi = real'(h_vrdata[1].im) / 8192.0;
      run(CORD);
      h_saddr = 4'd3; #1;
      check(h_srdata == h_vrdata[1], "scalar copy of q0[1]");
      h_saddr = 4'd4; #1;
      mag = real'(h_srdata.re) / 8192.0; ang = real'(h_srdata.im) / 8192.0;
      check(absr(mag - $sqrt(xr * xr + xi * xi)) < 0.002, $sformatf("CORDIC magnitude %f", mag));
      check(absr(ang - $atan2(xi, xr)) < 0.003, $sformatf("CORDIC angle %f exp %f", ang, $atan2(xi, xr)));
      h_saddr = 4'd6; #1;
      th = 0.5;
      check(absr(real'(h_srdata.re) / 8192.0 - (xr * $cos(th) - xi * $sin(th))) < 0.002, "CORDIC rotate re");
      check(absr(real'(h_srdata.im) / 8192.0 - (xr * $sin(th) + xi * $cos(th))) < 0.002, "CORDIC rotate im");
    end

    $display("mechanisms: full=%0d update=%0d fallback=%0d stall_cycles=%0d pe5=%0d pe6=%0d sub=%0d group=%0d precise=%0d fixed=%0d",
             n_full, n_update, n_fallback, n_stall, n_acc5, n_acc6, n_sub, n_group, n_precise, n_fixed);
    check(n_update > 0, "QR-update path never taken");
    check(n_fallback > 0, "brute-force fallback never taken");
    check(n_stall > 0, "no sync stall");
    check(n_acc5 > 0, "PE5 never used");
    check(n_acc6 > 0, "PE6 never used");
    check(n_sub > 0, "accumulate-subtract never used");
    check(n_group > 0 && n_precise > 0 && n_fixed > 0, "a sort mode never used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
