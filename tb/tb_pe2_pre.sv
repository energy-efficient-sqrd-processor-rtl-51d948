// tb_pe2_pre: self-checking test of the pre-processing element (PE2).
//
// Random register groups, permutations, scalars and random configurations
// of all operand modes. For every lane l and element k the expected A and B
// operands are worked out here from the mode definitions (rows, transpose,
// diagonal, identity; broadcast with crossbar, rows, scalar, one; then
// conjugate, negate, kill) and compared with the registered outputs one
// cycle later. Also checks that valid and control are delayed by one cycle.
module tb_pe2_pre;
  import sqrd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic     in_valid, out_valid;
  pe2_cfg_t cfg;
  vctl_t    ctl_in, ctl_out;
  mat_t     mat_a, mat_b, opa, opb;
  idx_t     ra_lo, rb_lo;
  perm_t    perm;
  cplx_t    scalar;

  pe2_pre dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // expected operands as plain integers
  int ear [N][N], eai [N][N], ebr [N][N], ebi [N][N];

  task automatic expect_ops();
    for (int l = 0; l < N; l++)
      for (int k = 0; k < N; k++) begin
        int col, vcol, xr, xi, yr, yi;
        // A
        case (cfg.amode)
          A_ROWS:  begin col = cfg.aperm ? perm[l] : l; xr = mat_a[col][k].re; xi = mat_a[col][k].im; end
          A_TRANS: begin col = cfg.aperm ? perm[k] : k; xr = mat_a[col][l].re; xi = mat_a[col][l].im; end
          A_DIAG:  begin
            vcol = cfg.aperm ? perm[ra_lo] : ra_lo;
            xr = (k == l) ? int'(mat_a[vcol][l].re) : 0;
            xi = (k == l) ? int'(mat_a[vcol][l].im) : 0;
          end
          default: begin xr = (k == l) ? 8192 : 0; xi = 0; end
        endcase
        if (cfg.aconj) xi = -xi;
        if (cfg.akill[k]) begin xr = 0; xi = 0; end
        // B
        case (cfg.bmode)
          B_BCAST: begin
            vcol = cfg.bperm ? perm[rb_lo] : rb_lo;
            yr = mat_b[vcol][cfg.bxsel[k]].re; yi = mat_b[vcol][cfg.bxsel[k]].im;
          end
          B_ROWS:   begin col = cfg.bperm ? perm[l] : l; yr = mat_b[col][k].re; yi = mat_b[col][k].im; end
          B_SCALAR: begin yr = scalar.re; yi = scalar.im; end
          default:  begin yr = 8192; yi = 0; end
        endcase
        if (cfg.bconj) yi = -yi;
        if (cfg.bneg[k]) begin yr = -yr; yi = -yi; end
        if (cfg.bkill[k]) begin yr = 0; yi = 0; end
        ear[l][k] = xr; eai[l][k] = xi; ebr[l][k] = yr; ebi[l][k] = yi;
      end
  endtask

  initial begin
    in_valid = 0; cfg = '0; ctl_in = '0; mat_a = '0; mat_b = '0; ra_lo = 0; rb_lo = 0;
    perm = '0; scalar = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      int sh [N];
      @(negedge clk);
      in_valid = 1;
      cfg = pe2_cfg_t'($urandom);
      ctl_in = vctl_t'({$urandom, $urandom, $urandom});
      // values kept away from -32768 so negation is exact
      for (int i = 0; i < N; i++)
        for (int k = 0; k < N; k++) begin
          mat_a[i][k].re = 16'($urandom_range(0, 65534) - 32767);
          mat_a[i][k].im = 16'($urandom_range(0, 65534) - 32767);
          mat_b[i][k].re = 16'($urandom_range(0, 65534) - 32767);
          mat_b[i][k].im = 16'($urandom_range(0, 65534) - 32767);
        end
      scalar.re = 16'($urandom_range(0, 65534) - 32767);
      scalar.im = 16'($urandom_range(0, 65534) - 32767);
      ra_lo = 2'($urandom); rb_lo = 2'($urandom);
      // random permutation
      sh = '{0, 1, 2, 3};
      for (int i = 3; i > 0; i--) begin
        int j, tmp;
        j = $urandom_range(0, i);
        tmp = sh[i]; sh[i] = sh[j]; sh[j] = tmp;
      end
      for (int i = 0; i < N; i++) perm[i] = 2'(sh[i]);
      expect_ops();
      @(posedge clk); #1;
      check(out_valid, "out_valid");
      check(ctl_out == ctl_in, "ctl delayed");
      for (int l = 0; l < N; l++)
        for (int k = 0; k < N; k++) begin
          check(int'(opa[l][k].re) == ear[l][k] && int'(opa[l][k].im) == eai[l][k],
                $sformatf("t=%0d A[%0d][%0d] mode %0d", t, l, k, cfg.amode));
          check(int'(opb[l][k].re) == ebr[l][k] && int'(opb[l][k].im) == ebi[l][k],
                $sformatf("t=%0d B[%0d][%0d] mode %0d", t, l, k, cfg.bmode));
        end
    end
    @(negedge clk); in_valid = 0;
    @(posedge clk); #1;
    check(!out_valid, "valid drops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
