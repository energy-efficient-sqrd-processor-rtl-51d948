// pe2_pre: pre-processing element (PE2) of the vector block.
//
// Builds, for each of the four PE3 lanes, the two 4-element complex operand
// vectors A_l and B_l from the register groups read out of ME2. This is where
// a matrix Hermitian (conjugate + choice of rows/columns), the column
// permutation of the sorted channel, broadcast of one vector to all lanes,
// an element crossbar with negation, and element masking happen, so that PE3
// can compute four dot products of any of these operand shapes per cycle.
//
// Operand modes (pe2_cfg_t in sqrd_pkg):
//   A_ROWS  A_l = a[l]                 A_TRANS A_l[k] = a[k][l]
//   A_DIAG  A_l[k] = (k==l) ? va[l]:0  A_IDENT A_l = e_l (unit vector)
//   B_BCAST B_l[k] = vb[bxsel[k]]      B_ROWS  B_l = b[l]
//   B_SCALAR B_l[k] = scalar           B_ONE   B_l[k] = 1.0
// where a / b are the A / B register groups, read through the permutation
// register when aperm / bperm is set, and va / vb are vectors ra / rb of the
// groups. Conjugation, negation and kill masks are applied afterwards.
//
// The processor description gives PE2's role (pre-processing such as the
// matrix Hermitian, with a crossbar drawn in the block diagram); the operand
// modes above are this design's own.
//
// Timing: combinational operand formation, one register stage at the output.
// in_valid / ctl_in are delayed along with the operands.
module pe2_pre
  import sqrd_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  pe2_cfg_t cfg,
  input  vctl_t    ctl_in,
  input  mat_t     mat_a,     // register group of ra
  input  mat_t     mat_b,     // register group of rb
  input  idx_t     ra_lo,     // vector of the group used by A_DIAG
  input  idx_t     rb_lo,     // vector of the group used by B_BCAST
  input  perm_t    perm,
  input  cplx_t    scalar,
  output logic     out_valid,
  output mat_t     opa,       // opa[l] = A_l
  output mat_t     opb,       // opb[l] = B_l
  output vctl_t    ctl_out
);

  function automatic cplx_t cconj(cplx_t x);
    cplx_t y;
    y.re = x.re;
    y.im = -x.im;
    return y;
  endfunction

  function automatic cplx_t cneg(cplx_t x);
    cplx_t y;
    y.re = -x.re;
    y.im = -x.im;
    return y;
  endfunction

  mat_t pa, pb, a_n, b_n;
  vec_t va, vb;
  cplx_t one_c;

  always_comb begin
    one_c.re = ONE;
    one_c.im = '0;
    for (int l = 0; l < N; l++) begin
      pa[l] = cfg.aperm ? mat_a[perm[l]] : mat_a[l];
      pb[l] = cfg.bperm ? mat_b[perm[l]] : mat_b[l];
    end
    va = cfg.aperm ? mat_a[perm[ra_lo]] : mat_a[ra_lo];
    vb = cfg.bperm ? mat_b[perm[rb_lo]] : mat_b[rb_lo];

    for (int l = 0; l < N; l++) begin
      for (int k = 0; k < N; k++) begin
        // A operand
        unique case (cfg.amode)
          A_ROWS:  a_n[l][k] = pa[l][k];
          A_TRANS: a_n[l][k] = pa[k][l];
          A_DIAG:  a_n[l][k] = (k == l) ? va[l] : '0;
          default: a_n[l][k] = (k == l) ? one_c : '0;   // A_IDENT
        endcase
        if (cfg.aconj) a_n[l][k] = cconj(a_n[l][k]);
        if (cfg.akill[k]) a_n[l][k] = '0;
        // B operand
        unique case (cfg.bmode)
          B_BCAST:  b_n[l][k] = vb[cfg.bxsel[k]];
          B_ROWS:   b_n[l][k] = pb[l][k];
          B_SCALAR: b_n[l][k] = scalar;
          default:  b_n[l][k] = one_c;                    // B_ONE
        endcase
        if (cfg.bconj) b_n[l][k] = cconj(b_n[l][k]);
        if (cfg.bneg[k]) b_n[l][k] = cneg(b_n[l][k]);
        if (cfg.bkill[k]) b_n[l][k] = '0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      opa       <= '0;
      opb       <= '0;
      ctl_out   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        opa     <= a_n;
        opb     <= b_n;
        ctl_out <= ctl_in;
      end
    end
  end

endmodule
