// tb_pe4_post: self-checking test of the post-processing element (PE4).
//
// Random accumulators and configurations. Expected values are worked out
// here: rounding right shift and 16-bit saturation, vector write with the
// element mask used as write enable or keep-mask, scalar write of one
// element, and the three sorting modes computed by repeated minimum
// selection on the real parts (precise), or by group energies (group,
// fixed), plus the QR-update condition against the old permutation.
// Energies are drawn from a small range so ties occur and the tie rule
// (lower column index first) is exercised.
module tb_pe4_post;
  import sqrd_pkg::*;

  logic      in_valid;
  accvec_t   acc;
  vctl_t     ctl;
  perm_t     perm_old, perm_new;
  logic      vwe, swe, pwe, upd_new;
  logic [3:0] vaddr, saddr;
  logic [N-1:0] vwmask;
  vec_t      vdata;
  cplx_t     sdata;

  pe4_post dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic int shs(longint x, int sh);
    longint r;
    r = (sh == 0) ? x : ((x + (64'sd1 <<< (sh - 1))) >>> sh);
    if (r > 32767) return 32767;
    if (r < -32768) return -32768;
    return int'(r);
  endfunction

  initial begin
    for (int t = 0; t < 3000; t++) begin
      pe4_cfg_t c;
      int sv_re [N], sv_im [N];
      int ep [N];
      bit used [N];
      int lo01, hi01, lo23, hi23;
      bit upd;
      in_valid = ($urandom_range(0, 9) != 0);
      c = pe4_cfg_t'($urandom);
      c.mmode = maskmode_e'($urandom_range(0, 2));
      ctl = '0;
      ctl.c4 = c;
      ctl.rd = 4'($urandom);
      ctl.emask = 4'($urandom);
      for (int i = 0; i < N; i++) perm_old[i] = 2'($urandom);
      for (int l = 0; l < N; l++) begin
        if (t % 2 == 0) begin   // small values, shift 0: sorting with ties
          acc[l].re = ACCW'($urandom_range(0, 6));
          acc[l].im = ACCW'($urandom_range(0, 6));
        end else begin
          acc[l].re = ACCW'({$urandom, $urandom}) >>> $urandom_range(0, 20);
          acc[l].im = ACCW'({$urandom, $urandom}) >>> $urandom_range(0, 20);
        end
      end
      if (t % 2 == 0) begin c.shift = 0; ctl.c4 = c; end
      #1;
      for (int l = 0; l < N; l++) begin
        sv_re[l] = shs(longint'(acc[l].re), c.shift);
        sv_im[l] = shs(longint'(acc[l].im), c.shift);
      end
      check(vwe == (in_valid && c.vwen), "vwe");
      check(vaddr == ctl.rd, "vaddr");
      check(vwmask == ((c.mmode == MASK_WRITE) ? ctl.emask : 4'hf), "vwmask");
      for (int l = 0; l < N; l++) begin
        bit z;
        z = (c.mmode == MASK_ZERO) && !ctl.emask[l];
        check(int'(vdata[l].re) == (z ? 0 : sv_re[l]) && int'(vdata[l].im) == (z ? 0 : sv_im[l]),
              $sformatf("t=%0d vdata[%0d] %0d exp %0d", t, l, vdata[l].re, sv_re[l]));
      end
      check(swe == (in_valid && c.swen) && saddr == c.sdst, "scalar write control");
      check(int'(sdata.re) == sv_re[c.selem] && int'(sdata.im) == sv_im[c.selem], "scalar data");
      // expected permutation
      for (int i = 0; i < N; i++) begin ep[i] = perm_old[i]; used[i] = 0; end
      lo01 = (sv_re[1] < sv_re[0]) ? 1 : 0;  hi01 = 1 - lo01;
      lo23 = (sv_re[3] < sv_re[2]) ? 3 : 2;  hi23 = 5 - lo23;
      case (c.sort)
        SORT_PRECISE: begin
          for (int p = 0; p < N; p++) begin       // repeated minimum selection
            int best;
            best = -1;
            for (int j = 0; j < N; j++)
              if (!used[j] && (best < 0 || sv_re[j] < sv_re[best])) best = j;
            used[best] = 1;
            ep[p] = best;
          end
        end
        SORT_GROUP:
          if (sv_re[0] + sv_re[1] >= sv_re[2] + sv_re[3]) ep = '{lo23, hi23, lo01, hi01};
          else                                            ep = '{lo01, hi01, lo23, hi23};
        SORT_FIXED: ep = '{lo23, hi23, lo01, hi01};
        default: ;
      endcase
      check(pwe == (in_valid && c.sort != SORT_NONE), "pwe");
      for (int i = 0; i < N; i++) check(int'(perm_new[i]) == ep[i], $sformatf("t=%0d perm[%0d] mode %0d", t, i, c.sort));
      upd = (ep[0] == perm_old[0]) && (ep[1] == perm_old[1]) && ep[0] >= 2 && ep[1] >= 2;
      check(upd_new == upd, "update condition");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
