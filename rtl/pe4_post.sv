// pe4_post: post-processing element (PE4) of the vector block.
//
// Takes the four lane accumulators of PE3 and
//  * scales them with a barrel shifter (arithmetic right shift by cfg.shift,
//    round half up) and saturates each part to 16 bits,
//  * forms the write to ME2: a vector register (optionally with the
//    instruction's element mask as per-element write enable or as a
//    keep-mask that zeroes the other elements) and/or one element to a
//    scalar register,
//  * optionally sorts the four lane results by their real parts (the column
//    energies ||h_i||^2) into a new column permutation, and derives the
//    QR-update condition.
//
// Sorting puts the weakest column left and the strongest right (ascending
// energy, ties kept in index order), so the columns detected first are the
// strongest. Modes:
//   SORT_PRECISE  all four columns individually (4! orders)
//   SORT_GROUP    columns {0,1} and {2,3} bundled; the group of larger total
//                 energy goes right (ties favour {0,1} right), then each
//                 group is sorted internally (the group-sort of the design)
//   SORT_FIXED    {2,3} left, {0,1} right, each sorted internally
// Update condition: the two left positions of the new order hold columns 2
// and 3 in exactly the order of the current permutation register. Then only
// the two right-most sorted columns differ from the previous decomposition
// and a single Givens rotation restores the triangular R.
//
// The barrel shifter and MIN/MAX sorting are named in the processor
// description, as are the group-sort rule and the update condition (changed
// columns right-most); rounding, saturation, masks, the tie rules and the
// exact test of the update condition are this design's choices.
//
// Timing: purely combinational; the ME2 registers written by its outputs
// form the pipeline register of this stage.
module pe4_post
  import sqrd_pkg::*;
(
  input  logic      in_valid,
  input  accvec_t   acc,
  input  vctl_t     ctl,
  input  perm_t     perm_old,
  output logic      vwe,
  output logic [3:0] vaddr,
  output logic [N-1:0] vwmask,
  output vec_t      vdata,
  output logic      swe,
  output logic [3:0] saddr,
  output cplx_t     sdata,
  output logic      pwe,
  output perm_t     perm_new,
  output logic      upd_new
);
  pe4_cfg_t c;
  vec_t     scaled;
  logic signed [DW-1:0] e [N];

  function automatic logic signed [DW-1:0] shsat(logic signed [ACCW-1:0] x, logic [4:0] sh);
    logic signed [ACCW-1:0] r;
    logic signed [ACCW-1:0] rnd;
    rnd = (sh == 0) ? '0 : (ACCW'(1) <<< (sh - 5'd1));
    r = (x + rnd) >>> sh;
    if (r > ACCW'(32767))       return 16'sh7fff;
    else if (r < -ACCW'(32768)) return 16'sh8000;
    else                        return r[DW-1:0];
  endfunction

  // ascending stable order of the columns listed in idx (2 or 4 entries)
  function automatic logic lt(logic signed [DW-1:0] x, logic signed [DW-1:0] y,
                              idx_t ix, idx_t iy);
    return (x < y) || ((x == y) && (ix < iy));
  endfunction

  always_comb begin
    logic [2:0] rank [N];
    logic signed [DW:0] g01, g23;
    idx_t lo01, hi01, lo23, hi23;

    c = ctl.c4;
    for (int l = 0; l < N; l++) begin
      scaled[l].re = shsat(acc[l].re, c.shift);
      scaled[l].im = shsat(acc[l].im, c.shift);
      e[l] = scaled[l].re;
    end

    // vector write
    vwe   = in_valid && c.vwen;
    vaddr = ctl.rd;
    vdata = scaled;
    vwmask = '1;
    if (c.mmode == MASK_WRITE) vwmask = ctl.emask;
    if (c.mmode == MASK_ZERO) begin
      for (int l = 0; l < N; l++)
        if (!ctl.emask[l]) vdata[l] = '0;
    end

    // scalar write
    swe   = in_valid && c.swen;
    saddr = c.sdst;
    sdata = scaled[c.selem];

    // precise sort: rank of every column, perm[rank] = column
    for (int i = 0; i < N; i++) begin
      rank[i] = '0;
      for (int j = 0; j < N; j++)
        if (j != i && lt(e[j], e[i], idx_t'(j), idx_t'(i))) rank[i] = rank[i] + 3'd1;
    end
    // group sort pieces
    g01 = {e[0][DW-1], e[0]} + {e[1][DW-1], e[1]};
    g23 = {e[2][DW-1], e[2]} + {e[3][DW-1], e[3]};
    if (lt(e[1], e[0], 2'd1, 2'd0)) begin lo01 = 2'd1; hi01 = 2'd0; end
    else                            begin lo01 = 2'd0; hi01 = 2'd1; end
    if (lt(e[3], e[2], 2'd3, 2'd2)) begin lo23 = 2'd3; hi23 = 2'd2; end
    else                            begin lo23 = 2'd2; hi23 = 2'd3; end

    perm_new = perm_old;
    unique case (c.sort)
      SORT_PRECISE: begin
        for (int i = 0; i < N; i++) perm_new[rank[i][1:0]] = idx_t'(i);
      end
      SORT_GROUP: begin
        if (g01 >= g23) perm_new = {hi01, lo01, hi23, lo23};
        else            perm_new = {hi23, lo23, hi01, lo01};
      end
      SORT_FIXED: perm_new = {hi01, lo01, hi23, lo23};
      default: ;
    endcase
    pwe = in_valid && (c.sort != SORT_NONE);
    upd_new = (perm_new[0] == perm_old[0]) && (perm_new[1] == perm_old[1]) &&
              perm_new[0][1] && perm_new[1][1];
  end

endmodule
