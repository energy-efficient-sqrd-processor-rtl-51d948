// pe3_lane: one processing lane of the CMAC bank (PE3).
//
// Four complex multipliers feed an adder tree, so the lane produces the full
// precision dot product sum_k a[k]*b[k] of two 4-element complex vectors in
// one combinational pass. The adder-tree organisation follows the processor
// description; widths are this design's: each product is kept exactly
// (2*DW+1 bits per part) and the sum is sign-extended to ACCW bits. The
// accumulator that closes the CMAC loop sits in pe3_cmac.
module pe3_lane
  import sqrd_pkg::*;
(
  input  vec_t  a,
  input  vec_t  b,
  output cacc_t dot
);
  cacc_t prod [N];
  cacc_t s01, s23;

  always_comb begin
    for (int k = 0; k < N; k++) begin
      // operands sign-extended first so the products are computed exactly
      logic signed [ACCW-1:0] ar, ai, br, bi;
      ar = ACCW'(a[k].re);
      ai = ACCW'(a[k].im);
      br = ACCW'(b[k].re);
      bi = ACCW'(b[k].im);
      prod[k].re = ar * br - ai * bi;
      prod[k].im = ar * bi + ai * br;
    end
    // two-level adder tree
    s01.re = prod[0].re + prod[1].re;
    s01.im = prod[0].im + prod[1].im;
    s23.re = prod[2].re + prod[3].re;
    s23.im = prod[2].im + prod[3].im;
    dot.re = s01.re + s23.re;
    dot.im = s01.im + s23.im;
  end
endmodule
