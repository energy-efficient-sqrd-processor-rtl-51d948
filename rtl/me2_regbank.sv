// me2_regbank: register bank (ME2) of the vector block.
//
// Holds
//   * NVREG vector registers of four complex Q3.13 elements. Registers are
//     addressed individually for writes and as aligned groups of four
//     (a 4x4 matrix, one vector per column) for the two PE2 read ports;
//   * NSREG complex scalar registers (special purpose "Scalar" registers),
//     read by PE2 (broadcast), PE5 (two operands) and PE6 (two operands);
//   * the permutation register (special purpose "Permutation" register),
//     perm[p] = original column placed at sorted position p, and the
//     QR-update condition flag that PE4 derives with each new permutation.
// Write sources: PE4 (vector with per-element enable, one scalar,
// permutation + flag), PE5 (two scalars), PE6 (one scalar), and a host port
// for loading channel matrices and reading results while the processor is
// idle. Scalar write ports are applied in the order host, PE4, PE5, PE6; a
// later one wins if two address the same register in one cycle.
//
// 16 vector registers and the two kinds of special purpose registers follow
// the processor description; NSREG, the port set and reset values are this
// design's choices. NVREG and NSREG (sqrd_pkg) must stay 16: register
// addresses are 4 bits wide. Reset clears all registers, sets the identity
// permutation and clears the flag.
//
// Timing: asynchronous reads, writes on the rising clock edge.
module me2_regbank
  import sqrd_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // PE2 read ports (group = addr[3:2])
  input  logic [3:0] ra,
  input  logic [3:0] rb,
  output mat_t       mat_a,
  output mat_t       mat_b,
  input  logic [3:0] ssel_pe2,
  output cplx_t      scal_pe2,
  // accelerator scalar read ports
  input  logic [3:0] sa5, sb5, sa6, sb6,
  output cplx_t      sa5_q, sb5_q, sa6_q, sb6_q,
  // PE4 writes
  input  logic       vwe,
  input  logic [3:0] vaddr,
  input  logic [N-1:0] vwmask,
  input  vec_t       vdata,
  input  logic       swe4,
  input  logic [3:0] saddr4,
  input  cplx_t      sdata4,
  input  logic       pwe,
  input  perm_t      perm_in,
  input  logic       upd_in,
  // PE5 / PE6 writes
  input  logic       swe5a,
  input  logic [3:0] saddr5a,
  input  cplx_t      sdata5a,
  input  logic       swe5b,
  input  logic [3:0] saddr5b,
  input  cplx_t      sdata5b,
  input  logic       swe6,
  input  logic [3:0] saddr6,
  input  cplx_t      sdata6,
  // host port
  input  logic       h_vwe,
  input  logic [3:0] h_vaddr,
  input  vec_t       h_vwdata,
  output vec_t       h_vrdata,
  input  logic       h_swe,
  input  logic [3:0] h_saddr,
  input  cplx_t      h_swdata,
  output cplx_t      h_srdata,
  // special purpose registers
  output perm_t      perm,
  output logic       upd_flag
);
  vec_t  vreg [NVREG];
  cplx_t sreg [NSREG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NVREG; i++) vreg[i] <= '0;
      for (int i = 0; i < NSREG; i++) sreg[i] <= '0;
      perm     <= {2'd3, 2'd2, 2'd1, 2'd0};
      upd_flag <= 1'b0;
    end else begin
      if (h_vwe) vreg[h_vaddr] <= h_vwdata;
      if (vwe) begin
        for (int k = 0; k < N; k++)
          if (vwmask[k]) vreg[vaddr][k] <= vdata[k];
      end
      if (h_swe) sreg[h_saddr] <= h_swdata;
      if (swe4)  sreg[saddr4]  <= sdata4;
      if (swe5a) sreg[saddr5a] <= sdata5a;
      if (swe5b) sreg[saddr5b] <= sdata5b;
      if (swe6)  sreg[saddr6]  <= sdata6;
      if (pwe) begin
        perm     <= perm_in;
        upd_flag <= upd_in;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < N; i++) begin
      mat_a[i] = vreg[{ra[3:2], 2'(i)}];
      mat_b[i] = vreg[{rb[3:2], 2'(i)}];
    end
  end

  assign scal_pe2 = sreg[ssel_pe2];
  assign sa5_q    = sreg[sa5];
  assign sb5_q    = sreg[sb5];
  assign sa6_q    = sreg[sa6];
  assign sb6_q    = sreg[sb6];
  assign h_vrdata = vreg[h_vaddr];
  assign h_srdata = sreg[h_saddr];

endmodule
