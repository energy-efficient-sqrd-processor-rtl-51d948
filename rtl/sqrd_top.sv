// sqrd_top: reconfigurable vector processor for sorted QR decomposition
// (SQRD) of 4x4 complex MIMO channel matrices.
//
// Structure (data bus / configuration bus):
//   PE1 master node  -- reads ME1, selects one configuration per PE per cycle
//   ME1 instruction memory (128 x 32 bit = 4 Kbit)
//   vector block: PE2 pre-processing -> PE3 4x4 CMAC bank -> PE4 post-
//                 processing (shift/saturate, sort) -> ME2 register bank,
//                 which feeds PE2 again
//   accelerators: PE5 DIV/SQRT and PE6 CORDIC on ME2's scalar registers
// Every PE has its own 16-entry configuration memory, loaded by the host
// through the cfg_* port (cfg_sel picks the PE, cfgsel_e in sqrd_pkg).
//
// Host flow: load the program (imem_*) and the configurations (cfg_*), write
// the channel matrix columns into ME2 vector registers (h_v*), pulse start
// with the program entry in start_pc, wait for done, read Q, R (h_v*), the
// permutation (perm) and the QR-update flag (upd_flag). Host writes are
// only allowed while the processor is not busy.
//
// Timing: a vector operation issued in cycle t reads ME2 and is formed by
// PE2 in t, multiplied in PE3 in t+1, shifted/sorted by PE4 and written
// into ME2 at the end of t+2; an operation issued in t+3 sees the result.
// One vector operation (four 4-element complex dot products) issues per
// cycle. PE5 takes 50 (sqrt + reciprocal) or 33 (divide) cycles, PE6 17.
//
// The partitioning into PE1-PE6, ME1-ME2, the 16-bit precision, 16 vector
// registers, 16 configurations per PE and the 4 Kbit instruction memory
// follow the processor description; the instruction set, configuration
// formats, host ports and pipeline timing are this design's own.
//
// Lint note: rst_n is reported as used both synchronously and
// asynchronously because the host-access assertion below samples it in its
// disable condition; every flop in the design resets asynchronously.
module sqrd_top
  import sqrd_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  // control
  input  logic           start,
  input  logic [PCW-1:0] start_pc,
  output logic           busy,
  output logic           done,
  output events_t        ev,
  // instruction memory load
  input  logic           imem_we,
  input  logic [PCW-1:0] imem_addr,
  input  logic [IW-1:0]  imem_wdata,
  // configuration memory load
  input  logic           cfg_we,
  input  cfgsel_e        cfg_sel,
  input  logic [3:0]     cfg_addr,
  input  logic [CFGW-1:0] cfg_wdata,
  // register bank host access
  input  logic           h_vwe,
  input  logic [3:0]     h_vaddr,
  input  vec_t           h_vwdata,
  output vec_t           h_vrdata,
  input  logic           h_swe,
  input  logic [3:0]     h_saddr,
  input  cplx_t          h_swdata,
  output cplx_t          h_srdata,
  output perm_t          perm,
  output logic           upd_flag
);
  // ---------------------------------------------------------------- PE1 + ME1
  logic [PCW-1:0] pc;
  logic [IW-1:0]  instr;
  logic           vec_issue, pe5_start, pe6_start;
  logic [3:0]     c2_idx, c3_idx, c4_idx, ra, rb, rd, emask, acc_idx;
  logic           pipe_busy, pe5_busy, pe6_busy;

  me1_imem #(.WORDS(IMEM_WORDS), .IW(IW)) u_me1 (
    .clk, .we(imem_we), .waddr(imem_addr), .wdata(imem_wdata),
    .raddr(pc), .rdata(instr)
  );

  pe1_master u_pe1 (
    .clk, .rst_n, .start, .start_pc, .pc, .instr,
    .pipe_busy, .pe5_busy, .pe6_busy, .upd_flag,
    .vec_issue, .c2_idx, .c3_idx, .c4_idx, .ra, .rb, .rd, .emask,
    .pe5_start, .pe6_start, .acc_idx,
    .busy, .done, .ev
  );

  // ---------------------------------------------------------------- configuration memories
  logic [CFGW-1:0] c2_w, c3_w, c4_w, c5_w, c6_w;

  cfg_mem #(.W(CFGW), .DEPTH(CFG_DEPTH)) u_cfg2 (
    .clk, .rst_n, .we(cfg_we && cfg_sel == CSEL_PE2), .waddr(cfg_addr), .wdata(cfg_wdata),
    .raddr(c2_idx), .rdata(c2_w));
  cfg_mem #(.W(CFGW), .DEPTH(CFG_DEPTH)) u_cfg3 (
    .clk, .rst_n, .we(cfg_we && cfg_sel == CSEL_PE3), .waddr(cfg_addr), .wdata(cfg_wdata),
    .raddr(c3_idx), .rdata(c3_w));
  cfg_mem #(.W(CFGW), .DEPTH(CFG_DEPTH)) u_cfg4 (
    .clk, .rst_n, .we(cfg_we && cfg_sel == CSEL_PE4), .waddr(cfg_addr), .wdata(cfg_wdata),
    .raddr(c4_idx), .rdata(c4_w));
  cfg_mem #(.W(CFGW), .DEPTH(CFG_DEPTH)) u_cfg5 (
    .clk, .rst_n, .we(cfg_we && cfg_sel == CSEL_PE5), .waddr(cfg_addr), .wdata(cfg_wdata),
    .raddr(acc_idx), .rdata(c5_w));
  cfg_mem #(.W(CFGW), .DEPTH(CFG_DEPTH)) u_cfg6 (
    .clk, .rst_n, .we(cfg_we && cfg_sel == CSEL_PE6), .waddr(cfg_addr), .wdata(cfg_wdata),
    .raddr(acc_idx), .rdata(c6_w));

  pe2_cfg_t c2;
  pe5_cfg_t c5;
  pe6_cfg_t c6;
  vctl_t    ctl_issue;
  always_comb begin
    c2 = pe2_cfg_t'(c2_w);
    c5 = pe5_cfg_t'(c5_w);
    c6 = pe6_cfg_t'(c6_w);
    ctl_issue.c3    = pe3_cfg_t'(c3_w);
    ctl_issue.c4    = pe4_cfg_t'(c4_w);
    ctl_issue.rd    = rd;
    ctl_issue.emask = emask;
  end

  // ---------------------------------------------------------------- ME2
  mat_t  mat_a, mat_b;
  cplx_t scal_pe2, sa5_q, sb5_q, sa6_q, sb6_q;
  logic  vwe, swe4, pwe, upd_new;
  logic [3:0] vaddr, saddr4;
  logic [N-1:0] vwmask;
  vec_t  vdata;
  cplx_t sdata4;
  perm_t perm_new;
  logic  we5a, we5b, we6;
  logic [3:0] dst5a, dst5b, dst6;
  cplx_t res5a, res5b, res6;

  me2_regbank u_me2 (
    .clk, .rst_n,
    .ra, .rb, .mat_a, .mat_b, .ssel_pe2(c2.ssel), .scal_pe2,
    .sa5(c5.srca), .sb5(c5.srcb), .sa6(c6.srca), .sb6(c6.srcb),
    .sa5_q, .sb5_q, .sa6_q, .sb6_q,
    .vwe, .vaddr, .vwmask, .vdata, .swe4, .saddr4, .sdata4,
    .pwe, .perm_in(perm_new), .upd_in(upd_new),
    .swe5a(we5a), .saddr5a(dst5a), .sdata5a(res5a),
    .swe5b(we5b), .saddr5b(dst5b), .sdata5b(res5b),
    .swe6(we6), .saddr6(dst6), .sdata6(res6),
    .h_vwe, .h_vaddr, .h_vwdata, .h_vrdata, .h_swe, .h_saddr, .h_swdata, .h_srdata,
    .perm, .upd_flag
  );

  // ---------------------------------------------------------------- vector path
  logic    v2, v3;
  mat_t    opa, opb;
  vctl_t   ctl2, ctl3;
  accvec_t acc;

  pe2_pre u_pe2 (
    .clk, .rst_n, .in_valid(vec_issue), .cfg(c2), .ctl_in(ctl_issue),
    .mat_a, .mat_b, .ra_lo(ra[1:0]), .rb_lo(rb[1:0]), .perm, .scalar(scal_pe2),
    .out_valid(v2), .opa, .opb, .ctl_out(ctl2)
  );

  pe3_cmac u_pe3 (
    .clk, .rst_n, .in_valid(v2), .opa, .opb, .ctl_in(ctl2),
    .out_valid(v3), .acc, .ctl_out(ctl3)
  );

  pe4_post u_pe4 (
    .in_valid(v3), .acc, .ctl(ctl3), .perm_old(perm),
    .vwe, .vaddr, .vwmask, .vdata, .swe(swe4), .saddr(saddr4), .sdata(sdata4),
    .pwe, .perm_new, .upd_new
  );

  assign pipe_busy = v2 || v3;

  // ---------------------------------------------------------------- accelerators
  pe5_divsqrt u_pe5 (
    .clk, .rst_n, .start(pe5_start), .cfg(c5), .a(sa5_q), .b(sb5_q),
    .busy(pe5_busy), .we1(we5a), .dst1(dst5a), .res1(res5a),
    .we2(we5b), .dst2(dst5b), .res2(res5b)
  );

  pe6_cordic u_pe6 (
    .clk, .rst_n, .start(pe6_start), .cfg(c6), .a(sa6_q), .b(sb6_q),
    .busy(pe6_busy), .we(we6), .dst(dst6), .res(res6)
  );

  // host access only while idle
  a_host_idle: assert property (@(posedge clk) disable iff (!rst_n)
    (h_vwe || h_swe || imem_we || cfg_we) |-> !busy);

endmodule
