// pe3_cmac: complex multiply-accumulate bank (PE3) of the vector block.
//
// Four homogeneous lanes of four complex multipliers each; an adder tree per
// lane adds the four products, so every lane completes one 4-element complex
// vector dot product per clock cycle and the bank completes four. The lane
// sums then close the multiply-accumulate loop through a per-lane accumulator
// register: ACC_NEW loads the dot product, ACC_ADD / ACC_SUB add it to or
// subtract it from the previous result (used for vector updates such as
// v = h - Q r). Lane count, CMAC count and single-cycle dot product follow
// the processor description; the accumulate modes and ACCW-bit accumulator
// width are this design's choices.
//
// Timing: one register stage. An operation presented with in_valid in cycle
// t appears on acc with out_valid in cycle t+1. The accumulator only changes
// on valid operations, so an accumulate chain may be interrupted by stalls.
module pe3_cmac
  import sqrd_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  mat_t    opa,        // opa[l] = A operand of lane l
  input  mat_t    opb,
  input  vctl_t   ctl_in,     // ctl_in.c3 selects the accumulate mode
  output logic    out_valid,
  output accvec_t acc,
  output vctl_t   ctl_out
);
  accvec_t dot, nxt;

  for (genvar l = 0; l < N; l++) begin : g_lane
    pe3_lane u_lane (.a(opa[l]), .b(opb[l]), .dot(dot[l]));
  end

  always_comb begin
    for (int l = 0; l < N; l++) begin
      unique case (ctl_in.c3.mode)
        ACC_ADD: begin
          nxt[l].re = acc[l].re + dot[l].re;
          nxt[l].im = acc[l].im + dot[l].im;
        end
        ACC_SUB: begin
          nxt[l].re = acc[l].re - dot[l].re;
          nxt[l].im = acc[l].im - dot[l].im;
        end
        default: nxt[l] = dot[l];
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      acc       <= '0;
      ctl_out   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        acc     <= nxt;
        ctl_out <= ctl_in;
      end
    end
  end
endmodule
