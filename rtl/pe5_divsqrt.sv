// pe5_divsqrt: division / square-root accelerator (PE5).
//
// Works on the real parts of complex scalar registers in Q3.13 and writes
// complex scalars with zero imaginary part.
//   DS_SQRTINV  res1 = sqrt(a)          (Q3.13, rounded down)
//               res2 = 1 / sqrt(a)      (ofrac fraction bits, rounded down,
//                                        saturated to 16 bits)
//   DS_DIV      res1 = a / b            (ofrac fraction bits, rounded toward
//                                        zero, saturated to 16 bits)
// The square root is a restoring digit-by-digit root of a * 2^13, one result
// bit per cycle (16 cycles). Division is restoring long division of a
// 32-bit dividend, one quotient bit per cycle (32 cycles). a <= 0 in
// DS_SQRTINV gives res1 = 0 and res2 = max; b = 0 in DS_DIV gives +/- max.
// The processor description names the unit and its use (division and square
// root, e.g. for normalising Gram-Schmidt columns and forming Givens
// coefficients); the algorithms, formats and latencies are this design's.
//
// Interface: start (one cycle, ignored while busy) latches cfg, a and b.
// busy is high from the cycle after start until the results are written.
// Latency: SQRTINV 50 cycles, DIV 33 cycles from start to the write cycle
// (we1/we2 high for one cycle, with dst1/dst2 from cfg).
module pe5_divsqrt
  import sqrd_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  pe5_cfg_t   cfg,
  input  cplx_t      a,
  input  cplx_t      b,
  output logic       busy,
  output logic       we1,
  output logic [3:0] dst1,
  output cplx_t      res1,
  output logic       we2,
  output logic [3:0] dst2,
  output cplx_t      res2
);
  typedef enum logic [2:0] {S_IDLE, S_SQRT, S_PREP, S_DIV, S_DONE} state_e;
  state_e    st;
  pe5_cfg_t  c;
  logic [5:0]  cnt;
  logic [31:0] rad;      // sqrt radicand, shifted out two bits per step
  logic [23:0] srem;     // sqrt remainder
  logic [15:0] root;
  logic [31:0] dvd;      // dividend, shifted out one bit per step
  logic [31:0] dvs;      // divisor
  logic [32:0] drem;
  logic [31:0] quo;
  logic        neg;      // sign of the quotient
  logic        zero_in;  // degenerate operand

  function automatic logic [15:0] absval(logic signed [15:0] x);
    return x[15] ? 16'(-x) : 16'(x);
  endfunction

  // one restoring square-root step
  logic [23:0] s_trial, s_rem2;
  always_comb begin
    s_rem2  = {srem[21:0], rad[31:30]};
    s_trial = {6'd0, root, 2'b01};
  end
  // one restoring division step
  logic [32:0] d_rem2;
  always_comb d_rem2 = {drem[31:0], dvd[31]};

  logic signed [16:0] qsat;
  always_comb begin
    if (zero_in || quo > 32'd32767) qsat = 17'sd32767;
    else                           qsat = 17'(signed'({1'b0, quo[15:0]}));
    if (neg) qsat = -qsat;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; c <= '0; cnt <= '0; rad <= '0; srem <= '0; root <= '0;
      dvd <= '0; dvs <= '0; drem <= '0; quo <= '0; neg <= 1'b0; zero_in <= 1'b0;
    end else begin
      unique case (st)
        S_IDLE: if (start) begin
          c <= cfg;
          cnt <= '0;
          srem <= '0; root <= '0; drem <= '0; quo <= '0;
          if (cfg.mode == DS_DIV) begin
            dvd <= 32'(absval(a.re)) << cfg.ofrac;
            dvs <= 32'(absval(b.re));
            neg <= a.re[15] ^ b.re[15];
            zero_in <= (b.re == 0);
            st <= S_DIV;
          end else begin
            rad <= 32'(a.re[15] ? 16'd0 : 16'(a.re)) << FRAC;
            neg <= 1'b0;
            zero_in <= (a.re[15] || a.re == 0);
            st <= S_SQRT;
          end
        end
        S_SQRT: begin
          if (s_rem2 >= s_trial) begin
            srem <= s_rem2 - s_trial;
            root <= {root[14:0], 1'b1};
          end else begin
            srem <= s_rem2;
            root <= {root[14:0], 1'b0};
          end
          rad <= rad << 2;
          cnt <= cnt + 6'd1;
          if (cnt == 6'd15) st <= S_PREP;
        end
        S_PREP: begin      // reciprocal of the root: 2^(13+ofrac) / root
          cnt <= '0;
          dvd <= 32'd1 << (FRAC + int'(c.ofrac));
          dvs <= 32'(root);
          if (root == 0) zero_in <= 1'b1;
          st  <= S_DIV;
        end
        S_DIV: begin
          if (d_rem2 >= {1'b0, dvs}) begin
            drem <= d_rem2 - {1'b0, dvs};
            quo  <= {quo[30:0], 1'b1};
          end else begin
            drem <= d_rem2;
            quo  <= {quo[30:0], 1'b0};
          end
          dvd <= dvd << 1;
          cnt <= cnt + 6'd1;
          if (cnt == 6'd31) st <= S_DONE;
        end
        default: st <= S_IDLE;   // S_DONE: results written this cycle
      endcase
    end
  end

  assign busy = (st != S_IDLE);
  always_comb begin
    we1  = (st == S_DONE);
    we2  = (st == S_DONE) && (c.mode == DS_SQRTINV);
    dst1 = c.dst1;
    dst2 = c.dst2;
    res1 = '0;
    res2 = '0;
    if (c.mode == DS_SQRTINV) begin
      res1.re = signed'(root);
      res2.re = qsat[15:0];
    end else begin
      res1.re = qsat[15:0];
    end
  end
endmodule
