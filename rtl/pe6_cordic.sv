// pe6_cordic: CORDIC accelerator (PE6).
//
// Iterative radix-2 CORDIC on one complex Q3.13 scalar, one micro-rotation
// per clock cycle, 16 iterations, gain compensated at the end.
//   CR_VECTOR  res = { |a| , angle(a) }   magnitude in the real part, phase
//              in radians (Q3.13, range -pi..pi) in the imaginary part
//   CR_ROTATE  res = a * exp(j * b.re)     b.re is an angle in radians (Q3.13,
//              |b.re| <= pi)
// Operands outside the CORDIC convergence range (|angle| > pi/2) are first
// turned by pi. Arithmetic uses 24-bit x/y/z registers so
// the CORDIC gain of 1.647 cannot overflow, with 6 guard bits below the
// Q3.13 point (angles in 2^-19 rad); results are multiplied by 1/1.647
// (0.6072529, 39797 / 2^16), rounded to nearest and saturated to 16 bits.
// Micro-rotation angles: atan(2^-i) * 2^19, i = 0..15, rounded.
// The processor description names a CORDIC unit among the accelerators and
// its usual role of generating Givens rotations; the modes, iteration count
// and widths are this design's choices.
//
// Interface: start (ignored while busy) latches cfg, a and b; busy is high
// from the next cycle until the result is written. Latency 17 cycles from
// start to the write cycle (we high for one cycle, dst from cfg).
module pe6_cordic
  import sqrd_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  pe6_cfg_t   cfg,
  input  cplx_t      a,
  input  cplx_t      b,
  output logic       busy,
  output logic       we,
  output logic [3:0] dst,
  output cplx_t      res
);
  localparam int XW = 24;
  localparam int G  = 6;                                   // guard bits
  localparam logic signed [XW-1:0] PI      = 24'sd1647099; // pi * 2^19
  localparam logic signed [XW-1:0] HALF_PI = 24'sd823550;
  localparam logic signed [XW-1:0] KINV    = 24'sd39797;   // 2^16 / 1.6467602

  // atan(2^-i) * 2^19, i = 0..15, rounded
  function automatic logic signed [XW-1:0] atan_tab(logic [3:0] i);
    unique case (i)
      4'd0:  return 24'sd411775;
      4'd1:  return 24'sd243085;
      4'd2:  return 24'sd128439;
      4'd3:  return 24'sd65198;
      4'd4:  return 24'sd32725;
      4'd5:  return 24'sd16379;
      4'd6:  return 24'sd8191;
      4'd7:  return 24'sd4096;
      4'd8:  return 24'sd2048;
      4'd9:  return 24'sd1024;
      4'd10: return 24'sd512;
      4'd11: return 24'sd256;
      4'd12: return 24'sd128;
      4'd13: return 24'sd64;
      4'd14: return 24'sd32;
      default: return 24'sd16;
    endcase
  endfunction

  function automatic logic signed [DW-1:0] sat16(logic signed [XW+17:0] v);
    if (v > 32767)       return 16'sh7fff;
    else if (v < -32768) return 16'sh8000;
    else                 return v[DW-1:0];
  endfunction

  typedef enum logic [1:0] {S_IDLE, S_ITER, S_DONE} state_e;
  state_e st;
  pe6_cfg_t c;
  logic [3:0] it;
  logic signed [XW-1:0] x, y, z;

  logic signed [XW-1:0] ax, ay, bz;
  always_comb begin
    ax = XW'(a.re) <<< G;
    ay = XW'(a.im) <<< G;
    bz = XW'(b.re) <<< G;
  end

  // one micro-rotation; direction from y (vectoring) or z (rotation)
  logic dir_pos;
  logic signed [XW-1:0] xs, ys;
  always_comb begin
    xs = x >>> it;
    ys = y >>> it;
    dir_pos = (c.mode == CR_VECTOR) ? (y < 0) : (z >= 0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; c <= '0; it <= '0; x <= '0; y <= '0; z <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (start) begin
          c  <= cfg;
          it <= '0;
          st <= S_ITER;
          if (cfg.mode == CR_VECTOR) begin
            if (ax < 0) begin
              x <= -ax; y <= -ay; z <= (ay >= 0) ? PI : -PI;
            end else begin
              x <= ax;  y <= ay;  z <= '0;
            end
          end else begin
            if (bz > HALF_PI) begin
              x <= -ax; y <= -ay; z <= bz - PI;
            end else if (bz < -HALF_PI) begin
              x <= -ax; y <= -ay; z <= bz + PI;
            end else begin
              x <= ax;  y <= ay;  z <= bz;
            end
          end
        end
        S_ITER: begin
          if (dir_pos) begin        // rotate counter-clockwise
            x <= x - ys;
            y <= y + xs;
            z <= z - atan_tab(it);
          end else begin            // rotate clockwise
            x <= x + ys;
            y <= y - xs;
            z <= z + atan_tab(it);
          end
          it <= it + 4'd1;
          if (it == 4'd15) st <= S_DONE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE);
  always_comb begin
    logic signed [XW+17:0] px, py;
    // gain compensation, guard bits removed, rounded to nearest
    px  = ((XW+18)'(x) * (XW+18)'(KINV) + (XW+18)'(1 <<< (15 + G))) >>> (16 + G);
    py  = ((XW+18)'(y) * (XW+18)'(KINV) + (XW+18)'(1 <<< (15 + G))) >>> (16 + G);
    we  = (st == S_DONE);
    dst = c.dst;
    if (c.mode == CR_VECTOR) begin
      res.re = sat16(px);
      res.im = sat16(((XW+18)'(z) + (XW+18)'(1 <<< (G - 1))) >>> G);
    end else begin
      res.re = sat16(px);
      res.im = sat16(py);
    end
  end
endmodule
