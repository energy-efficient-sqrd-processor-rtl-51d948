// tb_pe6_cordic: self-checking test of the CORDIC accelerator (PE6).
//
// Random complex operands in all four quadrants. Vectoring results are
// compared with sqrt(x^2 + y^2) and atan2(y, x), rotation results with
// (x + jy) * exp(j theta) for random theta in [-pi, pi], all computed in
// real arithmetic here, within 4 LSB (16 iterations of a 16-bit CORDIC).
// Checks the 17-cycle latency, busy, and the destination address.
module tb_pe6_cordic;
  import sqrd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       start, busy, we;
  pe6_cfg_t   cfg;
  cplx_t      a, b, res;
  logic [3:0] dst;

  pe6_cordic dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic real absr(real x); return x < 0 ? -x : x; endfunction

  task automatic run_op(crmode_e m, int xr, int xi, int th);
    int lat;
    real x, y, t, er, ei;
    @(negedge clk);
    cfg = '0; cfg.mode = m; cfg.dst = 4'($urandom);
    a.re = 16'(xr); a.im = 16'(xi); b.re = 16'(th); b.im = '0;
    start = 1;
    @(negedge clk);
    start = 0;
    lat = 1;
    check(busy, "busy");
    while (!we) begin @(negedge clk); lat++; end
    check(lat == 17, $sformatf("latency %0d", lat));
    check(dst == cfg.dst, "dst");
    x = real'(xr); y = real'(xi); t = real'(th) / 8192.0;
    if (m == CR_VECTOR) begin
      er = $sqrt(x * x + y * y);
      ei = $atan2(y, x) * 8192.0;
      // angle near +/-pi may come out with either sign
      if (absr(absr(ei) - 25736.0) < 8 && absr(absr(real'(res.im)) - 25736.0) < 8) ei = real'(res.im);
    end else begin
      er = x * $cos(t) - y * $sin(t);
      ei = x * $sin(t) + y * $cos(t);
    end
    check(absr(real'(res.re) - er) <= 4.0 && absr(real'(res.im) - ei) <= 4.0,
          $sformatf("mode %0d (%0d,%0d) th %0d -> (%0d,%0d) exp (%f,%f)", m, xr, xi, th, int'(res.re), int'(res.im), er, ei));
    @(negedge clk);
    check(!busy, "idle");
  endtask

  initial begin
    start = 0; cfg = '0; a = '0; b = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_op(CR_VECTOR, 8192, 0, 0);
    run_op(CR_VECTOR, -8192, 0, 0);
    run_op(CR_VECTOR, 0, -8192, 0);
    for (int t = 0; t < 300; t++) begin
      int xr, xi;
      xr = $urandom_range(0, 23000) - 11500;     // |a| < 2 keeps |a| * 1 in range
      xi = $urandom_range(0, 23000) - 11500;
      if (t % 2 == 0) run_op(CR_VECTOR, xr, xi, 0);
      else            run_op(CR_ROTATE, xr, xi, $urandom_range(0, 51472) - 25736);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
