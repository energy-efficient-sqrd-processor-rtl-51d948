// tb_pe5_divsqrt: self-checking test of the DIV/SQRT accelerator (PE5).
//
// Random operands for both modes. Expected values come from real-valued
// arithmetic here: z = floor(sqrt(a) * 2^13) and floor(2^(13+ofrac) / z)
// for DS_SQRTINV, a / b * 2^ofrac rounded toward zero for DS_DIV, all
// saturated to 16 bits, and compared exactly. Checks
// the fixed latencies (50 and 33 cycles from start to the write cycle), the
// busy flag, destination addresses and that a start during busy is ignored.
module tb_pe5_divsqrt;
  import sqrd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       start, busy, we1, we2;
  pe5_cfg_t   cfg;
  cplx_t      a, b, res1, res2;
  logic [3:0] dst1, dst2;

  pe5_divsqrt dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic run_op(dsmode_e m, int av, int bv, int of, int exp_lat);
    int lat;
    @(negedge clk);
    cfg = '0; cfg.mode = m; cfg.ofrac = 5'(of);
    cfg.dst1 = 4'($urandom); cfg.dst2 = 4'($urandom);
    a = '0; b = '0; a.re = 16'(av); b.re = 16'(bv);
    start = 1;
    @(negedge clk);
    start = 0;
    check(busy, "busy after start");
    lat = 1;
    // a second start while busy must be ignored
    start = 1; a.re = 16'sd1;
    @(negedge clk);
    start = 0;
    lat++;
    while (!we1) begin @(negedge clk); lat++; end
    check(lat == exp_lat, $sformatf("latency %0d exp %0d", lat, exp_lat));
    check(dst1 == cfg.dst1, "dst1");
    if (m == DS_SQRTINV) begin
      real x = real'(av) / 8192.0;
      int ez, ei;
      ez = (av <= 0) ? 0 : int'($floor($sqrt(x) * 8192.0));
      // reciprocal of the rounded-down root, as the unit defines it
      ei = (ez == 0) ? 32767 : int'($floor((2.0 ** (13 + of)) / real'(ez)));
      if (ei > 32767) ei = 32767;
      check(we2 && dst2 == cfg.dst2, "second result write");
      check(int'(res1.re) == ez && res1.im == 0, $sformatf("sqrt(%0d) = %0d exp %0d", av, res1.re, ez));
      check(int'(res2.re) == ei && res2.im == 0,
            $sformatf("1/sqrt(%0d) = %0d exp %0d", av, res2.re, ei));
    end else begin
      int q;
      if (bv == 0) q = 32767;
      else begin
        real r = (real'(av) / real'(bv)) * (2.0 ** of);
        q = (r < 0) ? -int'($floor(-r)) : int'($floor(r));
        if (q > 32767) q = 32767;
        if (q < -32767) q = -32767;
      end
      if (bv == 0 && av < 0) q = -32767;
      check(!we2, "no second write in DIV");
      check(int'(res1.re) == q, $sformatf("%0d / %0d = %0d exp %0d", av, bv, res1.re, q));
    end
    @(negedge clk);
    check(!busy, "idle after write");
  endtask

  initial begin
    start = 0; cfg = '0; a = '0; b = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_op(DS_SQRTINV, 8192, 0, 11, 50);      // sqrt(1) = 1
    run_op(DS_SQRTINV, 0, 0, 11, 50);
    run_op(DS_SQRTINV, 32767, 0, 11, 50);
    run_op(DS_DIV, 8192, 0, 13, 33);          // divide by zero
    for (int t = 0; t < 150; t++)
      run_op(DS_SQRTINV, $urandom_range(1, 32767), 0, $urandom_range(8, 14), 50);
    for (int t = 0; t < 150; t++)
      run_op(DS_DIV, $urandom_range(0, 65534) - 32767, $urandom_range(1, 65534) - 32767,
             $urandom_range(8, 14), 33);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
