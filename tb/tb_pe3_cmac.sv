// tb_pe3_cmac: self-checking test of the CMAC bank (PE3).
//
// Drives random 4x4 complex operand sets, one per cycle back to back, with
// random accumulate modes, and compares every lane accumulator with a model
// computed here from integer arithmetic. Checks the one-cycle latency
// (result of the operation presented in cycle t is on acc in t+1, with
// out_valid), the throughput of four dot products per cycle, that the
// accumulator holds across idle cycles, and that control passes through.
module tb_pe3_cmac;
  import sqrd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic    in_valid, out_valid;
  mat_t    opa, opb;
  vctl_t   ctl_in, ctl_out;
  accvec_t acc;

  pe3_cmac dut (.*);

  int checks = 0, failures = 0;
  longint mre [N], mim [N];     // model accumulators

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic logic signed [DW-1:0] r16();
    return 16'($urandom);
  endfunction

  initial begin
    in_valid = 0; opa = '0; opb = '0; ctl_in = '0;
    for (int l = 0; l < N; l++) begin mre[l] = 0; mim[l] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      accmode_e m;
      bit idle;
      idle = ($urandom_range(0, 7) == 0);
      @(negedge clk);
      if (idle) begin
        in_valid = 0;
      end else begin
        in_valid = 1;
        m = accmode_e'($urandom_range(0, 2));
        ctl_in = '0;
        ctl_in.c3.mode = m;
        ctl_in.rd = 4'($urandom);
        for (int l = 0; l < N; l++) begin
          longint dre, dim;
          dre = 0; dim = 0;
          for (int k = 0; k < N; k++) begin
            // large values sometimes, to cover full-scale products
            opa[l][k].re = r16(); opa[l][k].im = r16();
            opb[l][k].re = r16(); opb[l][k].im = r16();
            dre += longint'(opa[l][k].re) * opb[l][k].re - longint'(opa[l][k].im) * opb[l][k].im;
            dim += longint'(opa[l][k].re) * opb[l][k].im + longint'(opa[l][k].im) * opb[l][k].re;
          end
          case (m)
            ACC_ADD: begin mre[l] += dre; mim[l] += dim; end
            ACC_SUB: begin mre[l] -= dre; mim[l] -= dim; end
            default: begin mre[l] = dre; mim[l] = dim; end
          endcase
        end
      end
      @(posedge clk); #1;
      // one cycle after presenting: result must be there
      check(out_valid == !idle, "out_valid latency");
      for (int l = 0; l < N; l++) begin
        check(acc[l].re == ACCW'(mre[l]) && acc[l].im == ACCW'(mim[l]),
              $sformatf("t=%0d lane %0d acc mismatch", t, l));
      end
      if (!idle) check(ctl_out == ctl_in, "control pass-through");
    end
    @(negedge clk); in_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
