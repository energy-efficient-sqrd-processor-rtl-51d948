// tb_me2_regbank: self-checking test of the register bank (ME2).
//
// Keeps a shadow copy of all vector and scalar registers, the permutation
// and the flag, applies random writes from every port (host, PE4 with
// per-element enables, PE5 x2, PE6) each cycle, and compares all read ports
// (group reads for PE2, scalar reads, host reads) with the shadow. Checks
// the reset values (zeros, identity permutation) and the write priority
// host < PE4 < PE5a < PE5b < PE6 on equal scalar addresses.
module tb_me2_regbank;
  import sqrd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] ra, rb, ssel_pe2, sa5, sb5, sa6, sb6;
  mat_t       mat_a, mat_b;
  cplx_t      scal_pe2, sa5_q, sb5_q, sa6_q, sb6_q;
  logic       vwe, swe4, pwe, upd_in, swe5a, swe5b, swe6, h_vwe, h_swe, upd_flag;
  logic [3:0] vaddr, saddr4, saddr5a, saddr5b, saddr6, h_vaddr, h_saddr;
  logic [N-1:0] vwmask;
  vec_t       vdata, h_vwdata, h_vrdata;
  cplx_t      sdata4, sdata5a, sdata5b, sdata6, h_swdata, h_srdata;
  perm_t      perm_in, perm;

  me2_regbank dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  vec_t  sv [16];
  cplx_t ss [16];
  perm_t sp;
  logic  sf;

  task automatic check_reads();
    for (int i = 0; i < 4; i++) begin
      check(mat_a[i] == sv[{ra[3:2], 2'(i)}], "mat_a");
      check(mat_b[i] == sv[{rb[3:2], 2'(i)}], "mat_b");
    end
    check(scal_pe2 == ss[ssel_pe2] && sa5_q == ss[sa5] && sb5_q == ss[sb5] &&
          sa6_q == ss[sa6] && sb6_q == ss[sb6], "scalar reads");
    check(h_vrdata == sv[h_vaddr] && h_srdata == ss[h_saddr], "host reads");
    check(perm == sp && upd_flag == sf, "perm / flag");
  endtask

  task automatic randomize_reads();
    ra = 4'($urandom); rb = 4'($urandom); ssel_pe2 = 4'($urandom);
    sa5 = 4'($urandom); sb5 = 4'($urandom); sa6 = 4'($urandom); sb6 = 4'($urandom);
    h_vaddr = 4'($urandom); h_saddr = 4'($urandom);
  endtask

  initial begin
    {vwe, swe4, pwe, upd_in, swe5a, swe5b, swe6, h_vwe, h_swe} = '0;
    {vaddr, saddr4, saddr5a, saddr5b, saddr6} = '0;
    vwmask = '0; vdata = '0; h_vwdata = '0; sdata4 = '0; sdata5a = '0; sdata5b = '0;
    sdata6 = '0; h_swdata = '0; perm_in = '0;
    randomize_reads();
    for (int i = 0; i < 16; i++) begin sv[i] = '0; ss[i] = '0; end
    sp = {2'd3, 2'd2, 2'd1, 2'd0}; sf = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    #1 check_reads();
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      h_vwe = ($urandom_range(0, 3) == 0); h_swe = ($urandom_range(0, 3) == 0);
      vwe = $urandom; swe4 = $urandom; swe5a = $urandom; swe5b = $urandom; swe6 = $urandom;
      pwe = ($urandom_range(0, 3) == 0); upd_in = $urandom; perm_in = perm_t'($urandom);
      vaddr = 4'($urandom); vwmask = 4'($urandom); vdata = vec_t'({$urandom, $urandom, $urandom, $urandom});
      h_vwdata = vec_t'({$urandom, $urandom, $urandom, $urandom});
      // scalar addresses from a small set so collisions happen
      saddr4 = 4'($urandom_range(0, 3)); saddr5a = 4'($urandom_range(0, 3));
      saddr5b = 4'($urandom_range(0, 3)); saddr6 = 4'($urandom_range(0, 3));
      sdata4 = $urandom; sdata5a = $urandom; sdata5b = $urandom; sdata6 = $urandom; h_swdata = $urandom;
      randomize_reads();
      #1 check_reads();          // reads are combinational, before the write edge
      // shadow update in port order
      if (h_vwe) sv[h_vaddr] = h_vwdata;
      if (vwe) for (int k = 0; k < N; k++) if (vwmask[k]) sv[vaddr][k] = vdata[k];
      if (h_swe) ss[h_saddr] = h_swdata;
      if (swe4)  ss[saddr4]  = sdata4;
      if (swe5a) ss[saddr5a] = sdata5a;
      if (swe5b) ss[saddr5b] = sdata5b;
      if (swe6)  ss[saddr6]  = sdata6;
      if (pwe) begin sp = perm_in; sf = upd_in; end
      @(posedge clk); #1;
      check_reads();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
