// tb_cfg_mem: self-checking test of a configuration memory.
//
// Checks the reset contents (all zero), then random writes and reads
// against a shadow array: a written entry is readable in the next cycle, a
// read of another entry in the write cycle returns its old value, and every
// entry of the 16 can be selected.
module tb_cfg_mem;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        we;
  logic [3:0]  waddr, raddr;
  logic [31:0] wdata, rdata;

  cfg_mem dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  logic [31:0] shadow [16];

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int i = 0; i < 16; i++) shadow[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) begin raddr = 4'(i); #1 check(rdata == 0, "reset value"); end
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      we = $urandom; waddr = 4'($urandom); wdata = $urandom; raddr = 4'($urandom);
      #1 check(rdata == shadow[raddr], $sformatf("read %0d", raddr));
      if (we) shadow[waddr] = wdata;
      @(posedge clk); #1;
      check(rdata == shadow[raddr], "read after write edge");
    end
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
