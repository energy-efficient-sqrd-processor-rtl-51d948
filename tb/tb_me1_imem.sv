// tb_me1_imem: self-checking test of the instruction memory (ME1).
//
// Fills all 128 words, then random writes and reads
// against a shadow array: a written entry is readable in the next cycle, a
// read of another word in the write cycle returns its old value, and every
// word of the 128 (4 Kbit) can be selected.
module tb_me1_imem;
  logic clk = 1'b0;
  logic rst_n = 1'b0;   // no reset port; kept for the common sequence
  always #5 clk = ~clk;

  logic        we;
  logic [6:0]  waddr, raddr;
  logic [31:0] wdata, rdata;

  me1_imem dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  logic [31:0] shadow [128];

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 128; i++) begin
      @(negedge clk);
      we = 1; waddr = 7'(i); wdata = $urandom; shadow[i] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < 128; i++) begin raddr = 7'(i); #1 check(rdata == shadow[i], "fill"); end
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      we = $urandom; waddr = 7'($urandom); wdata = $urandom; raddr = 7'($urandom);
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
