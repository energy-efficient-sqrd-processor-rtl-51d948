// tb_pe1_master: self-checking test of the master node (PE1).
//
// The testbench plays instruction memory and the rest of the processor: it
// answers pc with words of a small program and drives pipe_busy, pe5_busy,
// pe6_busy and the update flag. It checks the exact issue cycle of every
// instruction: back-to-back issue, sync waiting for the pipeline and
// accelerators, an accelerator instruction waiting for its busy unit,
// taken and untaken BRU/BRN, JMP, HALT draining before done, the decoded
// fields, the event flags, and restart at start_pc.
module tb_pe1_master;
  import sqrd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic           start, busy, done;
  logic [PCW-1:0] start_pc, pc;
  logic [IW-1:0]  instr;
  logic           pipe_busy, pe5_busy, pe6_busy, upd_flag;
  logic           vec_issue, pe5_start, pe6_start;
  logic [3:0]     c2_idx, c3_idx, c4_idx, ra, rb, rd, emask, acc_idx;
  events_t        ev;

  pe1_master dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  logic [31:0] prog [IMEM_WORDS];
  assign instr = prog[pc];

  function automatic logic [31:0] vi(bit s, int tag);
    return {OP_VEC, s, 4'(tag), 4'(tag + 1), 4'(tag + 2), 4'(tag + 3), 4'(tag + 4), 4'(tag + 5), 4'(tag + 6)};
  endfunction

  // simple environment: a vector op keeps pipe_busy for 2 cycles after issue,
  // a PE5 op keeps pe5_busy for 6 cycles, PE6 for 4
  int pcnt = 0, c5 = 0, c6 = 0;
  always_ff @(posedge clk) begin
    if (vec_issue) pcnt <= 2; else if (pcnt > 0) pcnt <= pcnt - 1;
    if (pe5_start) c5 <= 6; else if (c5 > 0) c5 <= c5 - 1;
    if (pe6_start) c6 <= 4; else if (c6 > 0) c6 <= c6 - 1;
  end
  assign pipe_busy = pcnt > 0;
  assign pe5_busy  = c5 > 0;
  assign pe6_busy  = c6 > 0;

  // trace of issue: cycle number at which each address issued
  int cyc = 0;
  int issued_at [IMEM_WORDS];
  int n_stall = 0, n_taken = 0, n_not = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dut.go) issued_at[pc] = cyc;
    if (ev.stall) n_stall++;
    if (ev.br_taken) n_taken++;
    if (ev.br_not_taken) n_not++;
  end

  initial begin
    for (int i = 0; i < IMEM_WORDS; i++) begin prog[i] = {OP_HALT, 1'b1, 28'd0}; issued_at[i] = -1; end
    prog[0]  = vi(0, 1);                         // issue at c
    prog[1]  = vi(0, 2);                         // c+1
    prog[2]  = vi(1, 3);                         // sync: pipe busy 2 cycles after prog[1] -> c+4
    prog[3]  = {OP_ACC, 1'b0, 1'b0, 4'd5, 23'd0}; // PE5 start, c+5
    prog[4]  = {OP_ACC, 1'b0, 1'b1, 4'd6, 23'd0}; // PE6 start, c+6 (different unit, no wait)
    prog[5]  = {OP_ACC, 1'b0, 1'b0, 4'd7, 23'd0}; // PE5 busy until c+11 -> issue c+12
    prog[6]  = {OP_BRU, 1'b1, 21'd0, 7'd20};     // sync: waits PE5 (6 cycles) -> c+19; flag 0: not taken
    prog[7]  = {OP_BRN, 1'b0, 21'd0, 7'd10};     // taken -> 10, c+20
    prog[8]  = vi(0, 9);                         // skipped
    prog[10] = {OP_JMP, 1'b0, 21'd0, 7'd12};     // c+21
    prog[12] = vi(0, 4);                         // c+22
    prog[13] = {OP_HALT, 1'b1, 28'd0};           // sync -> c+25, done visible 2 cycles later
    prog[40] = {OP_BRU, 1'b0, 21'd0, 7'd44};     // second run, flag 1: taken
    prog[44] = {OP_NOP, 1'b0, 28'd0};
    prog[45] = {OP_HALT, 1'b0, 28'd0};
    start = 0; start_pc = '0; upd_flag = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!busy && !done, "idle after reset");
    start = 1; start_pc = 0;
    @(negedge clk);
    start = 0;
    begin
      int c0;
      c0 = cyc;     // prog[0] issues in the cycle that starts at this count
      // check decoded fields while prog[0] is presented
      check(vec_issue && c2_idx == 1 && c3_idx == 2 && c4_idx == 3 && ra == 4 && rb == 5 &&
            rd == 6 && emask == 7, "vector fields");
      while (!done) @(negedge clk);
      check(issued_at[0] == c0 && issued_at[1] == c0 + 1, "back-to-back issue");
      check(issued_at[2] == c0 + 4, $sformatf("sync vector at %0d exp %0d", issued_at[2] - c0, 4));
      check(issued_at[3] == c0 + 5 && issued_at[4] == c0 + 6, "accelerator issue");
      check(issued_at[5] == c0 + 12, $sformatf("busy unit wait %0d exp 12", issued_at[5] - c0));
      check(issued_at[6] == c0 + 19, $sformatf("sync branch %0d exp 19", issued_at[6] - c0));
      check(issued_at[7] == c0 + 20 && issued_at[8] == -1, "BRN taken");
      check(issued_at[10] == c0 + 21 && issued_at[12] == c0 + 22, "JMP");
      check(issued_at[13] == c0 + 25, $sformatf("HALT sync %0d exp 25", issued_at[13] - c0));
      check(cyc == c0 + 27, $sformatf("done at %0d exp 27", cyc - c0));
      check(n_taken == 1 && n_not == 1, "branch events");
      check(n_stall == (4 - 2) + (12 - 7) + (19 - 13) + (25 - 23), $sformatf("stall cycles %0d", n_stall));
    end
    // second run from start_pc 40 with the flag set
    upd_flag = 1;
    start = 1; start_pc = 40;
    @(negedge clk);
    start = 0;
    check(busy && !done, "busy after restart");
    while (!done) @(negedge clk);
    check(issued_at[44] >= 0 && issued_at[41] == -1, "BRU taken");
    check(n_taken == 2, "taken count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
