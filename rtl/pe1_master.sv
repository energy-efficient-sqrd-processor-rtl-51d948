// pe1_master: master node (PE1) of the SQRD vector processor.
//
// A small in-order controller that walks the program in the instruction
// memory ME1 and, every cycle, selects the configuration of each processing
// element for the operation it issues:
//   OP_VEC   issue one vector operation to PE2 -> PE3 -> PE4 (configuration
//            indices for the three PEs, register addresses ra/rb/rd and an
//            element mask travel with it)
//   OP_ACC   start PE5 (DIV/SQRT) or PE6 (CORDIC) with a configuration index
//   OP_BRU / OP_BRN   branch if the QR-update condition flag is set / clear;
//            this is the run-time switch between the QR-update and the
//            brute-force decomposition
//   OP_JMP, OP_NOP, OP_HALT
// Any instruction with its sync bit set waits until every issued operation
// has retired (vector pipeline empty and both accelerators idle); an OP_ACC
// also waits while its accelerator is busy. There is no other interlock:
// programs place sync where a result is consumed, and fill the pipeline
// latency with independent work where they can.
//
// The master node, its FSM and its use of the instruction memory and
// configuration memories come from the processor description; the
// instruction set, sync rule and branch-on-flag mechanism are this design's.
//
// Timing: the instruction at pc is read combinationally and issued in the
// same cycle. start (in IDLE or DONE) loads pc with start_pc. HALT waits for
// all operations to retire, then done stays high until the next start.
module pe1_master
  import sqrd_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [PCW-1:0] start_pc,
  output logic [PCW-1:0] pc,
  input  logic [IW-1:0]  instr,
  input  logic           pipe_busy,
  input  logic           pe5_busy,
  input  logic           pe6_busy,
  input  logic           upd_flag,
  // vector issue
  output logic           vec_issue,
  output logic [3:0]     c2_idx,
  output logic [3:0]     c3_idx,
  output logic [3:0]     c4_idx,
  output logic [3:0]     ra,
  output logic [3:0]     rb,
  output logic [3:0]     rd,
  output logic [3:0]     emask,
  // accelerator issue
  output logic           pe5_start,
  output logic           pe6_start,
  output logic [3:0]     acc_idx,
  // status
  output logic           busy,
  output logic           done,
  output events_t        ev
);
  typedef enum logic [1:0] {M_IDLE, M_RUN, M_DRAIN, M_DONE} mstate_e;
  mstate_e st;

  opcode_e op;
  logic    sync, all_idle, unit_busy, stall, go;
  logic    taken;

  always_comb begin
    op        = opcode_e'(instr[31:29]);
    sync      = instr[28];
    c2_idx    = instr[27:24];
    c3_idx    = instr[23:20];
    c4_idx    = instr[19:16];
    ra        = instr[15:12];
    rb        = instr[11:8];
    rd        = instr[7:4];
    emask     = instr[3:0];
    acc_idx   = instr[26:23];
    all_idle  = !pipe_busy && !pe5_busy && !pe6_busy;
    unit_busy = (op == OP_ACC) && (instr[27] ? pe6_busy : pe5_busy);
    stall     = (st == M_RUN) && ((sync && !all_idle) || unit_busy);
    go        = (st == M_RUN) && !stall;
    vec_issue = go && (op == OP_VEC);
    pe5_start = go && (op == OP_ACC) && !instr[27];
    pe6_start = go && (op == OP_ACC) &&  instr[27];
    taken     = (op == OP_JMP) || (op == OP_BRU && upd_flag) || (op == OP_BRN && !upd_flag);
    busy      = (st == M_RUN) || (st == M_DRAIN);
    done      = (st == M_DONE);
    ev.vec_issue    = vec_issue;
    ev.acc5_issue   = pe5_start;
    ev.acc6_issue   = pe6_start;
    ev.stall        = stall;
    ev.br_taken     = go && (op == OP_BRU || op == OP_BRN) && taken;
    ev.br_not_taken = go && (op == OP_BRU || op == OP_BRN) && !taken;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= M_IDLE;
      pc <= '0;
    end else begin
      unique case (st)
        M_IDLE, M_DONE: if (start) begin
          pc <= start_pc;
          st <= M_RUN;
        end
        M_RUN: if (go) begin
          if (op == OP_HALT) st <= M_DRAIN;
          else if (taken)    pc <= instr[PCW-1:0];
          else               pc <= pc + 1'b1;
        end
        default: if (all_idle) st <= M_DONE;   // M_DRAIN
      endcase
    end
  end

endmodule
