// sqrd_pkg: types, constants and configuration formats shared by the SQRD
// vector processor.
//
// Number format: every data word is a complex number of two 16-bit two's
// complement halves in Q3.13 (range [-4, 4), 13 fraction bits). The 16-bit
// width and the 4x4 matrix size follow the processor description; the Q3.13
// split, the accumulator width and all configuration/instruction encodings
// are this design's own choices.
//
// Instruction word (32 bits, 128 words fill the 4 Kbit instruction memory):
//   [31:29] opcode  [28] sync (wait until every issued operation has retired)
//   OP_VEC : [27:24] PE2 cfg  [23:20] PE3 cfg  [19:16] PE4 cfg
//            [15:12] ra  [11:8] rb  [7:4] rd  [3:0] element mask
//   OP_ACC : [27] unit (0 = PE5 DIV/SQRT, 1 = PE6 CORDIC)  [26:23] cfg index
//   OP_BRU / OP_BRN / OP_JMP : [6:0] target address
package sqrd_pkg;

  localparam int DW        = 16;   // data word width (each of re / im)
  localparam int FRAC      = 13;   // fraction bits of the Q3.13 format
  localparam int N         = 4;    // vector length = lanes = MIMO order
  localparam int NVREG     = 16;   // vector registers in ME2
  localparam int NSREG     = 16;   // scalar registers in ME2
  localparam int CFG_DEPTH = 16;   // configurations per configuration memory
  localparam int IW        = 32;   // instruction width
  localparam int IMEM_WORDS = 128; // 128 x 32 bit = 4 Kbit
  localparam int PCW       = $clog2(IMEM_WORDS);
  localparam int ACCW      = 40;   // PE3 accumulator width per re / im
  localparam int CFGW      = 32;   // width of a configuration word

  localparam logic signed [DW-1:0] ONE = 16'sd8192;  // 1.0 in Q3.13

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  typedef cplx_t [N-1:0] vec_t;     // one vector register (element 0 = bits [31:0])
  typedef vec_t  [N-1:0] mat_t;     // four vectors (an aligned register group, or lane operands)

  typedef struct packed {
    logic signed [ACCW-1:0] re;
    logic signed [ACCW-1:0] im;
  } cacc_t;
  typedef cacc_t [N-1:0] accvec_t;

  typedef logic [1:0] idx_t;        // element / column index 0..3
  typedef idx_t [N-1:0] perm_t;     // perm[p] = original column placed at position p

  // ---------------------------------------------------------------- opcodes
  typedef enum logic [2:0] {
    OP_NOP  = 3'd0,
    OP_VEC  = 3'd1,
    OP_ACC  = 3'd2,
    OP_BRU  = 3'd3,   // branch if the QR-update condition holds
    OP_BRN  = 3'd4,   // branch if it does not
    OP_JMP  = 3'd5,
    OP_HALT = 3'd6
  } opcode_e;

  // ---------------------------------------------------------------- PE2
  typedef enum logic [1:0] {
    A_ROWS  = 2'd0,   // lane l gets vector l of the A group
    A_TRANS = 2'd1,   // lane l gets element l of every vector of the A group
    A_DIAG  = 2'd2,   // lane l gets element l of vector ra only (element-wise ops)
    A_IDENT = 2'd3    // lane l gets unit vector e_l
  } amode_e;

  typedef enum logic [1:0] {
    B_BCAST  = 2'd0,  // every lane gets vector rb, elements routed by bxsel
    B_ROWS   = 2'd1,  // lane l gets vector l of the B group
    B_SCALAR = 2'd2,  // every element is scalar register ssel
    B_ONE    = 2'd3   // every element is 1.0
  } bmode_e;

  typedef struct packed {
    amode_e     amode;
    logic       aconj;
    logic       aperm;     // read A group columns through the permutation register
    logic [3:0] akill;     // A elements forced to zero
    bmode_e     bmode;
    logic       bconj;
    logic       bperm;
    logic [3:0] bkill;
    logic [3:0] bneg;      // B elements negated
    idx_t [N-1:0] bxsel;   // broadcast crossbar: element k takes element bxsel[k]
    logic [3:0] ssel;      // scalar register for B_SCALAR
  } pe2_cfg_t;             // 32 bits

  // ---------------------------------------------------------------- PE3
  typedef enum logic [1:0] {
    ACC_NEW = 2'd0,   // acc = dot
    ACC_ADD = 2'd1,   // acc = acc + dot
    ACC_SUB = 2'd2    // acc = acc - dot
  } accmode_e;

  typedef struct packed {
    logic [29:0] rsvd;
    accmode_e    mode;
  } pe3_cfg_t;

  // ---------------------------------------------------------------- PE4
  typedef enum logic [1:0] {
    SORT_NONE    = 2'd0,
    SORT_PRECISE = 2'd1,  // all four columns by energy
    SORT_GROUP   = 2'd2,  // groups {0,1} / {2,3} by total energy, then within group
    SORT_FIXED   = 2'd3   // {2,3} left, {0,1} right, sorted within group
  } sortmode_e;

  typedef enum logic [1:0] {
    MASK_NONE  = 2'd0,    // element mask ignored
    MASK_WRITE = 2'd1,    // element mask = per-element write enable
    MASK_ZERO  = 2'd2     // element mask = elements kept, others written as zero
  } maskmode_e;

  typedef struct packed {
    logic [12:0] rsvd;
    logic [4:0]  shift;   // arithmetic right shift of the accumulator
    logic        vwen;    // write vector register rd
    maskmode_e   mmode;
    logic        swen;    // write one element to a scalar register
    idx_t        selem;
    logic [3:0]  sdst;
    sortmode_e   sort;
    logic [1:0]  rsvd2;
  } pe4_cfg_t;

  // ---------------------------------------------------------------- PE5
  typedef enum logic [1:0] {
    DS_SQRTINV = 2'd0,    // dst1 = sqrt(a), dst2 = 1/sqrt(a)
    DS_DIV     = 2'd1     // dst1 = a / b
  } dsmode_e;

  typedef struct packed {
    logic [8:0]  rsvd;
    dsmode_e     mode;
    logic [3:0]  srca;
    logic [3:0]  srcb;
    logic [3:0]  dst1;
    logic [3:0]  dst2;
    logic [4:0]  ofrac;   // fraction bits of the reciprocal / quotient
  } pe5_cfg_t;

  // ---------------------------------------------------------------- PE6
  typedef enum logic [1:0] {
    CR_VECTOR = 2'd0,     // dst = {|a|, angle(a)}
    CR_ROTATE = 2'd1      // dst = a * exp(j * b.re)
  } crmode_e;

  typedef struct packed {
    logic [17:0] rsvd;
    crmode_e     mode;
    logic [3:0]  srca;
    logic [3:0]  srcb;
    logic [3:0]  dst;
  } pe6_cfg_t;

  // control that travels with a vector operation through PE2 -> PE3 -> PE4
  typedef struct packed {
    pe3_cfg_t   c3;
    pe4_cfg_t   c4;
    logic [3:0] rd;
    logic [3:0] emask;
  } vctl_t;

  // configuration memory selector of the host load port
  typedef enum logic [2:0] {
    CSEL_PE2 = 3'd2,
    CSEL_PE3 = 3'd3,
    CSEL_PE4 = 3'd4,
    CSEL_PE5 = 3'd5,
    CSEL_PE6 = 3'd6
  } cfgsel_e;

  // one-cycle event flags for monitoring
  typedef struct packed {
    logic vec_issue;
    logic acc5_issue;
    logic acc6_issue;
    logic stall;
    logic br_taken;
    logic br_not_taken;
  } events_t;

endpackage
