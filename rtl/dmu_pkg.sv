// dmu_pkg: types and constants shared by the data manipulation unit (DMU).
//
// The DMU is a 64-bit barrel shifter, built from cross-point switch stages,
// that also executes pixel pack/unpack instructions.  This package holds the
// instruction encoding, the partition (SIMD element width) encoding, the
// per-half shifter control bundle and the defect-map record used to inject
// stuck-open cross-point faults in simulation.
//
// The instruction names follow the source article this design is derived from; the
// binary encodings, the operand conventions and the defect-map format are
// this design's own choices.
package dmu_pkg;

  // Data widths of the datapath: two 32-bit halves form the 64-bit word.
  localparam int unsigned WORD_W  = 32;
  localparam int unsigned DWORD_W = 64;
  // Spare switch lines per stage (RM[3:0] in the 2^0 stage drawing).
  localparam int unsigned N_SPARE = 4;
  // Cross-point stages: 5 per half (2^0..2^4) times two halves, plus 2^5.
  localparam int unsigned N_HALF_STAGES = 5;
  localparam int unsigned N_STAGES      = 2 * N_HALF_STAGES + 1;
  // Stage numbering used by the repair vector and the defect maps.
  localparam int unsigned STG_LO0 = 0;   // lower half 2^0..2^4 -> 0..4
  localparam int unsigned STG_HI0 = 5;   // upper half 2^0..2^4 -> 5..9
  localparam int unsigned STG_S32 = 10;  // 2^5 stage

  // SIMD partition: shifts never move bits across a partition border.
  typedef enum logic [1:0] {
    PART8  = 2'd0,
    PART16 = 2'd1,
    PART32 = 2'd2,
    PART64 = 2'd3
  } part_e;

  // Instruction set.
  typedef enum logic [3:0] {
    OP_SHL      = 4'd0,   // logical left shift, partitioned
    OP_SHR      = 4'd1,   // logical right shift, partitioned
    OP_SAR      = 4'd2,   // arithmetic right shift, partitioned
    OP_PACK64   = 4'd3,   // ({w1,w0} >> amt)[31:0]
    OP_PACK4B   = 4'd4,   // byte sel of w0..w3 -> one word
    OP_PACK4HW  = 4'd5,   // half-word sel of w0..w3 -> two words
    OP_PUSH24P  = 4'd6,   // four 24-bit pixels -> three words
    OP_POP24P   = 4'd7,   // three words -> four 24-bit pixels
    OP_FPACK16  = 4'd8,   // byte sel of each 16-bit unit of {w1,w0}
    OP_FPACK32  = 4'd9,   // {w1[23:0], byte sel of w0}
    OP_FPACKFIX = 4'd10,  // {half sel of w1, half sel of w0}
    OP_EXPAND   = 4'd11,  // zero-extend 8/16-bit units of w0 to twice width
    OP_EXPANDS  = 4'd12,  // sign-extend 8/16-bit units of w0 to twice width
    OP_MERGE    = 4'd13   // interleave 8/16-bit units of w0 and w1
  } op_e;

  // Control of one 2^0..2^4 shift-and-manipulation block (one 32-bit half).
  typedef struct packed {
    logic [4:0] amt;    // bit k enables the 2^k stage
    logic       left;   // 1: left shift, 0: right shift
    logic       arith;  // right shift fills with the partition MSB
    part_e      part;
  } shctl_t;

  // Control of the 2^5 stage.
  typedef struct packed {
    logic  en;
    logic  left;
    logic  arith;
    part_e part;
  } s32ctl_t;

  // Extra fixed shift paths between the 2^4 and 2^5 stages.
  typedef enum logic [1:0] {
    FP_NONE     = 2'd0,
    FP_FPACK16  = 2'd1,
    FP_FPACK32  = 2'd2,
    FP_FPACKFIX = 2'd3
  } fpsel_e;

  // Output word assembly.
  typedef enum logic [2:0] {
    OS_SHIFT  = 3'd0,  // r0,r1 = 64-bit shifter result
    OS_LO     = 3'd1,  // r0    = low word of the shifter result
    OS_EM     = 3'd2,  // r0,r1 = EXPAND/MERGE result
    OS_PACK4B = 3'd3,
    OS_PACK4H = 3'd4,
    OS_PUSH24 = 3'd5,
    OS_POP24  = 3'd6
  } osel_e;

  // Defect map of one cross-point stage: a set bit marks a stuck-open
  // switch in the primary (non-redundant) switch set.  Bit j of ipr is the
  // IPR switch of input j, bits j of rls_r/rls_b/rls_l are the RLS switches
  // of input line j towards O[j-d], O[j] and O[j+d], bit o of bso is the
  // BSO_C switch that drives fill data onto output o.  Stages narrower than
  // 64 bits use the low bits.
  typedef struct packed {
    logic [DWORD_W-1:0] ipr;
    logic [DWORD_W-1:0] rls_r;
    logic [DWORD_W-1:0] rls_b;
    logic [DWORD_W-1:0] rls_l;
    logic [DWORD_W-1:0] bso;
  } stage_fault_t;

  localparam stage_fault_t NO_FAULT = '0;

  function automatic int unsigned part_width(part_e p);
    case (p)
      PART8:   return 8;
      PART16:  return 16;
      PART32:  return 32;
      default: return 64;
    endcase
  endfunction

endpackage
