// shift_manip_stage: the 2^0..2^4 shift-and-manipulation block of one 32-bit
// half of the 64-bit datapath.
//
// Five cross-point stages (xp_stage) of distance 1, 2, 4, 8 and 16 are
// chained; stage k shifts when CTL.amt[k] is set, so the block shifts by any
// amount 0..31 (amounts at or above the partition width empty the partition
// and leave only fill).  Every stage has its own repair bit and defect map.
//
// For 64-bit shifts (CTL.part = PART64) the two halves are linked stage by
// stage: STIN[k] is the input of stage k, and the parent feeds the
// neighbour's STIN[k] edge bits back as EXT_LO[k] / EXT_HI[k] (only the low
// 2^k bits of each are used).  Both halves must then be given the same amount
// and direction.
//
// Combinational.  The split into two 32-bit blocks and the stage distances
// follow the source article's architecture drawing; the neighbour links are this
// design's way of letting a 64-bit shift cross between the two blocks.
module shift_manip_stage
  import dmu_pkg::*;
(
  input  logic [WORD_W-1:0]                 din,
  input  shctl_t                            ctl,
  input  logic [N_HALF_STAGES-1:0]          repair,
  input  stage_fault_t                      flt     [N_HALF_STAGES],
  input  logic [N_HALF_STAGES-1:0][15:0]    ext_lo,
  input  logic [N_HALF_STAGES-1:0][15:0]    ext_hi,
  output logic [N_HALF_STAGES-1:0][WORD_W-1:0] stin,
  output logic [WORD_W-1:0]                 dout
);

  logic [N_HALF_STAGES:0][WORD_W-1:0] d;

  assign d[0] = din;

  for (genvar k = 0; k < N_HALF_STAGES; k++) begin : g_stage
    localparam int unsigned D = 1 << k;
    assign stin[k] = d[k];
    xp_stage #(.WIDTH(WORD_W), .DIST(D), .NSPARE(N_SPARE)) u_xp (
      .din     (d[k]),
      .ext_lo  (ext_lo[k][D-1:0]),
      .ext_hi  (ext_hi[k][D-1:0]),
      .en      (ctl.amt[k]),
      .left    (ctl.left),
      .arith   (ctl.arith),
      .part    (ctl.part),
      .repair  (repair[k]),
      .flt_ipr (flt[k].ipr[WORD_W-1:0]),
      .flt_r   (flt[k].rls_r[WORD_W-1:0]),
      .flt_b   (flt[k].rls_b[WORD_W-1:0]),
      .flt_l   (flt[k].rls_l[WORD_W-1:0]),
      .flt_bso (flt[k].bso[WORD_W-1:0]),
      .dout    (d[k+1])
    );
  end

  assign dout = d[N_HALF_STAGES];

endmodule
