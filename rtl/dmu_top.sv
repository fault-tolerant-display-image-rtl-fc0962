// dmu_top: fault-tolerant 64-bit image data manipulation unit (DMU).
//
// The DMU is a barrel shifter that also packs and unpacks pixels, so that
// 8-, 16- and 24-bit pixels can be stored densely in 32-bit frame memory and
// processed as SIMD data.  Datapath, in order:
//   two shift_manip_stage blocks (2^0..2^4) on the halves {W1, W0},
//   fixed_path (extra 8/16/24-bit moves for FPACK16/FPACK32/FPACKFIX),
//   the 64-bit 2^5 cross-point stage (xp_stage, WIDTH 64, DIST 32),
//   two expand_merge blocks, one per output word,
//   out_mux, which also takes W2/W3 and the raw operands on bypass lines.
// dmu_ctrl decodes the instruction.  Every one of the 11 cross-point stages
// (index 0..4 low half 2^0..2^4, 5..9 high half, 10 the 2^5 stage) has a
// REPAIR_I bit that switches it to its spare switch set, and a defect map
// FLT_I[n] that opens primary switches in simulation (tie it to zero in an
// implementation).
//
// Interface: one instruction per cycle is accepted when IN_VALID is high.
// The result words R_O[0..RES_CNT_O-1] and OUT_VALID_O appear one clock
// later from the output register; there is no back-pressure.  REPAIR_I is a
// static configuration (for instance from fuses) read every cycle.
// Concurrent assertions check the one-clock result timing and the result
// word count.
//
// The architecture (two 2^0..2^4 blocks, 2^5 stage, fixed extra paths,
// EXPAND/MERGE, output MUXes, per-stage spare switch lines) follows the
// source article.  The single output register, the four-word operand port and the
// instruction encoding are this design's choices.
module dmu_top
  import dmu_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  op_e                        op,
  input  logic [5:0]                 amt,
  input  part_e                      part,
  input  logic [1:0]                 sel,
  input  logic [3:0][WORD_W-1:0]     w,
  input  logic [N_STAGES-1:0]        repair_i,
  input  stage_fault_t               flt_i [N_STAGES],
  output logic                       out_valid_o,
  output logic [3:0][WORD_W-1:0]     r_o,
  output logic [2:0]                 res_cnt_o
);

  shctl_t  ctl_lo, ctl_hi;
  s32ctl_t ctl_s32;
  fpsel_e  fp;
  logic    em_unit16, em_expand, em_arith;
  osel_e   osel;

  dmu_ctrl u_ctrl (
    .op, .amt, .part, .sel,
    .ctl_lo, .ctl_hi, .ctl_s32, .fp,
    .em_unit16, .em_expand, .em_arith, .osel
  );

  // ---- 2^0..2^4 blocks, linked for 64-bit shifts -------------------------
  logic [N_HALF_STAGES-1:0][WORD_W-1:0] stin_lo, stin_hi;
  logic [N_HALF_STAGES-1:0][15:0]       lo_ext_lo, lo_ext_hi, hi_ext_lo, hi_ext_hi;
  logic [WORD_W-1:0]                    sh_lo, sh_hi;
  stage_fault_t                         flt_lo [N_HALF_STAGES];
  stage_fault_t                         flt_hi [N_HALF_STAGES];

  for (genvar k = 0; k < N_HALF_STAGES; k++) begin : g_link
    localparam int unsigned D = 1 << k;
    assign flt_lo[k] = flt_i[STG_LO0 + k];
    assign flt_hi[k] = flt_i[STG_HI0 + k];
    // left shift: top D bits of the low half enter the high half
    assign hi_ext_lo[k] = 16'(stin_lo[k][WORD_W-1 -: D]);
    // right shift: bottom D bits of the high half enter the low half
    assign lo_ext_hi[k] = 16'(stin_hi[k][D-1:0]);
    // outer edges: zero at the bottom, sign at the top
    assign lo_ext_lo[k] = '0;
    assign hi_ext_hi[k] = {16{ctl_hi.arith & stin_hi[k][WORD_W-1]}};
  end

  shift_manip_stage u_sm_lo (
    .din (w[0]), .ctl (ctl_lo), .repair (repair_i[STG_LO0 +: N_HALF_STAGES]),
    .flt (flt_lo), .ext_lo (lo_ext_lo), .ext_hi (lo_ext_hi),
    .stin (stin_lo), .dout (sh_lo)
  );

  shift_manip_stage u_sm_hi (
    .din (w[1]), .ctl (ctl_hi), .repair (repair_i[STG_HI0 +: N_HALF_STAGES]),
    .flt (flt_hi), .ext_lo (hi_ext_lo), .ext_hi (hi_ext_hi),
    .stin (stin_hi), .dout (sh_hi)
  );

  // ---- fixed extra paths and the 2^5 stage -------------------------------
  logic [DWORD_W-1:0] fp_out, s32_out;

  fixed_path u_fp (.din ({sh_hi, sh_lo}), .sel (fp), .dout (fp_out));

  xp_stage #(.WIDTH(DWORD_W), .DIST(32), .NSPARE(N_SPARE)) u_s32 (
    .din     (fp_out),
    .ext_lo  ('0),
    .ext_hi  ('0),
    .en      (ctl_s32.en),
    .left    (ctl_s32.left),
    .arith   (ctl_s32.arith),
    .part    (ctl_s32.part),
    .repair  (repair_i[STG_S32]),
    .flt_ipr (flt_i[STG_S32].ipr),
    .flt_r   (flt_i[STG_S32].rls_r),
    .flt_b   (flt_i[STG_S32].rls_b),
    .flt_l   (flt_i[STG_S32].rls_l),
    .flt_bso (flt_i[STG_S32].bso),
    .dout    (s32_out)
  );

  // ---- EXPAND / MERGE ----------------------------------------------------
  logic [WORD_W-1:0] em_lo, em_hi;

  expand_merge u_em_lo (
    .a (s32_out[15:0]), .b (s32_out[47:32]),
    .unit16 (em_unit16), .expand (em_expand), .arith (em_arith), .dout (em_lo)
  );

  expand_merge u_em_hi (
    .a (s32_out[31:16]), .b (s32_out[63:48]),
    .unit16 (em_unit16), .expand (em_expand), .arith (em_arith), .dout (em_hi)
  );

  // ---- output assembly and register ---------------------------------------
  logic [3:0][WORD_W-1:0] r_d;
  logic [2:0]             cnt_d;

  out_mux u_om (
    .s (s32_out), .em_lo, .em_hi, .w, .osel, .sel, .r (r_d), .cnt (cnt_d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid_o <= 1'b0;
      r_o         <= '0;
      res_cnt_o   <= '0;
    end else begin
      out_valid_o <= in_valid;
      if (in_valid) begin
        r_o       <= r_d;
        res_cnt_o <= cnt_d;
      end
    end
  end

  // Timing contract: every accepted instruction yields a result one clock
  // later, with between one and four valid words.
  assert property (@(posedge clk) disable iff (!rst_n) in_valid |=> out_valid_o)
    else $error("dmu_top: result missing one clock after issue");
  assert property (@(posedge clk) disable iff (!rst_n)
                   out_valid_o |-> (res_cnt_o >= 3'd1 && res_cnt_o <= 3'd4))
    else $error("dmu_top: result word count %0d out of range", res_cnt_o);

endmodule
