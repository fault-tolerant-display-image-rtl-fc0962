// dmu_ctrl: instruction decoder of the data manipulation unit.
//
// Turns one instruction (OP, shift amount AMT, partition PART, unit selector
// SEL) into the controls of the datapath: the amount, direction, fill and
// partition of each 2^0..2^4 half block, the 2^5 stage control, the
// fixed-path MUX setting, the EXPAND/MERGE setting and the output selection.
//
// How each instruction uses the shifter:
//   SHL/SHR/SAR  both halves and the 2^5 stage shift by AMT in PART
//   PACK64       64-bit logical right shift by AMT, low word kept
//   PACK4B/4HW   32-bit partitioned right shift by 8*SEL / 16*SEL[0] brings
//                the selected unit of W0 and W1 to the bottom of each half
//   PUSH24P      32-bit partitioned right shift by 16 brings bits 23:16 down
//   FPACK16      64-bit left pre-shift by 8 when SEL[0]=0, gather through
//                the fixed paths, 2^5 right shift moves the result down
//   FPACK32      low half left pre-shift by 8*(3-SEL), then as FPACK16
//   FPACKFIX     both halves left pre-shift by 16 when SEL[0]=0, then as
//                FPACK16
//   EXPAND(S)/MERGE and POP24P leave the shifter in bypass
// Combinational.  The instruction set is the source article's; the encoding and the
// way each instruction is mapped onto the stages are this design's.
module dmu_ctrl
  import dmu_pkg::*;
(
  input  op_e      op,
  input  logic [5:0] amt,
  input  part_e    part,
  input  logic [1:0] sel,
  output shctl_t   ctl_lo,
  output shctl_t   ctl_hi,
  output s32ctl_t  ctl_s32,
  output fpsel_e   fp,
  output logic     em_unit16,
  output logic     em_expand,
  output logic     em_arith,
  output osel_e    osel
);

  localparam shctl_t  SH_IDLE  = '{amt: 5'd0, left: 1'b0, arith: 1'b0, part: PART32};
  localparam s32ctl_t S32_IDLE = '{en: 1'b0, left: 1'b0, arith: 1'b0, part: PART64};
  // 2^5 stage moving the upper word down to the low word.
  localparam s32ctl_t S32_DOWN = '{en: 1'b1, left: 1'b0, arith: 1'b0, part: PART64};

  always_comb begin
    ctl_lo    = SH_IDLE;
    ctl_hi    = SH_IDLE;
    ctl_s32   = S32_IDLE;
    fp        = FP_NONE;
    em_unit16 = (part == PART16);
    em_expand = 1'b0;
    em_arith  = 1'b0;
    osel      = OS_SHIFT;
    unique case (op)
      OP_SHL, OP_SHR, OP_SAR: begin
        ctl_lo  = '{amt: amt[4:0], left: (op == OP_SHL), arith: (op == OP_SAR), part: part};
        ctl_hi  = ctl_lo;
        ctl_s32 = '{en: amt[5], left: (op == OP_SHL), arith: (op == OP_SAR), part: part};
      end
      OP_PACK64: begin
        ctl_lo  = '{amt: amt[4:0], left: 1'b0, arith: 1'b0, part: PART64};
        ctl_hi  = ctl_lo;
        ctl_s32 = '{en: amt[5], left: 1'b0, arith: 1'b0, part: PART64};
        osel    = OS_LO;
      end
      OP_PACK4B: begin
        ctl_lo = '{amt: {sel, 3'b000}, left: 1'b0, arith: 1'b0, part: PART32};
        ctl_hi = ctl_lo;
        osel   = OS_PACK4B;
      end
      OP_PACK4HW: begin
        ctl_lo = '{amt: {sel[0], 4'b0000}, left: 1'b0, arith: 1'b0, part: PART32};
        ctl_hi = ctl_lo;
        osel   = OS_PACK4H;
      end
      OP_PUSH24P: begin
        ctl_lo = '{amt: 5'd16, left: 1'b0, arith: 1'b0, part: PART32};
        ctl_hi = ctl_lo;
        osel   = OS_PUSH24;
      end
      OP_POP24P: begin
        osel = OS_POP24;
      end
      OP_FPACK16: begin
        ctl_lo  = '{amt: {1'b0, !sel[0], 3'b000}, left: 1'b1, arith: 1'b0, part: PART64};
        ctl_hi  = ctl_lo;
        ctl_s32 = S32_DOWN;
        fp      = FP_FPACK16;
        osel    = OS_LO;
      end
      OP_FPACK32: begin
        ctl_lo  = '{amt: {~sel, 3'b000}, left: 1'b1, arith: 1'b0, part: PART32};
        ctl_s32 = S32_DOWN;
        fp      = FP_FPACK32;
        osel    = OS_LO;
      end
      OP_FPACKFIX: begin
        ctl_lo  = '{amt: {!sel[0], 4'b0000}, left: 1'b1, arith: 1'b0, part: PART32};
        ctl_hi  = ctl_lo;
        ctl_s32 = S32_DOWN;
        fp      = FP_FPACKFIX;
        osel    = OS_LO;
      end
      OP_EXPAND, OP_EXPANDS: begin
        em_expand = 1'b1;
        em_arith  = (op == OP_EXPANDS);
        osel      = OS_EM;
      end
      OP_MERGE: begin
        osel = OS_EM;
      end
      default: ;
    endcase
  end

endmodule
