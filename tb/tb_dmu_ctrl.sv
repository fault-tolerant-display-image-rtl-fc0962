// tb_dmu_ctrl: self-checking testbench of the instruction decoder.
// For every instruction, partition, selector and random amount it checks the
// total shift each half receives (2^0..2^4 amount plus 32 for the 2^5
// stage), its direction, fill and partition, the fixed-path and output
// selections and the EXPAND/MERGE setting against the instruction's
// definition of how the datapath is used.
module tb_dmu_ctrl;
  import dmu_pkg::*;

  op_e        op;
  logic [5:0] amt;
  part_e      part;
  logic [1:0] sel;
  shctl_t     ctl_lo, ctl_hi;
  s32ctl_t    ctl_s32;
  fpsel_e     fp;
  logic       em_unit16, em_expand, em_arith;
  osel_e      osel;

  dmu_ctrl dut (.op, .amt, .part, .sel, .ctl_lo, .ctl_hi, .ctl_s32, .fp,
                .em_unit16, .em_expand, .em_arith, .osel);

  int unsigned checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input int got, input int want, input string what);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20)
        $display("op=%s sel=%0d amt=%0d: %s got %0d want %0d", op.name(), sel, amt, what, got, want);
    end
  endtask

  // Expected: low-half amount, high-half amount, left, arith, partition,
  // 2^5 enable, fixed path, output select.  The FPACK instructions pre-shift
  // left in the 2^0..2^4 stages and move the gathered word down (right) in
  // the 2^5 stage.
  initial begin
    int lo_a, hi_a, lft, ar, pt, s32, fpx, os;
    for (int o = 0; o < 14; o++)
      for (int i = 0; i < 64; i++) begin
        op = op_e'(o); amt = 6'($urandom); part = part_e'(i % 4); sel = 2'(i / 16);
        lo_a = 0; hi_a = 0; lft = 0; ar = 0; pt = int'(PART32); s32 = 0; fpx = int'(FP_NONE);
        case (op)
          OP_SHL, OP_SHR, OP_SAR: begin
            lo_a = amt % 32; hi_a = lo_a; lft = (op == OP_SHL); ar = (op == OP_SAR);
            pt = int'(part); s32 = amt / 32; os = int'(OS_SHIFT);
          end
          OP_PACK64:  begin lo_a = amt % 32; hi_a = lo_a; pt = int'(PART64); s32 = amt / 32; os = int'(OS_LO); end
          OP_PACK4B:  begin lo_a = 8 * sel; hi_a = lo_a; os = int'(OS_PACK4B); end
          OP_PACK4HW: begin lo_a = 16 * (sel % 2); hi_a = lo_a; os = int'(OS_PACK4H); end
          OP_PUSH24P: begin lo_a = 16; hi_a = 16; os = int'(OS_PUSH24); end
          OP_POP24P:  os = int'(OS_POP24);
          OP_FPACK16: begin lo_a = 8 * (1 - sel % 2); hi_a = lo_a; lft = 1; pt = int'(PART64);
                            s32 = 1; fpx = int'(FP_FPACK16); os = int'(OS_LO); end
          OP_FPACK32: begin lo_a = 8 * (3 - sel); hi_a = 0; lft = 1; s32 = 1;
                            fpx = int'(FP_FPACK32); os = int'(OS_LO); end
          OP_FPACKFIX: begin lo_a = 16 * (1 - sel % 2); hi_a = lo_a; lft = 1; s32 = 1;
                             fpx = int'(FP_FPACKFIX); os = int'(OS_LO); end
          default: os = int'(OS_EM);
        endcase
        #1;
        expect_eq(int'(ctl_lo.amt), lo_a, "low amount");
        expect_eq(int'(ctl_hi.amt), hi_a, "high amount");
        expect_eq(int'(ctl_s32.en), s32, "2^5 enable");
        expect_eq(int'(fp), fpx, "fixed path");
        expect_eq(int'(osel), os, "output select");
        if (lo_a != 0) begin
          expect_eq(int'(ctl_lo.left), lft, "direction");
          expect_eq(int'(ctl_lo.arith), ar, "fill");
          expect_eq(int'(ctl_lo.part), pt, "partition");
        end
        if (s32 != 0) begin
          expect_eq(int'(ctl_s32.left), (o >= int'(OP_FPACK16)) ? 0 : lft, "2^5 direction");
          expect_eq(int'(ctl_s32.arith), ar, "2^5 fill");
          expect_eq(int'(ctl_s32.part), (o >= int'(OP_FPACK16)) ? int'(PART64) : pt, "2^5 partition");
        end
        if (op inside {OP_EXPAND, OP_EXPANDS, OP_MERGE}) begin
          expect_eq(int'(em_expand), (op != OP_MERGE), "expand");
          expect_eq(int'(em_arith), (op == OP_EXPANDS), "sign extend");
          expect_eq(int'(em_unit16), (part == PART16), "unit width");
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
