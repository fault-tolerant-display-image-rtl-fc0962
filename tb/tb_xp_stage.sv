// tb_xp_stage: self-checking testbench of one cross-point shifter stage at
// its default size (32 bits, distance 1, the stage drawn with its
// redundancy in the source article) and at distance 8.
//
// For random data it checks right/left/bypass in every partition, with and
// without arithmetic fill and with neighbour bits for 64-bit partitions,
// against a reference shift.  It then checks the redundancy: with random
// stuck-open faults in the primary switches and REPAIR set the output must
// be exact; with REPAIR clear, targeted faults must drop the expected bit
// (bypass switch, IPR switch, BSO_C fill switch).
module tb_xp_stage;
  import dmu_pkg::*;
  import dmu_ref_pkg::*;

  logic [31:0] din, dout1, dout8;
  logic [7:0]  ext_lo, ext_hi;
  logic        en, left, arith, repair;
  part_e       part;
  logic [31:0] f_ipr, f_r, f_b, f_l, f_bso;

  xp_stage dut1 (
    .din, .ext_lo (ext_lo[0]), .ext_hi (ext_hi[0]), .en, .left, .arith, .part,
    .repair, .flt_ipr (f_ipr), .flt_r (f_r), .flt_b (f_b), .flt_l (f_l),
    .flt_bso (f_bso), .dout (dout1)
  );

  xp_stage #(.WIDTH(32), .DIST(8)) dut8 (
    .din, .ext_lo, .ext_hi, .en, .left, .arith, .part,
    .repair, .flt_ipr (f_ipr), .flt_r (f_r), .flt_b (f_b), .flt_l (f_l),
    .flt_bso (f_bso), .dout (dout8)
  );

  int unsigned checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10)
        $display("%s: din=%h en=%0b left=%0b arith=%0b part=%s rep=%0b got=%h exp=%h",
                 what, din, en, left, arith, part.name(), repair, got, exp);
    end
  endtask

  task automatic check_both(input string what);
    #1;
    check(dout1, 32'(xp_ref(64'(din), 32'(ext_lo), 32'(ext_hi), en, left, arith, part, 32, 1)), {what, " d1"});
    check(dout8, 32'(xp_ref(64'(din), 32'(ext_lo), 32'(ext_hi), en, left, arith, part, 32, 8)), {what, " d8"});
  endtask

  initial begin
    begin f_ipr = '0; f_r = '0; f_b = '0; f_l = '0; f_bso = '0; end
    repair = 1'b0;
    // functional, no faults, primary then spare switch set
    for (int i = 0; i < 4000; i++) begin
      repair = (i >= 2000);
      din = $urandom; ext_lo = 8'($urandom); ext_hi = 8'($urandom);
      en = 1'($urandom); left = 1'($urandom); arith = 1'($urandom);
      part = part_e'($urandom_range(0, 3));
      check_both("clean");
    end
    // random faults, repaired
    repair = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      f_ipr = $urandom; f_r = $urandom; f_b = $urandom; f_l = $urandom; f_bso = $urandom;
      din = $urandom; ext_lo = 8'($urandom); ext_hi = 8'($urandom);
      en = 1'($urandom); left = 1'($urandom); arith = 1'($urandom);
      part = part_e'($urandom_range(0, 3));
      check_both("repaired");
    end
    // targeted faults, not repaired
    repair = 1'b0;
    begin f_ipr = '0; f_r = '0; f_b = '0; f_l = '0; f_bso = '0; end
    for (int j = 0; j < 32; j++) begin
      // bypass switch j open: bit j reads 0
      din = '1; en = 1'b0; left = 1'b0; arith = 1'b0; part = PART32;
      f_b = 32'd1 << j;
      #1 check(dout1, ~(32'd1 << j), "bypass fault");
      f_b = '0;
      // IPR switch j open: bit j lost in a left shift by 1 (if it stays in)
      en = 1'b1; left = 1'b1; f_ipr = 32'd1 << j;
      #1 check(dout1, (j < 31) ? ~(32'd1 << (j + 1)) & 32'hFFFF_FFFE : 32'hFFFF_FFFE, "ipr fault");
      f_ipr = '0;
      // BSO_C switch j open: sign fill at bit j lost for SAR by 8
      din = 32'h8000_0000; left = 1'b0; arith = 1'b1; f_bso = 32'd1 << j;
      #1 check(dout8, (j >= 24) ? 32'hFF80_0000 & ~(32'd1 << j) : 32'hFF80_0000, "bso fault");
      f_bso = '0;
      // left-shift switch j open
      din = '1; left = 1'b1; arith = 1'b0; f_l = 32'd1 << j;
      #1 check(dout1, (j < 31) ? 32'hFFFF_FFFE & ~(32'd1 << (j + 1)) : 32'hFFFF_FFFE, "rls_l fault");
      f_l = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
