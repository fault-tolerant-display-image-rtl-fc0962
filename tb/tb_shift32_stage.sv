// tb_shift32_stage: self-checking testbench of the 64-bit 2^5 cross-point
// stage (xp_stage with WIDTH 64, DIST 32) that moves data between the two
// 32-bit halves.  Checks right/left/bypass in every partition against a
// reference shift (in 8/16/32-bit partitions a 32-bit move leaves only the
// fill), the spare switch set with random primary faults, and that an open
// primary switch corrupts the output when the stage is not repaired.
module tb_shift32_stage;
  import dmu_pkg::*;
  import dmu_ref_pkg::*;

  logic [63:0] din, dout;
  logic        en, left, arith, repair;
  part_e       part;
  logic [63:0] f_ipr, f_r, f_b, f_l, f_bso;

  xp_stage #(.WIDTH(64), .DIST(32)) dut (
    .din, .ext_lo ('0), .ext_hi ('0), .en, .left, .arith, .part, .repair,
    .flt_ipr (f_ipr), .flt_r (f_r), .flt_b (f_b), .flt_l (f_l), .flt_bso (f_bso),
    .dout
  );

  int unsigned checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [63:0] exp, input string what);
    #1;
    checks++;
    if (dout !== exp) begin
      failures++;
      if (failures < 10)
        $display("%s: rep=%0b fb=%h din=%h en=%0b left=%0b arith=%0b part=%s got=%h exp=%h",
                 what, repair, f_b, din, en, left, arith, part.name(), dout, exp);
    end
  endtask


  initial begin
    f_ipr = '0; f_r = '0; f_b = '0; f_l = '0; f_bso = '0;
    repair = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      din = {$urandom, $urandom}; en = 1'($urandom); left = 1'($urandom);
      arith = 1'($urandom); part = part_e'($urandom_range(0, 3));
      check(xp_ref(din, '0, '0, en, left, arith, part, 64, 32), "clean");
    end
    repair = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      f_ipr = {$urandom, $urandom}; f_r = {$urandom, $urandom};
      f_b = {$urandom, $urandom}; f_l = {$urandom, $urandom};
      f_bso = {$urandom, $urandom};
      din = {$urandom, $urandom}; en = 1'($urandom); left = 1'($urandom);
      arith = 1'($urandom); part = part_e'($urandom_range(0, 3));
      check(xp_ref(din, '0, '0, en, left, arith, part, 64, 32), "repaired");
    end
    // directed: 64-bit moves
    repair = 1'b0;
    f_ipr = '0; f_r = '0; f_b = '0; f_l = '0; f_bso = '0;
    din = 64'h8765_4321_0FED_CBA9; en = 1'b1; part = PART64;
    left = 1'b0; arith = 1'b0; check(64'h0000_0000_8765_4321, "shr32");
    left = 1'b0; arith = 1'b1; check(64'hFFFF_FFFF_8765_4321, "sar32");
    left = 1'b1; arith = 1'b0; check(64'h0FED_CBA9_0000_0000, "shl32");
    // unrepaired faults corrupt: right-shift switch 40 drops bit 8
    din = '1; left = 1'b0; arith = 1'b0; f_r = 64'd1 << 40;
    check(64'h0000_0000_FFFF_FEFF, "rls_r fault");
    f_r = '0; f_ipr = 64'd1 << 63;
    check(64'h0000_0000_7FFF_FFFF, "ipr fault");
    f_ipr = '0; arith = 1'b1; f_bso = 64'd1 << 50;
    check(64'hFFFB_FFFF_FFFF_FFFF, "bso fault");
    repair = 1'b1;
    check(64'hFFFF_FFFF_FFFF_FFFF, "bso fault repaired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
