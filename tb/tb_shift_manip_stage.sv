// tb_shift_manip_stage: self-checking testbench of one 2^0..2^4
// shift-and-manipulation block (32 bits, five cross-point stages).
//
// Partitioned shifts (8/16/32) by every amount are compared with a reference
// element-wise shift; 64-bit mode is checked stage by stage with random
// neighbour bits on EXT_LO/EXT_HI, including the exported stage inputs
// STIN.  With random primary faults in a random set of stages and exactly
// those stages' repair bits set the result must be exact; an unrepaired
// open switch must corrupt it.
module tb_shift_manip_stage;
  import dmu_pkg::*;
  import dmu_ref_pkg::*;

  logic [31:0]      din, dout;
  shctl_t           ctl;
  logic [4:0]       repair;
  stage_fault_t     flt [5];
  logic [4:0][15:0] ext_lo, ext_hi;
  logic [4:0][31:0] stin;

  shift_manip_stage dut (.din, .ctl, .repair, .flt, .ext_lo, .ext_hi, .stin, .dout);

  int unsigned checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_now(input string what);
    logic [63:0] x;
    #1;
    x = 64'(din);
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (stin[k] !== x[31:0]) begin
        failures++;
        $display("%s: stin[%0d]=%h exp %h", what, k, stin[k], x[31:0]);
      end
      x = xp_ref(x, 32'(ext_lo[k]), 32'(ext_hi[k]), ctl.amt[k], ctl.left,
                 ctl.arith, ctl.part, 32, 1 << k);
    end
    checks++;
    if (dout !== x[31:0]) begin
      failures++;
      if (failures < 10)
        $display("%s: din=%h ctl=%p got=%h exp=%h", what, din, ctl, dout, x[31:0]);
    end
    // for partitioned shifts the whole block must equal one element-wise shift
    if (ctl.part != PART64) begin
      checks++;
      if (dout !== 32'(pshift(64'(din), 32'(ctl.amt), part_width(ctl.part), ctl.left, ctl.arith))) begin
        failures++;
        $display("%s: partitioned shift mismatch din=%h ctl=%p got=%h", what, din, ctl, dout);
      end
    end
  endtask

  initial begin
    for (int k = 0; k < 5; k++) flt[k] = NO_FAULT;
    repair = '0;
    // every amount, partition and direction
    for (int i = 0; i < 32 * 4 * 3; i++) begin
      din = $urandom; ext_lo = {$urandom, $urandom, $urandom};
      ext_hi = {$urandom, $urandom, $urandom};
      ctl.amt   = 5'(i % 32);
      ctl.part  = part_e'((i / 32) % 4);
      ctl.left  = ((i / 128) == 0);
      ctl.arith = ((i / 128) == 2);
      check_now("sweep");
    end
    // random faults in a random set of stages, exactly those stages repaired
    for (int i = 0; i < 2000; i++) begin
      repair = 5'($urandom);
      for (int k = 0; k < 5; k++)
        flt[k] = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                  $urandom, $urandom, $urandom, $urandom};
      for (int k = 0; k < 5; k++)
        if (!repair[k]) flt[k] = NO_FAULT;
      din = $urandom; ext_lo = {$urandom, $urandom, $urandom};
      ext_hi = {$urandom, $urandom, $urandom};
      ctl = shctl_t'($urandom);
      check_now("repaired");
    end
    // an unrepaired fault in the 2^3 bypass switch of bit 12 clears bit 12
    for (int k = 0; k < 5; k++) flt[k] = NO_FAULT;
    repair = '0;
    flt[3].rls_b[12] = 1'b1;
    din = '1; ctl = '{amt: 5'd0, left: 1'b0, arith: 1'b0, part: PART32};
    #1 checks++;
    if (dout !== 32'hFFFF_EFFF) begin
      failures++;
      $display("unrepaired fault not seen: %h", dout);
    end
    repair[3] = 1'b1;
    #1 checks++;
    if (dout !== 32'hFFFF_FFFF) begin
      failures++;
      $display("repaired fault still seen: %h", dout);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
