// tb_dmu_top: end-to-end self-checking testbench of the data manipulation
// unit at its default configuration.
//
// Phase 1 runs every instruction in every partition and selector setting
// plus random instructions, with back-to-back issue and random idle cycles,
// and compares each result (words and word count) with the reference model
// in dmu_ref_pkg.  It checks the one-cycle latency: OUT_VALID_O must follow
// IN_VALID by exactly one clock.
// Phase 2 is a fault campaign: for each of the 11 cross-point stages it
// opens one random primary switch, runs random instructions without repair
// (the fault should corrupt some result) and then with that stage's repair
// bit set (every result must be correct again).
// Mechanisms counted (each must occur at least once): every instruction,
// each shift partition, arithmetic fill with a negative element, a 64-bit
// shift crossing the half border, a 2^5 stage shift, a fault visible without
// repair and masked with repair, for every stage.
module tb_dmu_top;
  import dmu_pkg::*;
  import dmu_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                   in_valid;
  op_e                    op;
  logic [5:0]             amt;
  part_e                  part;
  logic [1:0]             sel;
  words_t                 w;
  logic [N_STAGES-1:0]    repair;
  stage_fault_t           flt [N_STAGES];
  logic                   out_valid;
  words_t                 r;
  logic [2:0]             cnt;

  dmu_top dut (
    .clk, .rst_n, .in_valid, .op, .amt, .part, .sel, .w,
    .repair_i (repair), .flt_i (flt),
    .out_valid_o (out_valid), .r_o (r), .res_cnt_o (cnt)
  );

  int unsigned checks = 0, failures = 0;
  int unsigned n_op [14];
  int unsigned n_part [4];
  int unsigned n_sign = 0, n_cross = 0, n_s32 = 0;
  int unsigned n_exposed [N_STAGES];
  int unsigned n_masked [N_STAGES];

  // Watchdog.
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Drive one instruction (or an idle cycle) and check it one clock later.
  // Returns the number of mismatching fields.
  task automatic issue(input bit v, input op_e o, input logic [5:0] a,
                       input part_e p, input logic [1:0] s, input words_t wi,
                       input bit count_it, output int unsigned bad);
    words_t      er;
    int unsigned ec;
    bad = 0;
    @(negedge clk);
    in_valid = v; op = o; amt = a; part = p; sel = s; w = wi;
    dmu_ref(o, a, p, s, wi, er, ec);
    @(negedge clk);
    in_valid = 1'b0;
    // latency: valid exactly one clock after issue
    checks++;
    if (out_valid !== v) begin
      failures++;
      $display("latency error: out_valid=%0b expected %0b", out_valid, v);
    end
    if (v) begin
      if (r !== er || cnt != 3'(ec)) bad = 1;
      if (count_it) begin
        n_op[o]++;
        if (o inside {OP_SHL, OP_SHR, OP_SAR}) begin
          n_part[p]++;
          if (o == OP_SAR && a != 0 && (wi[1][31] || (p != PART64 && wi[0][31]))) n_sign++;
          if (p == PART64 && a[4:0] != 0) n_cross++;
          if (a[5]) n_s32++;
        end
      end
    end
  endtask

  function automatic words_t rand_words();
    words_t x;
    for (int n = 0; n < 4; n++) x[n] = $urandom;
    return x;
  endfunction

  task automatic run_checked(input op_e o, input logic [5:0] a, input part_e p,
                             input logic [1:0] s, input words_t wi);
    int unsigned bad;
    issue(1'b1, o, a, p, s, wi, 1'b1, bad);
    checks++;
    if (bad != 0) begin
      failures++;
      if (failures < 10)
        $display("mismatch op=%s amt=%0d part=%s sel=%0d w=%h r=%h cnt=%0d",
                 o.name(), a, p.name(), s, wi, r, cnt);
    end
  endtask

  initial begin
    words_t wi;
    int unsigned bad, nbad;
    in_valid = 1'b0; op = OP_SHL; amt = '0; part = PART8; sel = '0; w = '0;
    repair = '0;
    foreach (flt[i]) flt[i] = NO_FAULT;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---- directed: every op, partition, selector ----
    for (int o = 0; o < 14; o++)
      for (int p = 0; p < 4; p++)
        for (int s = 0; s < 4; s++) begin
          wi = rand_words();
          wi[1][31] = 1'b1;  // negative elements for SAR / EXPANDS
          run_checked(op_e'(o), 6'($urandom_range(1, 63)), part_e'(p), 2'(s), wi);
        end
    // every shift amount in every partition
    for (int p = 0; p < 4; p++)
      for (int a = 0; a < 64; a++)
        for (int o = 0; o < 3; o++)
          run_checked(op_e'(o), 6'(a), part_e'(p), 2'd0, rand_words());
    // random stream with idle cycles
    for (int i = 0; i < 3000; i++) begin
      if ($urandom_range(0, 7) == 0) begin
        issue(1'b0, OP_SHL, '0, PART8, '0, '0, 1'b0, bad);
      end else
        run_checked(op_e'($urandom_range(0, 13)), 6'($urandom),
                    part_e'($urandom_range(0, 3)), 2'($urandom), rand_words());
    end

    // ---- fault campaign ----
    for (int st = 0; st < int'(N_STAGES); st++) begin
      for (int trial = 0; trial < 3; trial++) begin
        int unsigned wdt, dst, bitn, fld;
        wdt  = (st == int'(STG_S32)) ? 64 : 32;
        dst  = (st == int'(STG_S32)) ? 32 : (1 << (st % 5));
        fld  = $urandom_range(0, 4);
        // pick a switch that some shift uses: a right-shift switch needs
        // a source at or above the distance, a left-shift one below the top
        if (fld == 1)      bitn = $urandom_range(dst, wdt - 1);
        else if (fld == 3) bitn = $urandom_range(0, wdt - 1 - dst);
        // a sign-fill switch at the top of a byte is used by short SARs
        else if (fld == 4) bitn = 8 * $urandom_range(0, wdt / 8 - 1) + 7;
        else               bitn = $urandom_range(0, wdt - 1);
        foreach (flt[i]) flt[i] = NO_FAULT;
        case (fld)
          0: flt[st].ipr[bitn]   = 1'b1;
          1: flt[st].rls_r[bitn] = 1'b1;
          2: flt[st].rls_b[bitn] = 1'b1;
          3: flt[st].rls_l[bitn] = 1'b1;
          default: flt[st].bso[bitn] = 1'b1;
        endcase
        // without repair: the fault should show in some result
        repair = '0;
        nbad = 0;
        for (int i = 0; i < 600; i++) begin
          // half of the shifts use a single power of two, so that the output
          // of one stage reaches the result unchanged
          issue(1'b1, op_e'($urandom_range(0, 3)),
                $urandom_range(0, 1) ? 6'($urandom) : 6'(1 << $urandom_range(0, 5)),
                part_e'($urandom_range(0, 3)), 2'($urandom), rand_words(), 1'b0, bad);
          nbad += bad;
        end
        if (nbad != 0) n_exposed[st]++;
        // with repair: all results must be correct
        repair[st] = 1'b1;
        nbad = 0;
        for (int i = 0; i < 300; i++)
          run_checked(op_e'($urandom_range(0, 13)), 6'($urandom),
                      part_e'($urandom_range(0, 3)), 2'($urandom), rand_words());
        n_masked[st]++;
      end
    end
    foreach (flt[i]) flt[i] = NO_FAULT;
    // all stages repaired, no fault: spare set alone is correct
    repair = '1;
    for (int i = 0; i < 300; i++)
      run_checked(op_e'($urandom_range(0, 13)), 6'($urandom),
                  part_e'($urandom_range(0, 3)), 2'($urandom), rand_words());

    // ---- mechanism coverage ----
    for (int o = 0; o < 14; o++) begin
      checks++;
      if (n_op[o] == 0) begin failures++; $display("op %0d never ran", o); end
    end
    for (int p = 0; p < 4; p++) begin
      checks++;
      if (n_part[p] == 0) begin failures++; $display("partition %0d never shifted", p); end
    end
    checks += 3;
    if (n_sign == 0)  begin failures++; $display("no arithmetic fill"); end
    if (n_cross == 0) begin failures++; $display("no 64-bit border crossing"); end
    if (n_s32 == 0)   begin failures++; $display("no 2^5 stage shift"); end
    for (int st = 0; st < int'(N_STAGES); st++) begin
      checks += 2;
      if (n_exposed[st] == 0) begin failures++; $display("stage %0d: no fault exposed", st); end
      if (n_masked[st] == 0)  begin failures++; $display("stage %0d: no repair run", st); end
    end
    $display("ops:%p parts:%p sign=%0d cross=%0d s32=%0d exposed:%p",
             n_op, n_part, n_sign, n_cross, n_s32, n_exposed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
