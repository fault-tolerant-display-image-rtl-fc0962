// tb_frame_pack: frame-level workload for the data manipulation unit.
//
// A 640x480 frame whose pixels sit one per 32-bit word, right-justified (the
// unpacked frame-buffer layout), is streamed through the unit at one
// instruction per clock in three passes:
//   8-bit pixels  with PACK4B  (4 pixel words -> 1 word),
//   16-bit pixels with PACK4HW (4 pixel words -> 2 words),
//   24-bit pixels with PUSH24P (4 pixel words -> 3 words), and each packed
//   group is unpacked again with POP24P.
// Every result word is compared with the pixel it must hold, the packed
// frame size in bits is checked (8, 16 and 24 bits per pixel, i.e. 75 % of
// the unpacked 32-bit layout for 24-bit pixels) and so is the clock count
// per pass (one instruction per clock: 76,800 instructions per frame).
module tb_frame_pack;
  import dmu_pkg::*;
  import dmu_ref_pkg::*;

  localparam int unsigned H_PIX = 640;
  localparam int unsigned V_PIX = 480;
  localparam int unsigned N_PIX = H_PIX * V_PIX;
  localparam int unsigned N_OPS = N_PIX / 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                in_valid;
  op_e                 op;
  logic [5:0]          amt;
  part_e               part;
  logic [1:0]          sel;
  words_t              w;
  stage_fault_t        flt [N_STAGES];
  logic                out_valid;
  words_t              r;
  logic [2:0]          cnt;

  dmu_top dut (
    .clk, .rst_n, .in_valid, .op, .amt, .part, .sel, .w,
    .repair_i ('0), .flt_i (flt),
    .out_valid_o (out_valid), .r_o (r), .res_cnt_o (cnt)
  );

  int unsigned checks = 0, failures = 0;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Pixel value of pixel n, as a 24-bit colour.
  function automatic logic [23:0] pix(int unsigned n);
    return 24'((n * 32'h9E37_79B1) ^ (n >> 3));
  endfunction

  // Frame-buffer word of pixel n at the given depth, right-justified.
  function automatic logic [31:0] fb_word(int unsigned n, int unsigned bpp);
    return (bpp == 8) ? 32'(pix(n) & 24'hFF) : (bpp == 16) ? 32'(pix(n) & 24'hFFFF) : 32'(pix(n));
  endfunction

  task automatic expect_word(input logic [31:0] got, input logic [31:0] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("%s: got %h want %h", what, got, want);
    end
  endtask

  // Stream one frame through OPC; returns packed bits and clocks used.
  task automatic run_pass(input op_e opc, input int unsigned bpp,
                          output longint unsigned bits, output longint unsigned clocks);
    longint unsigned t0;
    int unsigned prev_g;
    bits = 0;
    @(negedge clk);
    t0 = 0;
    for (int unsigned g = 0; g < N_OPS; g++) begin
      in_valid = 1'b1; op = opc; amt = '0; part = PART32; sel = '0;
      for (int n = 0; n < 4; n++) w[n] = fb_word(4 * g + n, bpp);
      @(negedge clk);
      t0++;
      // one clock later the group's result is on the outputs
      prev_g = g;
      begin
        checks++;
        if (!out_valid) begin failures++; $display("missing result for group %0d", prev_g); end
        bits += 32 * cnt;
        case (opc)
          OP_PACK4B: begin
            logic [31:0] e;
            for (int n = 0; n < 4; n++) e[8*n +: 8] = 8'(fb_word(4 * prev_g + n, 8));
            expect_word(r[0], e, "PACK4B");
          end
          OP_PACK4HW: begin
            expect_word(r[0], {16'(fb_word(4 * prev_g + 1, 16)), 16'(fb_word(4 * prev_g, 16))}, "PACK4HW w0");
            expect_word(r[1], {16'(fb_word(4 * prev_g + 3, 16)), 16'(fb_word(4 * prev_g + 2, 16))}, "PACK4HW w1");
          end
          default: begin
            logic [31:0] e0;
            for (int n = 0; n < 4; n++) e0[8*n +: 8] = pix(4 * prev_g + n) >> 16;
            expect_word(r[0], e0, "PUSH24P bytes");
            expect_word(r[1], {pix(4 * prev_g + 1)[15:0], pix(4 * prev_g)[15:0]}, "PUSH24P w1");
            expect_word(r[2], {pix(4 * prev_g + 3)[15:0], pix(4 * prev_g + 2)[15:0]}, "PUSH24P w2");
          end
        endcase
      end
    end
    in_valid = 1'b0;
    clocks = t0;
  endtask

  initial begin
    longint unsigned bits, clocks;
    words_t          pk;
    in_valid = 1'b0; op = OP_SHL; amt = '0; part = PART32; sel = '0; w = '0;
    foreach (flt[i]) flt[i] = NO_FAULT;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    run_pass(OP_PACK4B, 8, bits, clocks);
    $display("8-bit frame: %0d bits packed, %0d clocks", bits, clocks);
    checks += 2;
    if (bits != 64'(N_PIX) * 8) begin failures++; $display("8-bit size wrong"); end
    if (clocks != N_OPS) begin failures++; $display("8-bit clocks wrong"); end

    run_pass(OP_PACK4HW, 16, bits, clocks);
    $display("16-bit frame: %0d bits packed, %0d clocks", bits, clocks);
    checks += 2;
    if (bits != 64'(N_PIX) * 16) begin failures++; $display("16-bit size wrong"); end
    if (clocks != N_OPS) begin failures++; $display("16-bit clocks wrong"); end

    run_pass(OP_PUSH24P, 24, bits, clocks);
    $display("24-bit frame: %0d bits packed (unpacked %0d), %0d clocks", bits, 64'(N_PIX) * 32, clocks);
    checks += 2;
    if (bits != 64'(N_PIX) * 24) begin failures++; $display("24-bit size wrong"); end
    if (clocks != N_OPS) begin failures++; $display("24-bit clocks wrong"); end

    // POP24P round trip over a part of the frame: pack, then unpack.
    for (int unsigned g = 0; g < 2000; g++) begin
      @(negedge clk);
      in_valid = 1'b1; op = OP_PUSH24P;
      for (int n = 0; n < 4; n++) w[n] = fb_word(4 * g + n, 24);
      @(negedge clk);
      pk = r;
      in_valid = 1'b1; op = OP_POP24P; w = pk;
      @(negedge clk);
      in_valid = 1'b0;
      for (int n = 0; n < 4; n++) expect_word(r[n], fb_word(4 * g + n, 24), "POP24P");
      checks++;
      if (cnt != 3'd4) begin failures++; $display("POP24P count %0d", cnt); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
