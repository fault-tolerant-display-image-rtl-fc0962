// xp_stage: one fault-tolerant cross-point barrel-shifter stage.
//
// The stage shifts DIN by a fixed distance DIST (right, left, or not at all)
// inside SIMD partitions of 8, 16, 32 or 64 bits.  It is written as the four
// switch blocks of the cross-point shifter:
//   IPR    puts input bit IN[j] onto a horizontal switch line,
//   RLS    connects line j to output O[j-DIST] (right shift), O[j] (bypass)
//          or O[j+DIST] (left shift); switches whose path would cross a
//          partition border stay open, so border data is cut off,
//   ALS_IN produces the fill value of each partition (0, or its MSB for an
//          arithmetic right shift),
//   BSO_C  drives the fill value onto the output positions vacated by the
//          shift.
// Outputs are wired-OR column lines, so a stuck-open switch reads as 0.
//
// Redundancy: the WIDTH+NSPARE physical switch lines are shared between the
// primary and the spare switch set.  In normal operation IN[j] travels on
// line j+NSPARE (M[j]); with REPAIR set it travels on line j (RM[j]), so the
// lines M[WIDTH-NSPARE-1:0] double as RM[WIDTH-1:NSPARE] and only NSPARE
// lines RM[NSPARE-1:0] are added.  REPAIR also switches every RLS, IPR and
// BSO_C path to its spare switch (redundancy ALS_IN / BSO_C), so any set of
// stuck-open faults in the primary switches is masked.  The FLT_* inputs are
// a defect map for simulation: they open primary switches and must be tied to
// zero in an implementation.  Spare switches are modelled fault-free.
//
// When the partition is wider than the stage (PART64 in a 32-bit half), the
// bits shifted in at the block edges come from the neighbouring half through
// EXT_LO (left shift, bit i = neighbour bit WIDTH-DIST+i) and EXT_HI (right
// shift, bit i = neighbour bit i); the neighbour's fill logic supplies the
// sign at the top of the 64-bit word.
//
// Purely combinational.  The line structure and the four blocks follow the
// source article's 2^0 stage drawing; stages of other distances and the 64-bit 2^5
// stage reuse the same structure with NSPARE spare lines, which is this
// design's choice.  Only stuck-open switch faults are modelled.  An
// immediate assertion checks the cross-point rule that the decoder closes
// exactly one switch (data or fill) onto every output column.
module xp_stage
  import dmu_pkg::*;
#(
  parameter int unsigned WIDTH  = 32,
  parameter int unsigned DIST   = 1,
  parameter int unsigned NSPARE = 4
) (
  input  logic [WIDTH-1:0] din,
  input  logic [DIST-1:0]  ext_lo,
  input  logic [DIST-1:0]  ext_hi,
  input  logic             en,       // 1: shift by DIST, 0: bypass
  input  logic             left,
  input  logic             arith,
  input  part_e            part,
  input  logic             repair,   // use the spare switch set
  input  logic [WIDTH-1:0] flt_ipr,
  input  logic [WIDTH-1:0] flt_r,
  input  logic [WIDTH-1:0] flt_b,
  input  logic [WIDTH-1:0] flt_l,
  input  logic [WIDTH-1:0] flt_bso,
  output logic [WIDTH-1:0] dout
);

  localparam int unsigned NLINE = WIDTH + NSPARE;

  logic [NLINE-1:0] line;      // horizontal switch lines (RM[3:0] at the bottom)
  logic [WIDTH-1:0] sw_r;      // RLS switch enables per input j
  logic [WIDTH-1:0] sw_b;
  logic [WIDTH-1:0] sw_l;
  logic [WIDTH-1:0] fill_en;   // BSO_C switch enables per output o
  logic [WIDTH-1:0] fill_val;  // ALS_IN value routed to output o

  // Partition geometry.  "wide" means the partition continues into the
  // neighbouring half, so this block is one segment of it.
  int unsigned pw;
  logic        wide;
  always_comb begin
    pw   = part_width(part);
    wide = (pw > WIDTH);
    if (wide) pw = WIDTH;
  end

  // Switch-enable decoder for RLS and BSO_C (shared by primary and spare).
  always_comb begin
    for (int unsigned j = 0; j < WIDTH; j++) begin
      automatic int unsigned i    = j & (pw - 1);  // index inside partition
      automatic int unsigned base = j - i;
      sw_b[j]     = !en;
      sw_r[j]     = en && !left && (i >= DIST);
      sw_l[j]     = en &&  left && (i + DIST < pw);
      fill_en[j]  = en && (left ? (i < DIST) : (i + DIST >= pw));
      // ALS_IN: partition MSB for arithmetic right shifts, else zero;
      // across the half border the neighbour supplies the data.
      if (wide && left)
        fill_val[j] = (j < DIST) ? ext_lo[j % DIST] : 1'b0;
      else if (wide && !left)
        fill_val[j] = (j + DIST >= WIDTH) ? ext_hi[(j + DIST - WIDTH) % DIST] : 1'b0;
      else
        fill_val[j] = arith && !left && din[base + pw - 1];
    end
  end

  // IPR: primary switch j drives M[j] = line j+NSPARE, spare switch drives
  // RM[j] = line j.
  always_comb begin
    line = '0;
    for (int unsigned j = 0; j < WIDTH; j++) begin
      if (repair) line[j]          = line[j] | din[j];
      else        line[j + NSPARE] = line[j + NSPARE] | (din[j] & !flt_ipr[j]);
    end
  end

  // RLS and BSO_C: wired-OR onto the output columns.  ndrv counts the
  // switches enabled onto each column: the decoder must close exactly one.
  int unsigned ndrv [WIDTH];

  always_comb begin
    dout = '0;
    for (int unsigned o = 0; o < WIDTH; o++)
      ndrv[o] = 32'(sw_b[o]) + 32'(fill_en[o]);
    for (int unsigned j = 0; j < WIDTH; j++) begin
      automatic logic src = repair ? line[j] : line[j + NSPARE];
      automatic logic okr = repair || !flt_r[j];
      automatic logic okb = repair || !flt_b[j];
      automatic logic okl = repair || !flt_l[j];
      automatic logic okf = repair || !flt_bso[j];
      dout[j] = dout[j] | (src & sw_b[j] & okb) | (fill_val[j] & fill_en[j] & okf);
      if (j >= DIST) begin
        dout[j - DIST] = dout[j - DIST] | (src & sw_r[j] & okr);
        ndrv[j - DIST] = ndrv[j - DIST] + 32'(sw_r[j]);
      end
      if (j + DIST < WIDTH) begin
        dout[j + DIST] = dout[j + DIST] | (src & sw_l[j] & okl);
        ndrv[j + DIST] = ndrv[j + DIST] + 32'(sw_l[j]);
      end
    end
  end

  // Cross-point rule: every output column is driven by exactly one switch
  // (data from RLS or fill from BSO_C), whatever the control.
  always_comb begin
    for (int unsigned o = 0; o < WIDTH; o++)
      assert (ndrv[o] == 1)
        else $error("xp_stage: output %0d has %0d drivers", o, ndrv[o]);
  end

endmodule
