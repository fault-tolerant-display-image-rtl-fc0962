// out_mux: output word assembly of the data manipulation unit.
//
// Builds up to four 32-bit result words R[0..3] and their count from
//   S      the 64-bit result of the 2^5 stage (shifter output),
//   EM_LO / EM_HI  the two EXPAND/MERGE words,
//   W[0..3] the operand words on the bypass lines.
// Selections (W[n].b[k] is byte k of word n, .h[k] half-word k):
//   OS_SHIFT : R0 = S[31:0], R1 = S[63:32]                       (2 words)
//   OS_LO    : R0 = S[31:0]                                      (1 word)
//   OS_EM    : R0 = EM_LO, R1 = EM_HI                            (2 words)
//   OS_PACK4B: R0 = {W3.b[SEL], W2.b[SEL], S[39:32], S[7:0]}     (1 word)
//   OS_PACK4H: R0 = {S[47:32], S[15:0]}, R1 = {W3.h[SEL], W2.h[SEL]} (2)
//   OS_PUSH24: R0 = {W3.b2, W2.b2, S[39:32], S[7:0]},
//              R1 = {W1[15:0], W0[15:0]}, R2 = {W3[15:0], W2[15:0]} (3)
//   OS_POP24 : Rn = {8'h00, W0.b[n], Hn} with H0..H3 = W1.h0, W1.h1,
//              W2.h0, W2.h1                                        (4 words)
// For the pack instructions the shifter has already moved the selected unit
// of W0 and W1 to the bottom of each 32-bit half; the byte/half selectors on
// the W2/W3 bypass lines do the same for the other two words.  Unused result
// words are zero.
//
// Combinational.  The source article shows output MUXes fed by the shifter, the
// EXPAND/MERGE blocks and bypass lines, and gives the PUSH24P/POP24P word
// layout; the lane order inside the words is this design's choice.
module out_mux
  import dmu_pkg::*;
(
  input  logic [DWORD_W-1:0]          s,
  input  logic [WORD_W-1:0]           em_lo,
  input  logic [WORD_W-1:0]           em_hi,
  input  logic [3:0][WORD_W-1:0]      w,
  input  osel_e                       osel,
  input  logic [1:0]                  sel,
  output logic [3:0][WORD_W-1:0]      r,
  output logic [2:0]                  cnt
);

  // Byte and half-word selectors on the W2/W3 bypass lines.
  logic [7:0]  w2b, w3b;
  logic [15:0] w2h, w3h;

  always_comb begin
    w2b = w[2][8*sel +: 8];
    w3b = w[3][8*sel +: 8];
    w2h = sel[0] ? w[2][31:16] : w[2][15:0];
    w3h = sel[0] ? w[3][31:16] : w[3][15:0];
  end

  always_comb begin
    r   = '0;
    cnt = 3'd0;
    unique case (osel)
      OS_SHIFT: begin
        r[0] = s[31:0];
        r[1] = s[63:32];
        cnt  = 3'd2;
      end
      OS_LO: begin
        r[0] = s[31:0];
        cnt  = 3'd1;
      end
      OS_EM: begin
        r[0] = em_lo;
        r[1] = em_hi;
        cnt  = 3'd2;
      end
      OS_PACK4B: begin
        r[0] = {w3b, w2b, s[39:32], s[7:0]};
        cnt  = 3'd1;
      end
      OS_PACK4H: begin
        r[0] = {s[47:32], s[15:0]};
        r[1] = {w3h, w2h};
        cnt  = 3'd2;
      end
      OS_PUSH24: begin
        r[0] = {w[3][23:16], w[2][23:16], s[39:32], s[7:0]};
        r[1] = {w[1][15:0], w[0][15:0]};
        r[2] = {w[3][15:0], w[2][15:0]};
        cnt  = 3'd3;
      end
      OS_POP24: begin
        r[0] = {8'h00, w[0][7:0],   w[1][15:0]};
        r[1] = {8'h00, w[0][15:8],  w[1][31:16]};
        r[2] = {8'h00, w[0][23:16], w[2][15:0]};
        r[3] = {8'h00, w[0][31:24], w[2][31:16]};
        cnt  = 3'd4;
      end
      default: ;
    endcase
  end

endmodule
