// fixed_path: extra fixed-distance interconnections between the 2^4 and the
// 2^5 shift stage.
//
// The 64-bit word is seen as eight byte lanes, lane n = bits 8n+7..8n.  The
// lower four lanes pass straight through.  Each upper lane (4..7) has a MUX
// that takes either its own byte or a byte from a lower lane, a fixed 8, 16
// or 24 bits (2^3, 2^4, 2^3+2^4) below it:
//   FP_FPACK16  : lane4 <- lane1 (24), lane5 <- lane3 (16), lane6 <- lane5 (8)
//   FP_FPACK32  : lanes 7..4 <- lanes 6..3 (8 bits each)
//   FP_FPACKFIX : lanes 5..4 <- lanes 3..2 (16 bits each)
// The 2^5 stage behind it then moves the gathered upper word down to the low
// word.  These fixed moves are the ones that a partitioned barrel shift
// cannot make in the same pass.
//
// Combinational.  The distances per instruction and the MUXes on the four
// upper byte lanes follow the source article; which lane feeds which, and the choice of
// gathering into the upper word, are this design's reading of its drawing.
module fixed_path
  import dmu_pkg::*;
(
  input  logic [DWORD_W-1:0] din,
  input  fpsel_e             sel,
  output logic [DWORD_W-1:0] dout
);

  logic [7:0][7:0] li;
  logic [7:0][7:0] lo;

  assign li   = din;
  assign dout = lo;

  always_comb begin
    lo = li;
    unique case (sel)
      FP_FPACK16: begin
        lo[4] = li[1];
        lo[5] = li[3];
        lo[6] = li[5];
      end
      FP_FPACK32: begin
        lo[4] = li[3];
        lo[5] = li[4];
        lo[6] = li[5];
        lo[7] = li[6];
      end
      FP_FPACKFIX: begin
        lo[4] = li[2];
        lo[5] = li[3];
      end
      default: ;
    endcase
  end

endmodule
