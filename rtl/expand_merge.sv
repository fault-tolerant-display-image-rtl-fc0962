// expand_merge: EXPAND / MERGE unit for one output word.
//
// MERGE interleaves the units of two 16-bit inputs A and B into one 32-bit
// word, A's unit in the lower position:
//   8-bit units : {B[15:8], A[15:8], B[7:0], A[7:0]}
//   16-bit units: {B, A}
// EXPAND is MERGE with B replaced by the extension of each unit of A, so each
// 8-bit (16-bit) unit of A becomes a 16-bit (32-bit) unit, zero-extended or,
// with ARITH set, sign-extended.
//
// Two instances, one per output word, fed from the low and the high half-word
// of each 32-bit half, turn two 32-bit words into one interleaved 64-bit
// double word.  Combinational.  The source article names EXPAND and MERGE and places
// them after the 2^5 stage; the interleaving order and the extension rule are
// this design's choices.
module expand_merge (
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic        unit16,   // 0: 8-bit units, 1: 16-bit units
  input  logic        expand,   // 1: EXPAND (B ignored), 0: MERGE
  input  logic        arith,    // EXPAND sign-extends
  output logic [31:0] dout
);

  logic [15:0] bx;

  always_comb begin
    if (!expand)
      bx = b;
    else if (unit16)
      bx = {16{arith & a[15]}};
    else
      bx = {{8{arith & a[15]}}, {8{arith & a[7]}}};
    if (unit16)
      dout = {bx, a};
    else
      dout = {bx[15:8], a[15:8], bx[7:0], a[7:0]};
  end

endmodule
