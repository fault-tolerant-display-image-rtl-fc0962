// dmu_ref_pkg: instruction-level reference model of the data manipulation
// unit, used by the testbenches.  It computes each instruction's result
// words straight from its definition (element-wise shifts, byte and
// half-word gathers), independently of how the datapath routes the bits.
package dmu_ref_pkg;
  import dmu_pkg::*;

  typedef logic [3:0][31:0] words_t;

  function automatic logic [7:0] byte_of(logic [63:0] d, int unsigned n);
    return d[8*n +: 8];
  endfunction

  // Partitioned shift of a 64-bit word.  Amounts at or above the element
  // width leave only the fill (0, or the sign for arithmetic right shifts).
  function automatic logic [63:0] pshift(logic [63:0] d, int unsigned amt,
                                         int unsigned pw, bit left, bit arith);
    logic [63:0] res;
    res = '0;
    for (int unsigned base = 0; base < 64; base += pw) begin
      logic [63:0] e, mask;
      logic        sgn;
      mask = (pw == 64) ? '1 : ((64'd1 << pw) - 1);
      e    = (d >> base) & mask;
      sgn  = e[pw-1];
      if (amt >= pw)
        e = (arith && !left && sgn) ? mask : '0;
      else if (left)
        e = (e << amt) & mask;
      else begin
        e = e >> amt;
        if (arith && sgn) e = e | (mask & ~(mask >> amt));
      end
      res = res | (e << base);
    end
    return res;
  endfunction

  // One cross-point stage of width W and distance D: shift by D in the
  // partition, or, when the partition is wider than W, shift the W-bit
  // segment with EXT_LO / EXT_HI entering at the edges.
  function automatic logic [63:0] xp_ref(logic [63:0] din, logic [31:0] ext_lo,
                                         logic [31:0] ext_hi, bit en, bit left,
                                         bit arith, part_e part,
                                         int unsigned W, int unsigned D);
    logic [63:0] wmask, x;
    int unsigned pw;
    wmask = (W == 64) ? '1 : ((64'd1 << W) - 1);
    pw    = part_width(part);
    if (!en) return din & wmask;
    if (pw > W) begin
      if (left) x = (din << D) | (64'(ext_lo) & ((64'd1 << D) - 1));
      else      x = (din >> D) | ((64'(ext_hi) & ((64'd1 << D) - 1)) << (W - D));
      return x & wmask;
    end
    return pshift(din, D, pw, left, arith) & wmask;
  endfunction

  function automatic void dmu_ref(input op_e op, input logic [5:0] amt,
                                  input part_e part, input logic [1:0] sel,
                                  input words_t w,
                                  output words_t r, output int unsigned cnt);
    logic [63:0] d, x;
    int unsigned pw;
    d  = {w[1], w[0]};
    pw = part_width(part);
    r  = '0;
    cnt = 0;
    case (op)
      OP_SHL, OP_SHR, OP_SAR: begin
        x = pshift(d, 32'(amt), pw, op == OP_SHL, op == OP_SAR);
        r[0] = x[31:0]; r[1] = x[63:32]; cnt = 2;
      end
      OP_PACK64: begin
        x = d >> amt;
        r[0] = x[31:0]; cnt = 1;
      end
      OP_PACK4B: begin
        for (int n = 0; n < 4; n++) r[0][8*n +: 8] = w[n][8*sel +: 8];
        cnt = 1;
      end
      OP_PACK4HW: begin
        for (int n = 0; n < 4; n++) r[n/2][16*(n%2) +: 16] = w[n][16*sel[0] +: 16];
        cnt = 2;
      end
      OP_PUSH24P: begin
        for (int n = 0; n < 4; n++) begin
          r[0][8*n +: 8]                = w[n][23:16];
          r[1 + n/2][16*(n%2) +: 16]    = w[n][15:0];
        end
        cnt = 3;
      end
      OP_POP24P: begin
        for (int n = 0; n < 4; n++)
          r[n] = {8'h00, w[0][8*n +: 8], w[1 + n/2][16*(n%2) +: 16]};
        cnt = 4;
      end
      OP_FPACK16: begin
        for (int n = 0; n < 4; n++) r[0][8*n +: 8] = byte_of(d, 2*n + sel[0]);
        cnt = 1;
      end
      OP_FPACK32: begin
        r[0] = {w[1][23:0], w[0][8*sel +: 8]}; cnt = 1;
      end
      OP_FPACKFIX: begin
        r[0] = {w[1][16*sel[0] +: 16], w[0][16*sel[0] +: 16]}; cnt = 1;
      end
      OP_EXPAND, OP_EXPANDS: begin
        x = '0;
        if (part == PART16)
          for (int n = 0; n < 2; n++) begin
            logic [15:0] h = w[0][16*n +: 16];
            x[32*n +: 32] = (op == OP_EXPANDS) ? 32'(signed'(h)) : 32'(h);
          end
        else
          for (int n = 0; n < 4; n++) begin
            logic [7:0] b = w[0][8*n +: 8];
            x[16*n +: 16] = (op == OP_EXPANDS) ? 16'(signed'(b)) : 16'(b);
          end
        r[0] = x[31:0]; r[1] = x[63:32]; cnt = 2;
      end
      OP_MERGE: begin
        x = '0;
        if (part == PART16)
          for (int n = 0; n < 2; n++) x[32*n +: 32] = {w[1][16*n +: 16], w[0][16*n +: 16]};
        else
          for (int n = 0; n < 4; n++) x[16*n +: 16] = {w[1][8*n +: 8], w[0][8*n +: 8]};
        r[0] = x[31:0]; r[1] = x[63:32]; cnt = 2;
      end
      default: ;
    endcase
  endfunction

endpackage
