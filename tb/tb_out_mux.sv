// tb_out_mux: self-checking testbench of the output word assembly.
// For every selection and selector value with random inputs it rebuilds the
// expected result words lane by lane from the layout rules (shifter word S,
// EXPAND/MERGE words, bypassed operand words W0..W3) and checks the word
// count.
module tb_out_mux;
  import dmu_pkg::*;

  logic [63:0]      s;
  logic [31:0]      em_lo, em_hi;
  logic [3:0][31:0] w, r, e;
  osel_e            osel;
  logic [1:0]       sel;
  logic [2:0]       cnt;
  int unsigned      ecnt;

  out_mux dut (.s, .em_lo, .em_hi, .w, .osel, .sel, .r, .cnt);

  int unsigned checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1400; i++) begin
      s = {$urandom, $urandom}; em_lo = $urandom; em_hi = $urandom;
      for (int n = 0; n < 4; n++) w[n] = $urandom;
      osel = osel_e'(i % 7);
      sel  = 2'($urandom);
      e = '0;
      case (osel)
        OS_SHIFT:  begin e[0] = s[31:0]; e[1] = s[63:32]; ecnt = 2; end
        OS_LO:     begin e[0] = s[31:0]; ecnt = 1; end
        OS_EM:     begin e[0] = em_lo; e[1] = em_hi; ecnt = 2; end
        OS_PACK4B: begin
          e[0][7:0] = s[7:0]; e[0][15:8] = s[39:32];
          e[0][23:16] = w[2] >> (8 * sel); e[0][31:24] = w[3] >> (8 * sel);
          ecnt = 1;
        end
        OS_PACK4H: begin
          e[0] = {s[47:32], s[15:0]};
          e[1][15:0] = w[2] >> (16 * sel[0]); e[1][31:16] = w[3] >> (16 * sel[0]);
          ecnt = 2;
        end
        OS_PUSH24: begin
          e[0] = {w[3][23:16], w[2][23:16], s[39:32], s[7:0]};
          e[1] = (w[1] << 16) | (w[0] & 32'hFFFF);
          e[2] = (w[3] << 16) | (w[2] & 32'hFFFF);
          ecnt = 3;
        end
        default: begin
          for (int n = 0; n < 4; n++)
            e[n] = ((w[0] >> (8 * n)) & 32'hFF) << 16
                 | ((w[1 + n / 2] >> (16 * (n % 2))) & 32'hFFFF);
          ecnt = 4;
        end
      endcase
      #1;
      checks++;
      if (r !== e || cnt != 3'(ecnt)) begin
        failures++;
        if (failures < 10) $display("osel=%s sel=%0d r=%h exp=%h cnt=%0d", osel.name(), sel, r, e, cnt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
