// tb_fixed_path: self-checking testbench of the fixed extra shift paths
// between the 2^4 and 2^5 stages.  For each setting and random data it checks
// every byte lane: lanes 0..3 always pass, and the upper lanes carry the byte
// from the fixed distance below that the setting selects.
module tb_fixed_path;
  import dmu_pkg::*;

  logic [63:0] din, dout;
  fpsel_e      sel;

  fixed_path dut (.din, .sel, .dout);

  int unsigned checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Distance in bytes that upper lane n is moved up by, per setting.
  function automatic int unsigned lane_dist(fpsel_e s, int unsigned n);
    case (s)
      FP_FPACK16:  return (n == 4) ? 3 : (n == 5) ? 2 : (n == 6) ? 1 : 0;
      FP_FPACK32:  return 1;
      FP_FPACKFIX: return (n < 6) ? 2 : 0;
      default:     return 0;
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 400; i++) begin
      din = {$urandom, $urandom};
      sel = fpsel_e'(i % 4);
      #1;
      for (int n = 0; n < 8; n++) begin
        int unsigned src;
        src = (n < 4) ? n : n - lane_dist(sel, n);
        checks++;
        if (dout[8*n +: 8] !== din[8*src +: 8]) begin
          failures++;
          $display("sel=%s lane %0d: got %h exp %h", sel.name(), n, dout[8*n +: 8], din[8*src +: 8]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
