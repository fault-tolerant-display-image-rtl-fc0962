// tb_expand_merge: self-checking testbench of the EXPAND/MERGE unit.
// MERGE results are compared unit by unit with the interleaving rule (A's
// unit below B's), EXPAND results with zero and sign extension of each unit,
// for 8- and 16-bit units and random data.
module tb_expand_merge;

  logic [15:0] a, b;
  logic        unit16, expand, arith;
  logic [31:0] dout;

  expand_merge dut (.a, .b, .unit16, .expand, .arith, .dout);

  int unsigned checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp_v;
    for (int i = 0; i < 2000; i++) begin
      a = 16'($urandom); b = 16'($urandom);
      unit16 = 1'($urandom); expand = 1'($urandom); arith = 1'($urandom);
      #1;
      if (unit16) begin
        if (expand) exp_v = arith ? 32'(signed'(a)) : 32'(a);
        else        exp_v = {b, a};
      end else begin
        for (int n = 0; n < 2; n++) begin
          logic [7:0] ua;
          ua = a[8*n +: 8];
          if (expand) exp_v[16*n +: 16] = arith ? 16'(signed'(ua)) : 16'(ua);
          else        exp_v[16*n +: 16] = {b[8*n +: 8], ua};
        end
      end
      checks++;
      if (dout !== exp_v) begin
        failures++;
        if (failures < 10)
          $display("a=%h b=%h u16=%0b exp=%0b ar=%0b got=%h want=%h",
                   a, b, unit16, expand, arith, dout, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
