// tb_cla_carry_logic: exhaustive self-check of the carry lookahead network.
//
// The reference is the ripple recurrence C_{i+1} = G_i | (P_i & C_i), which
// the two-level lookahead form must equal for every input. The default
// three-bit network (the one used in the HRCLA block) is checked over all
// 128 input combinations. A four-bit instance is checked too, over all 512,
// to show the generic form holds beyond the default width. Only combinations
// that can occur from real operands (P and G never both 1) are meaningful to
// an adder, but the equations hold for all, so all are driven.
module tb_cla_carry_logic;

  logic [2:0] p3, g3, c3;
  logic       c0_3;
  logic [3:0] p4, g4, c4;
  logic       c0_4;
  int unsigned checks = 0;
  int unsigned failures = 0;

  cla_carry_logic dut3 (.p(p3), .g(g3), .c0(c0_3), .c(c3));
  cla_carry_logic #(.WIDTH(4)) dut4 (.p(p4), .g(g4), .c0(c0_4), .c(c4));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 7); v++) begin
      logic [2:0] ref_c;
      logic       carry;
      {p3, g3, c0_3} = 7'(v);
      #1;
      carry = c0_3;
      for (int i = 0; i < 3; i++) begin
        carry    = g3[i] | (p3[i] & carry);
        ref_c[i] = carry;
      end
      checks++;
      if (c3 !== ref_c) begin
        failures++;
        $display("FAIL w3 p=%b g=%b c0=%b: c=%b expected %b", p3, g3, c0_3, c3, ref_c);
      end
    end
    for (int v = 0; v < (1 << 9); v++) begin
      logic [3:0] ref_c;
      logic       carry;
      {p4, g4, c0_4} = 9'(v);
      #1;
      carry = c0_4;
      for (int i = 0; i < 4; i++) begin
        carry    = g4[i] | (p4[i] & carry);
        ref_c[i] = carry;
      end
      checks++;
      if (c4 !== ref_c) begin
        failures++;
        $display("FAIL w4 p=%b g=%b c0=%b: c=%b expected %b", p4, g4, c0_4, c4, ref_c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
