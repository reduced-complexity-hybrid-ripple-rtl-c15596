// tb_pg_sum_unit: exhaustive self-check of the propagate/generate/sum unit.
//
// For the default width of three bits, drives every combination of a, b and
// the incoming carries c (512 cases) and checks each bit separately: p must
// be 1 exactly when one of a_i, b_i is 1, g exactly when both are, and sum
// must be the low bit of a_i + b_i + c_i. A watchdog ends a hung run.
module tb_pg_sum_unit;

  localparam int unsigned W = 3;

  logic [W-1:0] a, b, c, p, g, sum;
  int unsigned checks = 0;
  int unsigned failures = 0;

  pg_sum_unit dut (.a(a), .b(b), .c(c), .p(p), .g(g), .sum(sum));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (3 * W)); v++) begin
      {a, b, c} = (3 * W)'(v);
      #1;
      for (int i = 0; i < int'(W); i++) begin
        int ones;
        ones = int'(a[i]) + int'(b[i]);
        checks++;
        if (p[i] != (ones == 1) || g[i] != (ones == 2) ||
            sum[i] != 1'((ones + int'(c[i])) % 2)) begin
          failures++;
          $display("FAIL bit %0d a=%b b=%b c=%b: p=%b g=%b sum=%b", i, a, b, c, p, g, sum);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
