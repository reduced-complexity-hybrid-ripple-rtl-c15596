// tb_hrcla4: exhaustive self-check of the 4-bit HRCLA block.
//
// Drives all 512 combinations of a, b and cin and compares {cout, sum} with
// the integer a + b + cin. It also checks the block's internal carry C3
// (the one handed from the lookahead network to the rippling full adder)
// against the carry out of the low three bits, and counts the cases in which
// C4 is produced only by C3 rippling through the top bit (a[3] xor b[3] = 1
// and C3 = 1), so that path is known to be exercised.
module tb_hrcla4;

  logic [3:0] a, b, sum;
  logic       cin, cout;
  int unsigned checks = 0;
  int unsigned failures = 0;
  int unsigned ripple_carries = 0;

  hrcla4 dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 9); v++) begin
      int unsigned total, low3;
      {a, b, cin} = 9'(v);
      #1;
      total = int'(a) + int'(b) + int'(cin);
      low3  = int'(a[2:0]) + int'(b[2:0]) + int'(cin);
      checks++;
      if ({cout, sum} != 5'(total)) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0d: got %0d expected %0d", a, b, cin, {cout, sum}, total);
      end
      checks++;
      if (dut.c_out[2] != (low3 >= 8)) begin
        failures++;
        $display("FAIL C3 a=%0d b=%0d cin=%0d: C3=%0d", a, b, cin, dut.c_out[2]);
      end
      if ((a[3] ^ b[3]) && low3 >= 8) ripple_carries++;
    end
    checks++;
    if (ripple_carries == 0) begin
      failures++;
      $display("FAIL the C3 -> C4 ripple path was never exercised");
    end
    $display("C3 rippled into C4 in %0d cases", ripple_carries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
