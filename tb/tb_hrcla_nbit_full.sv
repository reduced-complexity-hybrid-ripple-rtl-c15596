// tb_hrcla_nbit_full: the top-level adder at its default size, exhaustively.
//
// Instantiates hrcla_nbit with no parameter override (the single 4-bit HRCLA
// block) and applies every one of the 512 operand/carry-in combinations,
// comparing {cout, sum} with the integer a + b + cin. It also counts how
// often a carry out is produced, and how often it comes from C3 rippling
// through the full adder of bit 3, and fails if either never happens.
module tb_hrcla_nbit_full;

  logic [3:0] a, b, sum;
  logic       cin, cout;
  int unsigned checks = 0;
  int unsigned failures = 0;
  int unsigned carry_outs = 0;
  int unsigned ripple_carries = 0;

  hrcla_nbit dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

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
      if (cout) carry_outs++;
      if ((a[3] ^ b[3]) && low3 >= 8) ripple_carries++;
    end
    checks += 2;
    if (carry_outs == 0) begin
      failures++;
      $display("FAIL no carry out was ever produced");
    end
    if (ripple_carries == 0) begin
      failures++;
      $display("FAIL C3 never rippled into C4");
    end
    $display("carry outs %0d, of which rippled from C3 %0d", carry_outs, ripple_carries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
