// tb_hrcla_sizes: the HRCLA at every width the comparison sweeps, 4 to 256.
//
// One adder instance per width N = 4, 8, 16, 32, 64, 128, 256 (1 to 64
// cascaded 4-bit blocks). Each is given the same sequence: directed corner
// cases (the carry in travelling the whole length, all-ones operands, zero,
// alternating patterns) followed by 5000 random operand pairs built 32 bits
// at a time. The result {cout, sum} is compared with the (N+1)-bit integer
// a + b + cin formed by the simulator. The widths run one after another.
module tb_hrcla_sizes;

  localparam int unsigned NSIZES = 7;
  localparam int unsigned NMAX   = 256;
  localparam int unsigned RANDOM_VECTORS = 5000;

  int unsigned checks = 0;
  int unsigned failures = 0;
  int unsigned done = 0;

  for (genvar s = 0; s < NSIZES; s++) begin : g_size
    localparam int unsigned N = 4 << s;

    logic [N-1:0] a, b, sum;
    logic         cin, cout;

    hrcla_nbit #(.N(N)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

    task automatic check(input logic [N-1:0] x, input logic [N-1:0] y, input logic ci);
      logic [N:0] expect_total;
      a = x; b = y; cin = ci;
      #1;
      expect_total = {1'b0, x} + {1'b0, y} + {{N{1'b0}}, ci};
      checks++;
      if ({cout, sum} != expect_total) begin
        failures++;
        $display("FAIL N=%0d a=%h b=%h cin=%0d", N, x, y, ci);
      end
    endtask

    function automatic logic [N-1:0] rand_word();
      logic [NMAX-1:0] w;
      for (int i = 0; i < int'(NMAX / 32); i++) w[32*i +: 32] = $urandom;
      return w[N-1:0];
    endfunction

    initial begin
      a = '0; b = '0; cin = 1'b0;
      wait (done == s);
      check('1, '0, 1'b1);
      check('0, '1, 1'b1);
      check('1, '1, 1'b1);
      check('1, '1, 1'b0);
      check('0, '0, 1'b0);
      check({(N/2){2'b01}}, {(N/2){2'b10}}, 1'b1);
      check({(N/4){4'b0111}}, {(N/4){4'b0001}}, 1'b0);
      for (int t = 0; t < int'(RANDOM_VECTORS); t++) check(rand_word(), rand_word(), 1'($urandom));
      $display("N=%0d done", N);
      done++;
    end
  end

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (done == NSIZES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
