// tb_hrcla_nbit: end-to-end test of the cascaded N-bit HRCLA.
//
// Two instances are checked against the integer sum a + b + cin:
//  * N = 8 (two blocks), over all 2^17 operand/carry-in combinations;
//  * N = 32 (eight blocks), over directed corner cases and 20000 random
//    vectors.
// For each the test counts, by looking at the blocks' internal carries, how
// often each carry mechanism of the design acted, and fails if any never did:
//  * lookahead: a carry into bit 1, 2 or 3 of a block produced by the
//    lookahead network with a 1 value;
//  * ripple: C3 = 1 turned into the block carry out by the top full adder
//    alone (a[3] xor b[3] = 1);
//  * cascade: a block's carry out entering the next block as its carry in;
//  * through: the carry in passing through every block to the carry out
//    (all bits propagate), the longest path of the design;
//  * carry out of the whole adder.
module tb_hrcla_nbit;

  localparam int unsigned NA = 8;
  localparam int unsigned NB = 32;

  logic [NA-1:0] a8, b8, s8;
  logic          cin8, cout8;
  logic [NB-1:0] a32, b32, s32;
  logic          cin32, cout32;

  int unsigned checks = 0;
  int unsigned failures = 0;
  int unsigned n_lookahead = 0, n_ripple = 0, n_cascade = 0, n_through = 0, n_cout = 0;

  hrcla_nbit #(.N(NA)) dut8  (.a(a8),  .b(b8),  .cin(cin8),  .sum(s8),  .cout(cout8));
  hrcla_nbit #(.N(NB)) dut32 (.a(a32), .b(b32), .cin(cin32), .sum(s32), .cout(cout32));

  // Block-level observation of the 8-bit adder: carries C1..C3 and block
  // carry out of each block, taken from the hierarchy.
  function automatic void count_mechanisms8();
    logic [2:0] c0l, c1l;
    c0l = dut8.g_blk[0].u_blk.c_out;
    c1l = dut8.g_blk[1].u_blk.c_out;
    if (c0l != 0 || c1l != 0) n_lookahead++;
    if ((a8[3] ^ b8[3]) && c0l[2]) n_ripple++;
    if ((a8[7] ^ b8[7]) && c1l[2]) n_ripple++;
    if (dut8.carry[1]) n_cascade++;
    if (cin8 && (a8 ^ b8) == '1) n_through++;
    if (cout8) n_cout++;
  endfunction

  task automatic check32(input logic [NB-1:0] x, input logic [NB-1:0] y, input logic ci);
    logic [NB:0] expect_total;
    a32 = x; b32 = y; cin32 = ci;
    #1;
    expect_total = {1'b0, x} + {1'b0, y} + {{NB{1'b0}}, ci};
    checks++;
    if ({cout32, s32} != expect_total) begin
      failures++;
      $display("FAIL N=32 a=%h b=%h cin=%0d: got %h expected %h", x, y, ci, {cout32, s32}, expect_total);
    end
    // Compare the inter-block carries with the reference carries into bits 4k.
    for (int k = 1; k <= int'(NB / 4); k++) begin
      logic [NB:0] low;
      low = {1'b0, x & ((NB)'(1 << (4 * k)) - 1'b1)} + {1'b0, y & ((NB)'(1 << (4 * k)) - 1'b1)}
            + {{NB{1'b0}}, ci};
      if (k == int'(NB / 4)) low = expect_total;
      checks++;
      if (dut32.carry[k] != low[4 * k]) begin
        failures++;
        $display("FAIL N=32 carry into block %0d: got %0d", k, dut32.carry[k]);
      end
      if (k < int'(NB / 4) && dut32.carry[k]) n_cascade++;
    end
    if (ci && (x ^ y) == '1) n_through++;
    if (cout32) n_cout++;
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a32 = '0; b32 = '0; cin32 = 1'b0;
    // Exhaustive 8-bit run.
    for (int v = 0; v < (1 << 17); v++) begin
      int unsigned total;
      {a8, b8, cin8} = 17'(v);
      #1;
      total = int'(a8) + int'(b8) + int'(cin8);
      checks++;
      if ({cout8, s8} != 9'(total)) begin
        failures++;
        $display("FAIL N=8 a=%0d b=%0d cin=%0d: got %0d expected %0d", a8, b8, cin8, {cout8, s8}, total);
      end
      count_mechanisms8();
    end
    // Directed 32-bit corners: full propagate chain, all generate, zeros.
    check32('1, '0, 1'b1);
    check32('0, '1, 1'b1);
    check32(32'h5555_5555, 32'hAAAA_AAAA, 1'b1);
    check32(32'h5555_5555, 32'hAAAA_AAAA, 1'b0);
    check32('1, '1, 1'b1);
    check32('1, '1, 1'b0);
    check32('0, '0, 1'b0);
    check32(32'h0000_000F, 32'h0000_0001, 1'b0);
    check32(32'h7FFF_FFFF, 32'h0000_0001, 1'b0);
    // Random 32-bit run.
    for (int t = 0; t < 20000; t++) check32($urandom, $urandom, 1'($urandom));

    checks += 5;
    if (n_lookahead == 0) begin failures++; $display("FAIL lookahead carry never seen"); end
    if (n_ripple    == 0) begin failures++; $display("FAIL C3 ripple never seen"); end
    if (n_cascade   == 0) begin failures++; $display("FAIL block-to-block carry never seen"); end
    if (n_through   == 0) begin failures++; $display("FAIL full carry chain never seen"); end
    if (n_cout      == 0) begin failures++; $display("FAIL carry out never seen"); end
    $display("mechanisms: lookahead=%0d ripple=%0d cascade=%0d through=%0d cout=%0d",
             n_lookahead, n_ripple, n_cascade, n_through, n_cout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
