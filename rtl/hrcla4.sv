// hrcla4: 4-bit hybrid ripple carry lookahead adder block.
//
// Bits 0..2 are a carry lookahead adder: pg_sum_unit forms P_i = A_i xor B_i
// and G_i = A_i and B_i, cla_carry_logic turns them and C0 into C1, C2, C3 in
// two gate levels, and pg_sum_unit uses C0..C2 to form sum[2:0]. Instead of a
// fourth lookahead carry for C4 (five product terms, the widest a 5-input AND,
// in a plain 4-bit CLA), C3 is rippled through a full adder that adds A[3]
// and B[3] and gives sum[3] and C4. This removes the largest part of the
// lookahead network at the cost of one full-adder carry delay on the path
// C0 -> C4. The structure
// is the published HRCLA block diagram; the gate forms are this design's.
//
// Interface: a, b are 4 bits, cin is C0; sum is 4 bits, cout is C4.
// Purely combinational; the critical path is the 3-bit lookahead followed by
// the full adder's carry.
module hrcla4
  import hrcla_pkg::*;
(
  input  logic [BLOCK_W-1:0] a,
  input  logic [BLOCK_W-1:0] b,
  input  logic               cin,
  output logic [BLOCK_W-1:0] sum,
  output logic               cout
);

  logic [LOOKAHEAD_W-1:0] p;
  logic [LOOKAHEAD_W-1:0] g;
  logic [LOOKAHEAD_W-1:0] c_out;   // C1..C3 from the lookahead network
  logic [LOOKAHEAD_W-1:0] c_in;    // C0..C2, carry into bits 0..2

  assign c_in = {c_out[LOOKAHEAD_W-2:0], cin};

  pg_sum_unit #(.WIDTH(LOOKAHEAD_W)) u_pg_sum (
    .a   (a[LOOKAHEAD_W-1:0]),
    .b   (b[LOOKAHEAD_W-1:0]),
    .c   (c_in),
    .p   (p),
    .g   (g),
    .sum (sum[LOOKAHEAD_W-1:0])
  );

  cla_carry_logic #(.WIDTH(LOOKAHEAD_W)) u_lookahead (
    .p  (p),
    .g  (g),
    .c0 (cin),
    .c  (c_out)
  );

  // The rippling top bit: C3 -> full adder -> sum[3], C4.
  full_adder u_ripple (
    .a    (a[BLOCK_W-1]),
    .b    (b[BLOCK_W-1]),
    .cin  (c_out[LOOKAHEAD_W-1]),
    .sum  (sum[BLOCK_W-1]),
    .cout (cout)
  );

endmodule
