// hrcla_nbit: N-bit hybrid ripple carry lookahead adder (top level).
//
// Computes {cout, sum} = a + b + cin by cascading N/4 hrcla4 blocks: block k
// adds bits 4k+3..4k and passes its carry out C_{4k+4} to the carry in of
// block k+1, so carries ripple from block to block as in a cascaded CLA.
// Within each block three carries come from lookahead and the fourth from a
// full adder (see hrcla4). The default N = 4 is the single-block adder the
// original HRCLA work implements and measures; it also evaluates N = 8 to 256, which
// this module builds by setting N. N must be a multiple of 4, as the
// published structure only cascades whole 4-bit blocks.
//
// Interface: a, b are N bits, cin the carry in C0; sum is N bits, cout the
// carry out C_N. Purely combinational; the critical path runs through the
// block carries, one 3-bit lookahead plus one full-adder carry per block.
module hrcla_nbit
  import hrcla_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  localparam int unsigned NBLK = N / BLOCK_W;

  if (N == 0 || N % BLOCK_W != 0) begin : g_bad_width
    $error("hrcla_nbit: N must be a non-zero multiple of %0d", BLOCK_W);
  end

  // carry[k] is the carry into block k; carry[NBLK] is the final carry out.
  logic [NBLK:0] carry;

  assign carry[0] = cin;

  for (genvar k = 0; k < NBLK; k++) begin : g_blk
    hrcla4 u_blk (
      .a    (a[k*BLOCK_W +: BLOCK_W]),
      .b    (b[k*BLOCK_W +: BLOCK_W]),
      .cin  (carry[k]),
      .sum  (sum[k*BLOCK_W +: BLOCK_W]),
      .cout (carry[k+1])
    );
  end

  assign cout = carry[NBLK];

endmodule
