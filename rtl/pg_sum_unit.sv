// pg_sum_unit: propagate/generate and sum bits of a lookahead section.
//
// For each bit i it forms the carry propagate P_i = A_i xor B_i and the carry
// generate G_i = A_i and B_i, which go to the lookahead network, and the sum
// S_i = P_i xor C_i, where C_i is the carry into bit i coming back from that
// network (C_0 is the carry in of the block). The sum reuses the propagate
// XOR, so there is one XOR pair per bit. This is the block drawn as a
// "3-bit full adder" in the HRCLA block diagram; the equations for P and G
// are the published HRCLA's.
//
// Interface: a, b, c are WIDTH bits (c[i] is the carry into bit i);
// p, g, sum are WIDTH bits. Purely combinational.
module pg_sum_unit #(
  parameter int unsigned WIDTH = hrcla_pkg::LOOKAHEAD_W
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  output logic [WIDTH-1:0] p,
  output logic [WIDTH-1:0] g,
  output logic [WIDTH-1:0] sum
);

  always_comb begin
    p   = a ^ b;
    g   = a & b;
    sum = p ^ c;
  end

endmodule
