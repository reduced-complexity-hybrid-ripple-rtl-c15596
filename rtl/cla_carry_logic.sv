// cla_carry_logic: two-level carry lookahead network.
//
// Produces every carry of a WIDTH-bit section directly from the propagate and
// generate bits and the section's carry in, without a ripple chain:
//
//   C_{i+1} = G_i + P_i G_{i-1} + P_i P_{i-1} G_{i-2} + ... + P_i ... P_0 C_0
//
// Each carry is an OR of i+2 product terms, the longest an AND of i+2 inputs,
// which is why fan-in grows with the width and the HRCLA stops at three bits.
// With the default WIDTH = 3 it gives C1, C2 and C3, as in the published
// HRCLA equations; the same code gives the four-carry network of a plain 4-bit CLA
// with WIDTH = 4, which is not used here.
//
// Interface: p, g are WIDTH bits, c0 the carry into bit 0; c[i] is the carry
// OUT of bit i (i.e. C_{i+1}). Purely combinational.
module cla_carry_logic #(
  parameter int unsigned WIDTH = hrcla_pkg::LOOKAHEAD_W
) (
  input  logic [WIDTH-1:0] p,
  input  logic [WIDTH-1:0] g,
  input  logic             c0,
  output logic [WIDTH-1:0] c
);

  // Every product term is formed from the inputs only; no carry feeds another.
  always_comb begin
    for (int unsigned i = 0; i < WIDTH; i++) begin
      logic term;
      logic carry;
      // Term carrying c0 through bits 0..i.
      term = c0;
      for (int unsigned k = 0; k <= i; k++) term = term & p[k];
      carry = term;
      // Terms generated at bit j and propagated through bits j+1..i.
      for (int unsigned j = 0; j <= i; j++) begin
        term = g[j];
        for (int unsigned k = j + 1; k <= i; k++) term = term & p[k];
        carry = carry | term;
      end
      c[i] = carry;
    end
  end

endmodule
