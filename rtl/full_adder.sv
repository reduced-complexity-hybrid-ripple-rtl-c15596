// full_adder: one-bit full adder.
//
// Adds a, b and cin; sum is their exclusive-or and cout is the majority of the
// three. In the HRCLA block it is the "rippling" stage: it takes the carry
// into the top bit of the block (C3) from the lookahead network and produces
// both the top sum bit and the block's carry out (C4), so the lookahead
// network need only be three bits wide. The published HRCLA gives only the function
// of the cell; the gate form below (sum = a^b^cin, cout = a&b | cin&(a^b)) is
// this design's choice.
//
// Interface: a, b, cin in; sum, cout out. Purely combinational, no clock.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic p;

  always_comb begin
    p    = a ^ b;
    sum  = p ^ cin;
    cout = (a & b) | (cin & p);
  end

endmodule
