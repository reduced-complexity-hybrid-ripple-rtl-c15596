# Hybrid Ripple Carry Lookahead Adder (HRCLA)

A carry lookahead adder (CLA) computes every carry of a 4-bit group in two
gate levels. The price is a network whose fan-in and fan-out grow fast with
the group width. The carry out of a 4-bit group, C4, is by far the most
expensive term:

    C4 = G3 + P3 G2 + P3 P2 G1 + P3 P2 P1 G0 + P3 P2 P1 P0 C0

It has five product terms, and the widest is a 5-input AND. A ripple carry
adder (RCA) is the other extreme: it is small, but its delay grows by one
full-adder carry per bit.

The HRCLA sits between the two. In each 4-bit group it keeps lookahead for
the carries into bits 1, 2 and 3. It drops the lookahead term for C4: C3 is
rippled through an ordinary full adder, which adds bit 3 and produces C4.
This removes the widest part of the lookahead network, which saves area and
power. The cost is one full-adder carry delay on the path C0 -> C4. Wider
adders are built by chaining these 4-bit blocks, just as 4-bit CLA blocks are
chained.

The RTL here is purely combinational, with no clock and no reset.

## The 4-bit block (`hrcla4`)

```
            A[3] B[3]          A[2:0] B[2:0]
              |   |                 |   |
          +---v---v---+     +-------v---v--------+
   C4 <---| full_adder|<-+  |    pg_sum_unit     |<--- C0
          +-----+-----+  |  | P=A^B  G=A&B       |
                |        |  | sum=P^C            |
             sum[3]      |  +--+-----------^-----+
                         |     | P2..0     | C2,C1 (and C0)
                         |     | G2..0     |
                         |  +--v-----------+-----+
                         +--|  cla_carry_logic   |<--- C0
                     C3     |  (3-bit lookahead) |
                            +--------------------+
                 sum[2:0] from pg_sum_unit
```

* `pg_sum_unit` (WIDTH = 3) forms the propagate P_i = A_i xor B_i and the
  generate G_i = A_i and B_i. It also forms the sums: sum_i = P_i xor C_i,
  reusing the propagate XOR.
* `cla_carry_logic` (WIDTH = 3) builds each carry as a flat sum of products:
  - C1 = G0 + P0 C0
  - C2 = G1 + P1 G0 + P1 P0 C0
  - C3 = G2 + P2 G1 + P2 P1 G0 + P2 P1 P0 C0

  No carry is computed from another, so C3 is valid two gate levels after P
  and G. The module is written for any WIDTH. WIDTH = 4 gives the four-carry
  network of a conventional 4-bit CLA, which shows exactly what the HRCLA
  leaves out.
* `full_adder` adds A[3], B[3] and C3, and gives sum[3] and the block carry
  out C4.

The critical path of a block is P/G, then the 3-bit lookahead to C3, then
the full adder's carry to C4. The critical path of a plain CLA block ends at
the lookahead C4.

## The N-bit adder (`hrcla_nbit`, the top)

`hrcla_nbit #(N)` computes {cout, sum} = a + b + cin using N/4 `hrcla4`
blocks. Block k adds bits 4k+3..4k. Its carry out C_{4k+4} is the carry in of
block k+1. The carry out of the last block is `cout`.

* The default is N = 4: one block. That is the size whose area, power and
  delay were measured against a CLA and an RCA of the same width.
* The same comparison was swept over 8, 16, 32, 64, 128 and 256 bits. Set N
  to get those widths.
* N must be a non-zero multiple of 4. Any other value stops elaboration with
  an error.

Between blocks the carry ripples. For large N the delay therefore grows
linearly, at one block delay (lookahead plus full adder) per 4 bits.

| Port  | Dir | Width | Meaning                  |
|-------|-----|-------|--------------------------|
| a     | in  | N     | operand                  |
| b     | in  | N     | operand                  |
| cin   | in  | 1     | carry in, C0             |
| sum   | out | N     | a + b + cin, low N bits  |
| cout  | out | 1     | carry out, C_N           |

`hrcla_pkg` holds the two fixed sizes: `BLOCK_W` = 4 and `LOOKAHEAD_W` = 3.

## Design choices and departures

* **Gate forms.** For the full adder and the sum bits, only the function is
  specified. Here sum = a^b^cin and cout = a&b | cin&(a^b). The sum bits
  share the propagate XOR.
* **P and G.** Propagate is XOR and generate is AND, as the carry equations
  require. One description of the synthesised netlist swaps the two names.
  That reading would not give a correct adder, so it was not followed.
* **Slices of the top block.** The published N-bit block diagram labels the
  top block's slice N-1:N-5 and its carry in C_{N-5}. A 4-bit block covers
  N-1:N-4 with carry in C_{N-4}, and that is what is built.
* **No technology results.** The area, power and delay numbers belong to a
  45 nm standard-cell implementation. They cannot be reproduced from RTL:
  synthesis tools will restructure `a ^ b`, the sums of products and the full
  adder freely. To keep the HRCLA structure in a netlist, keep the hierarchy
  (do not flatten `hrcla4`) or map the full adder to a library FA cell.
* **Not included.** The RCA and the cascaded CLA are not included. They are
  only the reference points of the comparison.

## Verification

Each testbench is self-checking. Each ends by printing
`TB_RESULT checks=<n> failures=<n>`, and each has a watchdog that fails a
hung run.

| Testbench            | What it checks |
|----------------------|----------------|
| `tb_full_adder`      | all 8 input combinations |
| `tb_pg_sum_unit`     | all 512 inputs, bit by bit |
| `tb_cla_carry_logic` | WIDTH 3 and 4, all inputs, against the ripple recurrence C_{i+1} = G_i + P_i C_i |
| `tb_hrcla4`          | all 512 inputs against a + b + cin, and the internal C3; counts the cases where C4 comes from C3 rippling through bit 3 |
| `tb_hrcla_nbit_full` | the top at its default size (N = 4), all 512 inputs |
| `tb_hrcla_nbit`      | N = 8 over all 2^17 inputs; N = 32 on corner cases and 20 000 random vectors, with every inter-block carry checked |
| `tb_hrcla_sizes`     | N = 4, 8, ..., 256 on corner cases and 5000 random vectors each |

`tb_hrcla_nbit` also counts how often each carry mechanism fires:

* a lookahead carry inside a block;
* the C3 -> C4 ripple;
* a carry passed from block to block;
* the carry in travelling the full length;
* a final carry out.

The test fails if any of them never happens.

`tb_hrcla4` and `tb_hrcla_nbit` read internal signals by hierarchical name:
`c_out` (C1..C3) in `hrcla4`, and the `carry` vector and `g_blk[k].u_blk`
instances in `hrcla_nbit`. If you rename these, update the tests.

## Simulating

All RTL is in `rtl/` and all tests are in `tb/`. With Verilator 5, for
example:

```
verilator --binary --timing --assert rtl/hrcla_pkg.sv tb/tb_hrcla_nbit.sv \
          -y rtl --top-module tb_hrcla_nbit -Mdir obj_hrcla
./obj_hrcla/Vtb_hrcla_nbit
```

Replace the testbench name to run any other test. The package must be read
first. Every test finishes in well under a second.
