// dim1_mod_adder: diminished-1 modulo 2^n+1 adder built on a group-based
// parallel-prefix carry network.
//
// Operands are in diminished-1 form: a value A in 1..2^N is carried as
// a = A - 1 on N bits. The adder returns s = (a + b + ~cout) mod 2^N, which is
// the diminished-1 form of (A + B) mod (2^N + 1) whenever that result is not 0:
// when a + b overflows (cout = 1) the carry is dropped, which subtracts 2^N + 1
// from A + B; otherwise the inverted carry adds the 1 that the diminished-1
// encoding needs. A sum congruent to 0 (a + b = 2^N - 1) comes out as s = 0;
// a zero indicator, which the diminished-1 system keeps beside the N bits, is
// not part of this block.
//
// Three stages, as in the design: the pre-processing unit (g, p, h per bit),
// the carry computation unit (four-bit group trees and a cyclic Kogge-Stone
// network over the N/4 groups with the inverted end-around carry folded in),
// and the final sum generation unit (per group, h XOR (gg | pp & C)).
// Interface: a, b in, s and cout out; cout is the carry-out of a + b.
// Purely combinational: no clock, no reset, results follow the inputs after
// the gate delay.
module dim1_mod_adder
  import dim1_pkg::*;
#(
  parameter int unsigned N = 16   // operand width (the design's main case is n = 16)
) (
  input  logic [N-1:0] a,     // diminished-1 operand A - 1
  input  logic [N-1:0] b,     // diminished-1 operand B - 1
  output logic [N-1:0] s,     // diminished-1 sum
  output logic         cout   // carry-out of a + b; its complement was added at bit 0
);

  localparam int unsigned K = N / GROUP_W;

  logic [N-1:0] g, p, h;
  logic [K-1:0] cg;

  preproc_unit #(.N(N)) u_pre (
    .a(a), .b(b), .g(g), .p(p), .h(h)
  );

  carry_computation #(.N(N)) u_carry (
    .g(g), .p(p), .cg(cg)
  );

  final_sum #(.N(N)) u_sum (
    .h(h), .g(g), .p(p), .cg(cg), .s(s)
  );

  assign cout = cg[K-1];

endmodule
