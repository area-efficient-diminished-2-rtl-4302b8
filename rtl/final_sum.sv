// final_sum: final sum generation unit of the diminished-1 modulo 2^n+1 adder.
//
// Each four-bit group k receives one carry from the carry computation unit:
// group 0 the inverted end-around carry ~cg[K-1] (the complement of the
// carry-out of the most significant group), group k > 0 the carry cg[k-1] out
// of the group below. Inside the group the carries that would enter bits
// 1..3 are prepared twice, as if the group carry were 0 (gg) and as if it were
// 1 (pp):
//     gg1 = g0,                 pp1 = p0
//     gg2 = g1 | p1 & gg1,      pp2 = g1 | p1 & pp1
//     gg3 = g2 | p2 & gg2,      pp3 = g2 | p2 & pp2
// Since gg implies pp, selecting between them by the group carry C reduces to
// c = gg | pp & C, one AND and one OR instead of a multiplexer, and the sum bit
// is s = h XOR c (bit 0 of the group: s = h XOR C). The group size, the
// gg/pp recurrences and the reduced selection follow the design; only the
// bit-level arrangement is this implementation's. Purely combinational.
module final_sum
  import dim1_pkg::*;
#(
  parameter int unsigned N = 16   // operand width, a multiple of 4
) (
  input  logic [N-1:0]         h,      // half sums
  input  logic [N-1:0]         g,      // bit generates
  input  logic [N-1:0]         p,      // bit propagates
  input  logic [N/GROUP_W-1:0] cg,     // cg[k]: carry out of group k
  output logic [N-1:0]         s       // sum
);

  localparam int unsigned K = N / GROUP_W;

  for (genvar k = 0; k < K; k++) begin : g_group
    logic               cgrp;        // carry entering the group
    logic [GROUP_W-1:0] gg, pp;      // carry into bit j if cgrp = 0 / cgrp = 1

    if (k == 0) begin : g_first
      assign cgrp = ~cg[K-1];   // inverted end-around carry
    end else begin : g_rest
      assign cgrp = cg[k-1];
    end

    assign gg[0] = 1'b0;
    assign pp[0] = 1'b1;
    for (genvar j = 1; j < GROUP_W; j++) begin : g_bit
      assign gg[j] = g[GROUP_W*k+j-1] | (p[GROUP_W*k+j-1] & gg[j-1]);
      assign pp[j] = g[GROUP_W*k+j-1] | (p[GROUP_W*k+j-1] & pp[j-1]);
    end

    // Reduced group-sum selection: gg | pp & C picks gg when C = 0, pp when C = 1.
    assign s[GROUP_W*k +: GROUP_W] = h[GROUP_W*k +: GROUP_W] ^ (gg | (pp & {GROUP_W{cgrp}}));
  end

endmodule
