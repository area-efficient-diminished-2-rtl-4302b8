// carry_computation: carry computation unit of the diminished-1 modulo 2^n+1
// adder.
//
// The N bits form K = N/4 groups. Each group first reduces its four (g, p)
// pairs to one group pair (group_gp, three operators). The K group pairs then
// go through L = log2(K) levels of a cyclic Kogge-Stone prefix network: at
// level l, group k merges its current span with the span held by group
// k - 2^(l-1). When that index falls below zero it wraps around to group
// k - 2^(l-1) + K, and the wrapped pair enters inverted (dim1_pkg::wrap_invert),
// because a diminished-1 adder feeds its carry-out back into bit 0 complemented
// (the inverted end-around carry). For a span that has crossed the wrap, G
// then means "the carry is 1 whatever the upper groups not yet merged do" and
// P means "the carry is 1 unless those groups generate a carry that reaches
// the top". After L levels every group holds a span
// of all K groups, and its carry out of bit 4k+3 is
//     cg[k] = G[4k+3:0] | P[4k+3:0] & ~G[N-1:4k+4]
// which for a wrapped span is its G | P (one OR per group). The most
// significant group never wraps: cg[K-1] = G[N-1:0] is the carry-out of a + b,
// and its complement is the carry into bit 0.
// The unit has K*(L+3) operator nodes. For N = 16 that is the 20 nodes of the
// four-group, four-row network of the design. The NOR/NOT gates on the wrapped
// inputs and the closing OR per group are this implementation's own way of
// folding the inverted end-around carry into that network; the design shows
// only where the wrapped connections go. Purely combinational, L+2 operator
// levels deep plus one OR.
module carry_computation
  import dim1_pkg::*;
#(
  parameter int unsigned N = 16   // operand width, a multiple of 4 with N/4 a power of two
) (
  input  logic [N-1:0]         g,      // bit generates
  input  logic [N-1:0]         p,      // bit propagates (a OR b)
  output logic [N/GROUP_W-1:0] cg      // cg[k]: carry out of bit 4k+3
);

  localparam int unsigned K = N / GROUP_W;
  localparam int unsigned L = $clog2(K);

  if (N % GROUP_W != 0 || (K & (K - 1)) != 0 || K == 0) begin : g_bad_n
    $error("carry_computation: N must be 4 times a power of two, got %0d", N);
  end

  // g_lvl[l].node[k]: pair held by group k after l inter-group levels;
  // level 0 holds the group pairs.
  for (genvar l = 0; l <= L; l++) begin : g_lvl
    gp_t node [K];
    if (l == 0) begin : g_groups
      for (genvar k = 0; k < K; k++) begin : g_grp
        group_gp u_grp (
          .g (g[GROUP_W*k +: GROUP_W]),
          .p (p[GROUP_W*k +: GROUP_W]),
          .gg(node[k])
        );
      end
    end else begin : g_prefix
      localparam int unsigned D = 1 << (l - 1);
      for (genvar k = 0; k < K; k++) begin : g_node
        if (k >= D) begin : g_plain
          prefix_op u_op (.hi(g_lvl[l-1].node[k]), .lo(g_lvl[l-1].node[k-D]), .y(node[k]));
        end else begin : g_wrap
          gp_t wrapped;
          assign wrapped = wrap_invert(g_lvl[l-1].node[k+K-D]);
          prefix_op u_op (.hi(g_lvl[l-1].node[k]), .lo(wrapped), .y(node[k]));
        end
      end
    end
  end

  always_comb begin
    // A span that wrapped still owes the final, empty remainder of the
    // inverted end-around chain, which always completes it: its carry is G | P.
    for (int k = 0; k < K - 1; k++) cg[k] = g_lvl[L].node[k].g | g_lvl[L].node[k].p;
    cg[K-1] = g_lvl[L].node[K-1].g;
  end

endmodule
