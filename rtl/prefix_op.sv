// prefix_op: the parallel-prefix operator, the solid node of the carry network.
//
// It merges the (G, P) pair of a more significant span `hi` = [i:k] with the
// pair of the adjoining less significant span `lo` = [k-1:j] into the pair of
// [i:j]:
//     G[i:j] = G[i:k] | (P[i:k] & G[k-1:j])
//     P[i:j] = P[i:k] & P[k-1:j]
// That is two AND gates and one OR gate, as the node of the design is
// described. Purely combinational, no clock.
module prefix_op
  import dim1_pkg::gp_t;
(
  input  gp_t hi,   // pair of the more significant span
  input  gp_t lo,   // pair of the less significant span
  output gp_t y     // pair of the merged span
);

  always_comb begin
    y.g = hi.g | (hi.p & lo.g);
    y.p = hi.p & lo.p;
  end

endmodule
