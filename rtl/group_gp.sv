// group_gp: group generate / propagate of one four-bit carry group.
//
// A two-level tree of three prefix operators: bits 3 and 2 are merged, bits 1
// and 0 are merged, and the two halves are merged into the pair (GG, PP) of
// the whole group, bit 3 being the most significant. This is the first part of
// the carry computation unit; there is one instance per group.
// Purely combinational, two operator levels deep.
module group_gp
  import dim1_pkg::*;
(
  input  logic [GROUP_W-1:0] g,   // bit generates of the group
  input  logic [GROUP_W-1:0] p,   // bit propagates of the group
  output gp_t                gg   // pair of the whole group
);

  gp_t b3, b2, b1, b0, n32, n10;

  assign b3 = '{g: g[3], p: p[3]};
  assign b2 = '{g: g[2], p: p[2]};
  assign b1 = '{g: g[1], p: p[1]};
  assign b0 = '{g: g[0], p: p[0]};

  prefix_op u_n32 (.hi(b3),  .lo(b2),  .y(n32));
  prefix_op u_n10 (.hi(b1),  .lo(b0),  .y(n10));
  prefix_op u_grp (.hi(n32), .lo(n10), .y(gg));

endmodule
