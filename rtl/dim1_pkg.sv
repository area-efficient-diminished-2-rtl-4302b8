// dim1_pkg: types shared by the diminished-1 modulo 2^n+1 adder.
//
// gp_t is the (generate, propagate) pair that every node of the parallel-prefix
// carry network passes on. GROUP_W is the width of one carry group: the adder
// splits its n bits into n/4 groups of four bits, as the group carry computation
// of the design does.
package dim1_pkg;

  // Bits per carry group.
  localparam int unsigned GROUP_W = 4;

  // Generate / propagate pair of a bit or of a span of bits.
  typedef struct packed {
    logic g;
    logic p;
  } gp_t;

  // Pair fed into the cyclic prefix network when a span wraps around from the
  // most significant groups to the least significant ones. The end-around carry
  // of a diminished-1 adder is inverted, so the wrapped span has to enter as the
  // complement of its carry: its generate is NOR(G, P) and its propagate is NOT G.
  function automatic gp_t wrap_invert(gp_t x);
    gp_t r;
    r.g = ~(x.g | x.p);
    r.p = ~x.g;
    return r;
  endfunction

endpackage
