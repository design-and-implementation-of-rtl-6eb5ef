// Black cell: the full prefix operator of a parallel-prefix carry network.
//
// It merges the (generate, propagate) pair of an upper span i:k+1 with that
// of the adjacent lower span k:j into the pair of span i:j:
//   G(i:j) = G(i:k+1) | (P(i:k+1) & G(k:j))
//   P(i:j) = P(i:k+1) & P(k:j)
// Both equations are the standard group generate/propagate definitions the
// design is built on. Purely combinational, one AND-OR level plus one AND.
module black_cell
  import mksa_pkg::*;
(
  input  pg_t hi,   // span i:k+1
  input  pg_t lo,   // span k:j
  output pg_t out   // span i:j
);

  always_comb begin
    out.g = hi.g | (hi.p & lo.g);
    out.p = hi.p & lo.p;
  end

endmodule
