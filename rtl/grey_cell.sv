// Grey cell: the generate-only prefix operator.
//
// Used where the lower span reaches bit 0, so only the group generate of the
// merged span is needed (it is the carry out of bit i):
//   G(i:0) = G(i:k+1) | (P(i:k+1) & G(k:0))
// The lower span's propagate is never needed and is not an input. Purely
// combinational, one AND-OR level.
module grey_cell
  import mksa_pkg::*;
(
  input  pg_t  hi,     // span i:k+1
  input  logic lo_g,   // generate of span k:0
  output logic out_g   // generate of span i:0
);

  always_comb out_g = hi.g | (hi.p & lo_g);

endmodule
