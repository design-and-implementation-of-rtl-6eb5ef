// Pre-processing stage: bit-level propagate and generate signals.
//
// For each bit pair p_i = a_i ^ b_i and g_i = a_i & b_i. The carry in is
// folded into bit 0 as g_0 = a_0 & b_0 | p_0 & cin, so that every group
// generate G(i:0) computed by the carry network already includes the carry in
// and a grey cell (generate only) suffices wherever a span reaches bit 0.
// The folding is a choice of this implementation; the per-bit equations are
// the adder's. Purely combinational, one gate level (two at bit 0).
module pg_preprocess #(
  parameter int unsigned WIDTH = mksa_pkg::WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] p,
  output logic [WIDTH-1:0] g
);

  always_comb begin
    p = a ^ b;
    g = a & b;
    g[0] = g[0] | (p[0] & cin);
  end

endmodule
