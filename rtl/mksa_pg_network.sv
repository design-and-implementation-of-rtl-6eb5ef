// Modified 8-bit Kogge-Stone carry generation (PG) network.
//
// Computes every prefix generate G(i:0), i = 0..7, which is the carry out of
// bit i. The regular Kogge-Stone tree combines spans at distances 1, 2 and 4
// in three levels, with 10 black and 7 grey cells. This network removes the
// three black cells whose results are redundant and reroutes their consumers:
//   - black 5:2 (level 2) is gone: grey 5:0 (level 3) takes black 5:4 and
//     grey 3:0 instead of 5:2 and 1:0;
//   - black 4:1 (level 2) is gone: grey 4:0 (level 3) takes black 4:3 and
//     grey 2:0 instead of 4:1 and 0:0;
//   - black 2:1 (level 1) fed only 4:1 and grey 2:0, so it is gone as well:
//     grey 2:0 (level 2) takes bit 2 itself and grey 1:0.
// Grey cells 2:0 and 3:0 therefore both take their lower generate from grey
// 1:0. The result has 7 black and 7 grey cells and still three levels:
//   level 1: grey 1:0; black 3:2, 4:3, 5:4, 6:5, 7:6
//   level 2: grey 2:0, 3:0; black 6:3, 7:4
//   level 3: grey 4:0, 5:0, 6:0, 7:0
// The cell list and the rerouting follow the published modification; instance
// names are hi_lo of the span they compute. The carry in is expected folded
// into g[0] (see pg_preprocess), so G(0:0) = g[0] and p[0] is not needed.
// Purely combinational; the longest path is three AND-OR levels.
module mksa_pg_network
  import mksa_pkg::*;
(
  input  logic [7:0] g,      // bit generates, g[0] includes the carry in
  input  logic [7:1] p,      // bit propagates of bits 7..1
  output logic [7:0] gpre    // gpre[i] = G(i:0)
);

  pg_t bit_pg [7:1];
  always_comb begin
    for (int i = 1; i <= 7; i++) bit_pg[i] = '{g: g[i], p: p[i]};
  end

  // Level 1 (span distance 1)
  logic g1_0;
  pg_t  s3_2, s4_3, s5_4, s6_5, s7_6;

  grey_cell  c1_0 (.hi(bit_pg[1]), .lo_g(g[0]),   .out_g(g1_0));
  black_cell c3_2 (.hi(bit_pg[3]), .lo(bit_pg[2]), .out(s3_2));
  black_cell c4_3 (.hi(bit_pg[4]), .lo(bit_pg[3]), .out(s4_3));
  black_cell c5_4 (.hi(bit_pg[5]), .lo(bit_pg[4]), .out(s5_4));
  black_cell c6_5 (.hi(bit_pg[6]), .lo(bit_pg[5]), .out(s6_5));
  black_cell c7_6 (.hi(bit_pg[7]), .lo(bit_pg[6]), .out(s7_6));

  // Level 2 (span distance 2; bit 2 and 1:0 replace the removed black 2:1)
  logic g2_0, g3_0;
  pg_t  s6_3, s7_4;

  grey_cell  c2_0 (.hi(bit_pg[2]), .lo_g(g1_0), .out_g(g2_0));
  grey_cell  c3_0 (.hi(s3_2),      .lo_g(g1_0), .out_g(g3_0));
  black_cell c6_3 (.hi(s6_5),      .lo(s4_3),   .out(s6_3));
  black_cell c7_4 (.hi(s7_6),      .lo(s5_4),   .out(s7_4));

  // Level 3 (span distance 4; 4:3 and 5:4 replace the removed black 4:1, 5:2)
  logic g4_0, g5_0, g6_0, g7_0;

  grey_cell  c4_0 (.hi(s4_3), .lo_g(g2_0), .out_g(g4_0));
  grey_cell  c5_0 (.hi(s5_4), .lo_g(g3_0), .out_g(g5_0));
  grey_cell  c6_0 (.hi(s6_3), .lo_g(g2_0), .out_g(g6_0));
  grey_cell  c7_0 (.hi(s7_4), .lo_g(g3_0), .out_g(g7_0));

  assign gpre = {g7_0, g6_0, g5_0, g4_0, g3_0, g2_0, g1_0, g[0]};

  // The unused propagate of black cells whose output only feeds grey cells
  // (3:2 at level 1, 6:3 and 7:4 at level 2) is left for synthesis to trim.

endmodule
