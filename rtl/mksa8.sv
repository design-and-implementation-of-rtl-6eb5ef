// mksa8: 8-bit modified Kogge-Stone adder, {cout, sum} = a + b + cin.
//
// Three combinational stages, as in every parallel-prefix adder:
//   1. pg_preprocess   bit propagate p = a ^ b and generate g = a & b
//                      (carry in folded into g[0]);
//   2. mksa_pg_network modified Kogge-Stone prefix tree giving G(i:0) for
//                      every bit in log2(8) = 3 cell levels, with 7 black
//                      and 7 grey cells instead of 10 and 7;
//   3. sum_postprocess sum_i = p_i ^ G(i-1:0), cout = G(7:0).
// No clock and no registers: the result is valid one combinational delay
// after the operands. The carry-in port is part of the adder's equations;
// how it enters the tree (folded into bit 0) is this implementation's choice.
module mksa8
  import mksa_pkg::*;
(
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH-1:0] p, g, gpre;

  pg_preprocess #(.WIDTH(WIDTH)) u_pre (
    .a(a), .b(b), .cin(cin), .p(p), .g(g)
  );

  mksa_pg_network u_net (
    .g(g), .p(p[WIDTH-1:1]), .gpre(gpre)
  );

  sum_postprocess #(.WIDTH(WIDTH)) u_post (
    .p(p), .gpre(gpre), .cin(cin), .sum(sum), .cout(cout)
  );

endmodule
