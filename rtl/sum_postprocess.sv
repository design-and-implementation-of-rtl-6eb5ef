// Post-processing stage: sum bits and carry out.
//
// The carry into bit i is the prefix generate of the bits below it,
// c_(i-1) = G(i-1:0), with the carry in itself entering bit 0. Each sum bit
// is s_i = p_i ^ c_(i-1); the carry out of the adder is G(WIDTH-1:0). The
// prefix generates come from the carry network with the carry in already
// folded in, so no further carry-in term is needed here. Purely
// combinational, one XOR level.
module sum_postprocess #(
  parameter int unsigned WIDTH = mksa_pkg::WIDTH
) (
  input  logic [WIDTH-1:0] p,      // bit propagates a ^ b
  input  logic [WIDTH-1:0] gpre,   // gpre[i] = G(i:0)
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  always_comb begin
    sum  = p ^ {gpre[WIDTH-2:0], cin};
    cout = gpre[WIDTH-1];
  end

endmodule
