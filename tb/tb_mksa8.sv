// End-to-end testbench for mksa8 at its default size (no parameter overrides).
//
// First applies the worked example 11111110 + 11111111 with no carry in,
// whose result is sum 11111101 with carry out 1. Then runs every one of the
// 2^17 combinations of a, b and cin and compares {cout, sum} with the integer
// a + b + cin. It counts how often the adder's mechanisms are exercised and
// fails if any never occurs:
//   - a carry in that changes the result,
//   - a carry out,
//   - a carry rippling through all eight bits (a ^ b = 8'hFF, cin = 1),
//   - carries from below crossing each span rerouted by the removal of black
//     cells: bit 2 into grey 2:0, bits 4:3 into grey 4:0, bits 5:4 into
//     grey 5:0.
// The adder is combinational; each vector is checked 1 time unit after it is
// applied.
module tb_mksa8;

  logic [7:0] a, b, sum;
  logic       cin, cout;
  int checks = 0, failures = 0;
  int n_cin = 0, n_cout = 0, n_full_ripple = 0;
  int n_route_2 = 0, n_route_4 = 0, n_route_5 = 0;

  mksa8 dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Carry into bit i of a + b + cin, from integer arithmetic on the low bits.
  function automatic logic carry_into(logic [7:0] x, logic [7:0] y, logic c, int i);
    int lo_mask = (1 << i) - 1;
    return ((int'(x) & lo_mask) + (int'(y) & lo_mask) + int'(c)) > lo_mask;
  endfunction

  task automatic check(string what, logic [8:0] exp);
    checks++;
    if ({cout, sum} !== exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s a=%b b=%b cin=%b: got %b_%b, expected %b_%b",
                 what, a, b, cin, cout, sum, exp[8], exp[7:0]);
    end
  endtask

  initial begin
    logic [8:0] exp;
    logic [7:0] pv;

    a = 8'b1111_1110; b = 8'b1111_1111; cin = 1'b0;
    #1;
    check("worked example", 9'b1_1111_1101);

    for (int v = 0; v < (1 << 17); v++) begin
      {cin, a, b} = 17'(v);
      #1;
      exp = 9'(int'(a) + int'(b) + int'(cin));
      check("exhaustive", exp);

      pv = a ^ b;
      if (cin && exp != 9'(int'(a) + int'(b))) n_cin++;
      if (exp[8]) n_cout++;
      if (pv == 8'hFF && cin) n_full_ripple++;
      if (carry_into(a, b, cin, 2) && pv[2]) n_route_2++;
      if (carry_into(a, b, cin, 3) && pv[4:3] == 2'b11) n_route_4++;
      if (carry_into(a, b, cin, 4) && pv[5:4] == 2'b11) n_route_5++;
    end

    checks++;
    if (n_cin == 0 || n_cout == 0 || n_full_ripple == 0 ||
        n_route_2 == 0 || n_route_4 == 0 || n_route_5 == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("carry-in effective=%0d carry-out=%0d full ripple=%0d",
             n_cin, n_cout, n_full_ripple);
    $display("rerouted carries: into 2:0=%0d 4:0=%0d 5:0=%0d",
             n_route_2, n_route_4, n_route_5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
