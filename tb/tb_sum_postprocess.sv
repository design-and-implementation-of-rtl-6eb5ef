// Self-checking testbench for sum_postprocess at its default width (8).
//
// Exhaustive over the propagates, prefix generates and carry in (2^17
// vectors). The expected sum bit i is 1 when an odd number of p_i and the
// carry into bit i (cin for bit 0, G(i-1:0) above) are set; the expected
// carry out is G(7:0).
module tb_sum_postprocess;

  localparam int unsigned W = mksa_pkg::WIDTH;

  logic [W-1:0] p, gpre, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;

  sum_postprocess dut (.p(p), .gpre(gpre), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp_s;
    logic         cin_i;
    for (int v = 0; v < (1 << (2 * W + 1)); v++) begin
      {cin, p, gpre} = (2 * W + 1)'(v);
      #1;
      for (int i = 0; i < W; i++) begin
        cin_i = (i == 0) ? cin : gpre[i-1];
        exp_s[i] = ((int'(p[i]) + int'(cin_i)) % 2) == 1;
      end
      checks++;
      if (sum !== exp_s || cout !== gpre[W-1]) begin
        failures++;
        if (failures < 10)
          $display("FAIL p=%b gpre=%b cin=%b: got sum=%b cout=%b, expected sum=%b cout=%b",
                   p, gpre, cin, sum, cout, exp_s, gpre[W-1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
