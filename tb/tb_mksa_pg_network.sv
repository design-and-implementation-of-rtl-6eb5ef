// Self-checking testbench for mksa_pg_network.
//
// Exhaustive over all 2^15 combinations of bit generates g[7:0] and bit
// propagates p[7:1], including generate/propagate pairs the pre-processing
// stage never produces, since the prefix operator is correct for any input.
// The expected prefix generates G(i:0) come from a serial ripple of the carry
// c_i = g_i | (p_i & c_(i-1)) starting at c_0 = g_0. The testbench also
// counts vectors where a carry from the lower part crosses each of the
// rerouted spans (4:3 into grey 4:0, 5:4 into grey 5:0, bit 2 into grey 2:0),
// so that every rerouted connection is seen carrying a 1 at least once.
module tb_mksa_pg_network;

  logic [7:0] g, gpre;
  logic [7:1] p;
  int checks = 0, failures = 0;
  int crossed_2 = 0, crossed_4 = 0, crossed_5 = 0;

  mksa_pg_network dut (.g(g), .p(p), .gpre(gpre));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp;
    logic       c;
    for (int v = 0; v < (1 << 15); v++) begin
      {p, g} = 15'(v);
      #1;
      c = g[0];
      exp[0] = c;
      for (int i = 1; i < 8; i++) begin
        c = g[i] | (p[i] & c);
        exp[i] = c;
      end
      checks++;
      if (gpre !== exp) begin
        failures++;
        if (failures < 10)
          $display("FAIL g=%b p=%b: got %b, expected %b", g, p, gpre, exp);
      end
      if (exp[1] && p[2] && !g[2]) crossed_2++;
      if (exp[2] && p[4] && p[3] && !g[4] && !g[3]) crossed_4++;
      if (exp[3] && p[5] && p[4] && !g[5] && !g[4]) crossed_5++;
    end
    checks++;
    if (crossed_2 == 0 || crossed_4 == 0 || crossed_5 == 0) begin
      failures++;
      $display("FAIL a rerouted span never carried a lower carry");
    end
    $display("rerouted carries: into 2:0=%0d 4:0=%0d 5:0=%0d",
             crossed_2, crossed_4, crossed_5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
