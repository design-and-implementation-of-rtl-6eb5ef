// Self-checking testbench for pg_preprocess at its default width (8).
//
// Exhaustive over both operands and the carry in (2^17 vectors). Each bit's
// expected propagate and generate are taken from the two-bit arithmetic sum
// a_i + b_i (low bit = propagate, high bit = generate); bit 0's generate is
// the carry out of a_0 + b_0 + cin.
module tb_pg_preprocess;

  localparam int unsigned W = mksa_pkg::WIDTH;

  logic [W-1:0] a, b, p, g;
  logic         cin;
  int checks = 0, failures = 0;

  pg_preprocess dut (.a(a), .b(b), .cin(cin), .p(p), .g(g));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp_p, exp_g;
    logic [1:0]   s;
    for (int v = 0; v < (1 << (2 * W + 1)); v++) begin
      {cin, a, b} = (2 * W + 1)'(v);
      #1;
      for (int i = 0; i < W; i++) begin
        s = 2'(a[i]) + 2'(b[i]);
        exp_p[i] = s[0];
        exp_g[i] = s[1];
      end
      s = 2'(a[0]) + 2'(b[0]) + 2'(cin);
      exp_g[0] = s[1];
      checks++;
      if (p !== exp_p || g !== exp_g) begin
        failures++;
        if (failures < 10)
          $display("FAIL a=%h b=%h cin=%b: got p=%b g=%b, expected p=%b g=%b",
                   a, b, cin, p, g, exp_p, exp_g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
