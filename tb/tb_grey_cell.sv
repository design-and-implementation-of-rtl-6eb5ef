// Self-checking testbench for grey_cell.
//
// Applies all 8 combinations of the upper (generate, propagate) pair and the
// lower generate. The expected output is the carry leaving the upper span
// when the lower span's generate is its carry in.
module tb_grey_cell;
  import mksa_pkg::*;

  pg_t  hi;
  logic lo_g, out_g;
  int checks = 0, failures = 0;

  grey_cell dut (.hi(hi), .lo_g(lo_g), .out_g(out_g));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_g;
    for (int v = 0; v < 8; v++) begin
      {hi.g, hi.p, lo_g} = 3'(v);
      #1;
      exp_g = hi.g ? 1'b1 : (hi.p ? lo_g : 1'b0);
      checks++;
      if (out_g !== exp_g) begin
        failures++;
        $display("FAIL hi=%b%b lo_g=%b: got %b, expected %b",
                 hi.g, hi.p, lo_g, out_g, exp_g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
