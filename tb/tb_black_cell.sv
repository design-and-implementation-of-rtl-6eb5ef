// Self-checking testbench for black_cell.
//
// Applies all 16 combinations of the upper and lower (generate, propagate)
// pairs. The expected group generate is obtained by treating each span as a
// carry function c_out = g | (p & c_in) and passing a zero carry through the
// lower span and then the upper one; the expected group propagate is 1 only
// when both spans pass a carry without generating one on their own input.
module tb_black_cell;
  import mksa_pkg::*;

  pg_t hi, lo, out;
  int checks = 0, failures = 0;

  black_cell dut (.hi(hi), .lo(lo), .out(out));

  function automatic logic span_carry(logic g, logic p, logic c);
    return g ? 1'b1 : (p ? c : 1'b0);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_g, exp_p;
    for (int v = 0; v < 16; v++) begin
      {hi.g, hi.p, lo.g, lo.p} = 4'(v);
      #1;
      exp_g = span_carry(hi.g, hi.p, span_carry(lo.g, lo.p, 1'b0));
      exp_p = (hi.p == 1'b1) && (lo.p == 1'b1);
      checks++;
      if (out.g !== exp_g || out.p !== exp_p) begin
        failures++;
        $display("FAIL hi=%b%b lo=%b%b: got g=%b p=%b, expected g=%b p=%b",
                 hi.g, hi.p, lo.g, lo.p, out.g, out.p, exp_g, exp_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
