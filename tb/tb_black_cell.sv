// tb_black_cell: exhaustive self-checking test of the black prefix cell.
// All 16 input combinations are applied; the expected group generate and
// propagate come from the truth-table definition of carry generation over
// two adjacent spans (generate if the upper span generates, or it
// propagates and the lower span generates; propagate only if both do).
module tb_black_cell;
  logic g_hi, p_hi, g_lo, p_lo, g_out, p_out;
  int checks = 0, failures = 0;

  black_cell dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic exp_g, exp_p;
      {g_hi, p_hi, g_lo, p_lo} = 4'(v);
      #1;
      exp_g = (g_hi == 1'b1) ? 1'b1 : ((p_hi == 1'b1) ? g_lo : 1'b0);
      exp_p = (p_hi == 1'b1) && (p_lo == 1'b1);
      checks++;
      if (g_out !== exp_g || p_out !== exp_p) begin
        failures++;
        $display("FAIL in=%b%b%b%b g=%b/%b p=%b/%b", g_hi, p_hi, g_lo, p_lo,
                 g_out, exp_g, p_out, exp_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
