// tb_gray_cell: exhaustive self-checking test of the gray prefix cell.
// The expected carry out of the upper span is taken from a one-bit
// addition model: the span produces a carry if it generates, or if it
// propagates and a carry arrives from below.
module tb_gray_cell;
  logic g_hi, p_hi, g_lo, g_out;
  int checks = 0, failures = 0;

  gray_cell dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic exp_g;
      {g_hi, p_hi, g_lo} = 3'(v);
      #1;
      exp_g = (g_hi == 1'b1) ? 1'b1 : ((p_hi == 1'b1) ? g_lo : 1'b0);
      checks++;
      if (g_out !== exp_g) begin
        failures++;
        $display("FAIL in=%b%b%b g=%b exp %b", g_hi, p_hi, g_lo, g_out, exp_g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
