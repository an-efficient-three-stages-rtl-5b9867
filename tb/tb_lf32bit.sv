// tb_lf32bit: end-to-end test of the 32-bit Ladner-Fischer adder top at
// its default size. It applies the fourteen operand pairs of the
// published simulation waveform (0+0 up to 220+230) and checks the printed
// sums, then corner cases and random operands against 64-bit integer
// addition. It counts how often each behaviour of the adder was exercised
// -- a carry-out, a carry rippling through all 32 bits, an addition with
// no carry at all, a carry crossing the 16-bit mid-point -- and counts a
// failure for any that never occurred. s0 must always equal {cry, s}.
module tb_lf32bit;
  logic [31:0] a, b, s;
  logic [32:0] s0;
  logic        cry;
  int checks = 0, failures = 0;
  int n_carry_out = 0, n_full_ripple = 0, n_no_carry = 0, n_mid_carry = 0;

  lf32bit dut (.*);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Operand pairs and sums printed in the published waveform.
  int unsigned wa [14] = '{0, 18, 28, 44, 45, 38, 72, 85, 100, 130, 150, 170, 185, 200};
  int unsigned wb [14] = '{0, 20, 30, 36, 50, 61, 80, 80, 110, 140, 160, 175, 180, 211};
  int unsigned ws [14] = '{0, 38, 58, 80, 95, 99, 152, 165, 210, 270, 310, 345, 365, 411};

  task automatic apply(input logic [31:0] x, input logic [31:0] y);
    longint unsigned exp;
    a = x; b = y;
    #1;
    exp = longint'(x) + longint'(y);
    checks++;
    if ({cry, s} != 33'(exp) || s0 != 33'(exp)) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h s=%h cry=%b s0=%h exp %h", x, y, s, cry, s0, exp);
    end
    if (cry) n_carry_out++;
    if ((x ^ y) == 32'hFFFF_FFFF && (x & y) == 0) n_no_carry++;
    if ((17'(x[15:0]) + 17'(y[15:0])) >> 16 != 0) n_mid_carry++;
    if (x == 32'hFFFF_FFFF && y == 32'h1) n_full_ripple++;
  endtask

  initial begin
    for (int i = 0; i < 14; i++) begin
      apply(wa[i], wb[i]);
      checks++;
      if (s != ws[i]) begin
        failures++;
        $display("FAIL waveform row %0d: %0d + %0d gave %0d, printed %0d", i, wa[i], wb[i], s, ws[i]);
      end
    end
    apply(220, 230);
    checks++;
    if (s != 450) begin failures++; $display("FAIL 220+230 gave %0d", s); end
    apply(32'hFFFF_FFFF, 32'h1);          // carry ripples through every bit
    apply(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    apply(32'hAAAA_AAAA, 32'h5555_5555);  // all propagate, no carry
    apply(32'h0000_FFFF, 32'h0000_0001);  // carry into the upper half
    apply(32'h8000_0000, 32'h8000_0000);
    for (int t = 0; t < 100000; t++) apply($urandom(), $urandom());

    $display("mechanisms: carry_out=%0d full_ripple=%0d no_carry=%0d mid_carry=%0d",
             n_carry_out, n_full_ripple, n_no_carry, n_mid_carry);
    if (n_carry_out == 0)   begin failures++; $display("FAIL no carry-out seen"); end
    if (n_full_ripple == 0) begin failures++; $display("FAIL no full-width carry seen"); end
    if (n_no_carry == 0)    begin failures++; $display("FAIL no carry-free add seen"); end
    if (n_mid_carry == 0)   begin failures++; $display("FAIL no mid-point carry seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
