// tb_lf16bit: test of the 16-bit configuration of the Ladner-Fischer adder
// top (the same source built with N = 16). Corner operands, the smaller
// operand pairs of the 32-bit waveform, and random operands are checked
// against integer addition, including s0 == {cry, s}. Counts carry-out
// and full-width carry events and fails if either never occurred.
module tb_lf16bit;
  localparam int unsigned N = 16;
  logic [N-1:0] a, b, s;
  logic [N:0]   s0;
  logic         cry;
  int checks = 0, failures = 0;
  int n_carry_out = 0, n_full_ripple = 0;

  lf32bit #(.N(N)) dut (.*);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [N-1:0] x, input logic [N-1:0] y);
    logic [N:0] exp;
    a = x; b = y;
    #1;
    exp = (N+1)'(x) + (N+1)'(y);
    checks++;
    if ({cry, s} != exp || s0 != exp) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h s=%h cry=%b s0=%h exp %h", x, y, s, cry, s0, exp);
    end
    if (cry) n_carry_out++;
    if (x == '1 && y == 1) n_full_ripple++;
  endtask

  initial begin
    apply(18, 20); apply(100, 110); apply(220, 230);
    apply('1, 1); apply('1, '1); apply(16'hAAAA, 16'h5555); apply(16'h8000, 16'h8000);
    for (int t = 0; t < 100000; t++) apply(N'($urandom()), N'($urandom()));
    $display("mechanisms: carry_out=%0d full_ripple=%0d", n_carry_out, n_full_ripple);
    if (n_carry_out == 0)   begin failures++; $display("FAIL no carry-out seen"); end
    if (n_full_ripple == 0) begin failures++; $display("FAIL no full-width carry seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
