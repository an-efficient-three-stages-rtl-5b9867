// tb_lf_preprocess: self-checking test of the pre-processing stage at its
// default width (32 bits). Random operands plus corner values; each bit's
// expected propagate/generate is the sum and carry bit of a one-bit
// addition a_i + b_i, computed with integer arithmetic.
module tb_lf_preprocess;
  localparam int unsigned N = 32;
  logic [N-1:0] a, b, p, g;
  int checks = 0, failures = 0;

  lf_preprocess dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    #1;
    for (int i = 0; i < N; i++) begin
      logic [1:0] s2;
      s2 = 2'(a[i]) + 2'(b[i]);
      checks++;
      if (p[i] !== s2[0] || g[i] !== s2[1]) begin
        failures++;
        $display("FAIL bit %0d a=%h b=%h p=%h g=%h", i, a, b, p, g);
      end
    end
  endtask

  initial begin
    a = '0; b = '0; check();
    a = '1; b = '0; check();
    a = '1; b = '1; check();
    a = 32'hAAAA_5555; b = 32'h5555_AAAA; check();
    for (int t = 0; t < 200; t++) begin
      a = $urandom(); b = $urandom(); check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
