// tb_lf_postprocess: self-checking test of the post-processing stage at its
// default width (32 bits). Random propagate and carry vectors and both
// carry-in values are applied; the expected sum bit i is the parity of
// p[i] and the carry into bit i (cin for bit 0), and the expected cout the
// carry out of the top bit.
module tb_lf_postprocess;
  localparam int unsigned N = 32;
  logic [N-1:0] p, c, sum;
  logic cin, cout;
  int checks = 0, failures = 0;

  lf_postprocess dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      p = $urandom(); c = $urandom(); cin = 1'(t);
      if (t == 0) begin p = '0; c = '1; end
      #1;
      for (int i = 0; i < N; i++) begin
        logic cinto;
        cinto = (i == 0) ? cin : c[i-1];
        checks++;
        if (sum[i] !== (p[i] != cinto)) begin
          failures++;
          $display("FAIL bit %0d p=%h c=%h cin=%b sum=%h", i, p, c, cin, sum);
        end
      end
      checks++;
      if (cout !== c[N-1]) begin
        failures++;
        $display("FAIL cout c=%h cout=%b", c, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
