// tb_lf_carry_tree: self-checking test of the Ladner-Fischer carry tree.
// Two instances: an 8-bit tree tested exhaustively over every (g, p, cin)
// combination, and the default 32-bit tree tested with random and corner
// vectors. The expected carries come from a bit-serial ripple recurrence
// c_i = g_i OR (p_i AND c_{i-1}), c_{-1} = cin, which shares no structure
// with the tree.
module tb_lf_carry_tree;
  localparam int unsigned NS = 8;
  localparam int unsigned NL = 32;

  logic [NS-1:0] gs, ps, cs;
  logic          cins;
  logic [NL-1:0] gl, pl, cl;
  logic          cinl;
  int checks = 0, failures = 0;

  lf_carry_tree #(.N(NS)) dut_s (.g(gs), .p(ps), .cin(cins), .c(cs));
  lf_carry_tree           dut_l (.g(gl), .p(pl), .cin(cinl), .c(cl));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [NL-1:0] ripple(input logic [NL-1:0] g,
                                           input logic [NL-1:0] p,
                                           input logic cin, input int n);
    logic [NL-1:0] c = '0;
    logic cy = cin;
    for (int i = 0; i < n; i++) begin
      cy = g[i] | (p[i] & cy);
      c[i] = cy;
    end
    return c;
  endfunction

  initial begin
    // Exhaustive 8-bit: 2^17 combinations.
    for (int v = 0; v < (1 << (2 * NS + 1)); v++) begin
      logic [NS-1:0] exp_c;
      {cins, ps, gs} = (2 * NS + 1)'(v);
      #1;
      exp_c = NS'(ripple(NL'(gs), NL'(ps), cins, NS));
      checks++;
      if (cs !== exp_c) begin
        failures++;
        if (failures < 10)
          $display("FAIL N=8 g=%b p=%b cin=%b c=%b exp %b", gs, ps, cins, cs, exp_c);
      end
    end
    // 32-bit: corners, then random.
    for (int t = 0; t < 20000; t++) begin
      logic [NL-1:0] exp_c;
      gl = $urandom(); pl = $urandom() | $urandom(); cinl = 1'($urandom());
      case (t)
        0: begin gl = '0; pl = '1; cinl = 1'b1; end   // carry-in ripples to the top
        1: begin gl = '0; pl = '1; cinl = 1'b0; end
        2: begin gl = 32'h1;  pl = 32'hFFFF_FFFE; cinl = 1'b0; end
        3: begin gl = '1; pl = '0; cinl = 1'b0; end
        default: ;
      endcase
      #1;
      exp_c = ripple(gl, pl, cinl, NL);
      checks++;
      if (cl !== exp_c) begin
        failures++;
        if (failures < 10)
          $display("FAIL N=32 g=%h p=%h cin=%b c=%h exp %h", gl, pl, cinl, cl, exp_c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
