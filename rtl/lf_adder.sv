// lf_adder: N-bit Ladner-Fischer parallel-prefix adder with carry-in.
//
// Three combinational stages in a row:
//   pre-processing   p = a XOR b, g = a AND b          (lf_preprocess)
//   carry generation Ladner-Fischer prefix tree         (lf_carry_tree)
//   post-processing  sum = p XOR {carries, cin}        (lf_postprocess)
// The propagate vector goes both into the carry tree and, around it,
// straight to the post-processing stage. {cout, sum} = a + b + cin.
// No clock: the result settles after the pre-processing gates, log2(N) + 2
// prefix cells and the sum XOR.
// N must be a power of two of at least 2; it defaults to 32.
// The three stages and the side path follow the published block diagram;
// having no registers is this design's reading, as only a combinational
// delay is reported for it.
module lf_adder #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  logic [N-1:0] p, g, c;

  lf_preprocess  #(.N(N)) u_pre  (.a(a), .b(b), .p(p), .g(g));
  lf_carry_tree  #(.N(N)) u_tree (.g(g), .p(p), .cin(cin), .c(c));
  lf_postprocess #(.N(N)) u_post (.p(p), .c(c), .cin(cin), .sum(sum), .cout(cout));
endmodule
