// lf32bit: 32-bit Ladner-Fischer adder, top level.
//
// Adds two 32-bit unsigned operands through the three-stage Ladner-Fischer
// adder (lf_adder) and presents the result three ways: s is the 32-bit sum,
// cry the carry-out, and s0 the full 33-bit sum {cry, s}. The port list
// (a, b, s, s0, cry) follows the published top-level symbol, which has no
// carry-in; the carry-in of the inner adder is therefore tied to 0.
// Purely combinational. N is kept as a parameter (default 32) so narrower
// versions, such as the 16-bit one, can be built from the same source.
module lf32bit #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s,
  output logic [N:0]   s0,
  output logic         cry
);
  lf_adder #(.N(N)) u_add (.a(a), .b(b), .cin(1'b0), .sum(s), .cout(cry));

  assign s0 = {cry, s};
endmodule
