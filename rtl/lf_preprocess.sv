// lf_preprocess: pre-processing stage of the Ladner-Fischer adder.
//
// For every bit position i it forms the bit propagate p_i = a_i XOR b_i and
// the bit generate g_i = a_i AND b_i. The propagate vector also feeds the
// post-processing stage directly (the side path of the three-stage
// diagram). Purely combinational. N defaults to the 32-bit adder.
module lf_preprocess #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] p,
  output logic [N-1:0] g
);
  always_comb begin
    p = a ^ b;
    g = a & b;
  end
endmodule
