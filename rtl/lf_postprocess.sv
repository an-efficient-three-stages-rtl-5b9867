// lf_postprocess: post-processing (sum) stage of the Ladner-Fischer adder.
//
// Sum bit i is the bit propagate XORed with the carry into bit i:
//   s_i = p_i XOR c_{i-1},  with c_{-1} = cin
// where c[i] is the carry out of bit i delivered by the carry tree. The
// carry out of the most significant bit is the adder's carry-out; it is
// a plain wire from the c input, as the carry tree already computes it.
// Purely combinational. N defaults to the 32-bit adder.
// The sum gate is an XOR, as the sum equation requires (an AND, which one
// passage of the description shows, would not add).
module lf_postprocess #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] p,     // bit propagate
  input  logic [N-1:0] c,     // c[i] = carry out of bit i
  input  logic         cin,   // carry into bit 0
  output logic [N-1:0] sum,
  output logic         cout
);
  always_comb begin
    sum  = p ^ {c[N-2:0], cin};
    cout = c[N-1];
  end
endmodule
