// gray_cell: generate-only prefix operator of a parallel-prefix adder.
//
// Used where the lower span already reaches down to the carry-in, so its
// generate is a finished carry and the joined span's propagate is never
// needed again. Output is the carry out of the upper span:
//   G = G_hi OR (P_hi AND G_lo)
// (one AND-OR pair). Purely combinational.
// Some descriptions credit the gray cell with a single AND gate; that
// cannot form a carry, so the AND-OR form of the carry equation is used.
module gray_cell (
  input  logic g_hi,   // generate of the upper span
  input  logic p_hi,   // propagate of the upper span
  input  logic g_lo,   // carry into the upper span
  output logic g_out   // carry out of the upper span
);
  always_comb g_out = g_hi | (p_hi & g_lo);
endmodule
