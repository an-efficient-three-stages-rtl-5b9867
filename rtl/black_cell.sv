// black_cell: prefix "dot" operator of a parallel-prefix adder.
//
// Combines the (generate, propagate) pair of an upper bit span with that of
// the adjacent lower span into the pair of the joined span:
//   G = G_hi OR (P_hi AND G_lo)      P = P_hi AND P_lo
// This is two AND gates and one OR gate, as the black cell is usually
// described. Purely combinational; no clock, no latency.
module black_cell (
  input  logic g_hi,   // generate of the upper span
  input  logic p_hi,   // propagate of the upper span
  input  logic g_lo,   // generate of the lower span
  input  logic p_lo,   // propagate of the lower span
  output logic g_out,  // generate of the joined span
  output logic p_out   // propagate of the joined span
);
  always_comb begin
    g_out = g_hi | (p_hi & g_lo);
    p_out = p_hi & p_lo;
  end
endmodule
