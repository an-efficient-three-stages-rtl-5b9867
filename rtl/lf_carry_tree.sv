// lf_carry_tree: carry generation stage of the Ladner-Fischer adder.
//
// Input is the bit generate/propagate vector from the pre-processing stage
// and the carry-in; output c[i] is the carry out of bit i, i.e. the group
// generate G_{i:-1} of bits i..0 together with the carry-in.
//
// The tree is built in L+2 levels of prefix cells (L = log2 N):
//   level 0     a gray cell merges the carry-in into bit 0, so bit 0
//               carries a finished carry from here on;
//   level 1     every odd bit i is joined with bit i-1 (a black cell, or a
//               gray cell for bit 1 whose lower neighbour is already final);
//   levels 2..L the odd bits form a Sklansky (divide-and-conquer) prefix
//               tree over N/2 nodes: at tree level l, odd node j with bit l-1
//               of j set is joined with the top node of the block just below
//               it. These are the high-fan-out levels of Ladner-Fischer;
//   level L+1   every even bit i >= 2 is joined with the finished carry of
//               bit i-1 by a gray cell.
// A cell whose lower span already reaches the carry-in is a gray cell (its
// result is a final carry); every other cell is a black cell. The
// propagate of a finished span is kept at 0, the propagate of the carry-in
// position. Purely combinational: the critical path is L+2 cells deep.
// N must be a power of two of at least 2; it defaults to 32.
// The cell equations and the black/gray split follow the Ladner-Fischer
// description; the exact wiring (which bits each level joins) is the
// standard Ladner-Fischer network, chosen here because the published
// block drawings of the 8- and 16-bit networks do not fix it.
module lf_carry_tree #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] g,     // bit generate
  input  logic [N-1:0] p,     // bit propagate
  input  logic         cin,   // carry-in
  output logic [N-1:0] c      // c[i] = carry out of bit i
);
  localparam int unsigned L = $clog2(N);

  if (N < 2 || (1 << L) != N) begin : g_bad_n
    $error("lf_carry_tree: N must be a power of two of at least 2");
  end

  // gl[v][i], pl[v][i]: group generate/propagate at bit i after level v.
  logic [N-1:0] gl [0:L+1];
  logic [N-1:0] pl [0:L+1];

  // Level 0: merge the carry-in into bit 0.
  gray_cell u_cin (.g_hi(g[0]), .p_hi(p[0]), .g_lo(cin), .g_out(gl[0][0]));
  assign pl[0][0] = 1'b0;
  assign gl[0][N-1:1] = g[N-1:1];
  assign pl[0][N-1:1] = p[N-1:1];

  // Level 1: pair every odd bit with the even bit below it.
  for (genvar i = 0; i < N; i++) begin : g_lvl1
    if (i % 2 == 0) begin : g_pass
      assign gl[1][i] = gl[0][i];
      assign pl[1][i] = pl[0][i];
    end else if (i == 1) begin : g_gray
      gray_cell u_cell (.g_hi(gl[0][i]), .p_hi(pl[0][i]), .g_lo(gl[0][i-1]),
                        .g_out(gl[1][i]));
      assign pl[1][i] = 1'b0;
    end else begin : g_black
      black_cell u_cell (.g_hi(gl[0][i]), .p_hi(pl[0][i]),
                         .g_lo(gl[0][i-1]), .p_lo(pl[0][i-1]),
                         .g_out(gl[1][i]), .p_out(pl[1][i]));
    end
  end

  // Levels 2..L: Sklansky prefix tree over the odd bits (node j = bit 2j+1).
  for (genvar v = 2; v <= L; v++) begin : g_sk
    localparam int unsigned LB = v - 2;  // bit of the node index tested
    for (genvar i = 0; i < N; i++) begin : g_bit
      localparam int unsigned J = i / 2;
      // Top node of the block just below node J, as a bit position.
      localparam int unsigned K = ((J >> LB) << LB) - 1;
      localparam int unsigned KB = 2 * K + 1;
      if (i % 2 == 0 || ((J >> LB) & 1) == 0) begin : g_pass
        assign gl[v][i] = gl[v-1][i];
        assign pl[v][i] = pl[v-1][i];
      end else if (J < (2 << LB)) begin : g_gray
        gray_cell u_cell (.g_hi(gl[v-1][i]), .p_hi(pl[v-1][i]),
                          .g_lo(gl[v-1][KB]), .g_out(gl[v][i]));
        assign pl[v][i] = 1'b0;
      end else begin : g_black
        black_cell u_cell (.g_hi(gl[v-1][i]), .p_hi(pl[v-1][i]),
                           .g_lo(gl[v-1][KB]), .p_lo(pl[v-1][KB]),
                           .g_out(gl[v][i]), .p_out(pl[v][i]));
      end
    end
  end

  // Level L+1: even bits above bit 0 take the finished carry of the odd bit
  // below them.
  for (genvar i = 0; i < N; i++) begin : g_last
    if (i % 2 == 1 || i == 0) begin : g_pass
      assign gl[L+1][i] = gl[L][i];
      assign pl[L+1][i] = pl[L][i];
    end else begin : g_gray
      gray_cell u_cell (.g_hi(gl[L][i]), .p_hi(pl[L][i]),
                        .g_lo(gl[L][i-1]), .g_out(gl[L+1][i]));
      assign pl[L+1][i] = 1'b0;
    end
  end

  assign c = gl[L+1];
endmodule
