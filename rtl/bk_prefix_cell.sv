// bk_prefix_cell: the carry operator of a parallel-prefix adder.
//
// It merges the group (propagate, generate) pair of a higher bit span i with
// that of the adjacent lower span j:
//   CP = Pi AND Pj
//   CG = Gi OR (Pi AND Gj)
// so that (CP, CG) describes the joined span. The Brent-Kung adder (bk_adder)
// is built as a tree of these cells. Purely combinational, no clock.
module bk_prefix_cell (
  input  logic p_i,   // propagate of the upper span
  input  logic g_i,   // generate of the upper span
  input  logic p_j,   // propagate of the lower span
  input  logic g_j,   // generate of the lower span
  output logic cp,    // propagate of the joined span
  output logic cg     // generate of the joined span
);
  always_comb begin
    cp = p_i & p_j;
    cg = g_i | (p_i & g_j);
  end
endmodule
