// lutless_partial_sum: the look-up-table replacement of the LUT-less DA filter.
//
// A classic DA filter reads sum_k(h[k] * b[k]) from a ROM addressed by the
// current bit of every tap. Here that value is built directly: one 2:1
// multiplexer per tap passes coefficient h[k] when b[k] is 1 and zero when it
// is 0, and a binary tree of Brent-Kung adders sums the multiplexer outputs.
// For four taps the tree is the one of the reference structure: tap 0 + tap 1,
// tap 2 + tap 3, then the two pair sums. Because the coefficients are inputs
// and not stored products, they may change at run time.
//
// Coefficients are signed, packed with tap k in h[k*COEF_W +: COEF_W]. Every
// adder of the tree is SUM_W = COEF_W + ceil(log2 TAPS) bits wide, enough for
// the worst-case sum, with its inputs sign-extended. Purely combinational.
module lutless_partial_sum #(
  parameter int unsigned TAPS   = fir_da_pkg::TAPS,
  parameter int unsigned COEF_W = fir_da_pkg::COEF_W,
  localparam int unsigned SUM_W = COEF_W + ((TAPS <= 1) ? 0 : $clog2(TAPS))
) (
  input  logic [TAPS*COEF_W-1:0] h,     // packed signed coefficients
  input  logic [TAPS-1:0]        b,     // multiplexer selects, one per tap
  output logic [SUM_W-1:0]       psum   // signed sum of the selected coefficients
);
  // Heap-ordered tree: node n has children 2n+1 and 2n+2; nodes TAPS-1 ..
  // 2*TAPS-2 are the multiplexer outputs, node 0 the result.
  localparam int unsigned NODES = 2 * TAPS - 1;
  logic [SUM_W-1:0] node [NODES];

  // The multiplexers: coefficient or zero.
  for (genvar k = 0; k < TAPS; k++) begin : g_mux
    logic signed [COEF_W-1:0] coef;
    assign coef = h[k*COEF_W +: COEF_W];
    assign node[TAPS-1+k] = b[k] ? SUM_W'(coef) : '0;
  end

  // The adder tree.
  for (genvar n = 0; n < TAPS - 1; n++) begin : g_add
    logic unused_cout;
    bk_adder #(.WIDTH(SUM_W)) u_add (
      .a    (node[2*n+1]),
      .b    (node[2*n+2]),
      .cin  (1'b0),
      .sum  (node[n]),
      .cout (unused_cout)
    );
  end

  assign psum = node[0];
endmodule
