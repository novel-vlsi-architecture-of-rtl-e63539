// bk_adder: Brent-Kung parallel-prefix adder, WIDTH bits, with carry in/out.
//
// Three steps, as in any prefix adder:
//   1. pre-processing:  P_i = A_i XOR B_i, G_i = A_i AND B_i for every bit;
//      the carry in is folded into bit 0 as G_0 = G_0 OR (P_0 AND cin).
//   2. carry network:   a Brent-Kung tree of bk_prefix_cell operators.
//      The up-sweep (levels 0 .. L-1, L = ceil(log2 WIDTH)) forms the group
//      signals of spans 2, 4, 8, ... ending at bits 1, 3, 7, 15, ...; the
//      down-sweep (levels L-2 .. 0) then fills in every other bit, so that
//      each bit i ends up with the carry out of bits 0..i. That gives
//      2L-1 cell levels and fewer than 2*WIDTH cells, the sparse tree that
//      distinguishes Brent-Kung from denser prefix adders.
//   3. post-processing: S_i = P_i XOR C_i, C_0 = cin, C_(i+1) = group G of 0..i.
// The default width of 32 is the size drawn for this adder; any width
// from 1 up works, including widths that are not powers of two. The
// equations of steps 1 and 3 and the 4-bit tree follow the reference; for
// wider adders the textbook Brent-Kung level arrangement is used, not the
// six-stage grouping of the 32-bit drawing.
// Purely combinational.
module bk_adder #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned L  = (WIDTH <= 1) ? 0 : $clog2(WIDTH);
  localparam int unsigned NS = (L == 0) ? 0 : 2 * L - 1;  // prefix levels

  logic [WIDTH-1:0] p0, g0;          // bitwise propagate / generate
  logic [WIDTH-1:0] g0c;             // generate with the carry in folded in
  logic [WIDTH-1:0] pl [NS+1];       // group propagate after each level
  logic [WIDTH-1:0] gl [NS+1];       // group generate after each level
  logic [WIDTH:0]   c;               // carries into each bit, c[WIDTH] = cout

  // Step 1: pre-processing.
  always_comb begin
    p0 = a ^ b;
    g0 = a & b;
    g0c = g0;
    g0c[0] = g0[0] | (p0[0] & cin);
  end
  assign pl[0] = p0;
  assign gl[0] = g0c;

  // Step 2: Brent-Kung carry network.
  for (genvar s = 1; s <= NS; s++) begin : g_level
    // Level s < L+1 is up-sweep level l = s-1; later ones are down-sweep
    // levels l = 2L-1-s, i.e. L-2 down to 0.
    localparam bit          UP   = (s <= L);
    localparam int unsigned LV   = UP ? (s - 1) : (2 * L - 1 - s);
    localparam int unsigned DIST = 1 << LV;
    for (genvar i = 0; i < WIDTH; i++) begin : g_bit
      localparam bit ACTIVE = UP
        ? (((i + 1) % (2 * DIST)) == 0)
        : ((((i + 1) % (2 * DIST)) == DIST) && ((i + 1) > 2 * DIST));
      if (ACTIVE) begin : g_cell
        bk_prefix_cell u_cell (
          .p_i (pl[s-1][i]),
          .g_i (gl[s-1][i]),
          .p_j (pl[s-1][i-DIST]),
          .g_j (gl[s-1][i-DIST]),
          .cp  (pl[s][i]),
          .cg  (gl[s][i])
        );
      end else begin : g_pass
        assign pl[s][i] = pl[s-1][i];
        assign gl[s][i] = gl[s-1][i];
      end
    end
  end

  // Step 3: post-processing.
  always_comb begin
    c[0] = cin;
    for (int unsigned i = 0; i < WIDTH; i++) c[i+1] = gl[NS][i];
    sum  = p0 ^ c[WIDTH-1:0];
    cout = c[WIDTH];
  end
endmodule
