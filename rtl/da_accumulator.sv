// da_accumulator: shift-accumulate stage of the bit-serial distributed-
// arithmetic filter, with an add/subtract Brent-Kung adder.
//
// With a two's-complement sample x = -b_(N-1)*2^(N-1) + sum_(i<N-1) b_i*2^i,
// the filter output is sum_i 2^i * P_i, where P_i = sum_k h[k]*b_k,i is the
// partial sum of bit i, counted negative for the sign bit. Bits arrive least
// significant first, so each clock the accumulator halves its old value
// (the 2^-1 feedback) and adds P_i weighted by 2^(N-1):
//   acc <- (first ? 0 : acc >>> 1) +/- (P_i << (N-1))
// subtracting on the sign bit. The low N-1 bits of the accumulator hold the
// fractional bits that the halving moves down, so nothing is lost: after the
// sign bit, acc is exactly sum_k h[k]*x_k as an integer. The add/subtract
// adder, the accumulator and the halving feedback follow the reference
// structure; keeping the fraction bits (instead of working on fractions) and
// the separate output register are this design's choices.
//
// Timing: one bit per clock. On the clock edge ending the sign bit the new
// value is also copied into y, and y_valid is 1 for the following cycle.
// Synchronous, active-high reset clears acc, y and y_valid.
// ACC_W must be at least IN_W + DATA_W (checked at elaboration).
module da_accumulator #(
  parameter int unsigned IN_W   = fir_da_pkg::COEF_W + 2,
  parameter int unsigned DATA_W = fir_da_pkg::DATA_W,
  parameter int unsigned ACC_W  = fir_da_pkg::OUT_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             first,    // bit 0 of a word: previous acc ignored
  input  logic             sign,     // sign bit: subtract (S)
  input  logic [IN_W-1:0]  psum,     // signed partial sum of this bit
  output logic [ACC_W-1:0] acc,      // running value (scaled by 2^(N-1))
  output logic [ACC_W-1:0] y,        // result of the last complete word
  output logic             y_valid   // y was updated on the last edge
);
  if (ACC_W < IN_W + DATA_W) begin : g_width_check
    $error("da_accumulator: ACC_W must be at least IN_W + DATA_W");
  end

  logic [ACC_W-1:0] base, term, addend, next;
  logic             unused_cout;

  always_comb begin
    base   = first ? '0 : {acc[ACC_W-1], acc[ACC_W-1:1]};     // acc * 2^-1
    term   = ACC_W'($signed(psum)) << (DATA_W - 1);           // P_i * 2^(N-1)
    addend = sign ? ~term : term;                             // two's-complement negate
  end

  bk_adder #(.WIDTH(ACC_W)) u_addsub (
    .a    (base),
    .b    (addend),
    .cin  (sign),
    .sum  (next),
    .cout (unused_cout)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      acc     <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      acc     <= next;
      y_valid <= sign;
      if (sign) y <= next;
    end
  end
endmodule
