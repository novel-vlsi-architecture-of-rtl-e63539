// FIRusingLUTless_bka: 4-tap FIR filter by LUT-less distributed arithmetic,
// with Brent-Kung adders throughout.
//
// y[n] = sum_k h[k] * x[n-1-k], k = 0..TAPS-1, computed without multipliers
// and without a look-up table. Samples arrive bit-serially on Xin, least
// significant bit first, one bit per clock, DATA_W bits per sample with no
// gap between samples; the first sample starts on the first clock after
// reset is released. Each clock:
//   - da_shift_chain shifts Xin into a TAPS*DATA_W-bit chain whose register
//     k holds the sample k periods old; the LSB of each register selects its
//     tap's multiplexer,
//   - lutless_partial_sum adds the coefficients whose select bit is 1,
//   - da_accumulator halves its running sum and adds that partial sum, or
//     subtracts it on the sign bit flagged by da_bit_counter.
// After the sign bit the accumulator holds the exact filter output, which is
// loaded into Yout; Yvalid is 1 in the cycle after each load (once every
// DATA_W clocks). In sample period m (DATA_W clocks) the chain presents the
// samples of periods m-1 .. m-TAPS, so the output loaded at the end of period
// m is sum_k h[k]*x[m-1-k]: the newest complete sample reaches Yout DATA_W
// clocks after its last bit was shifted in.
//
// Ports h, clock, reset, Xin and Yout and their widths are those of the
// reference schematic; Yvalid is added here to mark when Yout changes.
// h packs signed tap k in h[k*COEF_W +: COEF_W]; Yout is signed. The
// coefficients may be changed at run time; a change takes effect cleanly
// when made at a sample boundary (the clock of Yvalid). Reset is synchronous
// and active high.
module FIRusingLUTless_bka #(
  parameter int unsigned TAPS   = fir_da_pkg::TAPS,
  parameter int unsigned COEF_W = fir_da_pkg::COEF_W,
  parameter int unsigned DATA_W = fir_da_pkg::DATA_W,
  parameter int unsigned OUT_W  = fir_da_pkg::OUT_W
) (
  input  logic                   clock,
  input  logic                   reset,
  input  logic                   Xin,     // serial sample bit, LSB first
  input  logic [TAPS*COEF_W-1:0] h,       // signed coefficients, tap 0 lowest
  output logic [OUT_W-1:0]       Yout,    // signed filter output
  output logic                   Yvalid   // Yout was updated on the last edge
);
  localparam int unsigned SUM_W = COEF_W + ((TAPS <= 1) ? 0 : $clog2(TAPS));

  logic             first, sign;  // bit 0 / sign bit of the current word
  logic [TAPS-1:0]  b;            // multiplexer selects from the chain
  logic [SUM_W-1:0] psum;         // partial sum of the current bit

  da_bit_counter #(.DATA_W(DATA_W)) u_timing (
    .clk     (clock),
    .rst     (reset),
    .bit_idx (),
    .first   (first),
    .sign    (sign)
  );

  da_shift_chain #(.TAPS(TAPS), .DATA_W(DATA_W)) u_chain (
    .clk   (clock),
    .rst   (reset),
    .xin   (Xin),
    .b     (b),
    .words ()
  );

  lutless_partial_sum #(.TAPS(TAPS), .COEF_W(COEF_W)) u_psum (
    .h    (h),
    .b    (b),
    .psum (psum)
  );

  da_accumulator #(.IN_W(SUM_W), .DATA_W(DATA_W), .ACC_W(OUT_W)) u_acc (
    .clk     (clock),
    .rst     (reset),
    .first   (first),
    .sign    (sign),
    .psum    (psum),
    .acc     (),
    .y       (Yout),
    .y_valid (Yvalid)
  );
endmodule
