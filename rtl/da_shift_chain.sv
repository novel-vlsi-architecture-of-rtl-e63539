// da_shift_chain: the bit-serial tapped delay line of the LUT-less DA filter.
//
// TAPS word registers of DATA_W bits each form one long shift register. The
// serial input xin enters at the most significant end of register 0 (the
// newest sample x[n]); every clock the whole chain moves one bit towards the
// least significant end, and the bit leaving the bottom of register k enters
// the top of register k+1. After DATA_W clocks every word has therefore moved
// one register on: x[n] has become x[n-1], and so on, which is the delay line
// of the FIR filter without any parallel load.
//
// The least significant bit of register k is b[k], the select of tap k's
// multiplexer. While the bits of a new sample are shifted in, b[k] presents
// the bits of the word held in register k, least significant first.
// words[k] shows register k for observation.
// Synchronous, active-high reset clears the chain.
module da_shift_chain #(
  parameter int unsigned TAPS   = fir_da_pkg::TAPS,
  parameter int unsigned DATA_W = fir_da_pkg::DATA_W
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     xin,          // serial sample bit, LSB first
  output logic [TAPS-1:0]          b,            // LSB of each register
  output logic [DATA_W-1:0]        words [TAPS]  // register k = x[n-k]
);
  localparam int unsigned LEN = TAPS * DATA_W;

  logic [LEN-1:0] chain;  // register k occupies bits [(TAPS-k)*DATA_W-1 -: DATA_W]

  always_ff @(posedge clk) begin
    if (rst) chain <= '0;
    else     chain <= {xin, chain[LEN-1:1]};
  end

  always_comb begin
    for (int unsigned k = 0; k < TAPS; k++) begin
      words[k] = chain[(TAPS-k)*DATA_W-1 -: DATA_W];
      b[k]     = chain[(TAPS-1-k)*DATA_W];
    end
  end
endmodule
