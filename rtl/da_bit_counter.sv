// da_bit_counter: bit-position timing for the bit-serial distributed-arithmetic
// datapath.
//
// Each input sample is DATA_W bits, sent least significant bit first, one bit
// per clock. This counter runs 0, 1, ..., DATA_W-1 and wraps, so a new sample
// period starts every DATA_W clocks. It flags the two positions the rest of
// the filter cares about:
//   first - bit 0 of a word: the accumulator starts afresh,
//   sign  - bit DATA_W-1, the two's-complement sign bit: the sign-bit timing
//           signal S, on which the partial sum is subtracted instead of added.
// Synchronous, active-high reset to bit position 0. Outputs are decoded
// from the count register, so they are valid for the whole clock cycle in
// which that bit is processed.
module da_bit_counter #(
  parameter int unsigned DATA_W = fir_da_pkg::DATA_W
) (
  input  logic                                    clk,
  input  logic                                    rst,
  output logic [fir_da_pkg::cnt_width(DATA_W)-1:0] bit_idx,  // current bit position
  output logic                                    first,    // bit_idx == 0
  output logic                                    sign      // bit_idx == DATA_W-1 (S)
);
  localparam int unsigned CW = fir_da_pkg::cnt_width(DATA_W);
  localparam logic [CW-1:0] LAST = CW'(DATA_W - 1);

  always_ff @(posedge clk) begin
    if (rst)                 bit_idx <= '0;
    else if (bit_idx == LAST) bit_idx <= '0;
    else                     bit_idx <= bit_idx + 1'b1;
  end

  always_comb begin
    first = (bit_idx == '0);
    sign  = (bit_idx == LAST);
  end
endmodule
