// fir_da_pkg: sizes shared by the LUT-less distributed-arithmetic FIR filter.
//
// The filter is 3rd order, so it has four taps and four multiplexers. The
// coefficient bus h is 64 bits wide and Yout is 64 bits wide; with four taps
// that gives 16 bits per coefficient. The width of an input sample is this
// design's choice: 16 bits, like a coefficient. Samples and coefficients are
// two's-complement integers.
package fir_da_pkg;
  localparam int unsigned TAPS   = 4;   // 3rd-order filter: four taps
  localparam int unsigned COEF_W = 16;  // 64-bit h bus / 4 taps
  localparam int unsigned DATA_W = 16;  // bits per input sample (own choice)
  localparam int unsigned OUT_W  = 64;  // width of Yout

  // Bits needed to count 0 .. n-1 (at least 1).
  function automatic int unsigned cnt_width(int unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction
endpackage
