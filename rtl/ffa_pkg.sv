// ffa_pkg -- constants shared by the parallel fast-FIR (FFA) filter family.
//
// The sample and coefficient widths are 8 bits, the width of the example
// vectors the filters were demonstrated with. Both are two's-complement
// signed. The output width is this design's own choice: it is wide enough
// for the exact sum of N full-scale products, so no result is ever rounded
// or saturated. Every internal sum of the FFA structure is computed modulo
// 2**YW; because the final output fits, the wrap-around of intermediate
// terms cancels and the output is exact.
package ffa_pkg;

  // Default sample width (bits, signed).
  localparam int unsigned SAMPLE_W = 8;
  // Default coefficient width (bits, signed).
  localparam int unsigned COEF_W   = 8;

  // Output width that holds sum_{k<n} h(k)*x(n-k) exactly.
  function automatic int unsigned out_width(int unsigned xw, int unsigned hw,
                                            int unsigned taps);
    return xw + hw + $clog2(taps);
  endfunction

endpackage
