// Shared widths of the Vedic-multiplier FIR filter.
//
// The filter works on 4-bit unsigned samples and 4-bit unsigned coefficients,
// because its multiplier is the 4x4-bit vertical-and-crosswise multiplier.
// Each product is 8 bits wide (15 x 15 = 225). These widths follow the
// multiplier's size; the type names are this design's own.
package fir_pkg;
  localparam int unsigned SAMPLE_W = 4;   // width of x(n)
  localparam int unsigned COEF_W   = 4;   // width of h_k
  localparam int unsigned PROD_W   = SAMPLE_W + COEF_W;  // T7..T0

  typedef logic [SAMPLE_W-1:0] sample_t;
  typedef logic [COEF_W-1:0]   coef_t;
  typedef logic [PROD_W-1:0]   prod_t;
endpackage
