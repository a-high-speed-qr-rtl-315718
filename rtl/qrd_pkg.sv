// qrd_pkg: shared sizes, fixed-point type and helpers of the Householder QRD processor.
//
// All internal arithmetic is two's-complement fixed point with WD bits, FR of them fractional
// (default Q11.20, range about +-2048). Channel and receive samples enter as IN_W = 13-bit
// normalized values with IN_FR = 12 fractional bits, i.e. in [-1, 1). The 13-bit input width
// and the 4x4 antenna configuration come from the design description; the internal word
// width, the fraction split and the rounding (truncation toward minus infinity) are this
// design's own choices. FOLD = 1 selects the fully unfolded pipeline, the main configuration.
package qrd_pkg;

  parameter int N     = 4;   // complex matrix size (4x4 MIMO)
  parameter int IN_W  = 13;  // input sample width
  parameter int IN_FR = 12;  // fractional bits of an input sample
  parameter int WD    = 32;  // internal word width
  parameter int FR    = 20;  // internal fractional bits
  parameter int FOLD  = 1;   // folding factor: 1 = fully unfolded, one QRD per clock

  typedef logic signed [WD-1:0]   fx_t;
  typedef logic signed [IN_W-1:0] in_t;

  // Full-precision product (2*FR fractional bits), for accumulating dot products.
  function automatic logic signed [2*WD-1:0] fx_mul_full(fx_t a, fx_t b);
    logic signed [2*WD-1:0] p;
    p = a * b;
    return p;
  endfunction

  // Fixed-point product, truncated back to FR fractional bits.
  function automatic fx_t fx_mul(fx_t a, fx_t b);
    logic signed [2*WD-1:0] p;
    p = a * b;
    return fx_t'(p >>> FR);
  endfunction

  // Input sample to internal format.
  function automatic fx_t fx_from_in(in_t s);
    fx_t w;
    w = fx_t'(s);
    return w <<< (FR - IN_FR);
  endfunction

endpackage
