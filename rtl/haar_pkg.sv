// Shared types and constants of the one-level 1-D Haar wavelet transform.
//
// The datapath carries 8-bit two's-complement samples (-128..+127) in and
// 8-bit two's-complement low-band and high-band coefficients out. Every
// datapath block takes its width from SAMPLE_W so that the whole design
// stays at the 8 bits it was laid out for.
package haar_pkg;
  // Width of an input sample and of each output coefficient.
  localparam int unsigned SAMPLE_W = 8;
  // Number of low adder sum bits brought out on the adder debug pins.
  localparam int unsigned DBG_ADDR_W = 4;

  typedef logic signed [SAMPLE_W-1:0] sample_t;
endpackage
