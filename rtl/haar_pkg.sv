// haar_pkg: sizes and types shared by the relaxed 16-point Haar DWT.
//
// The transform takes a vector of 16 unsigned 8-bit samples (one image row
// or column) and produces 16 coefficients of 8 bits through four butterfly
// stages. Each stage widens its lanes by one bit (9, 10, 11, 12 bits); the
// last stage divides by 16 with a 4-bit right shift so the result is 8 bits
// again. N, the 8-bit sample width, the four stages and the shift by 4 are
// the published design's numbers; the type names are this design's own.
package haar_pkg;

  localparam int unsigned N      = 16;  // samples per vector
  localparam int unsigned PIX_W  = 8;   // input sample / output coefficient width
  localparam int unsigned SHIFT  = 4;   // final divide by 16

  typedef logic [PIX_W-1:0]   pix_t;    // input sample, unsigned
  typedef logic [PIX_W:0]     s1_t;     // after stage one   (9 bits)
  typedef logic [PIX_W+1:0]   s2_t;     // after stage two   (10 bits)
  typedef logic [PIX_W+2:0]   s3_t;     // after stage three (11 bits)
  typedef logic [PIX_W-1:0]   coef_t;   // output coefficient

endpackage
