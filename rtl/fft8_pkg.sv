// fft8_pkg: widths, the twiddle constant and the complex sample types shared
// by the 8-point FFT and its butterfly and twiddle units.
//
// Input samples are 8-bit two's-complement real and imaginary parts, the width
// of the 8 x 8 compressor multiplier. Inside the FFT and at its outputs every
// part is 12 bits wide, enough for the largest possible spectrum value
// (8 samples of magnitude up to 128*sqrt(2)). The 1/sqrt(2) of the W8^1 and
// W8^3 twiddles is the 8-bit fraction COS45 / 2^FRAC = 181/256.
package fft8_pkg;
  localparam int unsigned NPOINT = 8;    // transform length
  localparam int unsigned IN_W   = 8;    // bits per real/imag input part
  localparam int unsigned OUT_W  = 12;   // bits per real/imag internal/output part
  localparam int unsigned FRAC   = 8;    // fraction bits of the twiddle constant
  localparam logic [7:0]  COS45  = 8'd181;  // round(2^8 / sqrt(2))

  typedef struct packed {
    logic signed [IN_W-1:0] re;
    logic signed [IN_W-1:0] im;
  } sample_t;

  typedef struct packed {
    logic signed [OUT_W-1:0] re;
    logic signed [OUT_W-1:0] im;
  } cplx_t;
endpackage
