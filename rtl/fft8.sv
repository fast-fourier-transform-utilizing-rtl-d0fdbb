// fft8: combinational 8-point FFT whose twiddle multiplications run on the
// compressor-based Urdhva multiplier.
//
//     y[k] = sum_{n=0..7} x[n] * exp(-j*2*pi*n*k/8),  k = 0..7
//
// Radix-2 decimation in frequency, three stages of four butterflies:
//   stage 1  butterflies on (x[n], x[n+4]), n = 0..3; the difference of
//            pair n is rotated by W8^n (n = 1, 3 use two multipliers each,
//            n = 2 is a -j swap);
//   stage 2  butterflies on (u[g+n], u[g+n+2]) within each half g = 0, 4;
//            the difference with n = 1 is rotated by -j;
//   stage 3  butterflies on neighbouring pairs.
// The stage-3 results come out in bit-reversed order and are wired to y[] in
// natural order. No scaling is done between stages: outputs are the
// unnormalised DFT, 12 bits per part, and are exact except for the rounding
// of the 1/sqrt(2) products (see fft_twiddle_w8).
//
// Interface: x[0..7] are 8-bit signed complex samples, y[0..7] 12-bit signed
// complex bins. The whole transform is one combinational path, as in the
// document, which reports it by its maximum combinational path delay; the
// sample width, the stage arrangement and the fixed-point scheme are this
// design's choices. No clock or reset.
module fft8
  import fft8_pkg::*;
(
  input  sample_t x [NPOINT],
  output cplx_t   y [NPOINT]
);
  cplx_t xs [NPOINT];               // inputs sign-extended to OUT_W bits
  cplx_t d1 [4];                    // stage-1 differences before rotation
  cplx_t u  [NPOINT];               // stage-1 results
  cplx_t d2 [2];                    // stage-2 differences that get -j
  cplx_t v  [NPOINT];               // stage-2 results
  cplx_t w  [NPOINT];               // stage-3 results, bit-reversed order

  always_comb begin
    for (int n = 0; n < NPOINT; n++) begin
      xs[n].re = OUT_W'(x[n].re);
      xs[n].im = OUT_W'(x[n].im);
    end
  end

  // stage 1: span 4, twiddles W8^n on the differences
  for (genvar n = 0; n < 4; n++) begin : g_s1
    fft_butterfly u_bf (.a(xs[n]), .b(xs[n+4]), .sum(u[n]), .diff(d1[n]));
    if (n == 0) begin : g_w0
      assign u[4] = d1[0];
    end else begin : g_wn
      fft_twiddle_w8 #(.K(n)) u_tw (.d(d1[n]), .q(u[n+4]));
    end
  end

  // stage 2: span 2 inside each half, twiddle W4^1 = -j on the n = 1 difference
  for (genvar g = 0; g < 2; g++) begin : g_s2
    fft_butterfly u_bf0 (.a(u[4*g]),   .b(u[4*g+2]), .sum(v[4*g]),   .diff(v[4*g+2]));
    fft_butterfly u_bf1 (.a(u[4*g+1]), .b(u[4*g+3]), .sum(v[4*g+1]), .diff(d2[g]));
    fft_twiddle_w8 #(.K(2)) u_tw (.d(d2[g]), .q(v[4*g+3]));
  end

  // stage 3: span 1
  for (genvar m = 0; m < 4; m++) begin : g_s3
    fft_butterfly u_bf (.a(v[2*m]), .b(v[2*m+1]), .sum(w[2*m]), .diff(w[2*m+1]));
  end

  // bit-reversed stage-3 order to natural frequency order
  for (genvar i = 0; i < NPOINT; i++) begin : g_out
    localparam int unsigned R = 32'({i[0], i[1], i[2]});
    assign y[R] = w[i];
  end
endmodule
