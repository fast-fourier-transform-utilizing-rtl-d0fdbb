// fft_butterfly: radix-2 complex butterfly of the 8-point FFT.
// sum = a + b and diff = a - b on the real and imaginary parts. The twiddle
// factor, where a stage needs one, is applied to diff by a separate
// fft_twiddle_w8 unit (decimation in frequency). Operands and results are
// 12-bit two's complement; in the FFT the values never exceed that range, so
// no saturation is done. Purely combinational, no clock.
module fft_butterfly
  import fft8_pkg::*;
(
  input  cplx_t a,
  input  cplx_t b,
  output cplx_t sum,
  output cplx_t diff
);
  always_comb begin
    sum.re  = a.re + b.re;
    sum.im  = a.im + b.im;
    diff.re = a.re - b.re;
    diff.im = a.im - b.im;
  end
endmodule
