// fft_twiddle_w8: multiplies a complex value by the twiddle factor
// W8^K = exp(-j*2*pi*K/8), K = 1, 2 or 3.
//
// W8^2 = -j is a swap of the parts with one negation. For the odd K the
// twiddle is (+-1 - j)/sqrt(2): each part is scaled by 1/sqrt(2), then the
// scaled parts are added or subtracted:
//     K = 1:  q = ( cr + ci) + j(ci - cr)
//     K = 3:  q = ( ci - cr) - j(ci + cr)
// with cr = d.re/sqrt(2), ci = d.im/sqrt(2). The scaling is sign-magnitude:
// the magnitude (at most 255) goes through one 8 x 8 compressor-based Urdhva
// multiplier with the constant 181 = round(256/sqrt(2)), the 16-bit product is
// rounded half up to an integer (add 128, drop 8 bits) and the sign restored.
// Rounding the magnitude keeps the scaling symmetric about zero.
// The document says only that the FFT's multiplications use the compressor
// multiplier; the sign-magnitude scheme, the constant and the rounding are this
// design's choices. Purely combinational, no clock.
module fft_twiddle_w8
  import fft8_pkg::*;
#(
  parameter int unsigned K = 1   // twiddle exponent, 1..3
) (
  input  cplx_t d,
  output cplx_t q
);
  if (K == 2) begin : g_minus_j
    always_comb begin
      q.re = d.im;
      q.im = -d.re;
    end
  end else if (K == 1 || K == 3) begin : g_odd
    logic              neg_re, neg_im;
    logic [OUT_W-1:0]  mag_re, mag_im;
    logic [15:0]       p_re, p_im;   // |d| * 181
    logic [OUT_W-1:0]  r_re, r_im;   // rounded magnitudes
    logic signed [OUT_W-1:0] cr, ci;

    always_comb begin
      neg_re = d.re[OUT_W-1];
      neg_im = d.im[OUT_W-1];
      mag_re = neg_re ? OUT_W'(-d.re) : OUT_W'(d.re);
      mag_im = neg_im ? OUT_W'(-d.im) : OUT_W'(d.im);
    end

    udmultipier_mmcompressor u_mul_re (.a(mag_re[7:0]), .b(COS45), .c(p_re));
    udmultipier_mmcompressor u_mul_im (.a(mag_im[7:0]), .b(COS45), .c(p_im));

    always_comb begin
      r_re = OUT_W'((17'(p_re) + 17'(1 << (FRAC - 1))) >> FRAC);
      r_im = OUT_W'((17'(p_im) + 17'(1 << (FRAC - 1))) >> FRAC);
      cr   = neg_re ? -$signed(r_re) : $signed(r_re);
      ci   = neg_im ? -$signed(r_im) : $signed(r_im);
      if (K == 1) begin
        q.re = cr + ci;
        q.im = ci - cr;
      end else begin
        q.re = ci - cr;
        q.im = -(ci + cr);
      end
    end

    // The multiplier takes 8-bit magnitudes: the FFT only rotates stage-1
    // differences of 8-bit samples, whose parts lie in [-255, 255].
    always_comb begin
      assert (mag_re <= OUT_W'(255) && mag_im <= OUT_W'(255))
        else $error("fft_twiddle_w8: operand magnitude above 255");
    end
  end else begin : g_bad_k
    $error("fft_twiddle_w8: K must be 1, 2 or 3");
  end
endmodule
