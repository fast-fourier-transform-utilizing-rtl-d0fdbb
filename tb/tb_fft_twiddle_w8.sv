// tb_fft_twiddle_w8: checks the W8^1, W8^2 and W8^3 rotations.
// Every real/imaginary input pair on a grid covering [-255, 255] (step 5,
// plus the end points) is applied to three instances, K = 1, 2, 3. Expected
// values are computed two ways, independently of the unit:
//   * bit-exact: scale each part by 181/256 with rounding of the magnitude,
//     then combine as the rotation requires;
//   * accuracy: the result must lie within 1.5 LSB of the exact complex
//     product with exp(-j*pi*K/4) on each part.
module tb_fft_twiddle_w8;
  import fft8_pkg::*;
  cplx_t d, q1, q2, q3;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  fft_twiddle_w8 #(.K(1)) dut1 (.d(d), .q(q1));
  fft_twiddle_w8 #(.K(2)) dut2 (.d(d), .q(q2));
  fft_twiddle_w8 #(.K(3)) dut3 (.d(d), .q(q3));

  always #5 clk = ~clk;

  function automatic real rabs(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int scale(input int v);
    int m;
    m = v < 0 ? -v : v;
    m = (m * 181 + 128) / 256;
    return v < 0 ? -m : m;
  endfunction

  task automatic expect_eq(input string what, input int got_re, input int got_im,
                           input int exp_re, input int exp_im, input int dr, input int di);
    checks++;
    if (got_re != exp_re || got_im != exp_im) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s d=(%0d,%0d) got (%0d,%0d) expected (%0d,%0d)",
                 what, dr, di, got_re, got_im, exp_re, exp_im);
    end
  endtask

  task automatic expect_near(input string what, input int got_re, input int got_im,
                             input real exp_re, input real exp_im);
    checks++;
    if (rabs(real'(got_re) - exp_re) > 1.5 || rabs(real'(got_im) - exp_im) > 1.5) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s accuracy got (%0d,%0d) ideal (%f,%f)",
                 what, got_re, got_im, exp_re, exp_im);
    end
  endtask

  task automatic apply(input int dr, input int di);
    int cr, ci;
    real h;
    d.re = OUT_W'(dr);
    d.im = OUT_W'(di);
    @(posedge clk);
    cr = scale(dr);
    ci = scale(di);
    h  = 1.0 / $sqrt(2.0);
    expect_eq("K=1", int'(q1.re), int'(q1.im), cr + ci, ci - cr, dr, di);
    expect_eq("K=2", int'(q2.re), int'(q2.im), di, -dr, dr, di);
    expect_eq("K=3", int'(q3.re), int'(q3.im), ci - cr, -(ci + cr), dr, di);
    expect_near("K=1", int'(q1.re), int'(q1.im), h * (dr + di), h * (di - dr));
    expect_near("K=3", int'(q3.re), int'(q3.im), h * (di - dr), -h * (dr + di));
  endtask

  initial begin
    d = '0;
    apply(255, -255);
    apply(-255, 255);
    apply(0, 0);
    for (int dr = -255; dr <= 255; dr += 5)
      for (int di = -255; di <= 255; di += 5)
        apply(dr, di);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
