// tb_fft8: end-to-end test of the 8-point FFT at its only size.
//
// Inputs: an impulse, a constant, full-scale patterns, sequences built to put
// the extreme difference +-255 on the multipliers, and 3,000 random sample
// sets. Each output bin is checked two ways:
//   * bit-exact against a reference computed here in a different form: the
//     even bins are a direct 4-point DFT of x[n] + x[n+4], the odd bins a
//     direct 4-point DFT of (x[n] - x[n+4]) * W8^n, where the 1/sqrt(2)
//     products are rounded the way the design specifies (magnitude * 181/256,
//     rounded half up);
//   * against the exact floating-point DFT, within 2.5 on each part.
// The test also counts how often each mechanism of the datapath was used:
// W8^1 and W8^3 rotations through the multipliers, -j rotations, full-scale
// (255) and negative multiplier operands, and products that round up. A
// mechanism that never occurs counts as a failure.
module tb_fft8;
  import fft8_pkg::*;
  sample_t x [NPOINT];
  cplx_t   y [NPOINT];
  int checks = 0, failures = 0;
  int n_rot1 = 0, n_rot3 = 0, n_rotj = 0, n_full = 0, n_neg = 0, n_rndup = 0;
  logic clk = 1'b0;

  fft8 dut (.x(x), .y(y));

  always #5 clk = ~clk;

  function automatic real rabs(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 1/sqrt(2) scaling as specified: sign-magnitude, 181/256, rounded half up
  function automatic int scale(input int v);
    int m;
    m = v < 0 ? -v : v;
    if (((m * 181) % 256) >= 128 && m != 0) n_rndup++;
    m = (m * 181 + 128) / 256;
    return v < 0 ? -m : m;
  endfunction

  task automatic run_vector(input int xr [NPOINT], input int xi [NPOINT]);
    int er [4], ei [4];          // x[n] + x[n+4]
    int orr [4], oi [4];         // (x[n] - x[n+4]) * W8^n
    int ref_re [NPOINT], ref_im [NPOINT];
    for (int n = 0; n < NPOINT; n++) begin
      x[n].re = IN_W'(xr[n]);
      x[n].im = IN_W'(xi[n]);
    end
    @(posedge clk);

    for (int n = 0; n < 4; n++) begin
      int dr, di, cr, ci;
      er[n] = xr[n] + xr[n+4];
      ei[n] = xi[n] + xi[n+4];
      dr = xr[n] - xr[n+4];
      di = xi[n] - xi[n+4];
      case (n)
        0: begin orr[n] = dr; oi[n] = di; end
        1: begin
             cr = scale(dr); ci = scale(di);
             orr[n] = cr + ci; oi[n] = ci - cr;
             if (dr != 0 || di != 0) n_rot1++;
           end
        2: begin orr[n] = di; oi[n] = -dr; end
        default: begin
             cr = scale(dr); ci = scale(di);
             orr[n] = ci - cr; oi[n] = -(ci + cr);
             if (dr != 0 || di != 0) n_rot3++;
           end
      endcase
      if (n % 2 == 1) begin
        if (dr == 255 || dr == -255 || di == 255 || di == -255) n_full++;
        if (dr < 0 || di < 0) n_neg++;
      end
    end
    // the -j of the second stage acts on (a[1] - a[3]) of either half
    if (er[1] != er[3] || ei[1] != ei[3] || orr[1] != orr[3] || oi[1] != oi[3]) n_rotj++;

    // direct 4-point DFTs: W4^(n*r) cycles through 1, -j, -1, j
    for (int r = 0; r < 4; r++) begin
      int sr, si, tr, ti;
      sr = 0; si = 0; tr = 0; ti = 0;
      for (int n = 0; n < 4; n++) begin
        case ((n * r) % 4)
          0: begin sr += er[n];  si += ei[n];  tr += orr[n]; ti += oi[n];  end
          1: begin sr += ei[n];  si -= er[n];  tr += oi[n];  ti -= orr[n]; end
          2: begin sr -= er[n];  si -= ei[n];  tr -= orr[n]; ti -= oi[n];  end
          default: begin sr -= ei[n]; si += er[n]; tr -= oi[n]; ti += orr[n]; end
        endcase
      end
      ref_re[2*r] = sr;   ref_im[2*r] = si;
      ref_re[2*r+1] = tr; ref_im[2*r+1] = ti;
    end

    for (int k = 0; k < NPOINT; k++) begin
      real fr, fi;
      fr = 0.0; fi = 0.0;
      for (int n = 0; n < NPOINT; n++) begin
        real ang;
        ang = -2.0 * 3.14159265358979 * real'(n * k) / 8.0;
        fr += real'(xr[n]) * $cos(ang) - real'(xi[n]) * $sin(ang);
        fi += real'(xr[n]) * $sin(ang) + real'(xi[n]) * $cos(ang);
      end
      checks++;
      if (int'(y[k].re) != ref_re[k] || int'(y[k].im) != ref_im[k]) begin
        failures++;
        if (failures < 20)
          $display("FAIL bin %0d got (%0d,%0d) expected (%0d,%0d)",
                   k, y[k].re, y[k].im, ref_re[k], ref_im[k]);
      end
      checks++;
      if (rabs(real'(y[k].re) - fr) > 2.5 || rabs(real'(y[k].im) - fi) > 2.5) begin
        failures++;
        if (failures < 20)
          $display("FAIL bin %0d got (%0d,%0d), exact DFT (%f,%f)",
                   k, y[k].re, y[k].im, fr, fi);
      end
    end
  endtask

  initial begin
    int xr [NPOINT], xi [NPOINT];
    foreach (x[n]) x[n] = '0;

    // impulse at n = 0: flat spectrum
    foreach (xr[n]) begin xr[n] = (n == 0) ? 100 : 0; xi[n] = 0; end
    run_vector(xr, xi);
    // constant: everything in bin 0
    foreach (xr[n]) begin xr[n] = 50; xi[n] = -20; end
    run_vector(xr, xi);
    // full-scale negative and positive constants
    foreach (xr[n]) begin xr[n] = -128; xi[n] = -128; end
    run_vector(xr, xi);
    foreach (xr[n]) begin xr[n] = 127; xi[n] = 127; end
    run_vector(xr, xi);
    // extreme differences on the multiplier pairs (n = 1, 3)
    foreach (xr[n]) begin
      xr[n] = (n < 4) ? 127 : -128;
      xi[n] = (n < 4) ? -128 : 127;
    end
    run_vector(xr, xi);
    foreach (xr[n]) begin
      xr[n] = (n % 2 == 0) ? 127 : -128;
      xi[n] = (n < 4) ? 127 : -128;
    end
    run_vector(xr, xi);
    // random sample sets
    for (int t = 0; t < 3000; t++) begin
      foreach (xr[n]) begin
        xr[n] = int'($urandom_range(255)) - 128;
        xi[n] = int'($urandom_range(255)) - 128;
      end
      run_vector(xr, xi);
    end

    $display("mechanisms: W8^1=%0d W8^3=%0d -j=%0d full-scale=%0d negative=%0d round-up=%0d",
             n_rot1, n_rot3, n_rotj, n_full, n_neg, n_rndup);
    checks++;
    if (n_rot1 == 0 || n_rot3 == 0 || n_rotj == 0 || n_full == 0 || n_neg == 0 || n_rndup == 0) begin
      failures++;
      $display("FAIL a datapath mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
