// tb_fft_butterfly: applies 2,000 random complex operand pairs (parts in
// [-1024, 1023], so no result overflows 12 bits) and compares sum and
// difference with integer arithmetic.
module tb_fft_butterfly;
  import fft8_pkg::*;
  cplx_t a, b, sum, diff;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  fft_butterfly dut (.a(a), .b(b), .sum(sum), .diff(diff));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd();
    return int'($urandom_range(2047)) - 1024;
  endfunction

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int ar, ai, br, bi;
      ar = rnd(); ai = rnd(); br = rnd(); bi = rnd();
      a.re = OUT_W'(ar); a.im = OUT_W'(ai);
      b.re = OUT_W'(br); b.im = OUT_W'(bi);
      @(posedge clk);
      checks++;
      if (int'(sum.re) != ar + br || int'(sum.im) != ai + bi ||
          int'(diff.re) != ar - br || int'(diff.im) != ai - bi) begin
        failures++;
        $display("FAIL a=(%0d,%0d) b=(%0d,%0d) sum=(%0d,%0d) diff=(%0d,%0d)",
                 ar, ai, br, bi, sum.re, sum.im, diff.re, diff.im);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
