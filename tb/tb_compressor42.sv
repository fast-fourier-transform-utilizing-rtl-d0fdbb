// tb_compressor42: exhaustive check of the 4:2 compressor over all 32 input
// combinations. For each it checks
//   * the defining sum: x1+x2+x3+x4+cin == sum + 2*(carry + cout);
//   * sum is the parity of all five inputs;
//   * cout is the majority of x1, x2, x3 and so does not depend on cin, which
//     is what lets a row of compressors work without a rippling carry.
module tb_compressor42;
  logic x1, x2, x3, x4, cin, sum, carry, cout;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  compressor42 dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .cin(cin),
                    .sum(sum), .carry(carry), .cout(cout));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      int total, maj3;
      {x1, x2, x3, x4, cin} = 5'(v);
      @(posedge clk);
      total = int'(x1) + int'(x2) + int'(x3) + int'(x4) + int'(cin);
      maj3  = (int'(x1) + int'(x2) + int'(x3)) >= 2 ? 1 : 0;
      checks++;
      if (total != int'(sum) + 2 * (int'(carry) + int'(cout))) begin
        failures++;
        $display("FAIL weight x=%b%b%b%b cin=%b -> sum=%b carry=%b cout=%b",
                 x1, x2, x3, x4, cin, sum, carry, cout);
      end
      checks++;
      if (int'(sum) != total % 2) begin
        failures++;
        $display("FAIL parity x=%b%b%b%b cin=%b sum=%b", x1, x2, x3, x4, cin, sum);
      end
      checks++;
      if (int'(cout) != maj3) begin
        failures++;
        $display("FAIL cout x=%b%b%b cout=%b", x1, x2, x3, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
