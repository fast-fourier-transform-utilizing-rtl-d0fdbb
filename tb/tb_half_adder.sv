// tb_half_adder: exhaustive check of the one-bit half adder against
// integer addition of its two inputs.
module tb_half_adder;
  logic a, b, s, co;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  half_adder dut (.a(a), .b(b), .s(s), .co(co));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      int total;
      {a, b} = 2'(v);
      @(posedge clk);
      total = int'(a) + int'(b);
      checks++;
      if (int'(s) != total % 2 || int'(co) != total / 2) begin
        failures++;
        $display("FAIL a=%0d b=%0d -> s=%0d co=%0d", a, b, s, co);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
