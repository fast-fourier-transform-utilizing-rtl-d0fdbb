// tb_full_adder: exhaustive check of the one-bit full adder. All eight input
// combinations are applied; sum and carry are compared with the parity and
// the majority of the inputs, computed here with integer arithmetic.
module tb_full_adder;
  logic a, b, ci, s, co;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  full_adder dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int total;
      {a, b, ci} = 3'(v);
      @(posedge clk);
      total = int'(a) + int'(b) + int'(ci);
      checks++;
      if (int'(s) != total % 2 || int'(co) != total / 2) begin
        failures++;
        $display("FAIL a=%0d b=%0d ci=%0d -> s=%0d co=%0d", a, b, ci, s, co);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
