// tb_udmultipier_mmcompressor: exhaustive check of the 8 x 8 compressor
// multiplier. First the operand pair 255 x 243 (11111111 x 11110011), then all
// 65,536 operand pairs, each against the integer product.
module tb_udmultipier_mmcompressor;
  logic [7:0]  a, b;
  logic [15:0] c;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  udmultipier_mmcompressor dut (.a(a), .b(b), .c(c));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int ia, input int ib);
    a = 8'(ia);
    b = 8'(ib);
    @(posedge clk);
    checks++;
    if (int'(c) != ia * ib) begin
      failures++;
      if (failures < 20) $display("FAIL %0d * %0d -> %0d, expected %0d", ia, ib, c, ia * ib);
    end
  endtask

  initial begin
    check(255, 243);
    if (c != 16'b1111001000001101) begin
      failures++;
      $display("FAIL 11111111 x 11110011 gave %b", c);
    end
    checks++;
    for (int ia = 0; ia < 256; ia++)
      for (int ib = 0; ib < 256; ib++)
        check(ia, ib);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
