// tb_compressor72: exhaustive check of the 7:2 compressor over all 512
// combinations of x[7:1], cin1 and cin2. Each is checked against the count of
// ones, computed here:
//     x1+...+x7+cin1+cin2 == sum + 2*carry + 4*(cout1 + cout2)
// and sum must be the parity of the nine inputs.
module tb_compressor72;
  logic [7:1] x;
  logic cin1, cin2, sum, carry, cout1, cout2;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  compressor72 dut (.x(x), .cin1(cin1), .cin2(cin2), .sum(sum), .carry(carry),
                    .cout1(cout1), .cout2(cout2));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      int total;
      {x, cin1, cin2} = 9'(v);
      @(posedge clk);
      total = 0;
      for (int i = 0; i < 9; i++) total += (v >> i) & 1;
      checks++;
      if (total != int'(sum) + 2 * int'(carry) + 4 * (int'(cout1) + int'(cout2))) begin
        failures++;
        $display("FAIL weight x=%b cin1=%b cin2=%b -> sum=%b carry=%b cout1=%b cout2=%b",
                 x, cin1, cin2, sum, carry, cout1, cout2);
      end
      checks++;
      if (int'(sum) != total % 2) begin
        failures++;
        $display("FAIL parity x=%b cin1=%b cin2=%b sum=%b", x, cin1, cin2, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
