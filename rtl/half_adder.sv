// half_adder: one-bit half adder, a + b = s + 2*co.
// It is the "H. A." cell of the 7:2 compressor, which adds the two weight-1
// sums of the 4:2 compressors. Purely combinational, no clock.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b;
    co = a & b;
  end
endmodule
