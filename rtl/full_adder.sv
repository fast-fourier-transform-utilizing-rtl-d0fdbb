// full_adder: one-bit full adder, a + b + ci = s + 2*co.
// It is the "F. A." cell of the 7:2 compressor, where two of them merge the
// weight-2 outputs of the two 4:2 compressors. The sum is a three-input XOR
// and the carry the majority of the inputs; the gate-level form is this
// design's own choice. Purely combinational, no clock.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  logic p;  // propagate

  always_comb begin
    p  = a ^ b;
    s  = p ^ ci;
    co = p ? ci : a;  // majority(a, b, ci), written as a 2:1 multiplexer
  end
endmodule
