// compressor72: 7:2 compressor built from two 4:2 compressors, two full
// adders and one half adder.
//
// Adds the seven bits x[7:1] of one column and two carry-ins that arrive from
// the compressor two columns lower:
//     x1 + ... + x7 + cin1 + cin2 = sum + 2*carry + 4*(cout1 + cout2)
// sum stays in this column, carry belongs to the next column, and cout1 and
// cout2 go to cin1 and cin2 of the compressor two columns higher.
//
// Structure (the cell arrangement and net routing follow the design's block
// diagram):
//   * 4:2 compressor A adds x1..x4 with cin1 on its carry-in;
//   * 4:2 compressor B adds x5..x7 (fourth input tied low) with cin2 on its
//     carry-in;
//   * the half adder adds the two weight-1 sums and gives the final sum;
//   * full adder M adds A.carry, B.cout and the half-adder carry (weight 2);
//   * full adder L adds A.cout, B.carry and the sum of M (weight 2), giving
//     carry (its sum) and cout1 (its carry); the carry of M is cout2.
// Which of M's two outputs feeds L, the tied-low input of B and the weights of
// the four outputs are this design's choices: they make the equation above
// exact. Purely combinational, no clock.
module compressor72 (
  input  logic [7:1] x,
  input  logic       cin1,
  input  logic       cin2,
  output logic       sum,
  output logic       carry,
  output logic       cout1,
  output logic       cout2
);
  logic sa, ca, oa;   // 4:2 compressor A: sum, carry, cout
  logic sb, cb, ob;   // 4:2 compressor B: sum, carry, cout
  logic hc;           // half-adder carry (weight 2)
  logic ms;           // full adder M sum (weight 2)

  compressor42 u_c42_a (
    .x1(x[1]), .x2(x[2]), .x3(x[3]), .x4(x[4]), .cin(cin1),
    .sum(sa), .carry(ca), .cout(oa)
  );

  compressor42 u_c42_b (
    .x1(x[5]), .x2(x[6]), .x3(x[7]), .x4(1'b0), .cin(cin2),
    .sum(sb), .carry(cb), .cout(ob)
  );

  half_adder u_ha (.a(sa), .b(sb), .s(sum), .co(hc));

  full_adder u_fa_m (.a(ca), .b(ob), .ci(hc), .s(ms), .co(cout2));

  full_adder u_fa_l (.a(oa), .b(cb), .ci(ms), .s(carry), .co(cout1));
endmodule
