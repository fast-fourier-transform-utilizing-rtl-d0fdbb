// compressor42: the XOR-XNOR / multiplexer 4:2 compressor.
//
// Adds four bits of one column and a carry-in from the next lower column:
//     x1 + x2 + x3 + x4 + cin = sum + 2*(carry + cout)
// cout goes to the cin of the next higher column's compressor and does not
// depend on cin, so a row of these cells has no rippling carry chain.
//
// Structure (follows the multiplexer-based cell of the design):
//   * two XOR-XNOR cells form x1^x2 and x3^x4 together with their complements;
//   * a multiplexer steered by x1^x2 picks x3 or x1 as cout;
//   * a multiplexer steered by x1^x2 picks (x3 XNOR x4) or (x3 XOR x4), giving
//     the four-input parity without a third XOR level;
//   * two output multiplexers steered by that parity produce
//     carry = parity ? cin : x4 and sum = parity ? ~cin : cin.
// Because the parity is ready before cin arrives, cin passes through a single
// multiplexer to both outputs. Which data leg of each multiplexer carries
// which signal is this design's choice, made so that the equation above holds.
// Purely combinational, no clock.
module compressor42 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic xor12;          // first XOR-XNOR cell (its XNOR rail is not needed)
  logic xor34, xnor34;  // second XOR-XNOR cell
  logic par4;           // x1 ^ x2 ^ x3 ^ x4

  always_comb begin
    xor12  = x1 ^ x2;
    xor34  = x3 ^ x4;
    xnor34 = ~xor34;

    cout  = xor12 ? x3 : x1;
    par4  = xor12 ? xnor34 : xor34;
    carry = par4 ? cin : x4;
    sum   = par4 ? ~cin : cin;
  end
endmodule
