// udmultipier_mmcompressor: 8 x 8 unsigned Urdhva (vertical and crosswise)
// multiplier with compressor-based column reduction. c = a * b.
//
// Urdhva generation: column k of the product collects the crosswise bit
// products a[i] & b[k-i]. The fifteen columns hold 1,2,...,8,...,2,1 bits.
//
// Reduction, one compressor per column and level:
//   level 1  a row of 7:2 compressors. Column k feeds bits i = 0..6 of its
//            crosswise set; cout1/cout2 of column k reach cin1/cin2 of
//            column k+2, carry (weight 2) goes on to column k+1.
//   level 2  a row of 4:2 compressors. Column k adds the level-1 sum of
//            column k, the level-1 carry of column k-1 and the eighth
//            crosswise bit a[7] & b[k-7] (present from column 7 on); its
//            fourth input is tied low and cout ripples into column k+1's cin.
//   final    the two remaining rows are added by a 16-bit carry-propagate
//            adder.
// The document gives the multiplier's function, its name and its 8-bit ports;
// the arrangement of the compressors in the array and the final adder are
// this design's choices. Signals that would carry weight 2^16 or more are
// left unconnected: they are always zero because a*b < 2^16.
// Purely combinational, no clock.
module udmultipier_mmcompressor (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] c
);
  localparam int N = 8;       // operand width
  localparam int W = 2 * N;   // product width / number of columns

  logic [N-1:0] col [W];      // crosswise bit products of each column

  // level 1 (7:2) outputs
  logic [W-1:0] s7, c7, o1, o2;
  // level 2 (4:2) outputs
  logic [W-1:0] s4, c4, co4;

  always_comb begin
    for (int k = 0; k < W; k++) begin
      for (int i = 0; i < N; i++) begin
        if ((k - i) >= 0 && (k - i) < N) col[k][i] = a[i] & b[k-i];
        else                             col[k][i] = 1'b0;
      end
    end
  end

  for (genvar k = 0; k < W; k++) begin : g_col
    logic cin1, cin2, l2_x2, l2_cin;

    if (k >= 2) begin : g_lat
      assign cin1 = o1[k-2];
      assign cin2 = o2[k-2];
    end else begin : g_nolat
      assign cin1 = 1'b0;
      assign cin2 = 1'b0;
    end

    if (k >= 1) begin : g_prev
      assign l2_x2  = c7[k-1];
      assign l2_cin = co4[k-1];
    end else begin : g_noprev
      assign l2_x2  = 1'b0;
      assign l2_cin = 1'b0;
    end

    compressor72 u_c72 (
      .x    (col[k][6:0]),
      .cin1 (cin1),
      .cin2 (cin2),
      .sum  (s7[k]),
      .carry(c7[k]),
      .cout1(o1[k]),
      .cout2(o2[k])
    );

    compressor42 u_c42 (
      .x1   (s7[k]),
      .x2   (l2_x2),
      .x3   (col[k][7]),
      .x4   (1'b0),
      .cin  (l2_cin),
      .sum  (s4[k]),
      .carry(c4[k]),
      .cout (co4[k])
    );
  end

  // final carry-propagate addition of the sum row and the shifted carry row
  assign c = s4 + {c4[W-2:0], 1'b0};
endmodule
