// afs_db2: shared shift-add multiplier for the four Daubechies-2 coefficient
// magnitudes (advanced functional sharing, AFS).
//
// One operand X is multiplied by all four low-pass coefficients at once,
// with no multiplier: every coefficient is written in canonical signed digit
// form and the products are sums of shifted copies of X.
//
//   C4 = X, C3 = X>>1, C2 = X>>2, C1 = X>>3, C0 = X>>4   (taps, free wiring)
//   B0 = C4 + C1 =  1.125 X      B1 = C4 + C2 =  1.25 X
//   B2 = C2 - C4 = -0.75  X      B3 = C4 - C1 =  0.875 X
//   Y0 = -C1 - (B0>>8)               = -0.1293945 X   (h0 = -0.1294)
//   Y1 =  C2 + (B2>>5) - (B1>>9)     =  0.2241211 X   (h1 =  0.2241)
//   Y2 =  B3 - (B1>>5) + (B0>>11)    =  0.8364868 X   (h2 =  0.8365)
//   Y3 =  C3 - (B0>>6) + (B0>>11)    =  0.4829712 X   (h3 =  0.4830)
//
// Four shared partial sums B0..B3 plus seven adders for the outputs make 11
// adders in total. The Y expressions and their shift amounts follow the
// design description; B0, B1 and B2 are formed at unit weight (B0 = X + X>>3
// rather than X>>4 + X>>1) so that those printed shift amounts give the
// printed coefficient values. C0 is not needed in this form and is omitted.
//
// The shifts are arithmetic and truncate; the caller appends at least 14
// zero low-order bits to X (see dwpt_pkg::AFS_GUARD) so every product is
// exact. Purely combinational. Outputs are two bits wider than X.
module afs_db2 #(
  parameter int unsigned XW = 40
) (
  input  logic signed [XW-1:0] iX,
  output logic signed [XW+1:0] oY0,
  output logic signed [XW+1:0] oY1,
  output logic signed [XW+1:0] oY2,
  output logic signed [XW+1:0] oY3
);

  localparam int unsigned YW = XW + 2;

  logic signed [YW-1:0] c4, c3, c2, c1;
  logic signed [YW-1:0] b0, b1, b2, b3;

  always_comb begin
    c4 = YW'(iX);
    c3 = c4 >>> 1;
    c2 = c4 >>> 2;
    c1 = c4 >>> 3;

    b0 = c4 + c1;
    b1 = c4 + c2;
    b2 = c2 - c4;
    b3 = c4 - c1;

    oY0 = -c1 - (b0 >>> 8);
    oY1 = c2 + (b2 >>> 5) - (b1 >>> 9);
    oY2 = b3 - (b1 >>> 5) + (b0 >>> 11);
    oY3 = c3 - (b0 >>> 6) + (b0 >>> 11);
  end

endmodule
