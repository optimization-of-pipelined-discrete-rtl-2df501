// wfpe_filter: one Daubechies-2 wavelet filter (low-pass or high-pass) in
// the transpose form that filters after down-sampling.
//
// The filter receives one even/odd sample pair per enabled cycle and emits
// one down-sampled output per pair:
//
//   y(n) = c0*x(2n) + c1*x(2n-1) + c2*x(2n-2) + c3*x(2n-3)
//
// with low-pass c = h = [-0.1294, 0.2241, 0.8365, 0.4830] and high-pass
// c = g = [-0.4830, 0.8365, -0.2241, -0.1294] = [-h3, h2, -h1, h0].
// Split into polyphase halves: the even input xe(n) = x(2n) meets c0 and c2,
// the odd input xo(n) = x(2n-1) meets c1 and c3. xo(n) is the odd sample of
// the previous pair, held in one register (the z^-1 ahead of the odd
// down-sampler). Both inputs pass through an afs_db2 network, which yields
// all four coefficient products. The products with c2 and c3 are held for one
// pair (the single "shift register" stage of the transpose form) and added to
// the next pair's c0 and c1 products:
//
//   y(n) = c0*xe(n) + c1*xo(n) + [c2*xe(n-1) + c3*xo(n-1)]   (bracket: registered)
//
// iFirst marks the first pair of a frame: the held odd sample and products
// are taken as zero, so each frame is transformed on its own with zero
// history (x(m) = 0 for m < 0). The frame-start input and the zero history
// are this design's choices.
//
// Input words have IN_W bits with IN_FRAC fractional bits (16/0 at the first
// level, 26/10 further down); outputs are 26 bits with 10 fractional bits,
// truncated toward minus infinity from the exact sum. Output overflow wraps.
// Timing: oData is registered; it holds y(n) from the clock edge that
// samples the pair with iEn high.
module wfpe_filter
  import dwpt_pkg::*;
#(
  parameter int unsigned IN_W    = 26,
  parameter int unsigned IN_FRAC = 10,
  parameter bit          HIGH    = 1'b0   // 0: low-pass h, 1: high-pass g
) (
  input  logic                   iClk,
  input  logic                   iEn,
  input  logic                   iFirst,
  input  logic signed [IN_W-1:0] iData_even,
  input  logic signed [IN_W-1:0] iData_odd,
  output coef_t                  oData
);

  // Operand of the AFS networks: the input aligned to 10 fractional bits and
  // extended by AFS_GUARD zero bits so every shift in the network is exact.
  localparam int unsigned XW = DATA_W + AFS_GUARD;
  localparam int unsigned YW = XW + 2;
  localparam int unsigned SW = YW + 2;
  localparam int unsigned ALIGN = FRAC_W - IN_FRAC + AFS_GUARD;

  logic signed [IN_W-1:0] odd_q;          // z^-1 on the odd branch
  logic signed [YW-1:0]   p2_q, p3_q;     // transpose-form delay registers

  logic signed [IN_W-1:0] xo;
  logic signed [XW-1:0]   xe_g, xo_g;
  logic signed [YW-1:0]   ye0, ye1, ye2, ye3;
  logic signed [YW-1:0]   yo0, yo1, yo2, yo3;
  logic signed [YW-1:0]   p0, p1, p2, p3;
  logic signed [SW-1:0]   sum;

  always_comb begin
    xo   = iFirst ? '0 : odd_q;
    xe_g = XW'(iData_even) <<< ALIGN;
    xo_g = XW'(xo) <<< ALIGN;
  end

  afs_db2 #(.XW(XW)) u_afs_even (
    .iX (xe_g), .oY0(ye0), .oY1(ye1), .oY2(ye2), .oY3(ye3)
  );

  afs_db2 #(.XW(XW)) u_afs_odd (
    .iX (xo_g), .oY0(yo0), .oY1(yo1), .oY2(yo2), .oY3(yo3)
  );

  // Coefficient selection: the high-pass taps are the low-pass products in
  // reverse order with alternating sign, so both filters share one network
  // design.
  always_comb begin
    if (HIGH) begin
      p0 = -ye3;   // g0 = -h3
      p1 =  yo2;   // g1 =  h2
      p2 = -ye1;   // g2 = -h1
      p3 =  yo0;   // g3 =  h0
    end else begin
      p0 =  ye0;
      p1 =  yo1;
      p2 =  ye2;
      p3 =  yo3;
    end
    sum = SW'(p0) + SW'(p1);
    if (!iFirst) sum = sum + SW'(p2_q) + SW'(p3_q);
  end

  always_ff @(posedge iClk) begin
    if (iEn) begin
      oData <= coef_t'(sum >>> AFS_GUARD);
      p2_q  <= p2;
      p3_q  <= p3;
      odd_q <= iData_odd;
    end
  end

endmodule
