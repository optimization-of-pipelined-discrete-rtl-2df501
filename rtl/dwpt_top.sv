// dwpt_top: five-level Daubechies-2 discrete wavelet packet transform
// processor built as a feed-forward pipeline of WFPE cells.
//
// The wavelet packet tree splits every node, not only the low-pass branch,
// so LEVELS levels give 2^LEVELS uniform sub-bands. Level l has 2^(l-1) WFPE
// cells: the first cell filters the input stream; every other cell filters
// the low-pass or high-pass output of its parent. Each cell buffers a frame
// of its input and then emits its two half-length output streams at one
// coefficient per cycle, so all levels work at the same time on successive
// frames and the input may stream at one sample per cycle without pause.
//
// Tree numbering (heap order): cell c has children 2c (fed by its low-pass
// output) and 2c+1 (fed by its high-pass output); cell 1 is the root. With
// the defaults (1024-sample frames, 5 levels) there are 31 cells and
// 32 sub-bands of 32 coefficients each per frame. Sub-band k (k = 0..31,
// in tree order, not frequency order) is oData_Low[k/2] for even k and
// oData_High[k/2] for odd k; the pair comes from level-5 cell k/2.
//
// Interface: iData is a 16-bit signed sample, taken when iEn is high; a frame
// is any FRAME_LEN consecutive accepted samples after reset. Outputs are
// 26-bit signed words with 10 fractional bits. oData_Valid is the AND of the
// valid flags of all last-level cells (they run in lock step).
// Timing: each cell emits output n of a frame after clock edge T+2+n, where T
// is the edge that accepts the frame's last input. If the top accepts the
// last sample of a frame at edge T, the first coefficients of that frame
// follow edge T + 2 + sum_{l<LEVELS}(2 + N_l/2) and the burst lasts
// N_LEVELS/2 cycles, with N_l = FRAME_LEN/2^(l-1): edges T+970 to T+1001 at
// the defaults.
// The tree, the level count, the frame length and the word widths follow
// the design description; frame handling and reset are this design's choice.
module dwpt_top
  import dwpt_pkg::*;
#(
  parameter int unsigned FRAME_LEN = 1024,
  parameter int unsigned LEVELS    = 5,
  localparam int unsigned NCELL    = (1 << LEVELS) - 1,
  localparam int unsigned NLEAF    = 1 << (LEVELS - 1)
) (
  input  logic                 iClk,
  input  logic                 iReset_n,
  input  logic                 iEn,
  input  logic signed [SAMPLE_W-1:0] iData,
  output coef_t                oData_Low  [NLEAF],
  output coef_t                oData_High [NLEAF],
  output logic                 oData_Valid
);

  // band[n] is the output stream of tree node n (n = 2 .. 2*NCELL+1);
  // cell_valid[c] flags the output bursts of cell c.
  coef_t band       [2:2*NCELL+1];
  logic  cell_valid [1:NCELL];

  if ((FRAME_LEN >> (LEVELS - 1)) < 4 || (FRAME_LEN & (FRAME_LEN - 1)) != 0) begin : g_bad_size
    $error("FRAME_LEN must be a power of two of at least 2^(LEVELS+1)");
  end

  for (genvar c = 1; c <= NCELL; c++) begin : g_cell
    localparam int unsigned LEVEL = $clog2(c + 1);
    localparam int unsigned DEPTH = FRAME_LEN >> (LEVEL - 1);
    if (c == 1) begin : g_root
      wfpe #(.DEPTH(DEPTH), .IN_W(SAMPLE_W), .IN_FRAC(0)) u_wfpe (
        .iClk        (iClk),
        .iReset_n    (iReset_n),
        .iEn         (iEn),
        .iData       (iData),
        .oData_Valid (cell_valid[c]),
        .oData1      (band[2*c]),
        .oData2      (band[2*c+1])
      );
    end else begin : g_inner
      wfpe #(.DEPTH(DEPTH), .IN_W(DATA_W), .IN_FRAC(FRAC_W)) u_wfpe (
        .iClk        (iClk),
        .iReset_n    (iReset_n),
        .iEn         (cell_valid[c/2]),
        .iData       (band[c]),
        .oData_Valid (cell_valid[c]),
        .oData1      (band[2*c]),
        .oData2      (band[2*c+1])
      );
    end
  end

  for (genvar k = 0; k < NLEAF; k++) begin : g_out
    assign oData_Low[k]  = band[2*(NLEAF + k)];
    assign oData_High[k] = band[2*(NLEAF + k) + 1];
  end

  always_comb begin
    oData_Valid = 1'b1;
    for (int k = 0; k < NLEAF; k++) oData_Valid &= cell_valid[NLEAF + k];
  end

  // All last-level cells see the same frame timing, so their valid flags
  // rise and fall together and the AND above loses nothing.
  a_leaves_in_step: assert property (@(posedge iClk) disable iff (!iReset_n)
    oData_Valid == cell_valid[NLEAF]);

endmodule
