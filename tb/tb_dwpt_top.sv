// tb_dwpt_top: end-to-end test of the five-level wavelet packet processor at
// its default size (1024-sample frames, 31 cells, 32 sub-bands).
//
// Three frames are streamed in: the first two back to back at one sample per
// cycle, so every cell receives its next frame while still reading out the
// previous one; the third with random idle cycles on iEn. A reference model
// computes the full packet tree of each frame independently of the RTL,
// level by level from
//   child_low(n)  = floor( sum_k h_k parent(2n-k) )
//   child_high(n) = floor( sum_k g_k parent(2n-k) ),  parent(m) = 0 for m < 0,
// with integer coefficients in units of 2^-14, 10 fractional bits and 26-bit
// wrap-around at every level. All 32 sub-bands of all frames are compared,
// and the first output of each frame must follow edge T+970 (at the default
// size), T being the edge
// that accepts the frame's last sample.
// Coverage counted: overlapped frames, input idle cycles inside a frame,
// output bursts of all 32 sub-bands; each must occur at least once.
module tb_dwpt_top;

  localparam int N      = 1024;
  localparam int LEVELS = 5;
  localparam int NLEAF  = 1 << (LEVELS - 1);
  localparam int NSB    = 1 << LEVELS;
  localparam int SBLEN  = N >> LEVELS;
  localparam int NF     = 3;
  // first output follows edge T + 2 + sum over levels l < LEVELS of (2 + N_l/2)
  function automatic int first_out_delay();
    int d = 2;
    for (int l = 1; l < LEVELS; l++) d += 2 + (N >> (l - 1)) / 2;
    return d;
  endfunction
  localparam int FIRST_OUT = first_out_delay();
  localparam longint H [4] = '{-2120, 3672, 13705, 7913};
  localparam longint G [4] = '{-7913, 13705, -3672, -2120};

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, en;
  logic signed [15:0] din;
  logic signed [25:0] lo [NLEAF];
  logic signed [25:0] hi [NLEAF];
  logic valid;
  int checks = 0, failures = 0;

  dwpt_top dut (
    .iClk(clk), .iReset_n(rst_n), .iEn(en), .iData(din),
    .oData_Low(lo), .oData_High(hi), .oData_Valid(valid)
  );

  // Reference: tree[node][n] for one frame, heap-numbered nodes (1 = input).
  longint tree [2*NSB][N];
  longint expect_sb [NF][NSB][SBLEN];
  logic signed [15:0] frame_in [NF][N];
  int last_edge [NF];
  int edge_no;

  function automatic longint wrap26(input longint v);
    return longint'($signed(v[25:0]));
  endfunction

  task automatic build_reference(input int f);
    for (int i = 0; i < N; i++) tree[1][i] = longint'(frame_in[f][i]) <<< 10;
    for (int c = 1; c < NSB; c++) begin
      // node c holds N >> floor(log2 c) samples; each child half of that
      automatic int len = (N >> ($clog2(c + 1) - 1)) / 2;
      for (int n = 0; n < len; n++) begin
        longint al = 0, ah = 0;
        for (int k = 0; k < 4; k++) begin
          int m = 2*n - k;
          if (m >= 0) begin
            al += H[k] * tree[c][m];
            ah += G[k] * tree[c][m];
          end
        end
        tree[2*c][n]   = wrap26(al >>> 14);
        tree[2*c+1][n] = wrap26(ah >>> 14);
      end
    end
    for (int k = 0; k < NSB; k++)
      for (int n = 0; n < SBLEN; n++) expect_sb[f][k][n] = tree[NSB + k][n];
  endtask

  task automatic cmp(input string name, input longint got, input longint exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d expected %0d", name, got, exp_v);
    end
  endtask

  initial edge_no = 0;
  always @(posedge clk) edge_no <= edge_no + 1;

  // Output checker
  int out_frame, out_n, bursts, overlaps, gaps;
  initial begin
    out_frame = 0; out_n = 0; bursts = 0;
    forever begin
      @(negedge clk);
      if (valid && out_frame < NF) begin
        for (int i = 0; i < NLEAF; i++) begin
          cmp($sformatf("frame %0d sub-band %0d n=%0d", out_frame, 2*i, out_n),
              longint'(lo[i]), expect_sb[out_frame][2*i][out_n]);
          cmp($sformatf("frame %0d sub-band %0d n=%0d", out_frame, 2*i+1, out_n),
              longint'(hi[i]), expect_sb[out_frame][2*i+1][out_n]);
        end
        if (out_n == 0) begin
          cmp($sformatf("frame %0d first-output edge", out_frame),
              longint'(edge_no) - 64'sd1, longint'(last_edge[out_frame]) + longint'(FIRST_OUT));
          bursts++;
        end
        out_n++;
        if (out_n == SBLEN) begin
          out_n = 0;
          out_frame++;
        end
      end
    end
  end

  initial begin
    rst_n = 0; en = 0; din = 0; overlaps = 0; gaps = 0;
    // Frame 0: moderate random samples; frame 1: full-range random samples;
    // frame 2: a slow triangle plus small noise.
    for (int i = 0; i < N; i++) begin
      frame_in[0][i] = 16'($signed(12'($urandom)));
      frame_in[1][i] = 16'($urandom);
      frame_in[2][i] = 16'(((i % 128) < 64 ? (i % 64) * 40 : (64 - i % 64) * 40)
                           + $signed(5'($urandom)));
    end
    for (int f = 0; f < NF; f++) build_reference(f);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++) begin
      for (int i = 0; i < N; i++) begin
        if (f == 2 && i > 0) begin
          while ($urandom_range(0, 3) == 0) begin
            en = 0;
            gaps++;
            @(negedge clk);
          end
        end
        en = 1;
        din = frame_in[f][i];
        // the root cell is still reading the previous frame
        if (f > 0 && edge_no - last_edge[f-1] <= N/2) overlaps++;
        if (i == N - 1) last_edge[f] = edge_no;
        @(negedge clk);
      end
    end
    en = 0;
    repeat (FIRST_OUT + SBLEN + 20) @(negedge clk);
    cmp("frames out", longint'(out_frame), longint'(NF));
    checks++;
    if (overlaps == 0 || gaps == 0 || bursts != NF) begin
      failures++;
      $display("FAIL coverage: overlaps=%0d gaps=%0d bursts=%0d", overlaps, gaps, bursts);
    end
    $display("overlapped input samples=%0d, input idle cycles=%0d, output bursts=%0d (32 sub-bands each)",
             overlaps, gaps, bursts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (12000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
