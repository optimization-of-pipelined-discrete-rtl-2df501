// tb_wfpe: self-checking test of one WFPE cell (controller, buffer and both
// filters) at a reduced frame length.
//
// Two cells are tested side by side: a first-level cell (16-bit integer
// input) and an inner cell (26-bit input with 10 fractional bits). Frames are
// streamed back to back (so the next frame is written while the previous one
// is read out) and then with random gaps. Every output burst is compared
// with a direct evaluation of
//   y_low(n)  = floor( sum_k h_k x(2n-k) ),  y_high(n) = floor( sum_k g_k x(2n-k) )
// per frame (x(m) = 0 before the frame start), with integer coefficients in
// units of 2^-14. The cycle timing is checked as well: output n of a frame
// must appear right after clock edge T+2+n, where T is the edge that accepts
// the frame's last sample.
module tb_wfpe;

  localparam int DEPTH = 32;
  localparam int NF = 6;
  localparam longint H [4] = '{-2120, 3672, 13705, 7913};
  localparam longint G [4] = '{-7913, 13705, -3672, -2120};

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, en;
  logic signed [15:0] d16;
  logic signed [25:0] d26;
  logic v16, v26;
  logic signed [25:0] lo16, hi16, lo26, hi26;
  int checks = 0, failures = 0;

  wfpe #(.DEPTH(DEPTH), .IN_W(16), .IN_FRAC(0)) u_c16 (
    .iClk(clk), .iReset_n(rst_n), .iEn(en), .iData(d16),
    .oData_Valid(v16), .oData1(lo16), .oData2(hi16));
  wfpe #(.DEPTH(DEPTH), .IN_W(26), .IN_FRAC(10)) u_c26 (
    .iClk(clk), .iReset_n(rst_n), .iEn(en), .iData(d26),
    .oData_Valid(v26), .oData1(lo26), .oData2(hi26));

  // Input frames, scaled to 10 fractional bits.
  longint x16 [NF][DEPTH];
  longint x26 [NF][DEPTH];
  int     last_edge [NF];
  int     edge_no;

  function automatic longint ref_y(input longint x [DEPTH], input int n, input bit high);
    longint acc = 0;
    for (int k = 0; k < 4; k++) begin
      int m = 2*n - k;
      if (m >= 0) acc += (high ? G[k] : H[k]) * x[m];
    end
    acc = acc >>> 14;
    return longint'($signed(acc[25:0]));
  endfunction

  task automatic cmp(input string name, input longint got, input longint exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("FAIL %s got %0d expected %0d", name, got, exp_v);
    end
  endtask

  initial edge_no = 0;
  always @(posedge clk) edge_no <= edge_no + 1;

  // Output checker: counts outputs per frame and checks value and timing.
  int out_frame, out_n;
  initial begin
    out_frame = 0; out_n = 0;
    forever begin
      @(negedge clk);
      cmp("valid_match", longint'(v16), longint'(v26));
      if (v16) begin
        cmp("low16",  longint'(lo16), ref_y(x16[out_frame], out_n, 1'b0));
        cmp("high16", longint'(hi16), ref_y(x16[out_frame], out_n, 1'b1));
        cmp("low26",  longint'(lo26), ref_y(x26[out_frame], out_n, 1'b0));
        cmp("high26", longint'(hi26), ref_y(x26[out_frame], out_n, 1'b1));
        // edge_no now counts the edge that produced this output
        cmp("timing", longint'(edge_no) - 64'sd1, longint'(last_edge[out_frame]) + longint'(out_n) + 64'sd2);
        out_n++;
        if (out_n == DEPTH/2) begin
          out_n = 0;
          out_frame++;
        end
      end
    end
  end

  initial begin
    rst_n = 0; en = 0; d16 = 0; d26 = 0;
    for (int f = 0; f < NF; f++)
      for (int i = 0; i < DEPTH; i++) begin
        x16[f][i] = longint'($signed(16'($urandom))) <<< 10;
        x26[f][i] = longint'($signed(26'($urandom)));
      end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++) begin
      for (int i = 0; i < DEPTH; i++) begin
        if (f >= 3) begin
          while ($urandom_range(0, 2) == 0) begin
            en = 0;
            @(negedge clk);
          end
        end
        en = 1;
        d16 = 16'(x16[f][i] >>> 10);
        d26 = 26'(x26[f][i]);
        if (i == DEPTH - 1) last_edge[f] = edge_no;   // edge that accepts it
        @(negedge clk);
      end
    end
    en = 0;
    repeat (DEPTH + 4) @(negedge clk);
    cmp("frames_out", longint'(out_frame), longint'(NF));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
