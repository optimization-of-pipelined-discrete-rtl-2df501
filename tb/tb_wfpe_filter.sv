// tb_wfpe_filter: self-checking test of the low-pass and high-pass Db2
// filters, in both word formats (16-bit integer input as at the first level,
// 26-bit input with 10 fractional bits as further down).
//
// Frames of even/odd pairs are driven with random idle cycles between pairs;
// iFirst marks each frame's first pair. After every accepted pair the
// registered outputs are compared with a direct evaluation of
//   y(n) = floor( sum_k c_k * x(2n-k) ), x(m) = 0 before the frame start,
// using integer coefficients in units of 2^-14 and the result wrapped to
// 26 bits, as the hardware does.
module tb_wfpe_filter;

  localparam longint H [4] = '{-2120, 3672, 13705, 7913};
  localparam longint G [4] = '{-7913, 13705, -3672, -2120};
  localparam int PAIRS = 12;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic en, first;
  logic signed [15:0] e16, o16;
  logic signed [25:0] e26, o26;
  logic signed [25:0] lo16, hi16, lo26, hi26;
  int checks = 0, failures = 0;

  wfpe_filter #(.IN_W(16), .IN_FRAC(0),  .HIGH(1'b0)) u_lo16 (.iClk(clk), .iEn(en), .iFirst(first), .iData_even(e16), .iData_odd(o16), .oData(lo16));
  wfpe_filter #(.IN_W(16), .IN_FRAC(0),  .HIGH(1'b1)) u_hi16 (.iClk(clk), .iEn(en), .iFirst(first), .iData_even(e16), .iData_odd(o16), .oData(hi16));
  wfpe_filter #(.IN_W(26), .IN_FRAC(10), .HIGH(1'b0)) u_lo26 (.iClk(clk), .iEn(en), .iFirst(first), .iData_even(e26), .iData_odd(o26), .oData(lo26));
  wfpe_filter #(.IN_W(26), .IN_FRAC(10), .HIGH(1'b1)) u_hi26 (.iClk(clk), .iEn(en), .iFirst(first), .iData_even(e26), .iData_odd(o26), .oData(hi26));

  // Samples of the current frame, already scaled to 10 fractional bits.
  longint x16 [2*PAIRS];
  longint x26 [2*PAIRS];

  function automatic longint ref_y(input longint x [2*PAIRS], input int n, input bit high);
    longint acc = 0;
    for (int k = 0; k < 4; k++) begin
      int m = 2*n - k;
      if (m >= 0) acc += (high ? G[k] : H[k]) * x[m];
    end
    acc = acc >>> 14;
    return longint'($signed(acc[25:0]));
  endfunction

  task automatic cmp(input string name, input logic signed [25:0] got, input longint exp_v);
    checks++;
    if (longint'(got) != exp_v) begin
      failures++;
      $display("FAIL %s got %0d expected %0d", name, got, exp_v);
    end
  endtask

  initial begin
    en = 0; first = 0; e16 = 0; o16 = 0; e26 = 0; o26 = 0;
    repeat (3) @(posedge clk);
    for (int f = 0; f < 6; f++) begin
      for (int n = 0; n < PAIRS; n++) begin
        // random idle cycles; the filter must hold its state
        while ($urandom_range(0, 2) == 0) begin
          @(negedge clk);
          en = 0; first = 0; e16 = 16'($urandom); o16 = 16'($urandom);
          e26 = 26'($urandom); o26 = 26'($urandom);
        end
        @(negedge clk);
        en = 1; first = (n == 0);
        if (f < 2) begin
          // small values in the first frames, full range afterwards
          e16 = 16'($signed(7'($urandom))); o16 = 16'($signed(7'($urandom)));
        end else begin
          e16 = 16'($urandom); o16 = 16'($urandom);
        end
        e26 = 26'($urandom); o26 = 26'($urandom);
        x16[2*n] = longint'(e16) <<< 10; x16[2*n+1] = longint'(o16) <<< 10;
        x26[2*n] = longint'(e26);        x26[2*n+1] = longint'(o26);
        @(posedge clk);
        #1;
        en = 0; first = 0;
        cmp("low16",  lo16, ref_y(x16, n, 1'b0));
        cmp("high16", hi16, ref_y(x16, n, 1'b1));
        cmp("low26",  lo26, ref_y(x26, n, 1'b0));
        cmp("high26", hi26, ref_y(x26, n, 1'b1));
      end
    end
    // A DC input: the low-pass settles at sqrt(2) times the input, the
    // high-pass at zero.
    for (int n = 0; n < 4; n++) begin
      @(negedge clk);
      en = 1; first = (n == 0); e16 = 16'sd1000; o16 = 16'sd1000;
      @(posedge clk);
      #1;
      en = 0; first = 0;
      if (n >= 2) begin
        cmp("dc_low",  lo16, (longint'(1000) * 23170 * 1024) >>> 14);
        cmp("dc_high", hi16, 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
