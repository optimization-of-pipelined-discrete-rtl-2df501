// tb_dwpt_ae_frame: accuracy test of the default processor on one 1024-sample
// frame of a synthetic acoustic-emission burst, against a floating-point
// wavelet packet transform.
//
// The frame models an AE hit sampled at 1 MHz: two exponentially decaying
// tones (150 kHz and 310 kHz) starting at sample 200, peak about half of full
// scale, plus low-level noise, quantised to 16 bits. The reference is the
// same five-level packet tree computed in double precision with the exact
// Daubechies-2 coefficients (1-sqrt3, 3-sqrt3, 3+sqrt3, 1+sqrt3)/(4 sqrt2),
// high-pass g = (-h3, h2, -h1, h0), zero history at the frame start.
// With samples normalised to full scale = 1.0 the mean squared error of
// every sub-band, and of all 32 together, must stay below 1e-5. The largest
// per-sub-band MSE and the average are printed.
module tb_dwpt_ae_frame;

  localparam int N      = 1024;
  localparam int NLEAF  = 16;
  localparam int NSB    = 32;
  localparam int SBLEN  = N / NSB;
  localparam real FS_SCALE = 32768.0;
  localparam real MSE_LIMIT = 1.0e-5;

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

  logic signed [15:0] x [N];
  real tree [2*NSB][N];
  real sq_err [NSB];
  real h [4];
  real g [4];

  task automatic build_reference();
    real s3 = $sqrt(3.0);
    real d  = 4.0 * $sqrt(2.0);
    h[0] = (1.0 - s3) / d; h[1] = (3.0 - s3) / d; h[2] = (3.0 + s3) / d; h[3] = (1.0 + s3) / d;
    g[0] = -h[3]; g[1] = h[2]; g[2] = -h[1]; g[3] = h[0];
    for (int i = 0; i < N; i++) tree[1][i] = real'(x[i]) / FS_SCALE;
    for (int c = 1; c < NSB; c++) begin
      automatic int len = (N >> ($clog2(c + 1) - 1)) / 2;
      for (int n = 0; n < len; n++) begin
        real al = 0.0, ah = 0.0;
        for (int k = 0; k < 4; k++) begin
          int m = 2*n - k;
          if (m >= 0) begin
            al += h[k] * tree[c][m];
            ah += g[k] * tree[c][m];
          end
        end
        tree[2*c][n]   = al;
        tree[2*c+1][n] = ah;
      end
    end
  endtask

  int out_n;
  initial begin
    out_n = 0;
    for (int k = 0; k < NSB; k++) sq_err[k] = 0.0;
    forever begin
      @(negedge clk);
      if (valid && out_n < SBLEN) begin
        for (int i = 0; i < NLEAF; i++) begin
          automatic real el = real'(lo[i]) / 1024.0 / FS_SCALE - tree[NSB + 2*i][out_n];
          automatic real eh = real'(hi[i]) / 1024.0 / FS_SCALE - tree[NSB + 2*i + 1][out_n];
          sq_err[2*i]     += el * el;
          sq_err[2*i + 1] += eh * eh;
        end
        out_n++;
      end
    end
  end

  initial begin
    real worst, total;
    rst_n = 0; en = 0; din = 0;
    for (int i = 0; i < N; i++) begin
      automatic real t = real'(i - 200);
      automatic real v = 0.0;
      if (i >= 200)
        v = 9000.0 * $exp(-t / 180.0) * $sin(2.0 * 3.14159265358979 * 0.150 * t)
          + 7000.0 * $exp(-t / 90.0)  * $sin(2.0 * 3.14159265358979 * 0.310 * t + 0.7);
      v += real'($signed(7'($urandom)));
      x[i] = 16'($rtoi(v));
    end
    build_reference();
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      en = 1; din = x[i];
      @(negedge clk);
    end
    en = 0;
    repeat (1100) @(negedge clk);
    checks++;
    if (out_n != SBLEN) begin
      failures++;
      $display("FAIL got %0d output words per sub-band, expected %0d", out_n, SBLEN);
    end
    worst = 0.0; total = 0.0;
    for (int k = 0; k < NSB; k++) begin
      automatic real mse = sq_err[k] / real'(SBLEN);
      total += mse;
      if (mse > worst) worst = mse;
      checks++;
      if (!(mse < MSE_LIMIT)) begin
        failures++;
        $display("FAIL sub-band %0d MSE %e", k, mse);
      end
    end
    checks++;
    if (!(total / real'(NSB) < MSE_LIMIT)) failures++;
    $display("AE frame: average sub-band MSE %e, worst %e (full scale = 1.0)",
             total / real'(NSB), worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (4000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
