// tb_wfpe_buffer: self-checking test of the two-bank frame buffer.
//
// Writes frames of DEPTH random words at word addresses 0..DEPTH-1 (with
// random idle cycles), reads every pair back and checks that oData_1 holds
// the even word and oData_2 the odd word, one cycle after the read request.
// The last frame is read while the next one is being written, at one word
// per cycle, which checks read-before-write on a shared pair.
module tb_wfpe_buffer;

  localparam int W = 26;
  localparam int DEPTH = 32;
  localparam int AW = $clog2(DEPTH);

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic en, rd_en;
  logic [AW-1:0] addr;
  logic [AW-2:0] rd_addr;
  logic signed [W-1:0] din, d_even, d_odd;
  logic signed [W-1:0] frame_a [DEPTH];
  logic signed [W-1:0] frame_b [DEPTH];
  int checks = 0, failures = 0;

  wfpe_buffer #(.W(W), .DEPTH(DEPTH)) dut (
    .iClk(clk), .iEn(en), .iAddr(addr), .iData(din),
    .iRdEn(rd_en), .iRdAddr(rd_addr), .oData_1(d_even), .oData_2(d_odd)
  );

  task automatic cmp(input string name, input logic signed [W-1:0] got, input logic signed [W-1:0] exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("FAIL %s got %0d expected %0d", name, got, exp_v);
    end
  endtask

  initial begin
    en = 0; rd_en = 0; addr = 0; rd_addr = 0; din = 0;
    for (int i = 0; i < DEPTH; i++) begin
      frame_a[i] = W'($urandom);
      frame_b[i] = W'($urandom);
    end
    // Frame A, with gaps
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      while (!en) begin
        @(negedge clk);
        en = ($urandom_range(0, 3) != 0);
      end
      addr = AW'(i); din = frame_a[i];
    end
    // Read frame A pair by pair while frame B is written word by word.
    for (int t = 0; t < DEPTH; t++) begin
      @(negedge clk);
      en = 1; addr = AW'(t); din = frame_b[t];
      rd_en = (t < DEPTH/2); rd_addr = (AW-1)'(t);
      if (t > 0 && t <= DEPTH/2) begin
        cmp("even_a", d_even, frame_a[2*(t-1)]);
        cmp("odd_a",  d_odd,  frame_a[2*(t-1)+1]);
      end
    end
    @(negedge clk);
    en = 0; rd_en = 0;
    // Read frame B in reverse order; a pair without a read request holds.
    for (int p = DEPTH/2 - 1; p >= 0; p--) begin
      @(negedge clk);
      rd_en = 1; rd_addr = (AW-1)'(p);
      @(negedge clk);
      rd_en = 0;
      cmp("even_b", d_even, frame_b[2*p]);
      cmp("odd_b",  d_odd,  frame_b[2*p+1]);
      @(negedge clk);
      cmp("hold_even", d_even, frame_b[2*p]);
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
