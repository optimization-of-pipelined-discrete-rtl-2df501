// tb_wfpe_controller: self-checking test of the WFPE address generator and
// read-phase sequencer.
//
// Drives random iEn patterns (including long runs of back-to-back samples,
// so that a new frame is written while the previous one is read) and a reset
// in the middle. A cycle-level reference model records the clock edge E at
// which each frame's last sample is accepted and requires, after edge E+j:
//   oRdEn = 1 and oRdAddr = j        for j = 0 .. DEPTH/2-1
//   oEnable = 1                      for j = 1 .. DEPTH/2
//   oFirst  = 1                      for j = 1 only
//   oValid  = 1                      for j = 2 .. DEPTH/2+1
// and oCounter equal to the number of accepted samples modulo DEPTH.
module tb_wfpe_controller;

  localparam int DEPTH = 16;
  localparam int AW = $clog2(DEPTH);

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, en;
  logic [AW-1:0] counter;
  logic rd_en, enable, first, valid;
  logic [AW-2:0] rd_addr;
  int checks = 0, failures = 0;
  int frames, overlaps;

  wfpe_controller #(.DEPTH(DEPTH)) dut (
    .iClk(clk), .iReset_n(rst_n), .iEn(en), .oCounter(counter),
    .oRdEn(rd_en), .oRdAddr(rd_addr), .oEnable(enable), .oFirst(first), .oValid(valid)
  );

  int edge_no;
  int done_edge;           // edge of the latest frame completion
  int accepted;
  initial begin
    frames = 0; overlaps = 0; edge_no = 0; done_edge = -1000; accepted = 0;
  end

  task automatic cmp(input string name, input int got, input int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("FAIL edge %0d %s got %0d expected %0d", edge_no, name, got, exp_v);
    end
  endtask

  // Reference model, updated at each edge from the inputs just sampled.
  always @(posedge clk) begin
    edge_no <= edge_no + 1;
    if (!rst_n) begin
      accepted  <= 0;
      done_edge <= -1000;
    end else if (en) begin
      accepted <= accepted + 1;
      if ((accepted % DEPTH) == DEPTH - 1) begin
        done_edge <= edge_no;
        frames    <= frames + 1;
      end
      if (edge_no - done_edge < DEPTH/2) overlaps <= overlaps + 1;
    end
  end

  always @(negedge clk) begin
    if (edge_no > 1) begin
      automatic int j = edge_no - 1 - done_edge;   // edges since completion
      cmp("counter", int'(counter), accepted % DEPTH);
      cmp("rd_en",   int'(rd_en),  int'(j >= 0 && j < DEPTH/2));
      if (j >= 0 && j < DEPTH/2) cmp("rd_addr", int'(rd_addr), j);
      cmp("enable",  int'(enable), int'(j >= 1 && j <= DEPTH/2));
      cmp("first",   int'(first),  int'(j == 1));
      cmp("valid",   int'(valid),  int'(j >= 2 && j <= DEPTH/2 + 1));
    end
  end

  initial begin
    rst_n = 0; en = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Continuous input for three frames: each frame overlaps the previous read.
    repeat (3*DEPTH) begin
      en = 1;
      @(negedge clk);
    end
    // Random gaps.
    repeat (12*DEPTH) begin
      en = ($urandom_range(0, 2) != 0);
      @(negedge clk);
    end
    // Reset in the middle of a frame, then two more frames.
    en = 1;
    repeat (DEPTH/2 + 3) @(negedge clk);
    rst_n = 0; en = 0;
    @(negedge clk);
    rst_n = 1;
    repeat (2*DEPTH) begin
      en = ($urandom_range(0, 4) != 0);
      @(negedge clk);
    end
    en = 0;
    repeat (DEPTH) @(negedge clk);
    checks++;
    if (frames < 8 || overlaps == 0) begin
      failures++;
      $display("FAIL coverage: frames=%0d overlaps=%0d", frames, overlaps);
    end
    $display("frames=%0d overlapped writes=%0d", frames, overlaps);
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
