// wfpe: wavelet filter processing element, one node of the wavelet packet
// tree.
//
// The cell takes a stream of samples (one per cycle with iEn high), collects
// a frame of DEPTH samples in its buffer, then reads the frame back as
// DEPTH/2 even/odd pairs, one pair per cycle, into a low-pass and a
// high-pass Daubechies-2 filter that work after down-sampling. It therefore
// emits DEPTH/2 low-pass coefficients (oData1) and DEPTH/2 high-pass
// coefficients (oData2) per frame, side by side, as a burst with oData_Valid
// high. The next frame may be written while the current one is read out.
//
// Structure (controller, buffer, low-pass and high-pass filter) and port
// names follow the cell's published schematic. Input words are IN_W bits
// with IN_FRAC fractional bits (16/0 at the first level, 26/10 below);
// outputs are 26 bits with 10 fractional bits.
//
// Timing: if the last sample of a frame is written at clock edge T, the
// coefficient pair for output n (n = 0 .. DEPTH/2-1) is on oData1/oData2,
// with oData_Valid high, in the clock period that follows edge T+2+n.
module wfpe
  import dwpt_pkg::*;
#(
  parameter int unsigned DEPTH   = 1024,
  parameter int unsigned IN_W    = 16,
  parameter int unsigned IN_FRAC = 0
) (
  input  logic                   iClk,
  input  logic                   iReset_n,
  input  logic                   iEn,
  input  logic signed [IN_W-1:0] iData,
  output logic                   oData_Valid,
  output coef_t                  oData1,   // low-pass
  output coef_t                  oData2    // high-pass
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [AW-1:0]          counter;
  logic                   rd_en, enable, first;
  logic [AW-2:0]          rd_addr;
  logic signed [IN_W-1:0] x_even, x_odd;

  wfpe_controller #(.DEPTH(DEPTH)) u_controller (
    .iClk     (iClk),
    .iReset_n (iReset_n),
    .iEn      (iEn),
    .oCounter (counter),
    .oRdEn    (rd_en),
    .oRdAddr  (rd_addr),
    .oEnable  (enable),
    .oFirst   (first),
    .oValid   (oData_Valid)
  );

  wfpe_buffer #(.W(IN_W), .DEPTH(DEPTH)) u_buffer (
    .iClk    (iClk),
    .iEn     (iEn),
    .iAddr   (counter),
    .iData   (iData),
    .iRdEn   (rd_en),
    .iRdAddr (rd_addr),
    .oData_1 (x_even),
    .oData_2 (x_odd)
  );

  wfpe_filter #(.IN_W(IN_W), .IN_FRAC(IN_FRAC), .HIGH(1'b0)) u_lowpass (
    .iClk       (iClk),
    .iEn        (enable),
    .iFirst     (first),
    .iData_even (x_even),
    .iData_odd  (x_odd),
    .oData      (oData1)
  );

  wfpe_filter #(.IN_W(IN_W), .IN_FRAC(IN_FRAC), .HIGH(1'b1)) u_highpass (
    .iClk       (iClk),
    .iEn        (enable),
    .iFirst     (first),
    .iData_even (x_even),
    .iData_odd  (x_odd),
    .oData      (oData2)
  );

endmodule
