// wfpe_buffer: frame buffer ("buffer registers") of one WFPE cell.
//
// Holds one frame of DEPTH input words as DEPTH/2 even/odd pairs in two
// banks, so that a whole pair can be read in one cycle and the filters can
// work after down-sampling. Write side: one word per cycle with iEn high, at
// word address iAddr; bit 0 of the address selects the bank (0 = even,
// 1 = odd) and the upper bits the pair. Read side: with iRdEn high the pair at
// iRdAddr appears on oData_1 (even) and oData_2 (odd) after the clock edge.
// A read and a write in the same cycle to the same pair return the old
// contents (read before write), which lets the next frame start filling the
// buffer while the current one is still being read out.
//
// The design description names the buffer and its even/odd outputs; the
// two-bank organisation and the synchronous read are this design's choice.
// Nothing is reset: the controller reads only pairs written in the frame.
module wfpe_buffer #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                iClk,
  input  logic                iEn,
  input  logic [AW-1:0]       iAddr,
  input  logic signed [W-1:0] iData,
  input  logic                iRdEn,
  input  logic [AW-2:0]       iRdAddr,
  output logic signed [W-1:0] oData_1,
  output logic signed [W-1:0] oData_2
);

  logic signed [W-1:0] mem_even [DEPTH/2];
  logic signed [W-1:0] mem_odd  [DEPTH/2];

  always_ff @(posedge iClk) begin
    if (iEn && !iAddr[0]) mem_even[iAddr[AW-1:1]] <= iData;
  end

  always_ff @(posedge iClk) begin
    if (iEn && iAddr[0]) mem_odd[iAddr[AW-1:1]] <= iData;
  end

  always_ff @(posedge iClk) begin
    if (iRdEn) begin
      oData_1 <= mem_even[iRdAddr];
      oData_2 <= mem_odd[iRdAddr];
    end
  end

endmodule
