// wfpe_controller: address generation and state counter of one WFPE cell.
//
// Write side: a DEPTH-modulo counter (the cell's "Counter" output) gives the
// buffer address of each incoming sample and advances on every cycle with
// iEn high. When the last sample of a frame is written, the read phase
// starts on the next cycle: the pair address runs from 0 to DEPTH/2-1, one
// pair per cycle, without stalls. Because samples arrive at most one per
// cycle and pairs leave one per cycle, the next frame can be written into
// the same buffer while the read phase is running; it never overtakes it.
//
// Timing, with the read of pair p issued in cycle r (oRdEn high):
//   cycle r+1  oEnable high (buffer output holds pair p, filters compute),
//              oFirst high as well when p = 0
//   cycle r+2  oValid high (filter outputs hold y(p))
// Synchronous active-low reset clears the counter and the read phase.
// The counter, enable and valid outputs are named in the design
// description; the read-phase sequencing and the cycle timing are this
// design's choice.
module wfpe_controller #(
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          iClk,
  input  logic          iReset_n,
  input  logic          iEn,
  output logic [AW-1:0] oCounter,
  output logic          oRdEn,
  output logic [AW-2:0] oRdAddr,
  output logic          oEnable,
  output logic          oFirst,
  output logic          oValid
);

  typedef enum logic {RD_IDLE, RD_BUSY} rd_state_t;

  localparam logic [AW-1:0] LAST_WORD = AW'(DEPTH - 1);
  localparam logic [AW-2:0] LAST_PAIR = (AW-1)'(DEPTH/2 - 1);

  rd_state_t   rd_state;
  logic        frame_done;

  assign frame_done = iEn && (oCounter == LAST_WORD);
  assign oRdEn      = (rd_state == RD_BUSY);

  always_ff @(posedge iClk) begin
    if (!iReset_n) begin
      oCounter <= '0;
      rd_state <= RD_IDLE;
      oRdAddr  <= '0;
      oEnable  <= 1'b0;
      oFirst   <= 1'b0;
      oValid   <= 1'b0;
    end else begin
      if (iEn) oCounter <= oCounter + 1'b1;

      case (rd_state)
        RD_IDLE: if (frame_done) begin
          rd_state <= RD_BUSY;
          oRdAddr  <= '0;
        end
        RD_BUSY: begin
          oRdAddr <= oRdAddr + 1'b1;
          if (oRdAddr == LAST_PAIR) rd_state <= RD_IDLE;
        end
        default: rd_state <= RD_IDLE;
      endcase

      oEnable <= oRdEn;
      oFirst  <= oRdEn && (oRdAddr == '0);
      oValid  <= oEnable;
    end
  end

  // A frame takes DEPTH cycles to fill and DEPTH/2 to read, so a new frame
  // can never complete while the previous one is still being read.
  a_no_overrun: assert property (@(posedge iClk) disable iff (!iReset_n)
    frame_done |-> (rd_state == RD_IDLE) || (oRdAddr == LAST_PAIR));

endmodule
