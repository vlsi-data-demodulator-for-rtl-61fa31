// Data clock synchroniser: the local 15.625 kHz bit clock.
//
// A down counter clocked at 4 MHz (en_4m) counts out one 64 us bit
// (BIT_TICKS = 256 ticks); on the tick where it reaches zero it issues d_clk,
// a one-cycle pulse marking the bit boundary, and reloads BIT_TICKS-1.
// A trigger from the edge detector loads the preset BIT_TICKS-1-SYNC_COMP
// instead, which schedules the next boundary 64 us after the detected
// transition: the preset is lowered by SYNC_COMP ticks to make up for the
// edge detector's delay (16 ticks = 4 us for a clean transition).
// In noise the detector's delay varies by several microseconds, so a trigger
// can arrive shortly before the edge scheduled by the previous one. That edge
// belongs to the boundary just detected and would otherwise be cancelled,
// losing a bit: a trigger that finds the edge due within LATE_WIN ticks
// (16 us) therefore issues d_clk at once as well as loading the preset.
// The retriggered counter and the lowered preset follow the document; the
// size of the compensation and the late-trigger rule are this design's.
module data_clock_sync #(
  parameter int unsigned BIT_TICKS = 256,
  parameter int unsigned SYNC_COMP = 16,
  parameter int unsigned LATE_WIN  = BIT_TICKS / 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en_4m,
  input  logic trigger,
  output logic d_clk
);

  localparam int unsigned W = $clog2(BIT_TICKS);
  logic [W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt   <= W'(BIT_TICKS - 1);
      d_clk <= 1'b0;
    end else begin
      d_clk <= 1'b0;
      if (trigger) begin
        cnt <= W'(BIT_TICKS - 1 - SYNC_COMP);
        if (cnt < W'(LATE_WIN)) d_clk <= 1'b1;
      end else if (en_4m) begin
        if (cnt == '0) begin
          cnt   <= W'(BIT_TICKS - 1);
          d_clk <= 1'b1;
        end else begin
          cnt <= cnt - 1'b1;
        end
      end
    end
  end

endmodule
