// Shared data filter: one up/down counter serving three roles.
//
// The counter steps up when the demodulated bit u_d is 1 and down when it is
// 0, on each tick (the clock the controller selects for the current mode),
// and saturates at the ends of its range.
//   FM_LOCK (1 MHz): 8-bit range 0..255, started at MID = 128. lock is high
//     while the count is >= TH_UPPER (225) or <= TH_LOWER (31): two
//     thresholds because the loop can lock in phase or 180 degrees out.
//     From 128 a clean signal needs 97 ticks (97 us) to reach either one.
//   FM_EDGE (4 MHz): range 0..EDGE_MAX (31). A data transition drives the
//     count from one end to the other; trigger pulses for one cycle when the
//     count crosses the midpoint EDGE_MID (16), i.e. 16 ticks (4 us) after a
//     clean transition.
//   FM_DUMP (2 MHz): 8-bit integrate-and-dump over one 64 us bit (128
//     ticks). dump (the data clock) resets the count to MID.
// level is the filtered bit: count >= MID in FM_LOCK and FM_DUMP; in FM_EDGE
// it is the side of EDGE_MID the count was on before the latest tick, so that
// in the cycles right after a trigger it still gives the bit that has just
// ended (the data clock may close that bit on the trigger itself). It is
// sampled by the DPSK decoder on the same cycle as dump.
// clear (reset_1) loads the start value of the new mode: MID for FM_LOCK and
// FM_DUMP; for FM_EDGE the end of the range on the side the lock count was
// on, so that entering the mode does not produce a trigger.
// Thresholds, ranges, clocks and the sharing of the counter follow the
// document; the midpoint-crossing rule in both directions and the start value
// on entering FM_EDGE are this design's choice.
module data_filter
  import mls_pkg::*;
#(
  parameter int unsigned TH_UPPER = 225,
  parameter int unsigned TH_LOWER = 31,
  parameter int unsigned MID      = 128,
  parameter int unsigned EDGE_MAX = 31,
  parameter int unsigned EDGE_MID = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  filt_mode_e mode,
  input  logic       tick,
  input  logic       clear,
  input  logic       dump,
  input  logic       u_d,
  output logic       lock,
  output logic       trigger,
  output logic       level,
  output logic [7:0] count
);

  logic [7:0] cnt, top, nxt;
  logic       edge_lvl;

  assign top = (mode == FM_EDGE) ? 8'(EDGE_MAX) : 8'd255;

  always_comb begin
    nxt = cnt;
    if (u_d) begin
      if (cnt < top) nxt = cnt + 8'd1;
    end else begin
      if (cnt != 8'd0) nxt = cnt - 8'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt      <= 8'(MID);
      trigger  <= 1'b0;
      edge_lvl <= 1'b0;
    end else begin
      trigger <= 1'b0;
      if (clear) begin
        if (mode == FM_EDGE) begin
          cnt      <= (cnt >= 8'(MID)) ? 8'(EDGE_MAX) : 8'd0;
          edge_lvl <= (cnt >= 8'(MID));
        end else begin
          cnt <= 8'(MID);
        end
      end else if (mode == FM_DUMP && dump) begin
        cnt <= 8'(MID);
      end else if (tick) begin
        cnt      <= nxt;
        edge_lvl <= (cnt >= 8'(EDGE_MID));
        if (mode == FM_EDGE &&
            ((cnt < 8'(EDGE_MID)) != (nxt < 8'(EDGE_MID))))
          trigger <= 1'b1;
      end
    end
  end

  assign lock  = (mode == FM_LOCK) &&
                 (cnt >= 8'(TH_UPPER) || cnt <= 8'(TH_LOWER));
  assign level = (mode == FM_EDGE) ? edge_lvl : (cnt >= 8'(MID));
  assign count = cnt;

endmodule
