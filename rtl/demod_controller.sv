// Controller: sequences the receiver through its three modes.
//
//   ST_ACQ   ADPLL wide (track = 0, K = 8); filter is the lock detector on
//            the 1 MHz tick. Goes to ST_SYNC when lock is seen.
//   ST_SYNC  ADPLL narrow (track = 1, K = 64); filter is the edge detector on
//            the 4 MHz tick, retriggering the data clock on each Barker bit
//            transition. Goes to ST_TRACK when the Barker code is found.
//   ST_TRACK ADPLL narrow; filter is the integrate-and-dump on the 2 MHz tick.
// restart (from the processor) returns to ST_ACQ from any mode. Each mode
// change pulses reset_1 for one cycle, which loads the filter counter's start
// value for the new mode; lock and barker are ignored in that cycle, since
// they still reflect the old count. Entering ST_TRACK also pulses reset_2, which clears
// the bit counter. filt_tick is the selected filter clock (the "clk" output of
// the controller). The modes, their order and the clocks follow the document;
// returning to acquisition only on restart is this design's choice.
module demod_controller
  import mls_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       restart,
  input  logic       lock,
  input  logic       barker,
  input  logic       en_1m,
  input  logic       en_4m,
  input  logic       en_2m,
  output logic       track,
  output filt_mode_e filt_mode,
  output logic       filt_tick,
  output logic       reset_1,
  output logic       reset_2,
  output rx_state_e  state
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= ST_ACQ;
      reset_1 <= 1'b0;
      reset_2 <= 1'b0;
    end else begin
      reset_1 <= 1'b0;
      reset_2 <= 1'b0;
      if (restart) begin
        state   <= ST_ACQ;
        reset_1 <= 1'b1;
      end else begin
        unique case (state)
          ST_ACQ:   if (lock && !reset_1)   begin state <= ST_SYNC;  reset_1 <= 1'b1; end
          ST_SYNC:  if (barker && !reset_1) begin state <= ST_TRACK; reset_1 <= 1'b1; reset_2 <= 1'b1; end
          ST_TRACK: ;
          default:  state <= ST_ACQ;
        endcase
      end
    end
  end

  always_comb begin
    track = (state != ST_ACQ);
    unique case (state)
      ST_SYNC:  begin filt_mode = FM_EDGE; filt_tick = en_4m; end
      ST_TRACK: begin filt_mode = FM_DUMP; filt_tick = en_2m; end
      default:  begin filt_mode = FM_LOCK; filt_tick = en_1m; end
    endcase
  end

endmodule
