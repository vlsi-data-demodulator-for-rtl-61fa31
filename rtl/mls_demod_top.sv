// MLS data demodulator functional unit (top level).
//
// Turns the hard-limited 5 MHz IF of a microwave landing system receiver into
// decoded data bytes for a processor. Signal path:
//   mixer        D flip-flop sampling the IF at 5.23 MHz -> ~230 kHz
//   adpll_demod  second-order ADPLL with remodulation branch; locks to the
//                carrier and yields the demodulated bit stream u_d
//   data_filter  one counter used as lock detector, bit-edge detector and
//                integrate-and-dump filter, depending on the mode
//   data_clock_sync  bit clock, retriggered by the edge detector
//   dpsk_decoder, barker_detect, bit_counter, shift_register
//   demod_controller  acquisition -> synchronisation -> tracking
// Processor interface: b (b0..b7), d_clk (one cycle per bit), int_o (high for
// one bit period after each 8th bit following the Barker code) and restart.
// lock, state, p_count (the rate count, from which the loop frequency is
// P * 17 MHz / 65536) and integrator (the shared filter counter) are brought
// out for observation.
// Everything runs on the 68 MHz clk, with slower rates as enable ticks.
// The block structure and connections follow the document's block diagram;
// the single-clock enable scheme, the synchronous reset, the observation
// outputs and the exact INT/b timing are this design's own choices.
module mls_demod_top
  import mls_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          if_in,
  input  logic          restart,
  output logic [7:0]    b,
  output logic          d_clk,
  output logic          int_o,
  output logic          lock,
  output rx_state_e     state,
  output logic [PW-1:0] p_count,
  output logic [7:0]    integrator
);

  logic en_fc, en_mix, en_4m, en_2m, en_1m;
  logic mix_out, u_d;
  logic track, filt_tick, reset_1, reset_2, trigger, level;
  logic dec_bit, dec_valid, barker;
  filt_mode_e filt_mode;

  freq_divider u_div (
    .clk, .rst_n, .en_fc, .en_mix, .en_4m, .en_2m, .en_1m
  );

  mixer u_mix (
    .clk, .rst_n, .en_mix, .if_in, .mix_out
  );

  adpll_demod u_pll (
    .clk, .rst_n, .en_fc, .track, .u_i(mix_out), .u_d, .out_i(), .out_q(),
    .p(p_count), .carry(), .borrow(), .p_limit()
  );

  data_filter u_filt (
    .clk, .rst_n, .mode(filt_mode), .tick(filt_tick), .clear(reset_1),
    .dump(d_clk), .u_d, .lock, .trigger, .level, .count(integrator)
  );

  data_clock_sync u_dclk (
    .clk, .rst_n, .en_4m, .trigger, .d_clk
  );

  dpsk_decoder u_dpsk (
    .clk, .rst_n, .d_clk, .d_in(level), .d_out(dec_bit), .valid(dec_valid)
  );

  barker_detect u_bark (
    .clk, .rst_n, .clear(reset_1), .valid(dec_valid && state == ST_SYNC),
    .bit_in(dec_bit), .found(barker)
  );

  demod_controller u_ctrl (
    .clk, .rst_n, .restart, .lock, .barker, .en_1m, .en_4m, .en_2m,
    .track, .filt_mode, .filt_tick, .reset_1, .reset_2, .state
  );

  bit_counter u_bcnt (
    .clk, .rst_n, .clear(reset_2), .enable(state == ST_TRACK),
    .valid(dec_valid), .int_o
  );

  shift_register u_sr (
    .clk, .rst_n, .valid(dec_valid), .bit_in(dec_bit), .b
  );

endmodule
