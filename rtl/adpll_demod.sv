// ADPLL demodulator: second-order all-digital PLL with a remodulation branch.
//
// Loop: the XOR phase detector (in remodulator) drives the K-counter; its
// carry and borrow pulses both step the rate controller (integral path, the
// rate count P) and insert or delete a half-cycle in the add/delete unit
// (proportional path). The rate multiplier, an accumulator modulo Q clocked
// at f_c, is the oscillator; the N-counter turns the add/delete output into
// Out_I and Out_Q. The free-running output frequency is P * f_c / (2 N Q),
// 230 kHz at P = 887 with f_c = 17 MHz, N = 32, Q = 1024.
// With Q = N*K the loop has natural frequency f_c*sqrt(2/(NKQ)) and damping
// 0.5*sqrt(2Q/(NK)): K = 8 (track = 0) gives a wide loop for acquisition,
// K = 64 (track = 1) the narrow tracking loop.
// u_d is the raw demodulated bit stream (input xor Out_I). All parameters
// follow the document; en_fc is the 17 MHz tick of the 68 MHz system clock.
module adpll_demod #(
  parameter int unsigned N       = mls_pkg::ADPLL_N,
  parameter int unsigned Q       = mls_pkg::ADPLL_Q,
  parameter int unsigned K_ACQ   = 8,
  parameter int unsigned K_TRACK = 64,
  parameter int unsigned PW      = mls_pkg::PW,
  parameter int unsigned P_NOM   = mls_pkg::P_NOM,
  parameter int unsigned P_MIN   = mls_pkg::P_MIN,
  parameter int unsigned P_MAX   = mls_pkg::P_MAX
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en_fc,
  input  logic          track,
  input  logic          u_i,
  output logic          u_d,
  output logic          out_i,
  output logic          out_q,
  output logic [PW-1:0] p,
  output logic          carry,
  output logic          borrow,
  output logic          p_limit
);

  logic cb, rm_pulse, id_step, q_rise;

  remodulator u_remod (
    .clk, .rst_n, .u_i, .out_i, .out_q, .q_rise, .u_d, .u_s(), .cb
  );

  k_counter #(.K_ACQ(K_ACQ), .K_TRACK(K_TRACK)) u_kcnt (
    .clk, .rst_n, .en(en_fc), .track, .cb, .carry, .borrow
  );

  rate_controller #(.PW(PW), .P_NOM(P_NOM), .P_MIN(P_MIN), .P_MAX(P_MAX)) u_rate (
    .clk, .rst_n, .carry, .borrow, .p, .at_limit(p_limit)
  );

  rate_multiplier #(.Q(Q), .PW(PW)) u_rm (
    .clk, .rst_n, .en(en_fc), .p, .rm_pulse
  );

  add_del u_ad (
    .clk, .rst_n, .en(en_fc), .rm_pulse, .carry, .borrow, .id_step, .id_out()
  );

  n_counter #(.N(N)) u_ncnt (
    .clk, .rst_n, .id_step, .out_i, .out_q, .q_rise
  );

endmodule
