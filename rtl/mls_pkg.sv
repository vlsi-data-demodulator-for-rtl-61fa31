// Shared types and constants of the MLS data demodulator.
//
// The demodulator runs entirely from the 68 MHz reference clock. Slower
// timing (17, 5.23, 4, 2 and 1 MHz) is produced as one-cycle clock-enable
// ticks by freq_divider, so every register lives in a single clock domain.
// The receiver moves through three modes: carrier acquisition, data clock
// synchronisation and tracking (data filtering). The shared filter counter
// changes its role with the mode.
// N, Q, the 230 kHz +-25 kHz range and the Barker code follow the document;
// the P limits are computed from that range (rounded to the nearest count),
// and the enable-tick clocking and the state encodings are this design's own.
package mls_pkg;

  // Receiver mode, as held by demod_controller.
  typedef enum logic [1:0] {
    ST_ACQ   = 2'd0,  // carrier acquisition, wide loop (K = 8), lock detection
    ST_SYNC  = 2'd1,  // data clock synchronisation on the Barker bits
    ST_TRACK = 2'd2   // tracking, integrate-and-dump data filter
  } rx_state_e;

  // Role of the shared up/down counter in data_filter.
  typedef enum logic [1:0] {
    FM_LOCK  = 2'd0,  // lock detector, 8 bits, 1 MHz
    FM_EDGE  = 2'd1,  // bit-edge detector, range 0..31, 4 MHz
    FM_DUMP  = 2'd2   // integrate-and-dump filter, 8 bits, 2 MHz
  } filt_mode_e;

  // ADPLL constants (68 MHz master clock, f_c = 17 MHz).
  localparam int unsigned ADPLL_N = 32;
  localparam int unsigned ADPLL_Q = 1024;
  localparam int unsigned PW      = 11;   // width of the rate count P (0..Q)

  // Rate count P for an ADPLL output frequency f: P = f * 2 * N * Q / f_c,
  // rounded to the nearest integer.
  localparam int unsigned P_NOM = 887;    // 230 kHz
  localparam int unsigned P_MIN = 790;    // 205 kHz
  localparam int unsigned P_MAX = 983;    // 255 kHz

  // Barker code, first received bit in the MSB.
  localparam logic [4:0] BARKER = 5'b11101;

endpackage
