// Shared constants and types of the double differential PSK (DDPSK) receiver.
//
// The receiver runs on a single sample clock fs = 4 MHz. A 1 MHz input
// (low-IF) or 435 MHz input (subsampled with n = 217) is sampled at
// fs = 4/(2n+1) f_i, so one carrier cycle spans exactly four samples and a
// quarter-period shift (90 degrees) is one sample. Four data rates are
// supported, 100, 10, 1 and 0.1 kb/s, i.e. 40, 400, 4000 and 40000 samples
// per symbol; a rate is identified by its divider stage S (0..3), the power
// of ten by which the 100 kb/s symbol period is stretched.
//
// The rates, fs, the decade spacing of the rates, the divide-by-40 symbol
// divider and the filter width tau = 2 samples follow the document; the
// binary encoding of the rate and mode enums is this design's own.
package ddpsk_pkg;

  // Sample clock in Hz.
  localparam int unsigned FS_HZ = 4_000_000;
  // Samples per symbol at the fastest rate (100 kb/s): fs / 100 kHz.
  localparam int unsigned BASE_SPS = 40;
  // Ratio between neighbouring data rates.
  localparam int unsigned RATE_STEP = 10;
  // Number of supported data rates.
  localparam int unsigned NUM_RATES = 4;
  // Ticks of the selected divider stage per symbol (the "/40" divider).
  localparam int unsigned SYM_DIV = 40;
  // Minimum pulse width accepted by the transition filter, in samples.
  localparam int unsigned TAU = 2;

  // Divider stage / data-rate selection S_i.
  typedef enum logic [1:0] {
    RATE_100K = 2'd0,
    RATE_10K  = 2'd1,
    RATE_1K   = 2'd2,
    RATE_100  = 2'd3
  } rate_e;

  // Delay combination of the two differential stages.
  typedef enum logic {
    DELAY_T_T  = 1'b0,   // (T, T):  phi_n - 2 phi_{n-1} + phi_{n-2}
    DELAY_2T_T = 1'b1    // (2T, T): phi_n - phi_{n-1} - phi_{n-2} + phi_{n-3}
  } delay_mode_e;

  // Samples per symbol at rate stage s.
  function automatic int unsigned samples_per_symbol(input int unsigned s);
    int unsigned v;
    v = BASE_SPS;
    for (int unsigned i = 0; i < s; i++) v = v * RATE_STEP;
    return v;
  endfunction

endpackage
