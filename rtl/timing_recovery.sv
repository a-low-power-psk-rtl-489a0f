// Symbol-timing recovery for data rates of 100, 10, 1 and 0.1 kb/s.
//
// Chain: the data-rate input signal is XORed with itself delayed by
// tau = 2 samples (transition detector), pulses narrower than tau are
// discarded (pulse filter, output y(k)), the frequency controller measures
// the spacing of the surviving transitions and selects one of the
// reference divider stages (4 MHz, 400 k, 40 k, 4 kHz), a divide-by-40
// turns the selected stage into the symbol clock, and the phase detector
// and phase estimator pull that clock onto the transitions. The outputs
// are the recovered symbol clock T_clk and the rate selection S_i, which
// also steers the delay units of the demodulator.
//
// The transmitter sends a '1010..' preamble and inserts '10' after every 8
// data bits so that there are always transitions to track. With the
// detection latency compensated, the rising edge of T_clk coincides with
// the data transition at sig_in (the same sample clock), to within one
// divider tick. The block structure follows the document's timing circuit
// diagram; the insides of the frequency controller, phase detector and
// phase estimator are this design's own (see those modules).
//
// Interface: clk (fs), rst_n, sig_in; t_clk, sel, aligned, and the
// internal events y_rise, up, dn, rate_change for observation.
module timing_recovery
  import ddpsk_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  sig_in,
  output logic  t_clk,
  output rate_e sel,
  output logic  aligned,
  output logic  y_rise,
  output logic  up,
  output logic  dn,
  output logic  rate_change
);

  // Clocks from a transition at sig_in to its y_rise strobe.
  localparam int unsigned LAT = 1 + TAU;

  logic                       pulse;
  logic                       y;
  logic                       tick;
  logic                       div_load;
  logic [$clog2(SYM_DIV)-1:0] p;
  logic signed [$clog2(SYM_DIV):0] err;
  logic [19:0]                interval;

  transition_detector #(.TAU_S(TAU)) u_tdet (
    .clk(clk), .rst_n(rst_n), .sig_in(sig_in), .pulse(pulse)
  );

  pulse_filter #(.MIN_W(TAU)) u_filt (
    .clk(clk), .rst_n(rst_n), .pulse_in(pulse), .y(y), .y_rise(y_rise)
  );

  freq_controller #(.BASE(BASE_SPS), .STEP(RATE_STEP), .CW(20)) u_fctl (
    .clk(clk), .rst_n(rst_n), .y_rise(y_rise),
    .sel(sel), .rate_change(rate_change), .interval(interval)
  );

  rate_divider #(.STEP(RATE_STEP), .NSTAGES(NUM_RATES), .LOAD_VAL(LAT + 1)) u_div (
    .clk(clk), .rst_n(rst_n), .sel(sel), .load(div_load), .tick(tick)
  );

  pfd #(.NDIV(SYM_DIV), .IDEAL_P0(LAT)) u_pfd (
    .clk(clk), .rst_n(rst_n), .y_rise(y_rise), .enable(aligned),
    .sel(sel), .p(p), .up(up), .dn(dn), .err(err)
  );

  phase_estimator #(.NDIV(SYM_DIV), .LAT(LAT)) u_pest (
    .clk(clk), .rst_n(rst_n), .sel(sel), .tick(tick), .y_rise(y_rise),
    .realign(rate_change), .up(up), .dn(dn),
    .p(p), .t_clk(t_clk), .div_load(div_load), .aligned(aligned)
  );

endmodule
