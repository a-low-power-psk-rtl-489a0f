// Digital double differential PSK (DDPSK) receiver with a 1-bit A/D.
//
// Structure: adc_1bit (comparator + sampler, behavioural) feeding
// ddpsk_baseband (all the digital logic).
//
// Signal path: the 1-bit A/D hard-limits the (IF or subsampled) input and
// samples it at fs = 4 MHz, four samples per carrier cycle. The first
// differential stage correlates each sample with the sample one or two
// symbols earlier (XNOR, I branch) and with that sample shifted by 90
// degrees (one more sample, Q branch). Each product stream is decimated by
// L and integrated over one symbol by an up/down counter (the matched
// filter), which the reset circuit dumps and clears at every rising edge
// of the recovered symbol clock T_clk. The second stage multiplies each
// symbol's I and Q sums by those of the previous symbol, adds the two
// products and takes the sign: the data bit, free of the carrier
// frequency offset (Doppler) and of the carrier phase.
//
// Timing: the timing recovery block derives T_clk and the rate selection
// S_i from timing_in, a sample-rate logic signal carrying the data
// transitions, with T_clk's rising edge on those transitions. Which
// receiver signal drives timing_in is not fixed by this design; it is
// brought out as a port. The delay units follow S_i, so the whole
// receiver switches between 100, 10, 1 and 0.1 kb/s.
//
// Controls: mode selects the (T,T) or (2T,T) delay combination (the
// transmitter's double differential encoder must match); dec_ratio is the
// decimation ratio L (K = fs*T/L samples per accumulator per symbol).
//
// Outputs: data_bit/data_valid, one decision per symbol, data_valid two
// clocks after the accumulators are dumped; the decided bit belongs to the
// symbol that ended at that dump. t_clk, rate_sel and timing_locked show
// the timing recovery state.
module ddpsk_rx_top
  import ddpsk_pkg::*;
#(
  parameter int unsigned ACC_W = 17,
  parameter int unsigned DEC_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  real               vin,
  input  logic              timing_in,
  input  delay_mode_e       mode,
  input  logic [DEC_W-1:0]  dec_ratio,
  output logic              data_bit,
  output logic              data_valid,
  output logic              t_clk,
  output rate_e             rate_sel,
  output logic              timing_locked
);

  logic rk;

  adc_1bit u_adc (
    .vin(vin), .clk(clk), .rst_n(rst_n), .rk(rk)
  );

  ddpsk_baseband #(.ACC_W(ACC_W), .DEC_W(DEC_W)) u_bb (
    .clk(clk), .rst_n(rst_n), .rk(rk), .timing_in(timing_in), .mode(mode),
    .dec_ratio(dec_ratio), .data_bit(data_bit), .data_valid(data_valid),
    .t_clk(t_clk), .rate_sel(rate_sel), .timing_locked(timing_locked),
    .metric(), .y_rise(), .pd_up(), .pd_dn(), .rate_change()
  );

endmodule
