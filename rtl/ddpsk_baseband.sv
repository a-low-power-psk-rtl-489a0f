// Digital baseband of the DDPSK receiver: everything after the 1-bit A/D.
//
// Input is the 1-bit sample stream r_k at fs = 4 MHz. The first
// differential stage correlates each sample with the sample one or two
// symbols earlier (XNOR, I branch) and with that sample shifted by 90
// degrees (one more sample, Q branch). Each product stream is decimated by
// L and integrated over one symbol by an up/down counter (the matched
// filter), which the reset circuit dumps and clears at every rising edge of
// the recovered symbol clock T_clk. The second stage multiplies each
// symbol's I and Q sums by those of the previous symbol, adds the two
// products and takes the sign: the data bit, free of the carrier frequency
// offset (Doppler) and of the carrier phase. The timing recovery block
// derives T_clk and the rate selection S_i (which also steers the delay
// units) from timing_in, a sample-rate logic signal carrying the data
// transitions.
//
// This split (A/D outside, all-digital baseband inside) mirrors the
// fabricated chip's "baseband" plus "1-bit A/D"; the ports are this
// design's own.
//
// Timing: a symbol boundary is expected at r_k on the clock where the
// matching transition appears at timing_in. data_valid comes two clocks
// after the accumulators are dumped, i.e. four clocks after the boundary,
// and carries the bit of the symbol that just ended.
//
// Interface: clk (fs), rst_n, rk, timing_in, mode, dec_ratio (L); data_bit,
// data_valid, metric (X_n + Y_n of the last decision), t_clk, rate_sel,
// timing_locked, and the timing events y_rise, pd_up, pd_dn, rate_change
// for observation.
module ddpsk_baseband
  import ddpsk_pkg::*;
#(
  parameter int unsigned ACC_W = 17,
  parameter int unsigned DEC_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rk,
  input  logic              timing_in,
  input  delay_mode_e       mode,
  input  logic [DEC_W-1:0]  dec_ratio,
  output logic              data_bit,
  output logic              data_valid,
  output logic              t_clk,
  output rate_e             rate_sel,
  output logic              timing_locked,
  output logic signed [2*ACC_W:0] metric,
  output logic              y_rise,
  output logic              pd_up,
  output logic              pd_dn,
  output logic              rate_change
);

  logic x_i, y_q;
  logic dec_sync, acc_dump;
  logic d_valid, d_i, d_q;
  logic signed [ACC_W-1:0] i_sum, q_sum;
  logic i_valid, q_valid;

  stage1_detector #(.BASE(BASE_SPS), .STEP(RATE_STEP), .NSTAGES(NUM_RATES)) u_stage1 (
    .clk(clk), .rst_n(rst_n), .mode(mode), .sel(rate_sel),
    .rk(rk), .x_i(x_i), .y_q(y_q)
  );

  decimator #(.RW(DEC_W)) u_dec (
    .clk(clk), .rst_n(rst_n), .ratio(dec_ratio), .sync(dec_sync),
    .in_i(x_i), .in_q(y_q), .out_valid(d_valid), .out_i(d_i), .out_q(d_q)
  );

  accumulator #(.W(ACC_W)) u_acc_i (
    .clk(clk), .rst_n(rst_n), .dump(acc_dump), .in_valid(d_valid),
    .in_bit(d_i), .sum(i_sum), .sum_valid(i_valid)
  );

  accumulator #(.W(ACC_W)) u_acc_q (
    .clk(clk), .rst_n(rst_n), .dump(acc_dump), .in_valid(d_valid),
    .in_bit(d_q), .sum(q_sum), .sum_valid(q_valid)
  );

  reset_circuit u_rc (
    .clk(clk), .rst_n(rst_n), .t_clk(t_clk),
    .dec_sync(dec_sync), .acc_dump(acc_dump)
  );

  stage2_detector #(.W(ACC_W)) u_stage2 (
    .clk(clk), .rst_n(rst_n), .in_valid(i_valid && q_valid),
    .i_n(i_sum), .q_n(q_sum),
    .j_bit(data_bit), .j_valid(data_valid), .metric(metric)
  );

  timing_recovery u_timing (
    .clk(clk), .rst_n(rst_n), .sig_in(timing_in),
    .t_clk(t_clk), .sel(rate_sel), .aligned(timing_locked),
    .y_rise(y_rise), .up(pd_up), .dn(pd_dn), .rate_change(rate_change)
  );

endmodule
