// First differential (autocorrelation) stage of the DDPSK demodulator.
//
// The 1-bit sample r_k is correlated with a copy of itself delayed by 2T or
// T (T = one symbol at the selected rate), which turns a carrier frequency
// error into a constant phase error per symbol. Two one-bit "mixers" are
// XNOR gates: x_I(k) = r_k XNOR r_{k-D} and y_Q(k) = r_k XNOR r_{k-D-1}.
// Because fs is four times the (IF or aliased) carrier, delaying the
// reference by one more sample shifts it by 90 degrees, giving the
// quadrature branch. The delay D is built from two delay units in series
// (each one symbol long at the rate sel); the control multiplexer picks
// the output of the first unit for (T,T) or of the second for (2T,T).
// An XNOR output of 1 stands for the product +1, 0 for -1.
//
// The two XNORs, the 2T/T delay, the 90 degree shift and the mode
// multiplexer follow the document's block diagram; realising the 90 degree
// shift as one sample of extra delay follows from fs = 4 f_i. x_i and y_q
// are registered: they show the products of the sample presented one
// clock earlier.
//
// Interface: clk, rst_n, mode (DELAY_T_T / DELAY_2T_T), sel (rate stage
// S_i), rk (sample in), x_i, y_q (products out).
module stage1_detector
  import ddpsk_pkg::*;
#(
  parameter int unsigned BASE    = BASE_SPS,
  parameter int unsigned STEP    = RATE_STEP,
  parameter int unsigned NSTAGES = NUM_RATES
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  delay_mode_e                mode,
  input  logic [$clog2(NSTAGES)-1:0] sel,
  input  logic                       rk,
  output logic                       x_i,
  output logic                       y_q
);

  logic d_t;       // r delayed by T
  logic d_2t;      // r delayed by 2T
  logic d_sel;     // r_{k-D}
  logic d_90;      // r_{k-D-1}: the 90 degree shifted reference

  delay_unit #(.BASE(BASE), .STEP(STEP), .NSTAGES(NSTAGES)) u_delay_a (
    .clk(clk), .rst_n(rst_n), .sel(sel), .din(rk), .dout(d_t)
  );

  delay_unit #(.BASE(BASE), .STEP(STEP), .NSTAGES(NSTAGES)) u_delay_b (
    .clk(clk), .rst_n(rst_n), .sel(sel), .din(d_t), .dout(d_2t)
  );

  always_comb d_sel = (mode == DELAY_2T_T) ? d_2t : d_t;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_90 <= 1'b0;
      x_i  <= 1'b0;
      y_q  <= 1'b0;
    end else begin
      d_90 <= d_sel;
      x_i  <= ~(rk ^ d_sel);
      y_q  <= ~(rk ^ d_90);
    end
  end

endmodule
