// Frequency controller of the timing circuit: data-rate detection.
//
// Measures the number of sample clocks between consecutive filtered data
// transitions and maps it to a divider stage: an interval shorter than
// 9.5 symbols of 100 kb/s (380 samples) means 100 kb/s, shorter than 3800
// means 10 kb/s, shorter than 38000 means 1 kb/s, anything longer
// 0.1 kb/s. The bound of 9.5 symbols rests on the framing the document
// prescribes ('1010..' preamble, '10' inserted after every 8 data bits),
// which limits a run of equal bits to 9 symbols, so every interval at one
// rate is shorter than the shortest interval (10 symbols of 10x the
// length is one symbol) at the next slower rate. The selection changes
// only when two consecutive intervals agree, and a change is announced on
// rate_change so that the phase estimator realigns.
//
// The document says the controller "selects the appropriate down converter
// stage depending on the frequency and phase of the incoming data signal";
// the interval measurement, the bounds and the agreement rule are this
// design's own. After reset the fastest rate is selected.
//
// Interface: clk, rst_n, y_rise; sel (registered S_i), rate_change
// (one-clock strobe), interval (last measured interval).
module freq_controller
  import ddpsk_pkg::*;
#(
  parameter int unsigned BASE    = BASE_SPS,
  parameter int unsigned STEP    = RATE_STEP,
  parameter int unsigned CW      = 20
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          y_rise,
  output rate_e         sel,
  output logic          rate_change,
  output logic [CW-1:0] interval
);

  localparam logic [CW-1:0] B0 = CW'(BASE * (2 * STEP - 1) / 2);
  localparam logic [CW-1:0] B1 = CW'(BASE * STEP * (2 * STEP - 1) / 2);
  localparam logic [CW-1:0] B2 = CW'(BASE * STEP * STEP * (2 * STEP - 1) / 2);

  logic [CW-1:0] cnt;
  rate_e         cand;
  rate_e         cand_prev;

  always_comb begin
    if (cnt < B0)      cand = RATE_100K;
    else if (cnt < B1) cand = RATE_10K;
    else if (cnt < B2) cand = RATE_1K;
    else               cand = RATE_100;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt         <= '0;
      cand_prev   <= RATE_100;
      sel         <= RATE_100K;
      rate_change <= 1'b0;
      interval    <= '0;
    end else begin
      rate_change <= 1'b0;
      if (y_rise) begin
        cnt       <= CW'(1);
        interval  <= cnt;
        cand_prev <= cand;
        if (cand == cand_prev && cand != sel) begin
          sel         <= cand;
          rate_change <= 1'b1;
        end
      end else if (cnt != '1) begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
