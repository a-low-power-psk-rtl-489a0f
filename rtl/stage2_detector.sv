// Second differential stage and decision of the DDPSK demodulator.
//
// For every symbol the accumulators deliver I_n and Q_n, which carry the
// first phase difference plus a constant Doppler-induced phase error. The
// stage keeps the previous symbol's values (the "T" delays), forms
// X_n = I_n * I_{n-1} and Y_n = Q_n * Q_{n-1}, adds them and takes the sign:
// X_n + Y_n is proportional to the cosine of the second-order phase
// difference, in which the frequency error has cancelled. A negative sum
// means a phase reversal, i.e. data bit a_n = 1; a positive sum (or a
// zero sum, this design's tie rule) gives 0.
//
// The delays, multipliers, adder and sign block follow the document's
// block diagram; the bit mapping follows its encoder
// (c_k = a_k XOR c_{k-1}, so a_k = 1 flips the phase). The previous values
// start at 0 after reset, so the first decision is 0.
//
// Interface: clk, rst_n, in_valid, i_n, q_n (signed W bits); j_bit,
// j_valid (registered, one clock after in_valid), and the decision
// statistic metric = X_n + Y_n.
module stage2_detector #(
  parameter int unsigned W = 17
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [W-1:0]     i_n,
  input  logic signed [W-1:0]     q_n,
  output logic                    j_bit,
  output logic                    j_valid,
  output logic signed [2*W:0]     metric
);

  logic signed [W-1:0]   i_prev;
  logic signed [W-1:0]   q_prev;
  logic signed [2*W-1:0] x_n;
  logic signed [2*W-1:0] y_n;
  logic signed [2*W:0]   sum;

  always_comb begin
    x_n = i_n * i_prev;
    y_n = q_n * q_prev;
    sum = (2*W+1)'(x_n) + (2*W+1)'(y_n);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_prev  <= '0;
      q_prev  <= '0;
      j_bit   <= 1'b0;
      j_valid <= 1'b0;
      metric  <= '0;
    end else begin
      j_valid <= in_valid;
      if (in_valid) begin
        i_prev <= i_n;
        q_prev <= q_n;
        j_bit  <= sum[2*W];
        metric <= sum;
      end
    end
  end

endmodule
