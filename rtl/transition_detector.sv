// Transition detector of the timing circuit: XOR with a tau-delayed copy.
//
// The incoming data-rate signal s(k) is XORed with itself delayed by
// tau = TAU samples (z^-tau). Each data transition therefore produces a
// pulse exactly tau samples wide; a one-sample glitch produces two
// one-sample pulses instead, which the following filter removes. The XOR,
// z^-tau and tau = 2 Ts follow the document.
//
// Interface: clk, rst_n, sig_in, pulse (registered: pulse at cycle t+1 is
// s(t) XOR s(t-TAU)).
module transition_detector
  import ddpsk_pkg::*;
#(
  parameter int unsigned TAU_S = TAU
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sig_in,
  output logic pulse
);

  logic [TAU_S-1:0] hist;   // hist[0] = s(k-1), hist[TAU_S-1] = s(k-TAU)

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist  <= '0;
      pulse <= 1'b0;
    end else begin
      pulse <= sig_in ^ hist[TAU_S-1];
      hist  <= TAU_S'({hist, sig_in});
    end
  end

endmodule
