// Decimator "L down": keeps one of every L products of the first stage.
//
// The I and Q product streams arrive at the sample rate; the decimator
// forwards the sample when its phase counter is 0 and drops the other L-1,
// so each accumulator sees K = fs*T/L samples per symbol. The phase counter
// restarts on sync, which the reset circuit raises on the first sample of
// every symbol, so each symbol is decimated the same way and K stays an
// integer. The ratio L is a run-time input so that it can follow the data
// rate; L = 0 is treated as 1.
//
// The document gives the decimator's place and the relation K = fs*T/L
// (K = 20 at 100 kb/s with L = 2); the counter, the symbol-aligned restart
// and the run-time ratio are this design's own.
//
// Interface: clk, rst_n, ratio (L), sync, in_i, in_q; out_valid, out_i,
// out_q are registered (one clock of latency).
module decimator #(
  parameter int unsigned RW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [RW-1:0] ratio,
  input  logic          sync,
  input  logic          in_i,
  input  logic          in_q,
  output logic          out_valid,
  output logic          out_i,
  output logic          out_q
);

  logic [RW-1:0] cnt;
  logic [RW-1:0] phase;
  logic [RW-1:0] last;

  always_comb begin
    phase = sync ? '0 : cnt;
    last  = (ratio == '0) ? '0 : ratio - 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      out_valid <= 1'b0;
      out_i     <= 1'b0;
      out_q     <= 1'b0;
    end else begin
      cnt       <= (phase >= last) ? '0 : phase + 1'b1;
      out_valid <= (phase == '0);
      out_i     <= in_i;
      out_q     <= in_q;
    end
  end

endmodule
