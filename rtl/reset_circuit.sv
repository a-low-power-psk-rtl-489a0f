// Reset circuit (RC): symbol-boundary strobes from the recovered clock.
//
// The accumulators must be cleared once per symbol. The reset circuit
// watches the recovered symbol clock T_clk, finds its rising edge (the
// symbol boundary) and issues two one-clock strobes: dec_sync, one clock
// after the edge, restarts the decimators, and acc_dump, one clock later,
// dumps and clears the accumulators. The one-clock spacing matches the
// register between the decimator input and the accumulator input, so both
// act on the first sample of the new symbol.
//
// The document names the RC and its job; the edge detector and strobe
// timing are this design's own.
//
// Interface: clk, rst_n, t_clk; dec_sync, acc_dump (registered).
module reset_circuit (
  input  logic clk,
  input  logic rst_n,
  input  logic t_clk,
  output logic dec_sync,
  output logic acc_dump
);

  logic t_clk_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_clk_d  <= 1'b1;
      dec_sync <= 1'b0;
      acc_dump <= 1'b0;
    end else begin
      t_clk_d  <= t_clk;
      dec_sync <= t_clk & ~t_clk_d;
      acc_dump <= dec_sync;
    end
  end

endmodule
