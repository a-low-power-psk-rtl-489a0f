// Divide-by-40 symbol divider and phase estimator of the timing circuit.
//
// Counts the ticks of the selected divider stage modulo NDIV = 40, so one
// count cycle is one symbol (40 ticks of 4 MHz, 400 k, 40 k or 4 kHz give
// 100, 10, 1 or 0.1 kb/s). The recovered symbol clock T_clk is high for the
// first half of the count; its rising edge is the symbol boundary.
//
// Phase estimation: after reset or a rate change (realign), the first
// filtered transition loads the counter so that the boundary falls exactly
// on that transition, compensating the LAT clocks the transition detector
// and filter took (at the fastest rate the load value LAT+1 goes into p; at
// the slower rates it goes into the prescaler via div_load, which the
// rate divider applies, and p starts at 0). After that the detector's up/dn
// strobes advance p by one extra tick or hold it for one tick, which keeps
// the boundary within one tick (T/40) of the transitions.
//
// The divide-by-40 and the phase estimator follow the document's block
// diagram; the load-then-track rule is this design's own.
//
// Interface: clk, rst_n, sel, tick, y_rise, realign, up, dn; p, t_clk,
// div_load (one-clock strobe to the rate divider), aligned.
module phase_estimator
  import ddpsk_pkg::*;
#(
  parameter int unsigned NDIV = SYM_DIV,
  parameter int unsigned LAT  = 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [1:0]              sel,
  input  logic                    tick,
  input  logic                    y_rise,
  input  logic                    realign,
  input  logic                    up,
  input  logic                    dn,
  output logic [$clog2(NDIV)-1:0] p,
  output logic                    t_clk,
  output logic                    div_load,
  output logic                    aligned
);

  localparam int unsigned PW = $clog2(NDIV);

  logic          skip_pending;
  logic [PW-1:0] p_plus1;
  logic [PW-1:0] p_plus2;

  always_comb begin
    p_plus1  = (p >= PW'(NDIV - 1)) ? PW'(32'(p) + 1 - NDIV) : p + PW'(1);
    p_plus2  = (p >= PW'(NDIV - 2)) ? PW'(32'(p) + 2 - NDIV) : p + PW'(2);
    t_clk    = (p < PW'(NDIV / 2));
    div_load = y_rise && !aligned;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p            <= '0;
      aligned      <= 1'b0;
      skip_pending <= 1'b0;
    end else if (realign) begin
      aligned      <= 1'b0;
      skip_pending <= 1'b0;
    end else if (div_load) begin
      p            <= (sel == 2'd0) ? PW'(LAT + 1) : '0;
      aligned      <= 1'b1;
      skip_pending <= 1'b0;
    end else if (up) begin
      p <= tick ? p_plus2 : p_plus1;
    end else if (dn) begin
      if (!tick) skip_pending <= 1'b1;
    end else if (tick) begin
      if (skip_pending) skip_pending <= 1'b0;
      else              p <= p_plus1;
    end
  end

endmodule
