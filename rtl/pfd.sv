// Phase(-frequency) detector of the timing circuit.
//
// On every filtered data transition (y_rise) it reads the phase of the
// recovered symbol clock, the divide-by-40 count p, and compares it with
// the value p would have if the clock were exactly aligned (IDEAL_P0 at
// the fastest rate, where the detection latency is visible in p, and 0 at
// the slower rates, where it stays inside the prescaler). The difference,
// wrapped to -20..+19 ticks, says whether the clock is ahead (dn: retard
// it by one tick) or behind (up: advance it by one tick); an exact match
// gives neither. This bang-bang form is this design's own: the document
// names the detector and its inputs (the filtered transitions and the
// recovered clock) but not its insides. Frequency acquisition is done by
// the frequency controller, so only the phase comparison is needed here.
//
// Interface: clk, rst_n, y_rise, enable (clock already aligned once), sel,
// p; up, dn (registered one-clock strobes), err (signed phase error in
// ticks at the last comparison).
module pfd
  import ddpsk_pkg::*;
#(
  parameter int unsigned NDIV     = SYM_DIV,
  parameter int unsigned IDEAL_P0 = 3
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       y_rise,
  input  logic                       enable,
  input  logic [1:0]                 sel,
  input  logic [$clog2(NDIV)-1:0]    p,
  output logic                       up,
  output logic                       dn,
  output logic signed [$clog2(NDIV):0] err
);

  localparam int unsigned PW = $clog2(NDIV);

  logic signed [PW:0] diff;

  always_comb begin
    diff = $signed({1'b0, p}) - $signed((PW+1)'((sel == 2'd0) ? IDEAL_P0 : 0));
    if (diff >= $signed((PW+1)'(NDIV / 2)))  diff = diff - $signed((PW+1)'(NDIV));
    else if (diff < -$signed((PW+1)'(NDIV / 2))) diff = diff + $signed((PW+1)'(NDIV));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      up  <= 1'b0;
      dn  <= 1'b0;
      err <= '0;
    end else begin
      up <= 1'b0;
      dn <= 1'b0;
      if (y_rise && enable) begin
        err <= diff;
        up  <= (diff < 0);
        dn  <= (diff > 0);
      end
    end
  end

endmodule
