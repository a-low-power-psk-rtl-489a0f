// Variable symbol delay "T" for several data rates.
//
// A cascade of delay segments T1, T2, T3, T4 whose outputs are taps at
// BASE, BASE*STEP, BASE*STEP^2 and BASE*STEP^3 samples (40, 400, 4000 and
// 40000 samples: one symbol at 100, 10, 1 and 0.1 kb/s with fs = 4 MHz). A
// multiplexer driven by the rate selection S_i from the timing circuit
// picks the tap, so dout is din delayed by one symbol period of the
// selected rate. Segment i holds BASE*STEP^i - BASE*STEP^(i-1) samples.
// The cascade-plus-multiplexer structure and the decade taps follow the
// document; building each segment as a circular memory is this design's
// choice.
//
// Interface: clk, rst_n, sel (S_i, 0 = fastest rate), din, dout
// (combinational from the memories and sel).
module delay_unit #(
  parameter int unsigned BASE    = 40,
  parameter int unsigned STEP    = 10,
  parameter int unsigned NSTAGES = 4
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [$clog2(NSTAGES)-1:0]   sel,
  input  logic                         din,
  output logic                         dout
);

  // Total delay at tap i.
  function automatic int unsigned tap_delay(input int unsigned i);
    int unsigned v;
    v = BASE;
    for (int unsigned k = 0; k < i; k++) v = v * STEP;
    return v;
  endfunction

  logic [NSTAGES-1:0] tap;

  for (genvar i = 0; i < NSTAGES; i++) begin : g_seg
    localparam int unsigned SEG = (i == 0) ? tap_delay(0)
                                           : tap_delay(i) - tap_delay(i - 1);
    delay_line #(.N(SEG)) u_seg (
      .clk  (clk),
      .rst_n(rst_n),
      .din  ((i == 0) ? din : tap[(i == 0) ? 0 : i - 1]),
      .dout (tap[i])
    );
  end

  always_comb dout = tap[sel];

endmodule
