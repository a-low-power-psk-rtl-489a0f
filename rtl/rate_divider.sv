// Reference divider chain and stage multiplexer of the timing circuit.
//
// The 4 MHz reference (the sample clock) feeds three cascaded divide-by-10
// stages, giving tick streams at 4 MHz, 400 kHz, 40 kHz and 4 kHz (the
// document's 400 k, 40 k, 4 k outputs). The multiplexer, steered by the
// frequency controller's selection sel, forwards one of them as tick; the
// following divide-by-40 turns it into the symbol clock of 100, 10, 1 or
// 0.1 kb/s. Everything runs on the one sample clock: a "clock" of a lower
// stage is a one-cycle enable (tick), which is this design's choice.
// load restarts the prescaler: the first divide-by-10 counter is set to
// LOAD_VAL and the others to 0, i.e. as if a tick period had begun LOAD_VAL
// clocks earlier; the phase estimator uses it to line the divider up with
// a data transition whose detection took LOAD_VAL - 1 clocks.
//
// Interface: clk, rst_n, sel (0..3), load; tick (combinational from the
// prescaler registers).
module rate_divider
  import ddpsk_pkg::*;
#(
  parameter int unsigned STEP    = RATE_STEP,
  parameter int unsigned NSTAGES = NUM_RATES,
  parameter int unsigned LOAD_VAL = 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [$clog2(NSTAGES)-1:0] sel,
  input  logic                       load,
  output logic                       tick
);

  localparam int unsigned CW = $clog2(STEP);

  logic [CW-1:0]      cnt   [NSTAGES-1];
  logic [NSTAGES-1:0] stage_tick;   // stage_tick[i]: end of a period of stage i

  always_comb begin
    logic run;
    run = 1'b1;
    for (int unsigned i = 0; i < NSTAGES; i++) begin
      stage_tick[i] = run;
      if (i < NSTAGES - 1) run = run && (cnt[i] == CW'(STEP - 1));
    end
  end

  always_comb tick = stage_tick[sel];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < NSTAGES - 1; i++) cnt[i] <= '0;
    end else if (load) begin
      cnt[0] <= CW'(LOAD_VAL);
      for (int unsigned i = 1; i < NSTAGES - 1; i++) cnt[i] <= '0;
    end else begin
      for (int unsigned i = 0; i < NSTAGES - 1; i++)
        if (stage_tick[i])
          cnt[i] <= (cnt[i] == CW'(STEP - 1)) ? '0 : cnt[i] + 1'b1;
    end
  end

endmodule
