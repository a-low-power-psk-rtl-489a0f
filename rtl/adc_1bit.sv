// 1-bit A/D converter: behavioural model of an analog part.
//
// A comparator hard-limits the analog input against ground (output +vdd for
// vin > 0, -vdd for vin < 0) and a sampling circuit samples the comparator
// output on every rising edge of the fs = 4 MHz sample clock, giving the
// one-bit sample stream r_k (1 = positive, 0 = negative). The comparator is a
// real analog circuit (a two-stage differential amplifier); here it is a
// plain sign test on a `real` input, which is why this file is a
// behavioural model and not synthesizable logic. The sampling flip-flop is
// ordinary logic.
//
// Interface: vin (analog input voltage, real), clk (fs), rst_n (active-low,
// clears r_k), rk (registered 1-bit sample). Timing: rk shows the sign of
// vin at the previous rising clock edge. The exact zero input (vin == 0)
// is resolved to 0; that choice is this model's own.
module adc_1bit (
  input  real  vin,
  input  logic clk,
  input  logic rst_n,
  output logic rk
);

  logic cmp_out;

  // Comparator (hard limiter).
  always_comb cmp_out = (vin > 0.0);

  // Sampling circuit.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rk <= 1'b0;
    else        rk <= cmp_out;
  end

endmodule
