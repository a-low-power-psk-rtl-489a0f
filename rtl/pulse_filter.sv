// Pulse-width filter of the timing circuit.
//
// Passes only those pulses of the transition detector that are at least
// MIN_W samples (tau = 2 Ts) wide. A run-length counter measures how long
// the input pulse has been high; y is high from the MIN_W-th sample of a
// qualifying pulse to its end, and y_rise marks, for one clock, the sample
// at which a pulse qualifies. Shorter pulses (noise, glitches, the
// fragments a fast Doppler drift leaves) produce nothing. The acceptance
// rule follows the document; the counter implementation and the y_rise
// strobe are this design's own.
//
// Interface: clk, rst_n, pulse_in; y, y_rise (registered).
module pulse_filter
  import ddpsk_pkg::*;
#(
  parameter int unsigned MIN_W = TAU
) (
  input  logic clk,
  input  logic rst_n,
  input  logic pulse_in,
  output logic y,
  output logic y_rise
);

  localparam int unsigned CW = $clog2(MIN_W + 1);

  logic [CW-1:0] run;       // saturating run length, including this sample
  logic [CW-1:0] run_next;

  always_comb begin
    if (!pulse_in)                 run_next = '0;
    else if (run >= CW'(MIN_W))    run_next = run;
    else                           run_next = run + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run    <= '0;
      y      <= 1'b0;
      y_rise <= 1'b0;
    end else begin
      run    <= run_next;
      y      <= (run_next >= CW'(MIN_W));
      y_rise <= (run_next == CW'(MIN_W)) && (run < CW'(MIN_W));
    end
  end

endmodule
