// Integrate-and-dump matched filter realised as an up/down counter.
//
// Each valid input bit adds +1 (bit 1, product +1) or -1 (bit 0, product
// -1) to a signed count. On dump, the count of the symbol that just ended
// is delivered on sum/sum_valid and the counter restarts with the current
// input, so consecutive symbols are integrated without overlap. The
// document describes the low-pass (matched) filters as accumulators or
// up/down counters reset every symbol by the reset circuit; the width W is
// this design's choice: 17 bits hold +-40000, the largest count possible
// (0.1 kb/s without decimation).
//
// Interface: clk, rst_n, dump, in_valid, in_bit; sum (signed W bits) and
// sum_valid are registered and appear the clock after dump.
module accumulator #(
  parameter int unsigned W = 17
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                dump,
  input  logic                in_valid,
  input  logic                in_bit,
  output logic signed [W-1:0] sum,
  output logic                sum_valid
);

  logic signed [W-1:0] acc;
  logic signed [W-1:0] step;

  always_comb begin
    if (!in_valid)   step = '0;
    else if (in_bit) step = W'(1);
    else             step = -W'(1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      sum       <= '0;
      sum_valid <= 1'b0;
    end else begin
      sum_valid <= dump;
      if (dump) begin
        sum <= acc;
        acc <= step;
      end else begin
        acc <= acc + step;
      end
    end
  end

endmodule
