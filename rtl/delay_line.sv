// Fixed-length delay of a 1-bit sample stream.
//
// Delays din by exactly N sample clocks: dout at cycle t equals din at cycle
// t-N. The samples are kept in an N-entry 1-bit memory used as a circular
// buffer: each cycle the oldest entry is read (asynchronously) and
// overwritten by the new sample, and the pointer advances. Until the buffer
// has been filled once after reset, dout is 0, so no stale memory content
// leaves the block. One such line is one delay segment (T1, T2, ...) of the
// delay unit; the memory-based form is this design's choice, the document
// only draws the segments.
//
// Interface: clk, rst_n (active-low), din, dout. Parameter N >= 1.
module delay_line #(
  parameter int unsigned N = 40
) (
  input  logic clk,
  input  logic rst_n,
  input  logic din,
  output logic dout
);

  localparam int unsigned PW = (N > 1) ? $clog2(N) : 1;

  logic          mem [N];
  logic [PW-1:0] ptr;
  logic          filled;

  always_comb dout = filled ? mem[ptr] : 1'b0;

  always_ff @(posedge clk) begin
    mem[ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr    <= '0;
      filled <= 1'b0;
    end else begin
      if (ptr == PW'(N - 1)) begin
        ptr    <= '0;
        filled <= 1'b1;
      end else begin
        ptr <= ptr + 1'b1;
      end
    end
  end

endmodule
