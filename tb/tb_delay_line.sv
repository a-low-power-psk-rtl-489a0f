// Self-checking testbench for delay_line: a random bit stream must come
// out exactly N clocks later, and 0 before the line has filled.
module tb_delay_line;
  localparam int unsigned N = 40;
  localparam int unsigned CYCLES = 600;
  logic clk = 0, rst_n = 0, din = 0, dout;
  int checks = 0, failures = 0;
  logic hist [CYCLES];

  delay_line #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .din(din), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < CYCLES; t++) begin
      @(posedge clk); #1;
      checks++;
      if (dout !== ((t >= N) ? hist[t-N] : 1'b0)) begin
        failures++;
        if (failures < 5) $display("cycle %0d: dout=%b expected %b", t, dout, (t >= N) ? hist[t-N] : 1'b0);
      end
      hist[t] = 1'($urandom);
      din = hist[t];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
