// Self-checking testbench for transition_detector: pulse at cycle t+1 must
// be s(t) XOR s(t-2); a clean transition gives a pulse two samples wide.
module tb_transition_detector;
  logic clk = 0, rst_n = 0, sig_in = 0, pulse;
  int checks = 0, failures = 0;
  logic hist [0:2047];

  transition_detector dut (.clk(clk), .rst_n(rst_n), .sig_in(sig_in), .pulse(pulse));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int width2 = 0, run = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      logic e;
      // slow data with occasional single-sample glitches
      if (t < 1000) hist[t] = 1'((t / 10) % 2);
      else          hist[t] = 1'($urandom);
      sig_in = hist[t];
      @(posedge clk); #1;
      e = hist[t] ^ ((t >= 2) ? hist[t-2] : 1'b0);
      checks++;
      if (pulse !== e) begin failures++; if (failures < 5) $display("t %0d pulse %b exp %b", t, pulse, e); end
      if (t < 1000) begin
        if (pulse) run++;
        else begin if (run == 2) width2++; run = 0; end
      end
    end
    checks++;
    if (width2 < 90) begin failures++; $display("only %0d two-sample pulses", width2); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
