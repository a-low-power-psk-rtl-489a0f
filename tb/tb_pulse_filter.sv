// Self-checking testbench for pulse_filter: pulses of width 1 must vanish,
// pulses of width >= 2 must produce y from their second sample to their
// end and exactly one y_rise, at their second sample (seen one clock
// later at the outputs).
module tb_pulse_filter;
  logic clk = 0, rst_n = 0, pulse_in = 0, y, y_rise;
  int checks = 0, failures = 0;

  pulse_filter dut (.clk(clk), .rst_n(rst_n), .pulse_in(pulse_in), .y(y), .y_rise(y_rise));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int run = 0, passed = 0, rejected = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      automatic int w = 1 + $urandom % 4;
      automatic int gap = 1 + $urandom % 4;
      if (w >= 2) passed++; else rejected++;
      for (int k = 0; k < w + gap; k++) begin
        logic ey, er;
        pulse_in = (k < w);
        run = pulse_in ? run + 1 : 0;
        ey = (run >= 2);
        er = (run == 2);
        @(posedge clk); #1;
        checks += 2;
        if (y !== ey)      begin failures++; if (failures < 5) $display("n %0d k %0d y %b exp %b", n, k, y, ey); end
        if (y_rise !== er) begin failures++; if (failures < 5) $display("n %0d k %0d y_rise %b exp %b", n, k, y_rise, er); end
      end
    end
    checks++;
    if (passed < 100 || rejected < 50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
