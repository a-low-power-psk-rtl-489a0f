// Self-checking testbench for the 1-bit A/D model: for a 1 MHz sine
// sampled at 4 MHz (with a phase offset, plus random levels), r_k after
// each sampling edge must be 1 exactly when the input was positive at
// that edge.
module tb_adc_1bit;
  real vin = 0.0;
  logic clk = 0, rst_n = 0, rk;
  int checks = 0, failures = 0;

  adc_1bit dut (.vin(vin), .clk(clk), .rst_n(rst_n), .rk(rk));

  always #125 clk = ~clk;   // 4 MHz with 1 ns units

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      logic e;
      if (k < 1000) vin = 0.01 * $cos(3.14159265358979 / 2.0 * k + 0.6);
      else          vin = (real'($urandom % 2001) - 1000.0) * 1.0e-3;
      e = (vin > 0.0);
      @(posedge clk); #1;
      checks++;
      if (rk !== e) begin failures++; if (failures < 5) $display("k %0d vin %f rk %b", k, vin, rk); end
      if (rk) ones++;
    end
    checks++;
    if (ones < 800 || ones > 1200) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
