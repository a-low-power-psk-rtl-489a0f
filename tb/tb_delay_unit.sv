// Self-checking testbench for delay_unit: for every rate selection the
// output must be the input delayed by one symbol (40, 400, 4000, 40000
// samples), with 0 before the selected tap has filled.
module tb_delay_unit;
  localparam int unsigned TAPS [4] = '{40, 400, 4000, 40000};
  logic clk = 0, rst_n = 0, din = 0, dout;
  logic [1:0] sel = 0;
  int checks = 0, failures = 0;
  logic hist [];

  delay_unit dut (.clk(clk), .rst_n(rst_n), .sel(sel), .din(din), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 4; s++) begin
      int unsigned d, len;
      d   = TAPS[s];
      len = d + 300;
      hist = new[len];
      rst_n = 0; sel = 2'(s); din = 0;
      repeat (2) @(posedge clk);
      #1 rst_n = 1;
      for (int t = 0; t < int'(len); t++) begin
        logic exp_v;
        @(posedge clk); #1;
        exp_v = (t >= int'(d)) ? hist[t-d] : 1'b0;
        // Check everything near the first tap fill and the whole tail.
        if (t < 50 || t >= int'(d) - 5) begin
          checks++;
          if (dout !== exp_v) begin
            failures++;
            if (failures < 5) $display("sel %0d cycle %0d: dout=%b expected %b", s, t, dout, exp_v);
          end
        end
        hist[t] = 1'($urandom);
        din = hist[t];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
