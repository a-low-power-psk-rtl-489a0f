// Self-checking testbench for rate_divider: for each selection the tick
// period must be 1, 10, 100 and 1000 clocks (4 MHz, 400 k, 40 k, 4 kHz
// from a 4 MHz reference), and after load the first tick must come
// STEP^sel - LOAD_VAL clocks after the load (for sel > 0).
// Then, after one load, the selection is switched at random every few
// hundred clocks without reloading. The stages keep counting, so on every
// clock t after the load the tick must be high exactly when
// (LOAD_VAL + t) is a multiple of the selected period.
module tb_rate_divider;
  localparam int unsigned LOAD_VAL = 4;
  logic clk = 0, rst_n = 0, load = 0, tick;
  logic [1:0] sel = 0;
  int checks = 0, failures = 0;

  rate_divider #(.LOAD_VAL(LOAD_VAL)) dut (.clk(clk), .rst_n(rst_n), .sel(sel), .load(load), .tick(tick));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned period [4] = '{1, 10, 100, 1000};
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int s = 0; s < 4; s++) begin
      int last, n;
      sel = 2'(s);
      // load, then measure the delay to the first tick and the periods
      load = 1;
      @(posedge clk); #1;
      load = 0;
      last = 0; n = 0;
      for (int t = 1; n < 12; t++) begin
        if (tick) begin
          checks++;
          if (n == 0) begin
            if (s > 0 && t != int'(period[s]) - int'(LOAD_VAL)) begin
              failures++; $display("sel %0d first tick at %0d", s, t);
            end
          end else if (t - last != int'(period[s])) begin
            failures++; $display("sel %0d period %0d", s, t - last);
          end
          last = t; n++;
        end
        @(posedge clk); #1;
        if (t > 20000) break;
      end
      checks++;
      if (n < 12) failures++;
    end
    // free-running chain with random selection changes
    begin
      int hold, n_sw;
      sel = 2'd0; load = 1;
      @(posedge clk); #1;
      load = 0;
      hold = 0; n_sw = 0;
      for (int t = 1; t <= 30000; t++) begin
        checks++;
        if (tick !== ((int'(LOAD_VAL) + t) % int'(period[sel]) == 0)) begin
          failures++;
          if (failures < 10) $display("t %0d sel %0d: tick %b", t, sel, tick);
        end
        @(posedge clk); #1;
        if (++hold > 200 + int'($urandom % 400)) begin
          sel = 2'($urandom);
          hold = 0; n_sw++;
          #1;   // let the tick multiplexer settle
        end
      end
      checks++;
      if (n_sw < 20) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
