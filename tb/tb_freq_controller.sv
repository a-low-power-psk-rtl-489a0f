// Self-checking testbench for freq_controller: transitions spaced by
// multiples (1..9) of one symbol of a given rate must select that rate
// after two intervals, with one rate_change strobe per change, and the
// selection must hold while the rate does not change.
// Then, after a reset, a random sequence of intervals: mostly runs of one
// rate, single outliers of another rate, and intervals right at the class
// bounds (9.5 symbols: 380, 3800 and 38000 clocks, and one clock less).
// After every transition the outputs are compared with a model of the
// rule: an interval is classed by those bounds, and the selection moves to
// a class when two successive intervals fall in it. The interval output
// must equal the measured spacing and rate_change must pulse exactly when
// the selection moves.
module tb_freq_controller;
  import ddpsk_pkg::*;
  logic clk = 0, rst_n = 0, y_rise = 0;
  rate_e sel;
  logic rate_change;
  logic [19:0] interval;
  int checks = 0, failures = 0;
  int changes = 0;

  freq_controller dut (.clk(clk), .rst_n(rst_n), .y_rise(y_rise), .sel(sel),
                       .rate_change(rate_change), .interval(interval));

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && rate_change) changes++;

  initial begin
    repeat (12000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic gap(input int n);
    y_rise = 1;
    @(posedge clk); #1;
    y_rise = 0;
    repeat (n - 1) @(posedge clk);
    #1;
  endtask

  initial begin
    int order [6] = '{1, 0, 2, 3, 1, 0};
    int sps, c0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    foreach (order[i]) begin
      sps = samples_per_symbol(order[i]);
      c0 = changes;
      for (int k = 0; k < 8; k++) begin
        automatic int runlen = (k < 3) ? 1 : 1 + $urandom % 9;
        gap(sps * runlen + int'($urandom % 3) - 1);
        if (k >= 2) begin
          checks++;
          if (sel != rate_e'(order[i])) begin
            failures++; $display("step %0d k %0d sel %0d exp %0d", i, k, sel, order[i]);
          end
        end
      end
      checks++;
      if (changes - c0 != ((i == 0 || order[i] != order[i-1]) ? 1 : 0)) begin
        failures++; $display("step %0d: %0d rate changes", i, changes - c0);
      end
    end
    random_phase();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int cls(input int n);
    if (n < 380)        return 0;
    else if (n < 3800)  return 1;
    else if (n < 38000) return 2;
    else                return 3;
  endfunction

  task automatic random_phase();
    int sel_m, prev_c, cur, last_n, n, c, n_moves, n_outl, n_bound;
    int bounds [6] = '{379, 380, 3799, 3800, 37999, 38000};
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    repeat (5) @(posedge clk);
    #1;
    // first transition: its interval (from reset) is short, class 0
    y_rise = 1; @(posedge clk); #1; y_rise = 0;
    sel_m = 0; prev_c = 0; cur = 0; n_moves = 0; n_outl = 0; n_bound = 0;
    last_n = 0;
    for (int i = 0; i < 300; i++) begin
      // choose the next interval
      int r;
      r = $urandom % 20;
      if (r < 2) begin
        n = bounds[$urandom % 6]; n_bound++;
      end else if (r < 4) begin
        c = (cur + 1 + $urandom % 3) % 4;   // a single outlier
        n = samples_per_symbol(c) * (c == 3 ? 1 : 1 + $urandom % 9);
        n_outl++;
      end else begin
        if (r < 7) cur = $urandom % 4;      // the rate moves
        n = samples_per_symbol(cur) * (cur == 3 ? 1 + $urandom % 2 : 1 + $urandom % 9)
            + int'($urandom % 3) - 1;
      end
      repeat (n - 1) @(posedge clk);
      #1;
      // transition ending this interval
      y_rise = 1; @(posedge clk); #1; y_rise = 0;
      c = cls(n);
      checks += 3;
      if (c == prev_c && c != sel_m) begin
        sel_m = c;
        n_moves++;
        if (rate_change !== 1'b1) begin failures++; $display("interval %0d: no rate_change", i); end
      end else if (rate_change !== 1'b0) begin
        failures++; $display("interval %0d: unexpected rate_change", i);
      end
      prev_c = c;
      if (int'(interval) != n) begin failures++; $display("interval %0d: reported %0d, spacing %0d", i, interval, n); end
      if (int'(sel) != sel_m) begin failures++; $display("interval %0d (%0d clocks): sel %0d, expected %0d", i, n, sel, sel_m); end
    end
    checks++;
    if (n_moves < 10 || n_outl == 0 || n_bound == 0) begin
      failures++; $display("random phase: %0d moves, %0d outliers, %0d bound cases", n_moves, n_outl, n_bound);
    end
  endtask
endmodule
