// Self-checking testbench for phase_estimator: after a transition loads
// the counter, T_clk must rise LAT clocks before the next expected symbol
// boundary (i.e. on the boundary of the transition's symbol, 40 ticks
// apart); an up strobe must shorten one symbol by one tick and a dn strobe
// lengthen one by one tick. Run at the fastest rate (tick every clock) and
// at 10 kb/s (tick every 10 clocks, generated here from the prescaler's
// specified behaviour).
// Then a random phase at both rates: random up/dn strobes (at least 12
// clocks apart) and y_rise pulses while aligned, which must be ignored. The
// phase must always equal the load value plus the ticks since the load plus
// the ups minus the dns, modulo 40 (checked whenever no dn is waiting for
// its tick), T_clk must be high exactly for p < 20, and div_load must fire
// only for a y_rise while not aligned.
module tb_phase_estimator;
  logic clk = 0, rst_n = 0, tick = 0, y_rise = 0, realign = 0, up = 0, dn = 0;
  logic [1:0] sel = 0;
  logic [5:0] p;
  logic t_clk, div_load, aligned;
  int checks = 0, failures = 0;
  int cyc = 0;
  int edges [$];
  logic t_clk_q = 1;
  int pre = 0;   // model of the prescaler for sel = 1

  phase_estimator #(.NDIV(40), .LAT(3)) dut (.clk(clk), .rst_n(rst_n), .sel(sel), .tick(tick),
    .y_rise(y_rise), .realign(realign), .up(up), .dn(dn), .p(p), .t_clk(t_clk),
    .div_load(div_load), .aligned(aligned));

  always #5 clk = ~clk;

  // record rising edges of t_clk (as seen after each clock edge)
  always @(posedge clk) begin
    cyc <= cyc + 1;
    #2;
    if (rst_n && t_clk && !t_clk_q) edges.push_back(cyc);
    t_clk_q = t_clk;
  end

  // tick source: every clock for sel 0, prescaler of 10 (loaded to 4) for sel 1
  always_comb tick = (sel == 0) ? 1'b1 : (pre == 9);
  always @(posedge clk) begin
    if (div_load) pre <= 4;
    else          pre <= (pre == 9) ? 0 : pre + 1;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic at_cycle(input int c);
    while (cyc < c) begin
      @(posedge clk);
      #1;
    end
  endtask

  task automatic expect_intervals(input int from, input int exp_first, input int d[$]);
    int k = 0;
    int prev = -1;
    foreach (edges[i]) if (edges[i] > from) begin
      if (prev < 0) begin
        checks++;
        if (edges[i] - from != exp_first) begin failures++; $display("first edge %0d after %0d", edges[i] - from, from); end
      end else if (k < d.size()) begin
        checks++;
        if (edges[i] - prev != d[k]) begin failures++; $display("interval %0d: %0d exp %0d", k, edges[i] - prev, d[k]); end
        k++;
      end
      prev = edges[i];
    end
    checks++;
    if (k != d.size()) begin failures++; $display("only %0d intervals", k); end
  endtask

  // Random strobes against the counting rule above.
  task automatic random_phase(input logic [1:0] rate, input int ncyc);
    int   pos, gap, n_up, n_dn, n_ign;
    logic pending, up_r, dn_r, tick_r, yr_r;
    sel = rate;
    realign = 1; @(posedge clk); #1; realign = 0;
    y_rise = 1; @(posedge clk); #1; y_rise = 0;
    pos = (rate == 0) ? 4 : 0;   // LAT + 1 at the fastest rate, else 0
    pending = 0; gap = 0; n_up = 0; n_dn = 0; n_ign = 0;
    for (int c = 0; c < ncyc; c++) begin
      // choose this cycle's strobes
      gap++;
      up = 0; dn = 0; y_rise = 0;
      if (gap > 12 && ($urandom % 20 == 0)) begin
        if ($urandom % 2) up = 1; else dn = 1;
        gap = 0;
      end else if ($urandom % 50 == 0) y_rise = 1;
      #1;
      up_r = up; dn_r = dn; tick_r = tick; yr_r = y_rise;
      checks++;
      if (div_load !== (y_rise && !aligned)) begin failures++; $display("div_load %b with y_rise %b aligned %b", div_load, y_rise, aligned); end
      @(posedge clk); #1;
      // the counting rule
      if (tick_r) pos++;
      if (up_r) begin pos++; n_up++; end
      if (dn_r) begin pos--; n_dn++; if (!tick_r) pending = 1; end
      else if (tick_r) pending = 0;
      if (yr_r) n_ign++;
      pos = (pos % 40 + 40) % 40;
      if (!pending) begin
        checks++;
        if (int'(p) != pos) begin
          failures++;
          if (failures < 10) $display("rate %0d cycle %0d: p %0d expected %0d", rate, c, p, pos);
        end
      end
      checks++;
      if (t_clk !== (p < 6'd20)) begin failures++; $display("t_clk %b at p %0d", t_clk, p); end
    end
    up = 0; dn = 0; y_rise = 0;
    checks++;
    if (n_up == 0 || n_dn == 0 || n_ign == 0 || !aligned) begin
      failures++;
      $display("rate %0d: %0d up, %0d dn, %0d ignored y_rise, aligned %b", rate, n_up, n_dn, n_ign, aligned);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // ---- fastest rate ----
    at_cycle(10); y_rise = 1; at_cycle(11); y_rise = 0;   // y_rise seen by the clock edge ending cycle 10
    at_cycle(130); up = 1; at_cycle(131); up = 0;
    at_cycle(170); dn = 1; at_cycle(171); dn = 0;
    at_cycle(250);
    checks++;
    if (!aligned) failures++;
    expect_intervals(10, 37, '{40, 40, 39, 41, 40});
    // ---- realign at 10 kb/s ----
    sel = 1; realign = 1; at_cycle(252); realign = 0;
    checks++;
    if (aligned) failures++;
    edges.delete();
    at_cycle(300); y_rise = 1; at_cycle(301); y_rise = 0;
    at_cycle(1500); dn = 1; at_cycle(1501); dn = 0;
    at_cycle(2800);
    // the transition was LAT = 3 clocks before cycle 300: boundaries at 297 + 400 n;
    // the dn strobe at cycle 1500 stretches the symbol then running by one tick
    expect_intervals(301, 396, '{400, 400, 410, 400});
    random_phase(0, 3000);
    random_phase(1, 6000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
