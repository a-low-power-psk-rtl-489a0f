// Testbench of the digital baseband, driven directly with 1-bit samples.
//
// A transmitter model double-differentially encodes framed data ('1010..'
// preamble, then 8 data bits plus the inserted '10'), maps d_n to a carrier
// phase of 0 or pi and hard-limits carrier plus noise into the 1-bit sample
// stream r_k (what the A/D delivers). The data waveform drives timing_in in
// step with r_k.
//
// Runs (each from reset): 100 kb/s (T,T) L=1 noiseless at f_d = 0;
// 100 kb/s (T,T) L=1 at +5 kHz and (2T,T) L=1 at -8 kHz, with noise;
// 10 kb/s (T,T) L=1 with noise; 1 kb/s (2T,T) L=25 at +2 kHz with noise.
// Checked per decision: the decided bit equals a_n, the reported metric
// agrees with the decision (bit 1 for a negative X_n + Y_n), and in the
// noiseless f_d = 0 run the metric magnitude is exactly K*K (the Q
// products cancel over whole carrier cycles, the I sums are +-K).
// Checked per run: one decision per symbol, timing locked to the right rate,
// timing events observed (a y_rise for transitions, rate_change when the
// rate moves away from the reset value).
module tb_ddpsk_baseband;
  import ddpsk_pkg::*;

  localparam real PI = 3.14159265358979;

  logic        clk = 0, rst_n = 0, rk = 0, timing_in = 0;
  delay_mode_e mode = DELAY_T_T;
  logic [15:0] dec_ratio = 16'd1;
  logic        data_bit, data_valid, t_clk, timing_locked;
  logic signed [34:0] metric;
  logic        y_rise, pd_up, pd_dn, rate_change;
  rate_e       rate_sel;

  int checks = 0, failures = 0;
  int cyc = 0;

  logic a [$];
  int   sym_start [$];
  int   matched = 0, bits_bad = 0, n_yrise = 0, n_rchg = 0;
  int   min_mag = 1 << 30;

  ddpsk_baseband dut (
    .clk(clk), .rst_n(rst_n), .rk(rk), .timing_in(timing_in), .mode(mode),
    .dec_ratio(dec_ratio), .data_bit(data_bit), .data_valid(data_valid),
    .t_clk(t_clk), .rate_sel(rate_sel), .timing_locked(timing_locked),
    .metric(metric), .y_rise(y_rise), .pd_up(pd_up), .pd_dn(pd_dn),
    .rate_change(rate_change)
  );

  always #125 clk = ~clk;

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #2;
    cyc++;
    if (rst_n && data_valid) begin
      int best, m;
      best = 1 << 30; m = -1;
      foreach (sym_start[n]) begin
        int d;
        d = cyc - 4 - sym_start[n];
        if (d < 0) d = -d;
        if (d < best) begin best = d; m = n; end
      end
      if (m >= 10 && best < samples_per_symbol(int'(rate_sel)) / 4) begin
        int mag;
        matched++;
        checks += 2;
        if (data_bit !== a[m-1]) begin
          bits_bad++;
          failures++;
          if (bits_bad < 10) $display("cycle %0d: symbol %0d decided %b, sent %b", cyc, m - 1, data_bit, a[m-1]);
        end
        if (data_bit !== (metric < 0)) begin
          failures++;
          $display("cycle %0d: bit %b with metric %0d", cyc, data_bit, metric);
        end
        mag = (metric < 0) ? -int'(metric) : int'(metric);
        if (mag < min_mag) min_mag = mag;
      end
    end
    if (rst_n && y_rise) n_yrise++;
    if (rst_n && rate_change) n_rchg++;
  end

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom % 1000000) + 1.0) / 1000001.0;
    u2 = real'($urandom % 1000000) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  task automatic run(input int rate, input delay_mode_e m, input int l, input real fd_hz,
                     input int nsym, input real sigma, input int min_metric);
    int   sps, k_glob, matched_before, yr_before, rc_before;
    logic c_prev, d1, d2;
    real  w, ph0;
    sps = samples_per_symbol(rate);
    a.delete();
    sym_start.delete();
    rst_n = 0; mode = m; dec_ratio = 16'(l); rk = 0; timing_in = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    matched_before = matched;
    yr_before = n_yrise;
    rc_before = n_rchg;
    min_mag = 1 << 30;
    c_prev = 0; d1 = 0; d2 = 0;
    w   = 2.0 * PI * (1.0e6 + fd_hz) / real'(FS_HZ);
    ph0 = 2.0 * PI * (real'($urandom % 1000) + 0.5) / 1000.0;
    k_glob = 0;
    for (int n = 0; n < nsym; n++) begin
      logic an, cn, dn_;
      int   pos;
      if (n < 16) an = 1'(~n & 1);
      else begin
        pos = (n - 16) % 10;
        if (pos == 8)      an = 1'b1;
        else if (pos == 9) an = 1'b0;
        else               an = 1'($urandom);
      end
      a.push_back(an);
      cn = an ^ c_prev;
      dn_ = (m == DELAY_2T_T) ? (cn ^ d2) : (cn ^ d1);
      c_prev = cn; d2 = d1; d1 = dn_;
      for (int k = 0; k < sps; k++) begin
        @(posedge clk); #1;
        if (k == 0) sym_start.push_back(cyc);
        rk = ($cos(w * real'(k_glob) + ph0 + (dn_ ? PI : 0.0)) + sigma * gauss()) > 0.0;
        timing_in = an;
        k_glob++;
      end
    end
    repeat (8) @(posedge clk);
    #1;
    checks += 4;
    if (matched - matched_before != nsym - 10) begin
      failures++;
      $display("rate %0d: %0d decisions for %0d symbols", rate, matched - matched_before, nsym - 10);
    end
    if (!timing_locked || rate_sel != rate_e'(rate)) begin
      failures++;
      $display("rate %0d: locked %b, selected rate %0d", rate, timing_locked, rate_sel);
    end
    // the preamble alone has nsym/2 rising data edges
    if (n_yrise - yr_before < 8) begin
      failures++;
      $display("rate %0d: only %0d y_rise events", rate, n_yrise - yr_before);
    end
    if ((rate != 0) != (n_rchg != rc_before)) begin
      failures++;
      $display("rate %0d: %0d rate changes", rate, n_rchg - rc_before);
    end
    if (min_metric > 0) begin
      checks++;
      if (min_mag < min_metric) begin
        failures++;
        $display("rate %0d: metric magnitude down to %0d, expected at least %0d", rate, min_mag, min_metric);
      end
    end
    $display("run rate %0d mode %0d L %0d fd %0.0f Hz: %0d decisions, smallest |metric| %0d",
             rate, m, l, fd_hz, matched - matched_before, min_mag);
  endtask

  initial begin
    //  rate mode        L   f_d      symbols noise min |metric|
    run(0, DELAY_T_T,  1,   0.0,     50, 0.0,  40 * 40);
    run(0, DELAY_T_T,  1,   5.0e3,   50, 0.3,  0);
    run(0, DELAY_2T_T, 1,  -8.0e3,   60, 0.4,  0);
    run(1, DELAY_T_T,  1,   0.0,     40, 0.6,  0);
    run(2, DELAY_2T_T, 25,  2.0e3,   30, 0.6,  0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
