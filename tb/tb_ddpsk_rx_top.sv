// End-to-end testbench of the DDPSK receiver at its default parameters.
//
// A transmitter model double-differentially encodes framed data ('1010..'
// preamble, then 8 data bits plus the inserted '10'), maps d_n to a carrier
// phase of 0 or pi and produces the A/D input: a carrier at f_i + f_d
// (f_i = fs/4 = 1 MHz, f_d a Doppler offset of several kHz) with a random
// initial phase and Gaussian noise. The data waveform, aligned with the
// received symbols, drives the timing input, with single-sample glitches
// that the timing circuit must reject.
//
// Runs (each from reset): 100 kb/s (T,T) L=2 (K=20) with the data pattern
// 10010110, without Doppler (an even L keeps only two of the four carrier
// phases and gives up the Doppler immunity); 100 kb/s (2T,T) and (T,T),
// L=1, with -+10 kHz Doppler, the latter with a slow transmitter symbol
// clock;
// 10 kb/s (T,T) L=5 with a fast transmitter symbol clock; 1 kb/s (2T,T)
// L=125; 0.1 kb/s (T,T) L=625 (K=64) with the Doppler offset ramping
// from +10 kHz at -1 kHz/s (the offset error of the first stage then moves
// by 2*pi*1 kHz/s*T^2 = 0.63 rad from symbol to symbol); and 100 kb/s (2T,T) L=1 with the
// 435 MHz carrier itself sampled at 4 MHz (subsampling: 435 MHz is 108.75
// cycles per sample, so it aliases to fs/4 with the spectrum mirrored).
// Every decided bit after the start-up symbols must equal the transmitted
// a_n; the receiver must deliver exactly one decision per symbol. The
// testbench also counts that each mechanism happened: each rate selected,
// both delay modes, decimation on and off, Doppler offsets of both signs,
// the subsampled input, a Doppler rate,
// timing phase corrections both ways and rejected glitches.
module tb_ddpsk_rx_top;
  import ddpsk_pkg::*;

  localparam real PI = 3.14159265358979;

  logic        clk = 0, rst_n = 0, timing_in = 0;
  real         vin = 0.0;
  delay_mode_e mode = DELAY_T_T;
  logic [15:0] dec_ratio = 16'd2;
  logic        data_bit, data_valid, t_clk, timing_locked;
  rate_e       rate_sel;

  int checks = 0, failures = 0;
  int cyc = 0;

  // transmitted symbols of the current run
  logic a [$];
  int   sym_start [$];
  int   bits_ok = 0, bits_bad = 0, decisions = 0, matched = 0;
  // mechanism counters
  int seen_rate [4] = '{0, 0, 0, 0};
  int seen_mode [2] = '{0, 0};
  int n_up = 0, n_dn = 0, n_glitch = 0, n_dec_on = 0, n_dec_off = 0, n_dop_pos = 0, n_dop_neg = 0, n_subsamp = 0, n_dop_rate = 0;

  ddpsk_rx_top dut (
    .clk(clk), .rst_n(rst_n), .vin(vin), .timing_in(timing_in), .mode(mode),
    .dec_ratio(dec_ratio), .data_bit(data_bit), .data_valid(data_valid),
    .t_clk(t_clk), .rate_sel(rate_sel), .timing_locked(timing_locked)
  );

  always #125 clk = ~clk;   // 4 MHz sample clock (1 ns units)

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Check every decision against the symbol that ended at the latest
  // recovered boundary (the decision comes 4 clocks after it).
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
      decisions++;
      if (m >= 10 && best < samples_per_symbol(int'(rate_sel)) / 4) begin
        matched++;
        checks++;
        if (data_bit !== a[m-1]) begin
          bits_bad++;
          failures++;
          if (bits_bad < 10) $display("cycle %0d: symbol %0d decided %b, sent %b", cyc, m - 1, data_bit, a[m-1]);
        end else bits_ok++;
      end
    end
    if (rst_n && dut.u_bb.pd_up) n_up++;
    if (rst_n && dut.u_bb.pd_dn) n_dn++;
  end

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom % 1000000) + 1.0) / 1000001.0;
    u2 = real'($urandom % 1000000) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  // One run: reset, then transmit nsym symbols.
  task automatic run(input int rate, input delay_mode_e m, input int l, input real fd_hz,
                     input int nsym, input bit fig9, input int drift, input real sigma,
                     input real fc_hz = 1.0e6, input real fd_rate = 0.0);
    int   sps;
    logic c_prev, d1, d2;
    real  w, ph, cyc_per_sample;
    int   k_glob;
    logic tin_next;
    int   dec_before, checks_before, bad_before;
    sps = samples_per_symbol(rate);
    a.delete();
    sym_start.delete();
    rst_n = 0; mode = m; dec_ratio = 16'(l); vin = 0.0; timing_in = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    dec_before = matched;
    bad_before = bits_bad;
    checks_before = checks;
    c_prev = 0; d1 = 0; d2 = 0;
    ph = 2.0 * PI * real'($urandom % 1000) / 1000.0;
    k_glob = 0;
    tin_next = 0;
    for (int n = 0; n < nsym; n++) begin
      logic an, cn, dn_;
      int   len, pos;
      // framing: 16 preamble bits 1010.., then 8 data bits + '10'
      if (n < 16) an = 1'(~n & 1);
      else begin
        pos = (n - 16) % 10;
        if (pos == 8)      an = 1'b1;
        else if (pos == 9) an = 1'b0;
        else if (fig9)     an = 1'((8'b1001_0110 >> (7 - pos)) & 1);
        else               an = 1'($urandom);
      end
      a.push_back(an);
      cn = an ^ c_prev;
      dn_ = (m == DELAY_2T_T) ? (cn ^ d2) : (cn ^ d1);
      c_prev = cn; d2 = d1; d1 = dn_;
      len = sps + ((n % 8 == 7) ? drift : 0);
      for (int k = 0; k < len; k++) begin
        @(posedge clk); #1;
        // the A/D registers vin, so the receiver sees this symbol from the
        // next clock on: the timing input follows one clock later
        if (k == 0) sym_start.push_back(cyc + 1);
        vin = $cos(ph + (dn_ ? PI : 0.0)) + sigma * gauss();
        // carrier phase step, with the Doppler offset ramping at fd_rate
        // Hz/s, reduced modulo one cycle (a 435 MHz carrier sampled at
        // 4 MHz advances 108.75 cycles per sample)
        cyc_per_sample = (fc_hz + fd_hz + fd_rate * real'(k_glob) / real'(FS_HZ)) / real'(FS_HZ);
        w = 2.0 * PI * (cyc_per_sample - $floor(cyc_per_sample));
        ph = ph + w;
        if (ph > 2.0 * PI) ph = ph - 2.0 * PI;
        timing_in = tin_next;
        if (k == len / 2 && ($urandom % 4 == 0)) begin
          timing_in = ~tin_next;
          n_glitch++;
        end
        tin_next = an;
        k_glob++;
      end
    end
    repeat (8) @(posedge clk);
    #1;
    seen_rate[rate] += (rate_sel == rate_e'(rate)) ? 1 : 0;
    seen_mode[m]++;
    if (l > 1) n_dec_on++; else n_dec_off++;
    if (fd_hz > 0.0) n_dop_pos++;
    if (fd_hz < 0.0) n_dop_neg++;
    if (fc_hz > real'(FS_HZ)) n_subsamp++;
    if (fd_rate != 0.0) n_dop_rate++;
    // one decision per symbol once locked
    checks++;
    if (matched - dec_before != nsym - 10) begin
      failures++;
      $display("rate %0d: %0d decisions for %0d symbols", rate, matched - dec_before, nsym - 10);
    end
    checks++;
    if (!timing_locked || rate_sel != rate_e'(rate)) begin
      failures++;
      $display("rate %0d: locked %b, selected rate %0d", rate, timing_locked, rate_sel);
    end
    $display("run rate %0d mode %0d L %0d carrier %0.3f MHz fd %0.0f Hz: %0d bits checked, %0d errors",
             rate, m, l, fc_hz / 1.0e6, fd_hz, checks - checks_before - 2, bits_bad - bad_before);
  endtask

  initial begin
    //  rate mode        L    f_d      symbols fig9 drift noise
    run(0, DELAY_T_T,  2,    0.0,     70, 1,  0,  0.2);
    run(0, DELAY_2T_T, 1,   -10.0e3,  70, 0,  0,  0.3);
    run(0, DELAY_T_T,  1,    10.0e3,  70, 0,  1,  0.3);
    run(1, DELAY_T_T,  5,    3.3e3,   50, 0, -10, 0.5);
    run(2, DELAY_2T_T, 125, -770.0,   40, 0,  0,  0.5);
    run(3, DELAY_T_T,  625,  10.0e3,  30, 0,  0,  0.5, 1.0e6, -1.0e3);
    run(0, DELAY_2T_T, 1,    7.0e3,   60, 0,  0,  0.3, 435.0e6);
    // every mechanism must have occurred
    checks += 12;
    foreach (seen_rate[r]) if (seen_rate[r] == 0) begin failures++; $display("rate %0d never selected", r); end
    foreach (seen_mode[i]) if (seen_mode[i] == 0) begin failures++; $display("mode %0d never used", i); end
    if (n_up == 0 || n_dn == 0) begin failures++; $display("phase corrections up %0d dn %0d", n_up, n_dn); end
    if (n_glitch == 0) begin failures++; $display("no glitches"); end
    if (n_dec_on == 0 || n_dec_off == 0) begin failures++; $display("decimation not exercised"); end
    if (n_dop_pos == 0 || n_dop_neg == 0) begin failures++; $display("Doppler signs not exercised"); end
    if (n_subsamp == 0) begin failures++; $display("subsampled input not exercised"); end
    if (n_dop_rate == 0) begin failures++; $display("Doppler rate not exercised"); end
    $display("bits ok %0d, bit errors %0d, phase corrections up %0d dn %0d, glitches %0d",
             bits_ok, bits_bad, n_up, n_dn, n_glitch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
