// Bit error rate of the complete receiver against signal-to-noise ratio,
// for the accumulator sizes K = 20, 64 and about 128.
//
// A transmitter model sends framed random data ('1010..' preamble, then 8
// data bits plus the inserted '10') double-differentially encoded on a
// carrier at fs/4 with independent Gaussian noise on every sample. The SNR
// is counted over the samples the accumulator uses: with carrier amplitude
// A and noise deviation sigma per sample, SNR = K*A^2/(4*sigma^2) (the
// energy of K samples against the noise they collect), so that the
// different K are compared at equal SNR.
//
// Alongside the receiver the testbench runs its own reference of the
// detection algorithm on the same 1-bit samples, with ideal symbol
// boundaries and the same L and delay mode. Checks:
// - the receiver's decisions agree with the reference on at least 97 % of
//   the symbols at every point (they can differ only where the timing
//   recovery places a boundary a few samples off and the metric is small);
// - the receiver's bit error rate falls as the SNR rises;
// - at the highest SNR point of each K the error rate is below 1 % (one
//   error allowed on the shorter low-rate runs), and at the lowest point of
//   the K = 20 sweep errors do occur (the noise matters);
// - exactly one decision per symbol.
//
// Points: K = 20 (100 kb/s, L = 2) at 6, 9, 12 and 15 dB in (T,T) and at 9
// and 12 dB in (2T,T); K = 64 (0.1 kb/s, L = 625) at 9 and 15 dB; K = 129
// (0.1 kb/s, L = 312, the nearest to 128 at fs = 4 MHz) at 12 dB. The
// carrier phase is fixed (0.3 rad) so that the points differ only in noise.
module tb_ddpsk_ber;
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

  logic a [$];
  logic ref_bit [$];
  int   sym_start [$];
  int   matched = 0, errs = 0, agree = 0;

  ddpsk_rx_top dut (
    .clk(clk), .rst_n(rst_n), .vin(vin), .timing_in(timing_in), .mode(mode),
    .dec_ratio(dec_ratio), .data_bit(data_bit), .data_valid(data_valid),
    .t_clk(t_clk), .rate_sel(rate_sel), .timing_locked(timing_locked)
  );

  always #125 clk = ~clk;

  initial begin
    repeat (14000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Receiver decisions against the sent bits and the reference decisions.
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
        matched++;
        if (data_bit !== a[m-1]) errs++;
        if (m - 1 < ref_bit.size() && data_bit === ref_bit[m-1]) agree++;
      end
    end
  end

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom % 1000000) + 1.0) / 1000001.0;
    u2 = real'($urandom % 1000000) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  real ber_prev;

  // One point: reset, transmit nsym symbols at the given SNR, return the
  // receiver's bit error rate.
  task automatic point(input int rate, input delay_mode_e m, input int l, input real snr_db,
                       input int nsym, output real ber);
    int   sps, dly, k_glob, kk;
    logic c_prev, d1, d2, tin_next;
    real  w, sigma;
    bit   r [];
    int   i_prev, q_prev;
    int   matched_before, errs_before, agree_before, n_dec;
    real  agree_frac;
    sps = samples_per_symbol(rate);
    dly = (m == DELAY_2T_T) ? 2 * sps : sps;
    kk = (sps + l - 1) / l;
    sigma = $sqrt(real'(kk) / (4.0 * (10.0 ** (snr_db / 10.0))));
    a.delete();
    ref_bit.delete();
    sym_start.delete();
    r = new[nsym * sps];
    rst_n = 0; mode = m; dec_ratio = 16'(l); vin = 0.0; timing_in = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    matched_before = matched; errs_before = errs; agree_before = agree;
    c_prev = 0; d1 = 0; d2 = 0; tin_next = 0;
    w = 2.0 * PI * (1.0e6) / real'(FS_HZ);
    k_glob = 0;
    i_prev = 0; q_prev = 0;
    for (int n = 0; n < nsym; n++) begin
      logic an, cn, dn_;
      int   pos, si, sq, metric;
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
        if (k == 0) sym_start.push_back(cyc + 1);
        vin = $cos(w * real'(k_glob) + 0.3 + (dn_ ? PI : 0.0)) + sigma * gauss();
        r[k_glob] = (vin > 0.0);
        timing_in = tin_next;
        tin_next = an;
        k_glob++;
      end
      // reference: integrate the kept products of this symbol
      si = 0; sq = 0;
      for (int k = 0; k < sps; k += l) begin
        int kg;
        kg = n * sps + k;
        if (kg - dly - 1 >= 0) begin
          si += (r[kg] == r[kg - dly]) ? 1 : -1;
          sq += (r[kg] == r[kg - dly - 1]) ? 1 : -1;
        end
      end
      metric = si * i_prev + sq * q_prev;
      ref_bit.push_back(metric < 0);
      i_prev = si; q_prev = sq;
    end
    repeat (8) @(posedge clk);
    #1;
    n_dec = matched - matched_before;
    ber = real'(errs - errs_before) / real'(n_dec > 0 ? n_dec : 1);
    agree_frac = real'(agree - agree_before) / real'(n_dec > 0 ? n_dec : 1);
    checks += 2;
    if (n_dec != nsym - 10) begin
      failures++;
      $display("rate %0d: %0d decisions for %0d symbols", rate, n_dec, nsym - 10);
    end
    if (agree_frac < 0.97) begin
      failures++;
      $display("rate %0d K %0d %0.0f dB: only %0.3f agreement with the reference", rate, kk, snr_db, agree_frac);
    end
    $display("K %0d mode %0d SNR %0.0f dB: %0d bits, %0d errors, BER %0.4f, agreement with reference %0.4f",
             kk, m, snr_db, n_dec, errs - errs_before, ber, agree_frac);
  endtask

  task automatic expect_lower(input real hi_snr_ber, input real lo_snr_ber, input string what);
    checks++;
    if (!(hi_snr_ber < lo_snr_ber)) begin
      failures++;
      $display("%s: BER %0.4f at the higher SNR is not below %0.4f", what, hi_snr_ber, lo_snr_ber);
    end
  endtask

  task automatic expect_below(input real ber, input real bound, input string what);
    checks++;
    if (!(ber < bound)) begin
      failures++;
      $display("%s: BER %0.4f not below %0.4f", what, ber, bound);
    end
  endtask

  initial begin
    real b6, b9, b12, b15, c9, c12, e9, e15, f12;
    point(0, DELAY_T_T,  2,   6.0,  610, b6);
    point(0, DELAY_T_T,  2,   9.0,  610, b9);
    point(0, DELAY_T_T,  2,   12.0, 610, b12);
    point(0, DELAY_T_T,  2,   15.0, 610, b15);
    point(0, DELAY_2T_T, 2,   9.0,  610, c9);
    point(0, DELAY_2T_T, 2,   12.0, 610, c12);
    point(3, DELAY_T_T,  625, 9.0,  70,  e9);
    point(3, DELAY_T_T,  625, 15.0, 70,  e15);
    point(3, DELAY_T_T,  312, 12.0, 50,  f12);
    expect_lower(b9, b6, "K=20 (T,T) 9 dB vs 6 dB");
    expect_lower(b12, b9, "K=20 (T,T) 12 dB vs 9 dB");
    expect_lower(c12, c9, "K=20 (2T,T) 12 dB vs 9 dB");
    checks++;
    if (b6 == 0.0) begin failures++; $display("no errors at 6 dB"); end
    expect_below(b15, 0.01, "K=20 (T,T) 15 dB");
    expect_lower(e15, e9, "K=64 15 dB vs 9 dB");
    expect_below(e15, 0.01 + 1.0 / 60.0, "K=64 15 dB");
    expect_below(f12, 0.01 + 1.0 / 40.0, "K=129 12 dB");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
