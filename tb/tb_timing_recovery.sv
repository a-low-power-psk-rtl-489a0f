// Self-checking testbench for timing_recovery.
//
// Drives a framed data signal at the sample rate: for each of the four
// data rates in turn (100, 10, 1, 0.1 kb/s, without reset in between) a
// '1010..' preamble followed by frames of 8 random bits plus the inserted
// '10'. The transmitter's symbol clock is off (every 4th symbol is one
// divider tick longer at 100 kb/s and 1 kb/s, one tick shorter at 10 kb/s
// and 0.1 kb/s) so the phase detector has to keep correcting, and
// single-sample glitches are added inside symbols, which the pulse filter
// must reject. Checks, once each rate has settled: the selected rate, and
// that every rising edge of T_clk lies within T/10 of a true symbol
// boundary (the document's timing-offset goal). It also counts that rate
// changes, phase corrections and glitches actually occurred.
module tb_timing_recovery;
  import ddpsk_pkg::*;
  logic clk = 0, rst_n = 0, sig_in = 0;
  logic t_clk, aligned, y_rise, up, dn, rate_change;
  rate_e sel;
  int checks = 0, failures = 0;
  int cyc = 0;

  typedef struct { int c; int rate; } mark_t;
  mark_t bounds [$];      // true symbol boundaries that are settled
  int    edges  [$];      // T_clk rising edges
  rate_e edge_sel [$];
  int n_up = 0, n_dn = 0, n_rc = 0, n_glitch = 0;
  logic t_clk_q = 1;

  timing_recovery dut (.clk(clk), .rst_n(rst_n), .sig_in(sig_in), .t_clk(t_clk), .sel(sel),
    .aligned(aligned), .y_rise(y_rise), .up(up), .dn(dn), .rate_change(rate_change));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    #2;
    cyc++;
    if (rst_n) begin
      if (t_clk && !t_clk_q) begin edges.push_back(cyc); edge_sel.push_back(sel); end
      if (up) n_up++;
      if (dn) n_dn++;
      if (rate_change) n_rc++;
    end
    t_clk_q = t_clk;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Drive one symbol of value b lasting len samples, glitching one sample
  // in its middle now and then. sig_in is changed right after a clock edge,
  // so the boundary cycle is the one whose edge first samples the new bit.
  task automatic send(input logic b, input int len, input bit settled, input int rate);
    for (int k = 0; k < len; k++) begin
      @(posedge clk); #1;
      if (k == 0 && settled) bounds.push_back('{cyc + 1, rate});
      sig_in = b;
      if (k == len / 2 && len >= 40 && ($urandom % 3 == 0)) begin
        sig_in = ~b;
        n_glitch++;
      end
    end
  endtask

  initial begin
    int nsym [4] = '{60, 40, 30, 26};
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int r = 0; r < 4; r++) begin
      automatic int sps = samples_per_symbol(r);
      automatic int n = 0;
      // preamble
      for (int i = 0; i < 16; i++, n++)
        send(1'(~i & 1), sps + ((n % 4 == 3) ? ((r % 2 == 0) ? sps / 40 : -(sps / 40)) : 0), n >= 14, r);
      while (n < nsym[r]) begin
        for (int i = 0; i < 10 && n < nsym[r]; i++, n++) begin
          automatic logic b = (i == 8) ? 1'b1 : (i == 9) ? 1'b0 : 1'($urandom);
          send(b, sps + ((n % 4 == 3) ? ((r % 2 == 0) ? sps / 40 : -(sps / 40)) : 0), n >= 14, r);
        end
      end
    end
    @(posedge clk);
    // ---- analysis ----
    foreach (edges[i]) begin
      automatic int best = 1 << 30;
      automatic int rate = -1;
      foreach (bounds[j]) begin
        automatic int d = edges[i] - bounds[j].c;
        if (d < 0) d = -d;
        if (d < best) begin best = d; rate = bounds[j].rate; end
      end
      // only edges inside a settled stretch of one rate
      if (rate >= 0 && best < samples_per_symbol(rate) / 2) begin
        checks += 2;
        if (best > samples_per_symbol(rate) / 10) begin
          failures++;
          $display("edge at %0d is %0d samples off (rate %0d)", edges[i], best, rate);
        end
        if (edge_sel[i] != rate_e'(rate)) begin
          failures++;
          $display("edge at %0d: sel %0d, rate %0d", edges[i], edge_sel[i], rate);
        end
      end
    end
    $display("edges %0d, settled boundaries %0d, up %0d, dn %0d, rate changes %0d, glitches %0d",
             edges.size(), bounds.size(), n_up, n_dn, n_rc, n_glitch);
    checks += 4;
    if (checks < 100)       begin failures++; $display("too few edges checked"); end
    if (n_rc < 3)           begin failures++; $display("rate changes missing"); end
    if (n_up == 0 || n_dn == 0) begin failures++; $display("phase corrections missing"); end
    if (n_glitch == 0)      begin failures++; $display("no glitch injected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
