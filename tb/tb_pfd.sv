// Self-checking testbench for pfd: for every divide-by-40 phase p and rate
// selection, a transition must give dn when the clock is ahead (wrapped
// error > 0), up when it is behind (< 0) and neither when aligned; no
// output without a transition or before the clock is aligned.
module tb_pfd;
  logic clk = 0, rst_n = 0, y_rise = 0, enable = 0;
  logic [1:0] sel = 0;
  logic [5:0] p = 0;
  logic up, dn;
  logic signed [6:0] err;
  int checks = 0, failures = 0;

  pfd #(.NDIV(40), .IDEAL_P0(3)) dut (.clk(clk), .rst_n(rst_n), .y_rise(y_rise), .enable(enable),
               .sel(sel), .p(p), .up(up), .dn(dn), .err(err));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      int e, ideal;
      logic eu, ed;
      sel = 2'($urandom);
      p = 6'($urandom % 40);
      y_rise = ($urandom % 2 == 0);
      enable = ($urandom % 8 != 0);
      ideal = (sel == 0) ? 3 : 0;
      e = int'(p) - ideal;
      if (e >= 20) e -= 40;
      if (e < -20) e += 40;
      eu = y_rise && enable && (e < 0);
      ed = y_rise && enable && (e > 0);
      @(posedge clk); #1;
      checks += 2;
      if (up !== eu) begin failures++; if (failures < 5) $display("p %0d sel %0d up %b exp %b", p, sel, up, eu); end
      if (dn !== ed) begin failures++; if (failures < 5) $display("p %0d sel %0d dn %b exp %b", p, sel, dn, ed); end
      if (y_rise && enable) begin
        checks++;
        if (int'(err) != e) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
