// Self-checking testbench for reset_circuit: for a symbol clock with
// random periods, dec_sync must pulse one clock after each rising edge of
// t_clk and acc_dump one clock after that, and never otherwise.
module tb_reset_circuit;
  logic clk = 0, rst_n = 0, t_clk = 0, dec_sync, acc_dump;
  int checks = 0, failures = 0;
  logic hist [0:4095];

  reset_circuit dut (.clk(clk), .rst_n(rst_n), .t_clk(t_clk),
                     .dec_sync(dec_sync), .acc_dump(acc_dump));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t = 0;
    int edges = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;   // t_clk low for one clock after reset
    hist[0] = 0; hist[1] = 0; hist[2] = 0;
    t = 3;
    while (t < 4000) begin
      automatic int hi = 2 + $urandom % 30;
      automatic int lo = 2 + $urandom % 30;
      for (int k = 0; k < hi + lo && t < 4000; k++) begin
        logic e1, e2;
        t_clk = (k < hi);
        hist[t] = t_clk;
        @(posedge clk); #1;
        // rising edge seen at t-1 -> dec_sync now; at t-2 -> acc_dump now
        e1 = hist[t] & ~hist[t-1];
        e2 = hist[t-1] & ~hist[t-2];
        if (e1) edges++;
        checks += 2;
        if (dec_sync !== e1) begin failures++; if (failures < 5) $display("t %0d dec_sync=%b exp %b", t, dec_sync, e1); end
        if (acc_dump !== e2) begin failures++; if (failures < 5) $display("t %0d acc_dump=%b exp %b", t, acc_dump, e2); end
        t++;
      end
    end
    checks++;
    if (edges < 50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
