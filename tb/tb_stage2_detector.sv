// Self-checking testbench for stage2_detector: for random symbol sums I_n,
// Q_n the decision statistic must be I_n*I_{n-1} + Q_n*Q_{n-1} and the bit
// its sign (1 for negative), one clock after in_valid.
module tb_stage2_detector;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [16:0] i_n = 0, q_n = 0;
  logic j_bit, j_valid;
  logic signed [34:0] metric;
  int checks = 0, failures = 0;

  stage2_detector dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .i_n(i_n),
                       .q_n(q_n), .j_bit(j_bit), .j_valid(j_valid), .metric(metric));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ip = 0, qp = 0, m;
    int ones = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int lim;
      lim = (t < 1500) ? 40 : 40000;
      in_valid = ($urandom % 3 == 0);
      i_n = 17'($signed($urandom % (2 * lim + 1)) - lim);
      q_n = 17'($signed($urandom % (2 * lim + 1)) - lim);
      m = longint'(i_n) * ip + longint'(q_n) * qp;
      @(posedge clk); #1;
      checks++;
      if (j_valid !== in_valid) failures++;
      if (in_valid) begin
        checks += 2;
        if (j_bit !== (m < 0)) begin failures++; if (failures < 5) $display("j_bit %b m %0d", j_bit, m); end
        if (longint'(metric) != m) begin failures++; if (failures < 5) $display("metric %0d exp %0d", metric, m); end
        if (m < 0) ones++;
        ip = i_n; qp = q_n;
      end
    end
    checks++;
    if (ones < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
