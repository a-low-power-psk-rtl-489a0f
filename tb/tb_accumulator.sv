// Self-checking testbench for accumulator: random valid bits are counted
// up (1) and down (0); at each dump the count of the finished symbol must
// appear on sum one clock later and counting must restart with the dump
// sample. Also checks the full 0.1 kb/s count range (40000 equal bits).
module tb_accumulator;
  logic clk = 0, rst_n = 0, dump = 0, in_valid = 0, in_bit = 0;
  logic signed [16:0] sum;
  logic sum_valid;
  int checks = 0, failures = 0;

  accumulator dut (.clk(clk), .rst_n(rst_n), .dump(dump), .in_valid(in_valid),
                   .in_bit(in_bit), .sum(sum), .sum_valid(sum_valid));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic d, input logic v, input logic b, inout int model,
                      inout int expect_sum, inout logic expect_valid);
    dump = d; in_valid = v; in_bit = b;
    expect_valid = d;
    if (d) begin
      expect_sum = model;
      model = v ? (b ? 1 : -1) : 0;
    end else if (v) begin
      model += b ? 1 : -1;
    end
    @(posedge clk); #1;
    checks++;
    if (sum_valid !== expect_valid || (expect_valid && sum !== 17'(expect_sum))) begin
      failures++;
      if (failures < 5) $display("sum_valid=%b sum=%0d expected %b %0d", sum_valid, sum, expect_valid, expect_sum);
    end
  endtask

  initial begin
    int model = 0, es = 0;
    logic ev = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 3000; t++)
      step(($urandom % 23) == 0, 1'($urandom), 1'($urandom), model, es, ev);
    // full range: one symbol of 40000 samples, all +1, then all -1
    step(1, 1, 1, model, es, ev);
    for (int t = 1; t < 40000; t++) step(0, 1, 1, model, es, ev);
    step(1, 1, 0, model, es, ev);
    if (es != 40000) failures++;
    for (int t = 1; t < 40000; t++) step(0, 1, 0, model, es, ev);
    step(1, 0, 0, model, es, ev);
    checks++;
    if (sum !== -17'sd40000) begin
      failures++;
      $display("full-range count %0d", sum);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
