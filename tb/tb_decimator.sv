// Self-checking testbench for decimator: for several ratios L and random
// sync pulses, exactly every L-th sample counted from the last sync (and
// the sync sample itself) must be forwarded, one clock later, unchanged.
module tb_decimator;
  logic clk = 0, rst_n = 0, sync = 0, in_i = 0, in_q = 0;
  logic [15:0] ratio = 1;
  logic out_valid, out_i, out_q;
  int checks = 0, failures = 0;

  decimator dut (.clk(clk), .rst_n(rst_n), .ratio(ratio), .sync(sync),
                 .in_i(in_i), .in_q(in_q),
                 .out_valid(out_valid), .out_i(out_i), .out_q(out_q));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned ratios [5] = '{1, 2, 3, 5, 20};
    int since;        // samples since the last sync (model)
    logic exp_valid, exp_i, exp_q;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    foreach (ratios[r]) begin
      ratio = 16'(ratios[r]);
      since = 0;
      exp_valid = 0;
      // first sample is a sync so the model starts in phase
      for (int t = 0; t < 1000; t++) begin
        sync = (t == 0) || ($urandom % 37 == 0);
        in_i = 1'($urandom);
        in_q = 1'($urandom);
        if (sync) since = 0;
        exp_valid = (since % ratios[r] == 0);
        exp_i = in_i; exp_q = in_q;
        since++;
        @(posedge clk); #1;
        checks++;
        if (out_valid !== exp_valid || (exp_valid && (out_i !== exp_i || out_q !== exp_q))) begin
          failures++;
          if (failures < 5) $display("L=%0d t=%0d valid=%b exp %b", ratios[r], t, out_valid, exp_valid);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
