// Self-checking testbench for stage1_detector: with random samples r_k,
// x_i must be r_k XNOR r_{k-D} and y_q must be r_k XNOR r_{k-D-1}, one
// clock later, with D = T or 2T (T = 40 or 400 samples) by mode and rate.
module tb_stage1_detector;
  import ddpsk_pkg::*;
  logic clk = 0, rst_n = 0, rk = 0, x_i, y_q;
  logic [1:0] sel = 0;
  delay_mode_e mode = DELAY_T_T;
  int checks = 0, failures = 0;
  logic hist [];

  stage1_detector dut (.clk(clk), .rst_n(rst_n), .mode(mode), .sel(sel),
                       .rk(rk), .x_i(x_i), .y_q(y_q));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int run = 0; run < 4; run++) begin
      int d, len;
      sel  = (run < 2) ? 2'd0 : 2'd1;
      mode = (run % 2 == 0) ? DELAY_T_T : DELAY_2T_T;
      d    = ((sel == 0) ? 40 : 400) * ((mode == DELAY_2T_T) ? 2 : 1);
      len  = d + 400;
      hist = new[len];
      rst_n = 0; rk = 0;
      repeat (2) @(posedge clk);
      #1 rst_n = 1;
      for (int t = 0; t < len; t++) begin
        @(posedge clk); #1;
        // Outputs now show the products of the sample driven at t-1.
        if (t >= d + 2) begin
          checks += 2;
          if (x_i !== ~(hist[t-1] ^ hist[t-1-d])) begin
            failures++;
            if (failures < 5) $display("run %0d t %0d: x_i=%b", run, t, x_i);
          end
          if (y_q !== ~(hist[t-1] ^ hist[t-2-d])) begin
            failures++;
            if (failures < 5) $display("run %0d t %0d: y_q=%b", run, t, y_q);
          end
        end
        hist[t] = 1'($urandom);
        rk = hist[t];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
