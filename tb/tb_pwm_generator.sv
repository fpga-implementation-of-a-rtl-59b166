// tb_pwm_generator - comparison levels against cumulative thresholds.
// Loads random dwell counts, then sweeps the carrier over its whole range and
// checks level[k] = (count < t0 + t4 + ... + t(k+1)) for every k. Also checks
// that thresholds change only on 'load'.
module tb_pwm_generator;
  import svm_pkg::*;

  logic clk = 1'b0, reset = 1'b1, load = 1'b0;
  dwell_t t;
  cnt_t count = '0;
  logic [NSEG-1:0] level;
  int checks = 0, failures = 0;

  pwm_generator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int thr [5];
    t = '0;
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;
    for (int n = 0; n < 40; n++) begin
      int p;
      p = (n % 4 == 0) ? 65535 : $urandom_range(10, 3000);
      for (int k = 0; k < 5; k++) t[k] = cnt_t'($urandom_range(0, p / 3));
      if (n % 5 == 0) t[2] = '0;           // zero-length segment
      thr[4] = int'(t[0]);
      thr[3] = thr[4] + int'(t[4]);
      thr[2] = thr[3] + int'(t[3]);
      thr[1] = thr[2] + int'(t[2]);
      thr[0] = thr[1] + int'(t[1]);
      load = 1'b1;
      @(posedge clk); #1;
      load = 1'b0;
      t = '0;                               // must not matter any more
      for (int c = 0; c <= p; c += (p > 5000 ? 37 : 1)) begin
        count = cnt_t'(c);
        #1;
        for (int k = 0; k < 5; k++) begin
          checks++;
          if (level[k] != (c < thr[k])) begin
            failures++;
            $display("count %0d level%0d=%0d thr %0d", c, k, level[k], thr[k]);
          end
        end
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
