// tb_counter_unit - carrier sequence, period length, trigger and direction.
// For several Tm values it checks cycle by cycle that the count follows
// Tm, Tm-1, ..., 0, ..., Tm-1 (period 2*Tm), that trigger is high exactly in
// the last cycle of a period, that c_direct is high in the falling half, that
// a new Tm is taken only at a period boundary, and that disabling stops it.
module tb_counter_unit;
  import svm_pkg::*;

  logic clk = 1'b0, reset = 1'b1, enable = 1'b0;
  cnt_t tm = 16'd5;
  cnt_t count;
  logic trigger, c_direct, running;
  int checks = 0, failures = 0;

  counter_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // Follow nper periods of peak p; the start cycle is the cycle in which
  // 'trigger' announced the boundary.
  task automatic run_periods(int p, int nper, int next_p);
    for (int n = 0; n < nper; n++) begin
      for (int c = 0; c < 2 * p; c++) begin
        int exp_cnt;
        exp_cnt = (c < p) ? p - c : c - p;
        @(posedge clk); #1;
        if (c == p) tm = cnt_t'($urandom_range(1, 600));  // ignored mid-period
        if (c == 2 * p - 1) tm = (n == nper - 1) ? cnt_t'(next_p) : cnt_t'(p);
        expect_eq(int'(count), exp_cnt, "count");
        expect_eq(int'(c_direct), int'(c < p), "c_direct");
        expect_eq(int'(trigger), int'(c == 2 * p - 1), "trigger");
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;
    @(posedge clk); #1;
    expect_eq(int'(running), 0, "idle");
    expect_eq(int'(trigger), 0, "idle trigger");
    enable = 1'b1;
    #1 expect_eq(int'(trigger), 1, "start trigger");
    // peaks written in the middle of a period take no effect
    run_periods(5, 3, 1);
    run_periods(1, 3, 300);
    run_periods(300, 2, 4);
    run_periods(4, 2, 4);
    // stop and restart
    enable = 1'b0;
    @(posedge clk); #1;
    expect_eq(int'(running), 0, "stopped");
    expect_eq(int'(c_direct), 0, "stopped c_direct");
    tm = 16'd3;
    enable = 1'b1;
    #1 expect_eq(int'(trigger), 1, "restart trigger");
    run_periods(3, 3, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
