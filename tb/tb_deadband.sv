// tb_deadband - gate pairs against a cycle model of the dead time.
// Random leg requests (long and short pulses) with dead times of 0, 1,
// 100 (1 us at 100 MHz), 145, 256 and an over-range value that must
// saturate at 256. Model: after a request changes, both gates of the leg stay
// off for the dead time, then the requested gate turns on; if the request
// changes again the wait restarts. Every cycle every gate is compared, and no
// leg may ever have both gates on.
module tb_deadband;
  import svm_pkg::*;

  localparam int LEGS = 6;
  logic clk = 1'b0, reset = 1'b1, enable = 1'b0;
  cnt_t tdb = '0;
  logic [LEGS-1:0] pwm_s = '0, pwm, pwm_n;
  int checks = 0, failures = 0;

  deadband #(.DB_MAX(256), .LEGS(LEGS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int since [LEGS];          // cycles since the request of a leg last changed
  logic [LEGS-1:0] prev_s;
  int dead_seen;

  task automatic run_case(int d, int ncycles, int maxpulse);
    int dt;
    int hold [LEGS];
    dt = (d > 256) ? 256 : d;
    tdb = cnt_t'(d);
    for (int i = 0; i < LEGS; i++) begin since[i] = 1000; hold[i] = 0; end
    prev_s = '0;
    pwm_s = '0;
    enable = 1'b1;
    for (int c = 0; c < ncycles; c++) begin
      // drive the request for this cycle
      for (int i = 0; i < LEGS; i++) begin
        if (hold[i] == 0) begin
          pwm_s[i] = ~pwm_s[i];
          hold[i] = $urandom_range(1, maxpulse);
        end
        hold[i]--;
      end
      for (int i = 0; i < LEGS; i++)
        since[i] = (pwm_s[i] != prev_s[i]) ? 0 : since[i] + 1;
      prev_s = pwm_s;
      @(posedge clk); #1;
      for (int i = 0; i < LEGS; i++) begin
        logic eu, el;
        eu = (since[i] >= dt) &&  pwm_s[i];
        el = (since[i] >= dt) && !pwm_s[i];
        checks++;
        if (pwm[i] != eu || pwm_n[i] != el) begin
          failures++;
          if (failures < 10)
            $display("d=%0d leg %0d: gates %b%b expected %b%b", d, i, pwm[i], pwm_n[i], eu, el);
        end
        if (!pwm[i] && !pwm_n[i]) dead_seen++;
        checks++;
        if (pwm[i] && pwm_n[i]) begin failures++; $display("shoot-through"); end
      end
    end
    // both gates off while disabled
    enable = 1'b0;
    @(posedge clk); #1;
    checks++;
    if (pwm != '0 || pwm_n != '0) begin failures++; $display("gates on while disabled"); end
  endtask

  initial begin
    dead_seen = 0;
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;
    run_case(0, 2000, 20);
    run_case(1, 2000, 20);
    run_case(100, 20000, 400);
    run_case(145, 20000, 400);
    run_case(256, 30000, 700);
    run_case(1000, 30000, 700);
    run_case(7, 5000, 10);       // pulses shorter than the dead time
    checks++;
    if (dead_seen == 0) begin failures++; $display("no dead time seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
