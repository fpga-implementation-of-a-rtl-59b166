// tb_duty_ratio_calc - dwell counts against the volt-second solution.
// For random references inside the linear range (|v| <= 0.49 VDC) and random
// carrier peaks it compares t[1..4] with d_k*Tm and t[0] with d_0*Tm/2, where
// d_k come from solving the alpha-beta / x-y balance of the sector's four
// vectors, allowing 2 counts of rounding. References above 0.52 VDC must
// raise overmod with t[0] = 0. The four-clock latency is checked by sampling
// the outputs exactly four clocks after the inputs change.
module tb_duty_ratio_calc;
  import svm_pkg::*;
  import svm_model_pkg::*;

  logic clk = 1'b0;
  ref_t v_alpha = '0, v_beta = '0;
  cnt_t tm = 16'd1000;
  sector_t sector = 4'd1;
  dwell_t t;
  logic overmod;
  int checks = 0, failures = 0;

  duty_ratio_calc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic trial(real ang_deg, real mag, int p);
    real va, vb, d [5], e;
    int s;
    va = mag * $cos(ang_deg * PI / 180.0);
    vb = mag * $sin(ang_deg * PI / 180.0);
    v_alpha = ref_t'(q15(va));
    v_beta  = ref_t'(q15(vb));
    tm = cnt_t'(p);
    va = real'(v_alpha) / 32768.0;
    vb = real'(v_beta) / 32768.0;
    s = sector_of(va, vb);
    @(posedge clk); #1;
    sector = sector_t'(s);       // detect_sector's one-clock latency
    repeat (3) @(posedge clk);
    #1;
    dwell(va, vb, s, d);
    if (mag > 0.52) begin
      checks++;
      if (!overmod || t[0] != 0) begin
        failures++;
        $display("no overmod at |v|=%f", mag);
      end
    end else begin
      checks++;
      if (overmod) begin failures++; $display("false overmod at |v|=%f", mag); end
      for (int k = 1; k <= 4; k++) begin
        e = d[k] * p;
        checks++;
        if ($sqrt((real'(t[k]) - e) ** 2) > 2.0) begin
          failures++;
          $display("ang %f mag %f Tm %0d: t%0d=%0d expected %f", ang_deg, mag, p, k, t[k], e);
        end
      end
      e = d[0] * p / 2.0;
      checks++;
      if ($sqrt((real'(t[0]) - e) ** 2) > 3.0) begin
        failures++;
        $display("ang %f mag %f Tm %0d: t0=%0d expected %f", ang_deg, mag, p, t[0], e);
      end
    end
  endtask

  initial begin
    @(posedge clk);
    for (int i = 0; i < 3000; i++) begin
      real ang, mag;
      ang = $urandom_range(0, 359999) / 1000.0;
      mag = (i % 10 == 9) ? 0.53 + $urandom_range(0, 400) / 1000.0
                          : $urandom_range(0, 490) / 1000.0;
      trial(ang, mag, (i % 3 == 0) ? 65535 : $urandom_range(4, 20000));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
