// tb_svm_top - end-to-end test of the modulator through its CPU port.
//
// The testbench writes references as a controller would and watches only the
// twelve gate outputs, c_direct and error. For every sampling period (from one
// rising edge of c_direct to the next) it measures:
//   * the period length, which must be 2*Tm clocks;
//   * the average alpha-beta and x-y voltage of the applied leg states, which
//     must equal the reference and zero (volt-second balance, model package);
//   * the number of switchings per leg: two for five legs and six (three
//     pulses) for the sector's special leg, as the sequence table gives;
//   * with a dead time set: the gap with both gates off and the absence of
//     shoot-through.
// Mechanisms exercised and counted: reference update at a period boundary
// (double buffering, one-period delay), writes without act_regs being held
// back, all 12 sectors, overmodulation flag, carrier-period change (including
// the slowest and fastest carriers), dead time, stop/restart with all gates
// off. The top runs with its default parameters.
module tb_svm_top;
  import svm_pkg::*;
  import svm_model_pkg::*;

  logic clk = 1'b0, reset = 1'b1, we = 1'b0, act_regs = 1'b0, start = 1'b0;
  logic [1:0] address = '0;
  logic [15:0] data = '0;
  logic c_direct, error;
  legs_t pwm, pwm_n;

  svm_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_update = 0, n_hold = 0, n_overmod = 0, n_tm_change = 0, n_dead = 0,
      n_restart = 0, n_special = 0;
  int sect_seen [13];
  int dead_cases  [4] = '{100, 145, 256, 1000};
  int dead_expect [4] = '{100, 145, 256, 256};

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL at %0t: %s", $time, msg);
  endtask

  task automatic wr(reg_addr_e a, int v);
    @(negedge clk);
    we = 1'b1; address = a; data = 16'(v);
    @(negedge clk);
    we = 1'b0;
  endtask

  task automatic activate();
    @(negedge clk);
    act_regs = 1'b1;
    @(negedge clk);
    act_regs = 1'b0;
  endtask

  task automatic set_ref(real mag, real ang_deg);
    wr(ADDR_VALPHA, q15(mag * $cos(ang_deg * PI / 180.0)));
    wr(ADDR_VBETA,  q15(mag * $sin(ang_deg * PI / 180.0)));
  endtask

  // ---- period monitor ----------------------------------------------------
  // Results of the last complete period.
  real   m_avg [4];
  int    m_len, m_maxdead, m_mindead;
  bit    m_err;
  int    m_toggles [6];
  int    n_periods = 0;
  bit    m_shoot;

  initial begin : monitor
    real   acc [4];
    int    len, tog [6], gap [6], maxdead, mindead;
    legs_t last;
    bit    shoot, errseen, prev_cd, inwin;
    logic [2:0] cd_pipe;
    vec4_t v;
    prev_cd = 1'b0;
    len = 0;
    inwin = 0;
    last = '0;
    gap = '{default: 0};
    cd_pipe = '0;
    forever begin
      @(posedge clk); #2;
      // the gates follow the carrier two clocks later (leg-state register
      // and dead-band register), so the period window is shifted to match
      cd_pipe = {cd_pipe[1:0], c_direct};
      if (cd_pipe[2] && !prev_cd) begin
        if (inwin && len > 0) begin
          for (int r = 0; r < 4; r++) m_avg[r] = acc[r] / real'(len);
          m_len = len; m_toggles = tog; m_err = errseen; m_shoot = shoot;
          m_maxdead = maxdead; m_mindead = mindead;
          n_periods++;
        end
        acc = '{0.0, 0.0, 0.0, 0.0};
        len = 0; tog = '{default: 0}; shoot = 0; errseen = 0;
        maxdead = 0; mindead = 1 << 30;
        inwin = start;
      end
      prev_cd = cd_pipe[2];
      if (!start) begin
        len = 0;
        inwin = 0;
        continue;
      end
      // leg state from the gates; during a dead gap keep the last state
      for (int i = 0; i < 6; i++) begin
        if (pwm[i] && pwm_n[i]) shoot = 1;
        if (!pwm[i] && !pwm_n[i]) gap[i]++;
        else begin
          if (gap[i] > 0 && len > 0) begin
            if (gap[i] > maxdead) maxdead = gap[i];
            if (gap[i] < mindead) mindead = gap[i];
          end
          gap[i] = 0;
          if (pwm[i] != last[i]) tog[i]++;
          last[i] = pwm[i];
        end
      end
      v = project(last);
      for (int r = 0; r < 4; r++) acc[r] += v[r];
      if (error) errseen = 1;
      len++;
    end
  end

  task automatic wait_periods(int n);
    int target;
    target = n_periods + n;
    while (n_periods < target) @(posedge clk);
    #3;
  endtask

  // Check the last complete period against a reference.
  task automatic check_period(real mag, real ang_deg, int tm, bit dead_on);
    real va, vb, tol;
    int twos, sixes;
    va = real'(q15(mag * $cos(ang_deg * PI / 180.0))) / 32768.0;
    vb = real'(q15(mag * $sin(ang_deg * PI / 180.0))) / 32768.0;
    checks++;
    if (m_len != 2 * tm) fail($sformatf("period %0d clocks, expected %0d", m_len, 2 * tm));
    checks++;
    if (m_shoot) fail("shoot-through");
    checks++;
    if (m_err) fail("error flag in linear range");
    if (!dead_on) begin
      tol = 8.0 / real'(2 * tm) + 1e-4;
      checks++;
      if ((m_avg[0] - va) ** 2 + (m_avg[1] - vb) ** 2 > tol ** 2)
        fail($sformatf("alpha-beta mean (%f,%f) expected (%f,%f), |v|=%f ang %f",
                       m_avg[0], m_avg[1], va, vb, mag, ang_deg));
      checks++;
      if (m_avg[2] ** 2 + m_avg[3] ** 2 > tol ** 2)
        fail($sformatf("x-y mean (%f,%f) not zero", m_avg[2], m_avg[3]));
      twos = 0; sixes = 0;
      for (int i = 0; i < 6; i++) begin
        if (m_toggles[i] == 2) twos++;
        if (m_toggles[i] == 6) sixes++;
      end
      checks++;
      if (twos != 5 || sixes != 1)
        fail($sformatf("switchings per leg %p", m_toggles));
      else n_special++;
      sect_seen[sector_of(va, vb)]++;
    end
  endtask

  initial begin
    real mag, ang;
    int tm;
    sect_seen = '{default: 0};
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 1'b0;

    // ---- bring-up: 10 kHz carrier, no dead time -------------------------
    tm = 5000;
    wr(ADDR_TM, tm);
    wr(ADDR_TDB, 0);
    set_ref(0.4, 10.0);
    activate();                        // stopped: takes effect at once
    repeat (10) @(negedge clk);
    start = 1'b1;
    wait_periods(2);
    check_period(0.4, 10.0, tm, 0);

    // ---- all sectors, random magnitudes inside the linear range ----------
    tm = 1000;
    wr(ADDR_TM, tm);
    for (int s = 1; s <= 12; s++) begin
      mag = 0.05 + $urandom_range(0, 440) / 1000.0;
      ang = (s - 1) * 30.0 - 12.0 + $urandom_range(0, 24000) / 1000.0;
      set_ref(mag, ang);
      activate();
      wait_periods(3);
      check_period(mag, ang, tm, 0);
    end
    n_tm_change++;

    // ---- double buffering: a reference takes effect one period after the
    //      boundary that loads it; writes alone change nothing ------------
    set_ref(0.3, 100.0);
    activate();
    wait_periods(3);
    check_period(0.3, 100.0, tm, 0);
    set_ref(0.45, 200.0);              // written, not activated
    wait_periods(2);
    check_period(0.3, 100.0, tm, 0);
    n_hold++;
    activate();                        // inside period P0
    wait_periods(1);                   // P0 done: old reference
    check_period(0.3, 100.0, tm, 0);
    wait_periods(1);                   // P1: loaded at its start, still old
    check_period(0.3, 100.0, tm, 0);
    wait_periods(1);                   // P2: new reference
    check_period(0.45, 200.0, tm, 0);
    n_update++;

    // ---- overmodulation ---------------------------------------------------
    set_ref(0.7, 20.0);
    activate();
    wait_periods(3);
    checks++;
    if (!m_err) fail("no error flag at |v| = 0.7");
    else n_overmod++;
    checks++;
    if (m_len != 2 * tm) fail("period length in overmodulation");
    set_ref(0.25, 20.0);
    activate();
    wait_periods(4);                   // the overmodulated period ends without
                                       // its outer zero: skip the first one
    check_period(0.25, 20.0, tm, 0);

    // ---- slowest and fastest carriers --------------------------------------
    tm = 65535;                        // 763 Hz at 100 MHz
    wr(ADDR_TM, tm);
    set_ref(0.35, 250.0);
    activate();
    wait_periods(3);
    check_period(0.35, 250.0, tm, 0);
    n_tm_change++;
    tm = 1111;                         // 45 kHz at 100 MHz
    wr(ADDR_TM, tm);
    set_ref(0.35, 320.0);
    activate();
    wait_periods(3);
    check_period(0.35, 320.0, tm, 0);
    n_tm_change++;

    // ---- dead time: 1 us, 1.45 us, 2.56 us and an over-range value ------
    tm = 5000;
    wr(ADDR_TM, tm);
    set_ref(0.4, 0.0);
    foreach (dead_cases[i]) begin
      wr(ADDR_TDB, dead_cases[i]);
      activate();
      wait_periods(3);
      check_period(0.4, 0.0, tm, 1);
      checks++;
      if (m_mindead != dead_expect[i] || m_maxdead != dead_expect[i])
        fail($sformatf("dead gap %0d..%0d, expected %0d", m_mindead, m_maxdead, dead_expect[i]));
      else n_dead++;
    end
    wr(ADDR_TDB, 0);
    activate();
    wait_periods(3);

    // ---- stop and restart -------------------------------------------------
    @(negedge clk) start = 1'b0;
    repeat (3) @(negedge clk);
    checks++;
    if (pwm != '0 || pwm_n != '0 || c_direct) fail("outputs active while stopped");
    tm = 800;
    wr(ADDR_TM, tm);
    set_ref(0.2, 140.0);
    activate();
    repeat (10) @(negedge clk);
    start = 1'b1;
    wait_periods(2);
    check_period(0.2, 140.0, tm, 0);
    n_restart++;

    // ---- every mechanism must have happened ---------------------------------
    for (int s = 1; s <= 12; s++) begin
      checks++;
      if (sect_seen[s] == 0) fail($sformatf("sector %0d never applied", s));
    end
    checks++;
    if (n_update == 0 || n_hold == 0 || n_overmod == 0 || n_tm_change == 0 ||
        n_dead == 0 || n_restart == 0 || n_special == 0)
      fail("a mechanism never happened");
    $display("mechanisms: boundary update %0d, held write %0d, overmodulation %0d, Tm change %0d, dead time %0d, restart %0d, special leg %0d, periods %0d",
             n_update, n_hold, n_overmod, n_tm_change, n_dead, n_restart, n_special, n_periods);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
