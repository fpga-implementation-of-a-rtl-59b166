// tb_svm_workload - rotating references as a motor controller sends them.
//
// A controller model answers every rising edge of c_direct (start of a
// sampling period) with the next sample of a rotating reference
// v* = m * (cos(2*pi*f*t), sin(2*pi*f*t)) and an act_regs pulse, so each
// reference is applied two period boundaries later. Each run covers the
// operating points the modulator was demonstrated with: a 50 Hz fundamental
// at 0.45 and 0.3 of VDC, 20 Hz and 30 Hz fundamentals at a 6 kHz carrier,
// and carriers of 2.5, 5, 7.5 and 10 kHz (100 MHz clock). For every complete
// period the average alpha-beta voltage of the gates must equal the
// reference of that period, the average x-y voltage must be zero and the
// period must last 2*Tm clocks. A sector count confirms that the reference
// really turned through the plane.
module tb_svm_workload;
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

  initial begin
    repeat (60000000) @(posedge clk);
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

  // Run one operating point: fundamental f_hz, carrier fc_hz, magnitude m,
  // for nper sampling periods.
  task automatic run_point(real f_hz, real fc_hz, real m, int nper);
    int tm, first;
    real ts, ang;
    int va_q [$], vb_q [$];
    int seen [13];
    int nsect;
    seen = '{default: 0};
    tm = int'(100.0e6 / fc_hz / 2.0 + 0.5);
    ts = 2.0 * tm / 100.0e6;
    @(negedge clk) start = 1'b0;
    wr(ADDR_TM, tm);
    wr(ADDR_TDB, 0);
    wr(ADDR_VALPHA, q15(m));
    wr(ADDR_VBETA, 0);
    activate();
    repeat (10) @(negedge clk);
    start = 1'b1;
    first = n_periods;
    for (int n = 0; n < nper + 2; n++) begin
      // the period that starts now applies the reference sent 2 boundaries ago
      @(posedge c_direct);
      ang = 2.0 * PI * f_hz * ts * real'(n + 1);
      va_q.push_back(q15(m * $cos(ang)));
      vb_q.push_back(q15(m * $sin(ang)));
      wr(ADDR_VALPHA, va_q[$]);
      wr(ADDR_VBETA, vb_q[$]);
      activate();
    end
    // period k after start (k >= 2) applies va_q[k-2]; monitor periods lag
    // by two clocks, so wait for them to be closed
    @(posedge clk);
    start = 1'b0;
    checks++;
    if (n_periods - first < nper) fail("periods missing");
  endtask

  // Per-period checker, fed by the monitor through these queues.
  real exp_va [$], exp_vb [$];
  int  exp_tm;
  int  skip_n;

  always @(n_periods) begin
    if (skip_n > 0) skip_n--;
    else if (exp_va.size() > 0) begin
      real va, vb, tol;
      int s;
      va = exp_va.pop_front();
      vb = exp_vb.pop_front();
      tol = 8.0 / real'(2 * exp_tm) + 1e-4;
      checks++;
      if (m_len != 2 * exp_tm) fail($sformatf("period %0d clocks, expected %0d", m_len, 2 * exp_tm));
      checks++;
      if ((m_avg[0] - va) ** 2 + (m_avg[1] - vb) ** 2 > tol ** 2)
        fail($sformatf("alpha-beta mean (%f,%f) expected (%f,%f)", m_avg[0], m_avg[1], va, vb));
      checks++;
      if (m_avg[2] ** 2 + m_avg[3] ** 2 > tol ** 2)
        fail($sformatf("x-y mean (%f,%f) not zero", m_avg[2], m_avg[3]));
      checks++;
      if (m_err || m_shoot) fail("error flag or shoot-through");
      s = sector_of(va, vb);
      sectors_hit[s] = 1;
    end
  end

  bit sectors_hit [13];

  task automatic point(real f_hz, real fc_hz, real m, int nper);
    int tm;
    real ts;
    tm = int'(100.0e6 / fc_hz / 2.0 + 0.5);
    ts = 2.0 * tm / 100.0e6;
    exp_tm = tm;
    exp_va.delete(); exp_vb.delete();
    sectors_hit = '{default: 0};
    // period 0 and 1 after start apply the initial reference (m, 0)
    exp_va.push_back(real'(q15(m)) / 32768.0); exp_vb.push_back(0.0);
    exp_va.push_back(real'(q15(m)) / 32768.0); exp_vb.push_back(0.0);
    for (int n = 0; n < nper; n++) begin
      real ang;
      ang = 2.0 * PI * f_hz * ts * real'(n + 1);
      exp_va.push_back(real'(q15(m * $cos(ang))) / 32768.0);
      exp_vb.push_back(real'(q15(m * $sin(ang))) / 32768.0);
    end
    skip_n = 0;
    run_point(f_hz, fc_hz, m, nper);
    repeat (5) @(posedge clk);
    begin
      int ns;
      ns = 0;
      for (int s = 1; s <= 12; s++) ns += sectors_hit[s];
      $display("f=%0.0f Hz carrier=%0.0f Hz |v|=%0.2f: %0d periods, %0d sectors", f_hz, fc_hz, m, nper, ns);
      checks++;
      if (ns < want_sectors(f_hz, fc_hz, nper)) fail("reference did not turn through the expected sectors");
    end
  endtask

  function automatic int want_sectors(real f_hz, real fc_hz, int nper);
    real turns;
    turns = f_hz / fc_hz * nper;
    return (turns >= 1.0) ? 12 : int'($floor(turns * 12.0));
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 1'b0;
    point(50.0, 5000.0, 0.45, 100);      // one full turn at 50 Hz
    point(50.0, 10000.0, 0.30, 200);
    point(20.0, 6000.0, 0.45, 100);
    point(30.0, 6000.0, 0.45, 100);
    point(50.0, 2500.0, 0.45, 50);
    point(50.0, 7500.0, 0.45, 150);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
