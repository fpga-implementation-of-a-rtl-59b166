// sv_pwm - the SV-PWM operational module of the dual three-phase modulator.
//
// Data path, as in the document's block diagram of this module:
//   shadow registers (v_alpha, v_beta, Tm, Tdb)
//     -> detect_sector ---------------------------------+
//     -> duty_ratio_calc (T0..T4) -> pwm_generator       |
//            (levels vs. carrier) -> switching_function <-+  (PWM1s..PWM6s)
//     -> deadband -> PWM1..PWM6 / PWM1n..PWM6n
//   counter_unit: triangular carrier 'count', period 'trigger', cDirect.
//
// Double buffering (this design's reading of the diagram): the values the
// controller writes are copied into the shadow registers only when
// 'regs_update' has been requested, and then at the next period boundary
// ('trigger'); while the counter is stopped the copy is immediate. The
// sector, the dwell counts and the carrier peak computed from one set of
// shadow values all take effect together on the following period boundary,
// so a sampling period never mixes two references. A reference therefore
// acts one period after the boundary that loaded it. The dead time follows
// the shadow Tdb at once. Load references at least 5 clocks before 'start'.
//
// 'error' is high for every period whose reference is outside the linear
// range (the dwell times do not fit in the period); 'c_direct' is high in the
// first half of every period. With 'start' low all gates are off.
module sv_pwm
  import svm_pkg::*;
#(
  parameter int unsigned DB_MAX = 256
) (
  input  logic      clk,
  input  logic      reset,        // synchronous, active high
  input  svm_regs_t regs_in,      // values written by the controller
  input  logic      regs_update,  // Regs_Update request (pulse)
  input  logic      start,        // carrier enable
  output legs_t     pwm,
  output legs_t     pwm_n,
  output logic      c_direct,
  output logic      error
);

  svm_regs_t shadow;
  logic      pending;
  cnt_t      count;
  logic      trigger, running;
  sector_t   sector;
  dwell_t    t;
  logic      overmod;
  logic [NSEG-1:0] level;
  legs_t     pwm_s;
  seg_e      seg;

  // ---- shadow registers --------------------------------------------------
  always_ff @(posedge clk) begin
    if (reset) begin
      shadow  <= '0;
      pending <= 1'b0;
    end else if ((pending || regs_update) && (trigger || !running)) begin
      shadow  <= regs_in;
      pending <= 1'b0;
    end else if (regs_update) begin
      pending <= 1'b1;
    end
  end

  // ---- sub-modules -------------------------------------------------------
  counter_unit u_counter (
    .clk, .reset, .enable(start), .tm(shadow.tm),
    .count, .trigger, .c_direct, .running
  );

  detect_sector u_sector (
    .clk, .v_alpha(shadow.v_alpha), .v_beta(shadow.v_beta), .sector
  );

  duty_ratio_calc u_duty (
    .clk, .v_alpha(shadow.v_alpha), .v_beta(shadow.v_beta), .tm(shadow.tm),
    .sector, .t, .overmod
  );

  pwm_generator u_pwmgen (
    .clk, .reset, .load(trigger), .t, .count, .level
  );

  switching_function u_switch (
    .clk, .reset, .run(running), .load(trigger), .sector, .level, .pwm_s, .seg
  );

  deadband #(.DB_MAX(DB_MAX), .LEGS(6)) u_deadband (
    .clk, .reset, .enable(start && running), .tdb(shadow.tdb), .pwm_s,
    .pwm, .pwm_n
  );

  always_ff @(posedge clk) begin
    if (reset || !start) error <= 1'b0;
    else if (trigger)    error <= overmod;
  end

endmodule
