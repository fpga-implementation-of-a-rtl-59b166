// deadband - complementary gate signals with a programmable dead time.
//
// For each inverter leg the desired state pwm_s[i] (1 = upper switch on)
// becomes an upper gate pwm[i] and a lower gate pwm_n[i]. A change of
// pwm_s turns the conducting switch off at once and turns the other one on
// only after 'tdb' clock cycles with both off, so a leg can never short the
// DC link. The dead time saturates at DB_MAX cycles (256 = 2.56 us at
// 100 MHz, the range the document gives). If pwm_s changes back before the
// dead time ends, the timer restarts for the new state. With 'enable' low both
// gates of every leg are off. Turn-off at once, delayed turn-on and the
// behaviour on short pulses are this design's choices.
//
// Timing: outputs are registered; an edge of pwm_s appears as a turn-off one
// clock later and as the matching turn-on tdb clocks after that.
module deadband
  import svm_pkg::*;
#(
  parameter int unsigned DB_MAX = 256,
  parameter int unsigned LEGS   = 6
) (
  input  logic            clk,
  input  logic            reset,   // synchronous, active high
  input  logic            enable,
  input  cnt_t            tdb,
  input  logic [LEGS-1:0] pwm_s,
  output logic [LEGS-1:0] pwm,
  output logic [LEGS-1:0] pwm_n
);

  localparam int TW = $clog2(DB_MAX + 1);

  logic [TW-1:0] dt;                 // dead time in clocks
  logic [TW-1:0] timer [LEGS];
  logic [LEGS-1:0] state;            // last accepted leg state

  assign dt = (tdb > cnt_t'(DB_MAX)) ? TW'(DB_MAX) : TW'(tdb);

  always_ff @(posedge clk) begin
    if (reset || !enable) begin
      pwm   <= '0;
      pwm_n <= '0;
      state <= '0;
      for (int i = 0; i < LEGS; i++) timer[i] <= '0;
    end else begin
      for (int i = 0; i < LEGS; i++) begin
        if (pwm_s[i] != state[i]) begin
          // new request: both off, start the dead time
          state[i] <= pwm_s[i];
          pwm[i]   <= 1'b0;
          pwm_n[i] <= 1'b0;
          timer[i] <= dt;
          if (dt == '0) begin
            pwm[i]   <= pwm_s[i];
            pwm_n[i] <= !pwm_s[i];
          end
        end else if (timer[i] > TW'(1)) begin
          timer[i] <= timer[i] - TW'(1);
        end else begin
          timer[i] <= '0;
          pwm[i]   <= state[i];
          pwm_n[i] <= !state[i];
        end
      end
    end
  end

  // Both gates of a leg are never on together.
  always_ff @(posedge clk)
    if (!reset) assert ((pwm & pwm_n) == '0) else $error("shoot-through on a leg");

endmodule
