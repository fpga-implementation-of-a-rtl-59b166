// counter_unit - triangular carrier for the SVM peripheral.
//
// An up-down counter produces one sampling period as Tm, Tm-1, ..., 1, 0, 1,
// ..., Tm-1 (2*Tm clock cycles), so the period starts at the top of the
// triangle and its middle is at 0, as in the document's switching-sequence
// diagram. With a 16-bit Tm and a 100 MHz clock the slowest carrier is
// 100e6/(2*65535) = 763 Hz, the figure the document quotes.
//
// 'trigger' is high in the last cycle of every period and in the cycle in
// which a stopped counter is enabled: on that clock edge the new Tm is taken
// and every period-synchronous register of the modulator reloads. c_direct is
// high while the carrier falls (first half period), so its rising edge marks
// the start of each sampling period for the controller. Disabling the counter
// stops it at once. Tm is meant to be at least 4; Tm = 0 is run as Tm = 1.
// The exact count sequence and the trigger timing are this design's choices.
module counter_unit
  import svm_pkg::*;
(
  input  logic clk,
  input  logic reset,          // synchronous, active high
  input  logic enable,         // Start
  input  cnt_t tm,             // carrier peak, read at period boundaries
  output cnt_t count,
  output logic trigger,
  output logic c_direct,
  output logic running
);

  logic down;   // counting down (first half period)
  cnt_t tm_act; // peak of the running period
  cnt_t tm_new;

  assign tm_new = (tm == '0) ? cnt_t'(1) : tm;

  assign trigger  = enable && (!running || (!down && count == tm_act - cnt_t'(1)));
  assign c_direct = running && down;

  always_ff @(posedge clk) begin
    if (reset || !enable) begin
      running <= 1'b0;
      down    <= 1'b1;
      count   <= '0;
      tm_act  <= cnt_t'(1);
    end else if (trigger) begin
      running <= 1'b1;
      down    <= 1'b1;
      count   <= tm_new;
      tm_act  <= tm_new;
    end else if (down) begin
      count <= count - cnt_t'(1);
      if (count == cnt_t'(1)) down <= 1'b0;
    end else begin
      count <= count + cnt_t'(1);
    end
  end

  // The carrier never leaves 0..Tm.
  always_ff @(posedge clk)
    if (!reset && running) assert (count <= tm_act) else $error("carrier above its peak");

endmodule
