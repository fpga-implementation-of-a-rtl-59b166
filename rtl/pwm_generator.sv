// pwm_generator - comparison levels of the five-vector sequence.
//
// At each period boundary ('load') the dwell counts are latched and turned
// into five nested thresholds, as in the document's timing diagram where the
// falling carrier crosses Level 0 to Level 4 in turn:
//   L4 = t0, L3 = L4 + t4, L2 = L3 + t3, L1 = L2 + t2, L0 = L1 + t1.
// Each comparator output is level[k] = (count < Lk). Because L0 >= ... >= L4,
// the outputs form a thermometer code whose population count is the index of
// the segment being applied (0 outer zero, 1..4 V1..V4, 5 middle zero). On
// the falling half each segment lasts (L(k-1) - Lk) = tk counts, and the same
// again on the rising half, so each active vector gets tVk in total.
// Thresholds are 18 bits wide so an overmodulated sum cannot wrap; the
// comparison sense and widths are this design's choices.
//
// Timing: thresholds update on the clock edge where 'load' is high; 'level'
// is combinational from 'count' and the latched thresholds.
module pwm_generator
  import svm_pkg::*;
(
  input  logic              clk,
  input  logic              reset,   // synchronous, active high
  input  logic              load,
  input  dwell_t            t,
  input  cnt_t              count,
  output logic [NSEG-1:0]   level
);

  logic [CNT_W+1:0] thr [NSEG];

  always_ff @(posedge clk) begin
    if (reset) begin
      for (int k = 0; k < NSEG; k++) thr[k] <= '0;
    end else if (load) begin
      thr[4] <= (CNT_W+2)'(t[0]);
      thr[3] <= (CNT_W+2)'(t[0]) + (CNT_W+2)'(t[4]);
      thr[2] <= (CNT_W+2)'(t[0]) + (CNT_W+2)'(t[4]) + (CNT_W+2)'(t[3]);
      thr[1] <= (CNT_W+2)'(t[0]) + (CNT_W+2)'(t[4]) + (CNT_W+2)'(t[3])
              + (CNT_W+2)'(t[2]);
      thr[0] <= (CNT_W+2)'(t[0]) + (CNT_W+2)'(t[4]) + (CNT_W+2)'(t[3])
              + (CNT_W+2)'(t[2]) + (CNT_W+2)'(t[1]);
    end
  end

  // Thresholds are nested, so the levels always form a thermometer code.
  always_ff @(posedge clk)
    if (!reset) assert (thr[0] >= thr[1] && thr[1] >= thr[2] && thr[2] >= thr[3]
                        && thr[3] >= thr[4]) else $error("thresholds out of order");

  always_comb begin
    for (int k = 0; k < NSEG; k++)
      level[k] = (CNT_W+2)'(count) < thr[k];
  end

endmodule
