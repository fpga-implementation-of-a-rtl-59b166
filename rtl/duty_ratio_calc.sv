// duty_ratio_calc - dwell times of the five applied vectors, in carrier counts.
//
// Follows the document's equations: six times
//   T1 = b*va - vb        T2 = a*(va - vb)      T3 = va - b*vb
//   T4 = va + b*vb        T5 = a*(va + vb)      T6 = b*va + vb
// with a = sqrt(3)-1, b = 2-sqrt(3) (as fractions of Ts, for va, vb in units
// of VDC), then per sector k the active dwell times
//   tV1 = T(k), tV2 = T(k+1), tV3 = T(k+4), tV4 = T(k+5),  T(i+6) = -T(i),
// and the zero-vector time tV0 = Ts - tV1 - tV2 - tV3 - tV4.
// Sector 1 thus uses T1, T2, T5, T6; the rest follow by rotation.
//
// Scaling to the carrier (this design's choice): one sampling period is 2*Tm
// counts, so tVk/2 = dk*Tm counts and tV0/4 = (Tm - sum)/2 counts, where dk is
// tVk/Ts. The outputs are t[0] = tV0/4 and t[k] = tVk/2, which are exactly the
// distances between the comparison levels of the PWM generator. Small
// negative times produced by rounding near a sector boundary are clamped to
// 0. If the active times need more than a period (reference outside the
// linear range, |v*| > 0.5*VDC) 'overmod' is set and t[0] is 0.
//
// Arithmetic: Q1.15 inputs, 18-bit coefficients with 17 fraction bits, exact
// sums; the duty ratios are cut to 17 fraction bits before the multiply by Tm.
// Timing: four register stages from v_alpha/v_beta/tm to t/overmod; 'sector'
// is expected one clock after the references (detect_sector's latency).
module duty_ratio_calc
  import svm_pkg::*;
(
  input  logic    clk,
  input  ref_t    v_alpha,
  input  ref_t    v_beta,
  input  cnt_t    tm,
  input  sector_t sector,
  output dwell_t  t,
  output logic    overmod
);

  localparam int FW = 36;          // width of the six times, 2^-32 units
  typedef logic signed [FW-1:0] frac_t;

  // ---- stage 1: the six times of the document's matrix equation ----------
  frac_t tt [1:6];
  always_ff @(posedge clk) begin
    logic signed [34:0] a_s, b_s, ba, bb, am, ap;
    a_s = 35'(v_alpha) <<< COEF_FRAC;
    b_s = 35'(v_beta)  <<< COEF_FRAC;
    ba  = 35'(v_alpha) * 35'(K_2MSQ3);
    bb  = 35'(v_beta)  * 35'(K_2MSQ3);
    am  = (35'(v_alpha) - 35'(v_beta)) * 35'(K_SQ3M1);
    ap  = (35'(v_alpha) + 35'(v_beta)) * 35'(K_SQ3M1);
    tt[1] <= FW'(ba)  - FW'(b_s);
    tt[2] <= FW'(am);
    tt[3] <= FW'(a_s) - FW'(bb);
    tt[4] <= FW'(a_s) + FW'(bb);
    tt[5] <= FW'(ap);
    tt[6] <= FW'(ba)  + FW'(b_s);
  end

  // ---- stage 2: per-sector selection (rotation of the sector table) -------
  // Extended index i in 1..12: T(i) for i <= 6, -T(i-6) otherwise.
  function automatic frac_t pick(input int unsigned i);
    int unsigned j;
    j = ((i - 1) % 12) + 1;
    return (j <= 6) ? tt[j] : -tt[j - 6];
  endfunction

  localparam int DW = 19;          // duty ratio, unsigned Q2.17
  logic [DW-1:0] d [1:4];
  always_ff @(posedge clk) begin
    frac_t sel [1:4];
    int unsigned k;
    k = (sector >= 4'd1 && sector <= 4'd12) ? int'(sector) : 1;
    sel[1] = pick(k);
    sel[2] = pick(k + 1);
    sel[3] = pick(k + 4);
    sel[4] = pick(k + 5);
    for (int n = 1; n <= 4; n++)
      d[n] <= sel[n][FW-1] ? '0 : DW'(sel[n] >>> 15);  // 2^-32 -> 2^-17
  end

  // ---- stage 3: scale to carrier counts: dk * Tm ----------------------------
  localparam int CW = 19;          // counts, up to 2*Tm
  logic [CW-1:0] c [1:4];
  always_ff @(posedge clk) begin
    for (int n = 1; n <= 4; n++)
      c[n] <= CW'((36'(d[n]) * 36'(tm)) >> COEF_FRAC);
  end

  // ---- stage 4: zero-vector time and saturation -----------------------------
  always_ff @(posedge clk) begin
    logic [CW+1:0] sum;
    sum = (CW+2)'(c[1]) + (CW+2)'(c[2]) + (CW+2)'(c[3]) + (CW+2)'(c[4]);
    if (sum > (CW+2)'(tm)) begin
      overmod <= 1'b1;
      t[0]    <= '0;
    end else begin
      overmod <= 1'b0;
      t[0]    <= CNT_W'(((CW+2)'(tm) - sum) >> 1);
    end
    for (int n = 1; n <= 4; n++)
      t[n] <= (c[n] > CW'({CNT_W{1'b1}})) ? {CNT_W{1'b1}} : CNT_W'(c[n]);
  end

endmodule
