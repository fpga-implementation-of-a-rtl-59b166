// svm_pkg - types and constants shared by the dual three-phase SVM peripheral.
//
// The peripheral modulates a six-leg voltage source inverter feeding an
// asymmetrical dual three-phase machine (two three-phase windings 30 degrees
// apart, legs a,b,c and d,e,f). Only the 12 largest alpha-beta vectors plus the
// zero vectors are used; the reference plane is split into 12 sectors of
// 30 degrees, and in each sector four adjacent large vectors and one zero vector
// are applied in an 11-segment continuous sequence.
//
// Fixed-point conventions (this design's choice):
//   * references v_alpha, v_beta: signed Q1.15, value = v*/VDC
//   * Tm: carrier peak = half sampling period in clock cycles (unsigned 16 bit)
//   * Tdb: dead time in clock cycles
//   * leg-state vectors are 6 bits {Sa,Sb,Sc,Sd,Se,Sf}, bit 5 = leg a, written
//     in the text as two octal digits [Sa Sb Sc]-[Sd Se Sf].
package svm_pkg;

  localparam int DATA_W = 16;   // CPU data bus and register width
  localparam int CNT_W  = 16;   // carrier counter width
  localparam int NSEG   = 5;    // comparator levels / dwell times T0..T4

  typedef logic signed [DATA_W-1:0] ref_t;   // Q1.15 reference component
  typedef logic        [CNT_W-1:0]  cnt_t;   // carrier count or dwell count
  typedef logic        [3:0]        sector_t; // 1..12
  typedef logic        [5:0]        legs_t;   // {a,b,c,d,e,f}

  // Register file seen by the CPU, address 0..3 in this order.
  typedef struct packed {
    ref_t v_alpha;
    ref_t v_beta;
    cnt_t tm;
    cnt_t tdb;
  } svm_regs_t;

  typedef enum logic [1:0] {
    ADDR_VALPHA = 2'd0,
    ADDR_VBETA  = 2'd1,
    ADDR_TM     = 2'd2,
    ADDR_TDB    = 2'd3
  } reg_addr_e;

  // Dwell times in carrier counts: t[0] = tV0/4, t[k] = tVk/2 (k = 1..4).
  typedef cnt_t [NSEG-1:0] dwell_t;

  // Segments of one sampling period, as the carrier falls through the levels.
  typedef enum logic [2:0] {
    SEG_Z_OUT = 3'd0,   // zero vector at the period edges (tV0/4 each)
    SEG_V1    = 3'd1,
    SEG_V2    = 3'd2,
    SEG_V3    = 3'd3,
    SEG_V4    = 3'd4,
    SEG_Z_MID = 3'd5    // zero vector in the middle (tV0/2)
  } seg_e;

  // Constants of the dwell-time equations, 17 fraction bits.
  localparam int COEF_FRAC = 17;
  localparam logic signed [17:0] K_SQ3M1 = 18'sd95951;  // (sqrt(3)-1) * 2^17
  localparam logic signed [17:0] K_2MSQ3 = 18'sd35121;  // (2-sqrt(3)) * 2^17

  // The twelve largest alpha-beta vectors in angular order, starting at
  // -45 degrees: 5-5, 4-5, 4-4, 6-4, 6-6, 2-6, 2-2, 3-2, 3-3, 1-3, 1-1, 5-1.
  // Sector k applies entries k-1, k, k+1, k+2 (mod 12) as V1..V4.
  function automatic legs_t outer_vector(input int unsigned idx);
    case (idx % 12)
      0:  return 6'o55;
      1:  return 6'o45;
      2:  return 6'o44;
      3:  return 6'o64;
      4:  return 6'o66;
      5:  return 6'o26;
      6:  return 6'o22;
      7:  return 6'o32;
      8:  return 6'o33;
      9:  return 6'o13;
      10: return 6'o11;
      default: return 6'o51;
    endcase
  endfunction

  // Zero vector at the period edges; the middle one is its complement.
  function automatic legs_t edge_zero(input sector_t s);
    case ((int'(s) - 1) % 4)
      0:  return 6'o07;
      1:  return 6'o00;
      2:  return 6'o70;
      default: return 6'o77;
    endcase
  endfunction

endpackage
