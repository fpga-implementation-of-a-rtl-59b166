// svm_model_pkg - reference model used by the testbenches.
//
// Works from first principles, not from the RTL's equations: the voltage
// vector of a switching state is projected on the alpha-beta and x-y planes
// of the asymmetrical six-phase machine (phases a,b,c at 0,120,240 degrees,
// d,e,f at 30,150,270 degrees; x-y uses five times the angle), and the dwell
// times of the four vectors of a sector are found by solving
//     sum_k t_k * v_k = (v_alpha, v_beta, 0, 0) * Ts
// with Gaussian elimination. The projection scale 1/(2*sqrt(3)) makes the
// largest vectors 0.5176*VDC long and the linear range a circle of 0.5*VDC.
package svm_model_pkg;

  localparam real PI = 3.14159265358979323846;

  typedef real vec4_t [4];

  // Sector 1..12 of a reference, from its angle.
  function automatic int sector_of(real va, real vb);
    real ang;
    ang = $atan2(vb, va) * 180.0 / PI + 15.0;
    while (ang < 0.0)    ang += 360.0;
    while (ang >= 360.0) ang -= 360.0;
    return int'($floor(ang / 30.0)) + 1;
  endfunction

  // alpha, beta, x, y of the leg states {a,b,c,d,e,f}, in units of VDC.
  function automatic vec4_t project(logic [5:0] s);
    real th [6];
    vec4_t v;
    real k;
    th = '{0.0, 120.0, 240.0, 30.0, 150.0, 270.0};
    k = 1.0 / (2.0 * $sqrt(3.0));
    v = '{0.0, 0.0, 0.0, 0.0};
    for (int i = 0; i < 6; i++) begin
      if (s[5 - i]) begin
        v[0] += k * $cos(th[i] * PI / 180.0);
        v[1] += k * $sin(th[i] * PI / 180.0);
        v[2] += k * $cos(5.0 * th[i] * PI / 180.0);
        v[3] += k * $sin(5.0 * th[i] * PI / 180.0);
      end
    end
    return v;
  endfunction

  // Table of the sequence, as printed: V1..V4 of sector 1..12.
  function automatic logic [5:0] table_vec(int sector, int k);
    logic [5:0] tbl [12][4];
    tbl = '{'{6'o55, 6'o45, 6'o44, 6'o64}, '{6'o45, 6'o44, 6'o64, 6'o66},
            '{6'o44, 6'o64, 6'o66, 6'o26}, '{6'o64, 6'o66, 6'o26, 6'o22},
            '{6'o66, 6'o26, 6'o22, 6'o32}, '{6'o26, 6'o22, 6'o32, 6'o33},
            '{6'o22, 6'o32, 6'o33, 6'o13}, '{6'o32, 6'o33, 6'o13, 6'o11},
            '{6'o33, 6'o13, 6'o11, 6'o51}, '{6'o13, 6'o11, 6'o51, 6'o55},
            '{6'o11, 6'o51, 6'o55, 6'o45}, '{6'o51, 6'o55, 6'o45, 6'o44}};
    return tbl[sector - 1][k - 1];
  endfunction

  // Outer (edge) and middle zero vectors of a sector, as printed.
  function automatic logic [5:0] table_zero(int sector, bit middle);
    logic [5:0] edge_z [12];
    logic [5:0] mid_z  [12];
    edge_z = '{6'o07, 6'o00, 6'o70, 6'o77, 6'o07, 6'o00, 6'o70, 6'o77, 6'o07, 6'o00, 6'o70, 6'o77};
    mid_z  = '{6'o70, 6'o77, 6'o07, 6'o00, 6'o70, 6'o77, 6'o07, 6'o00, 6'o70, 6'o77, 6'o07, 6'o00};
    return middle ? mid_z[sector - 1] : edge_z[sector - 1];
  endfunction

  function automatic real fabs(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  // Dwell ratios d[1..4] (fractions of Ts) of V1..V4 and d[0] of the zero
  // vector, by solving the 4x4 volt-second balance.
  function automatic void dwell(real va, real vb, int sector, output real d [5]);
    real a [4][5];
    vec4_t p;
    real f, s;
    for (int k = 0; k < 4; k++) begin
      p = project(table_vec(sector, k + 1));
      for (int r = 0; r < 4; r++) a[r][k] = p[r];
    end
    a[0][4] = va; a[1][4] = vb; a[2][4] = 0.0; a[3][4] = 0.0;
    for (int c = 0; c < 4; c++) begin
      int piv;
      piv = c;
      for (int r = c + 1; r < 4; r++) if (fabs(a[r][c]) > fabs(a[piv][c])) piv = r;
      for (int j = 0; j < 5; j++) begin f = a[c][j]; a[c][j] = a[piv][j]; a[piv][j] = f; end
      for (int r = 0; r < 4; r++) if (r != c) begin
        f = a[r][c] / a[c][c];
        for (int j = 0; j < 5; j++) a[r][j] -= f * a[c][j];
      end
    end
    s = 0.0;
    for (int k = 0; k < 4; k++) begin d[k + 1] = a[k][4] / a[k][k]; s += d[k + 1]; end
    d[0] = 1.0 - s;
  endfunction

  function automatic int q15(real v);
    return int'($rtoi(v * 32768.0 + (v >= 0.0 ? 0.5 : -0.5)));
  endfunction

endpackage
