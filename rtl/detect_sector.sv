// detect_sector - finds the 30-degree sector of the reference voltage vector.
//
// Sector 1 is centred on the alpha axis and sectors are numbered towards the
// beta axis (sector 4 holds +beta), each one spanning 30 degrees, as in the
// document's sector map. The boundaries lie at 15 + 30*k degrees. Six linear
// forms, the same ones that give the dwell times,
//   F1 = b*va - vb   F2 = va - vb   F3 = va - b*vb
//   F4 = va + b*vb   F5 = va + vb   F6 = b*va + vb      (b = 2 - sqrt(3))
// each vanish on one boundary line. Their signs step through a 12-state
// Johnson code as the angle turns: sector 1 has all six positive, sector k
// (2..7) has F1..F(k-1) negative, sector 7 all negative, and sectors 8..12
// turn F1..F5 positive again. Decoding the sector from these signs is this
// design's choice; the document only names the block and its inputs.
// A vector exactly on a boundary goes to the sector whose form is zero as
// non-negative; the dwell times agree there.
//
// Timing: one register stage, 'sector' follows the inputs after one clock.
module detect_sector
  import svm_pkg::*;
(
  input  logic    clk,
  input  ref_t    v_alpha,
  input  ref_t    v_beta,
  output sector_t sector
);

  // Q1.15 * Q0.17 products keep 17 extra fraction bits: scale va, vb alike.
  logic signed [34:0] a_s, b_s, ba, bb;
  logic signed [35:0] f [1:6];
  logic [6:1] neg;

  always_comb begin
    a_s = 35'(v_alpha) <<< COEF_FRAC;
    b_s = 35'(v_beta)  <<< COEF_FRAC;
    ba  = 35'(v_alpha) * 35'(K_2MSQ3);
    bb  = 35'(v_beta) * 35'(K_2MSQ3);
    f[1] = 36'(ba)  - 36'(b_s);
    f[2] = 36'(a_s) - 36'(b_s);
    f[3] = 36'(a_s) - 36'(bb);
    f[4] = 36'(a_s) + 36'(bb);
    f[5] = 36'(a_s) + 36'(b_s);
    f[6] = 36'(ba)  + 36'(b_s);
    for (int i = 1; i <= 6; i++) neg[i] = f[i][35];
  end

  always_ff @(posedge clk) begin
    // Johnson-code decode: count of negative forms plus which end is negative.
    unique case (neg)
      6'b000000: sector <= 4'd1;
      6'b000001: sector <= 4'd2;
      6'b000011: sector <= 4'd3;
      6'b000111: sector <= 4'd4;
      6'b001111: sector <= 4'd5;
      6'b011111: sector <= 4'd6;
      6'b111111: sector <= 4'd7;
      6'b111110: sector <= 4'd8;
      6'b111100: sector <= 4'd9;
      6'b111000: sector <= 4'd10;
      6'b110000: sector <= 4'd11;
      6'b100000: sector <= 4'd12;
      default:   sector <= 4'd1;   // unreachable for consistent signs
    endcase
  end

endmodule
