// switching_function - Moore state machine that produces the six leg states.
//
// One sampling period is applied as the continuous 11-segment sequence
//   V0/4  V1/2  V2/2  V3/2  V4/2  V0/2  V4/2  V3/2  V2/2  V1/2  V0/4
// in which every leg switches twice and one leg per sector four times. The
// vectors are those of the document's sequence table: sector k applies the
// large vectors k-1..k+2 of the list 5-5, 4-5, 4-4, 6-4, 6-6, 2-6, 2-2, 3-2,
// 3-3, 1-3, 1-1, 5-1 as V1..V4, the zero vector 0-7, 0-0, 7-0 or 7-7 (period
// 4 in k, starting at sector 1) at the period edges, and its complement in
// the middle. Octal digits are [Sa Sb Sc]-[Sd Se Sf]; pwm_s = {a,b,c,d,e,f}.
//
// The state is the current segment (seg_e). Its next value is the number of
// comparator levels that are set, which moves the machine down the sequence
// on the falling carrier and back up on the rising one and skips segments
// of zero length. Outputs depend only on the state and on the sector latched
// at the period boundary (Moore). While 'run' is low the state is the outer
// zero. The state encoding and the level decoding are this design's choices.
//
// Timing: 'sector' is latched on the clock edge where 'load' is high; the
// state follows 'level' with one clock of latency.
module switching_function
  import svm_pkg::*;
(
  input  logic            clk,
  input  logic            reset,   // synchronous, active high
  input  logic            run,
  input  logic            load,
  input  sector_t         sector,
  input  logic [NSEG-1:0] level,
  output legs_t           pwm_s,
  output seg_e            seg
);

  sector_t sector_q;
  seg_e    seg_next;

  always_comb begin
    int n;
    n = 0;
    for (int k = 0; k < NSEG; k++) n += int'(level[k]);
    seg_next = run ? seg_e'(n) : SEG_Z_OUT;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      seg      <= SEG_Z_OUT;
      sector_q <= 4'd1;
    end else begin
      seg <= seg_next;
      if (load) sector_q <= (sector >= 4'd1 && sector <= 4'd12) ? sector : 4'd1;
    end
  end

  always_comb begin
    unique case (seg)
      SEG_Z_OUT: pwm_s = edge_zero(sector_q);
      SEG_V1:    pwm_s = outer_vector(int'(sector_q) - 1);
      SEG_V2:    pwm_s = outer_vector(int'(sector_q));
      SEG_V3:    pwm_s = outer_vector(int'(sector_q) + 1);
      SEG_V4:    pwm_s = outer_vector(int'(sector_q) + 2);
      SEG_Z_MID: pwm_s = ~edge_zero(sector_q);
      default:   pwm_s = edge_zero(sector_q);
    endcase
  end

endmodule
