// tb_switching_function - leg states of every sector and segment.
// For each sector the comparator levels are driven through the 11 segments
// of a period (thermometer code with 0..5 bits set, up and down again) and
// the leg states are compared, one clock later, with the printed sequence
// table held in the model package. Also checks the 'run' low state and that
// the sector is taken only on 'load'.
module tb_switching_function;
  import svm_pkg::*;
  import svm_model_pkg::*;

  logic clk = 1'b0, reset = 1'b1, run = 1'b0, load = 1'b0;
  sector_t sector = 4'd1;
  logic [NSEG-1:0] level = '0;
  legs_t pwm_s;
  seg_e seg;
  int checks = 0, failures = 0;

  switching_function dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic legs_t expect_vec(int s, int n);
    if (n == 0) return table_zero(s, 1'b0);
    if (n == 5) return table_zero(s, 1'b1);
    return table_vec(s, n);
  endfunction

  initial begin
    int seq [11];
    seq = '{0, 1, 2, 3, 4, 5, 4, 3, 2, 1, 0};
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;
    run = 1'b1;
    for (int s = 1; s <= 12; s++) begin
      sector = sector_t'(s);
      load = 1'b1;
      @(posedge clk); #1;
      load = 1'b0;
      sector = sector_t'((s % 12) + 1);     // next sector waits for 'load'
      for (int i = 0; i < 11; i++) begin
        level = NSEG'((1 << seq[i]) - 1);
        @(posedge clk); #1;
        checks++;
        if (pwm_s !== expect_vec(s, seq[i])) begin
          failures++;
          $display("sector %0d segment %0d: %o expected %o", s, seq[i], pwm_s, expect_vec(s, seq[i]));
        end
      end
      // skip segments of zero length: jump straight from V1 to V4
      level = 5'b00001; @(posedge clk);
      level = 5'b01111; @(posedge clk); #1;
      checks++;
      if (pwm_s !== expect_vec(s, 4)) begin failures++; $display("skip failed"); end
      level = '0;
      @(posedge clk); #1;
    end
    run = 1'b0;
    level = 5'b11111;
    @(posedge clk); #1;
    checks++;
    if (seg != SEG_Z_OUT) begin failures++; $display("not idle when stopped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
