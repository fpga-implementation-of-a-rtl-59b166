// tb_detect_sector - sector of random references against the angle model.
// References within 0.05 degrees of a boundary are skipped, since either
// neighbour is right there. Also sweeps every sector centre and checks the
// one-clock latency.
module tb_detect_sector;
  import svm_pkg::*;
  import svm_model_pkg::*;

  logic clk = 1'b0;
  ref_t v_alpha = '0, v_beta = '0;
  sector_t sector;
  int checks = 0, failures = 0;
  int seen [13];

  detect_sector dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(real ang_deg, real mag);
    real va, vb, off;
    int exp_s;
    va = mag * $cos(ang_deg * PI / 180.0);
    vb = mag * $sin(ang_deg * PI / 180.0);
    v_alpha = ref_t'(q15(va));
    v_beta  = ref_t'(q15(vb));
    // angle of the quantised vector
    exp_s = sector_of(real'(v_alpha), real'(v_beta));
    off = $atan2(real'(v_beta), real'(v_alpha)) * 180.0 / PI + 15.0;
    off = off - 30.0 * $floor(off / 30.0);
    @(posedge clk); #1;
    if (off > 0.05 && off < 29.95) begin
      checks++;
      seen[exp_s]++;
      if (int'(sector) != exp_s) begin
        failures++;
        $display("angle %f mag %f: sector %0d expected %0d", ang_deg, mag, sector, exp_s);
      end
    end
  endtask

  initial begin
    seen = '{default: 0};
    for (int s = 1; s <= 12; s++) apply((s - 1) * 30.0, 0.45);
    for (int i = 0; i < 5000; i++)
      apply($urandom_range(0, 359999) / 1000.0, 0.01 + $urandom_range(0, 980) / 1000.0);
    for (int s = 1; s <= 12; s++) begin
      checks++;
      if (seen[s] == 0) begin failures++; $display("sector %0d never seen", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
