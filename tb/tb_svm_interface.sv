// tb_svm_interface - random register writes against a simple register model.
// Checks every register after each cycle, that WE low writes nothing and
// that reset clears everything.
module tb_svm_interface;
  import svm_pkg::*;

  logic clk = 1'b0, reset = 1'b1, we = 1'b0;
  logic [1:0] address = '0;
  logic [15:0] data = '0;
  svm_regs_t regs;
  logic [15:0] model [4];
  int checks = 0, failures = 0;

  svm_interface dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_regs();
    checks++;
    if (regs.v_alpha !== model[0] || regs.v_beta !== model[1] ||
        regs.tm !== model[2] || regs.tdb !== model[3]) begin
      failures++;
      $display("mismatch: %h %h %h %h vs %h %h %h %h", regs.v_alpha, regs.v_beta,
               regs.tm, regs.tdb, model[0], model[1], model[2], model[3]);
    end
  endtask

  initial begin
    model = '{default: 16'h0};
    repeat (3) @(posedge clk);
    #1 reset = 1'b0;
    @(posedge clk); #1 check_regs();
    for (int i = 0; i < 2000; i++) begin
      we = ($urandom_range(0, 3) != 0);
      address = 2'($urandom);
      data = 16'($urandom);
      @(posedge clk);
      if (we) model[address] = data;
      #1 check_regs();
    end
    we = 1'b0;
    reset = 1'b1;
    @(posedge clk);
    model = '{default: 16'h0};
    #1 reset = 1'b0;
    check_regs();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
