// svm_interface - CPU write port of the SVM peripheral.
//
// The external controller writes four 16-bit registers through a 16-bit data
// bus and a 2-bit address: a 2-to-4 decoder gated by WE enables exactly one of
// the registers v_alpha (0), v_beta (1), Tm (2) and Tdb (3), as in the
// interface block diagram. The register set itself follows the document; the
// address order, the synchronous write and the reset value 0 are this design's
// choices.
//
// Timing: a register takes the value of 'data' on the rising clock edge at
// which 'we' is high; 'regs' shows it from the next cycle. The bus is assumed
// to be synchronous to clk.
module svm_interface
  import svm_pkg::*;
(
  input  logic                 clk,
  input  logic                 reset,     // synchronous, active high
  input  logic                 we,
  input  logic [1:0]           address,
  input  logic [DATA_W-1:0]    data,
  output svm_regs_t            regs
);

  logic [3:0] sel;

  // 2-to-4 decoder
  always_comb begin
    sel = '0;
    if (we) sel[address] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      regs <= '0;
    end else begin
      if (sel[ADDR_VALPHA]) regs.v_alpha <= data;
      if (sel[ADDR_VBETA])  regs.v_beta  <= data;
      if (sel[ADDR_TM])     regs.tm      <= data;
      if (sel[ADDR_TDB])    regs.tdb     <= data;
    end
  end

endmodule
