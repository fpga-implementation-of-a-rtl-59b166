// svm_top - FPGA space vector modulator for an asymmetrical dual three-phase
// machine (two three-phase windings shifted by 30 degrees, six inverter legs).
//
// An external controller writes the reference voltage (v_alpha, v_beta, as
// signed Q1.15 fractions of the DC-link voltage), the carrier half-period Tm
// and the dead time Tdb (both in clock cycles) through a 16-bit data bus and a
// 2-bit address. A pulse on act_regs makes the new values effective at the
// next sampling-period boundary; start runs the carrier. The modulator then
// applies, in every period of 2*Tm clocks, four adjacent large vectors and a
// zero vector in a symmetric 11-segment sequence that keeps the x-y voltage
// at zero on average, and drives twelve gate signals with dead time.
// c_direct rises at the start of each period to tell the controller when to
// send the next reference. error flags a reference outside the linear range.
//
// Structure: svm_interface (CPU registers) feeding sv_pwm (modulator), as in
// the document's system diagram; the port set is the document's 23-line
// controller link (Reset, WE, ActRegs, Start, Address, Data, cDirect) and
// 12 gate lines, plus 'error', which this design adds. Address map: 0 v_alpha,
// 1 v_beta, 2 Tm, 3 Tdb.
module svm_top
  import svm_pkg::*;
#(
  parameter int unsigned DB_MAX = 256
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              we,
  input  logic              act_regs,
  input  logic              start,
  input  logic [1:0]        address,
  input  logic [DATA_W-1:0] data,
  output logic              c_direct,
  output legs_t             pwm,
  output legs_t             pwm_n,
  output logic              error
);

  svm_regs_t regs;

  svm_interface u_if (
    .clk, .reset, .we, .address, .data, .regs
  );

  sv_pwm #(.DB_MAX(DB_MAX)) u_svpwm (
    .clk, .reset, .regs_in(regs), .regs_update(act_regs), .start,
    .pwm, .pwm_n, .c_direct, .error
  );

endmodule
