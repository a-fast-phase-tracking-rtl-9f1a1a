// dco: behavioural model of the cell-based MUX-type digitally controlled
// oscillator. Not synthesizable: the real block is a ring of standard cells
// whose period is set by cell delays, which only a timing model can show.
//
// The ring is an enable stage (held off by reset_n), a fine-tuning stage of
// 64 digitally controlled varactor loads (cells built from the gate
// capacitance of NAND gates) (fine_sel, thermometer) and a
// coarse-tuning chain of 128 OR-gate/multiplexer stages (coarse_sel,
// one-hot), as in the document. Its period is modelled as
//   T = T_INTR + coarse * T_COARSE + fine * T_FINE
// with the typical-corner numbers the document reports from circuit
// simulation: 2.63 ns intrinsic period, 448.02 ps mean coarse step and
// 11.48 ps mean fine step (a 64-step fine range of about 723 ps, more than
// one coarse step, so coarse and fine ranges overlap). Modelling the period
// as linear in the codes (no DNL/INL) is this model's simplification.
//
// The control lines are sampled at every falling output edge, half a period
// after the sigma-delta modulator has moved them on the rising edge, and the
// low and the following high half both use that code: one code per period,
// the glitch-free behaviour the modified (OR-gate) DCO is built to give.
// While reset_n is low the output is held low.
//
// Lint note: the half-period delay is computed at run time, so lint cannot
// prove it non-zero (ZERODLY); it is at least T_INTR/2 = 1.3 ns.
module dco #(
  parameter real T_INTR_PS   = 2630.0,   // period at coarse = fine = 0
  parameter real T_COARSE_PS = 448.02,   // per coarse step
  parameter real T_FINE_PS   = 11.48     // per fine (DCV) step
) (
  input  logic         reset_n,
  input  logic [127:0] coarse_sel,
  input  logic [63:0]  fine_sel,
  output logic         ck_out
);

  timeunit 1ps;
  timeprecision 1fs;

  int unsigned coarse_idx, fine_cnt;
  real         half;

  always_comb begin
    coarse_idx = 0;
    for (int i = 127; i >= 0; i--)
      if (coarse_sel[i]) coarse_idx = i;
    fine_cnt = $countones(fine_sel);
  end

  initial ck_out = 1'b0;

  always begin
    if (!reset_n) begin
      ck_out = 1'b0;
      @(posedge reset_n);
    end else begin
      half = (T_INTR_PS + real'(coarse_idx) * T_COARSE_PS
              + real'(fine_cnt) * T_FINE_PS) / 2.0;
      #(half) ck_out = 1'b1;
      #(half) ck_out = 1'b0;
    end
  end

endmodule
