// tb_tdc_loop: checks the TDC loop against arithmetic done here.
//
// For random lead/lag decisions, TDC codes, gains and base codes it checks
// that, after the phase clock, dco_code_frac = base + sign * floor(code *
// gain / 16), saturated inside the 14-bit fine+fraction field with the
// coarse field untouched; that the correction is replaced (not accumulated)
// at each clock; and that it is zero when en is low or neither flag is set.
module tb_tdc_loop;

  timeunit 1ps;
  timeprecision 1fs;

  logic        clk = 1'b0, rst_n = 1'b0, en = 1'b0, lead = 1'b0, lag = 1'b0;
  logic [5:0]  code_lead = '0, code_lag = '0;
  logic [11:0] gain = '0;
  logic [20:0] dco_code_base = '0;
  logic signed [15:0] cp_code;
  logic [20:0] dco_code_frac;
  int checks = 0, failures = 0;

  tdc_loop dut (.*);

  function automatic logic [20:0] expected(input bit e, input bit ld, input bit lg,
                                           input int cl, input int cg, input int g,
                                           input logic [20:0] base);
    longint corr, low;
    if (!e)      corr = 0;
    else if (ld) corr =  (longint'(cl) * g) / 16;
    else if (lg) corr = -((longint'(cg) * g) / 16);
    else         corr = 0;
    if (corr > 16383)  corr = 16383;
    if (corr < -16383) corr = -16383;
    low = longint'(base[13:0]) + corr;
    if (low < 0) low = 0;
    if (low > 16383) low = 16383;
    return {base[20:14], 14'(low)};
  endfunction

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [20:0] exp_v;
    #1000 rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      #1000;
      en        = ($urandom_range(9) != 0);
      case ($urandom_range(2))
        0: begin lead = 1'b1; lag = 1'b0; end
        1: begin lead = 1'b0; lag = 1'b1; end
        default: begin lead = 1'b0; lag = 1'b0; end
      endcase
      code_lead = 6'($urandom);
      code_lag  = 6'($urandom);
      gain      = (i < 1000) ? 12'($urandom_range(64)) : 12'($urandom);
      exp_v     = expected(en, lead, lag, code_lead, code_lag, gain, 21'($urandom));
      dco_code_base = {exp_v[20:14], 14'($urandom)};
      exp_v     = expected(en, lead, lag, code_lead, code_lag, gain, dco_code_base);
      #1000 clk = 1'b1;
      #1000 clk = 1'b0;
      checks++;
      if (dco_code_frac !== exp_v) begin
        failures++;
        if (failures < 10)
          $display("FAIL: en=%b lead=%b lag=%b cl=%0d cg=%0d g=%0d base=%h got %h exp %h",
                   en, lead, lag, code_lead, code_lag, gain, dco_code_base, dco_code_frac, exp_v);
      end
      // a new base code with no clock: the same correction applies to it
      dco_code_base = dco_code_base ^ 21'h1;
      exp_v = expected(en, lead, lag, code_lead, code_lag, gain, dco_code_base);
      #1;
      checks++;
      if (dco_code_frac !== exp_v) begin
        failures++;
        $display("FAIL: correction not held between clocks");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
