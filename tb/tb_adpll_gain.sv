// tb_adpll_gain: effect of the TDC-loop gain on phase tracking under HSYNC
// jitter, in UXGA mode (M = 2160, 75 kHz HSYNC).
//
// Three copies of the ADPLL, with the TDC loop gain at 50 %, 100 % and 200 %
// of the ideal gain (TDC_GAIN_PCT), see the same HSYNC. Two jitter patterns
// are run, each from reset to lock and then over 200 measured lines:
//   - fast: each HSYNC edge independently displaced, uniform in +/-1.2 ns;
//   - slow: a sinusoidal displacement of 1.2 ns amplitude with a period of
//     12 lines, so consecutive edges move in the same direction.
// For each copy the worst FB_CLK-to-HSYNC error after lock is measured.
// Checks: all copies lock; with slow jitter the ideal gain tracks better than
// half the ideal gain (a larger gain removes drift that keeps one direction);
// with fast jitter half the ideal gain is no worse than twice the ideal gain
// (a large gain over-corrects edges that jump back and forth). All errors are
// printed.
module tb_adpll_gain;

  timeunit 1ps;
  timeprecision 1fs;

  import adpll_pkg::*;

  localparam int N = 3;
  localparam int unsigned PCT [N] = '{50, 100, 200};
  localparam real T_LINE_PS = 2160.0 * 1.0e6 / 162.0;   // UXGA at 60 Hz

  logic        RESET = 1'b0;
  logic        HSYNC = 1'b0;
  logic [N-1:0] FB_CLK, LOCK;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  for (genvar g = 0; g < N; g++) begin : g_pll
    logic        hsyncd, ckout, phase_clk, p_up, p_down;
    logic [1:0]  fsm;
    logic [DIVM_W-1:0] divm;
    logic [CODE_W-1:0] code_frac;
    logic [TDC_W-1:0]  tdc_code;
    logic [INT_W-1:0]  code_int;
    adpll_top #(.TDC_GAIN_PCT(PCT[g])) dut (
      .RESET         (RESET),
      .HSYNC         (HSYNC),
      .EN_CKOUT      (1'b1),
      .EN_TDC_LOOP   (1'b1),
      .SD_MODE       (2'd0),
      .DIVM_MODE     (4'd5),
      .HSYNCD        (hsyncd),
      .FB_CLK        (FB_CLK[g]),
      .CKOUT         (ckout),
      .LOCK          (LOCK[g]),
      .FSM           (fsm),
      .PHASE_CLK     (phase_clk),
      .P_UP          (p_up),
      .P_DOWN        (p_down),
      .DIVM          (divm),
      .DCO_CODE_FRAC (code_frac),
      .TDC_CODE      (tdc_code),
      .DCO_CODE_INT  (code_int)
    );
  end

  // HSYNC source: jitter_mode 0 = fast (independent uniform), 1 = slow (sine)
  bit  hsync_run = 1'b0;
  int  jitter_mode = 0;
  int  line_no = 0;
  initial begin
    real j;
    forever begin
      if (!hsync_run) begin
        HSYNC = 1'b0;
        #(1000.0);
      end else begin
        if (jitter_mode == 0) j = (real'($urandom_range(2000)) / 1000.0 - 1.0) * 1200.0;
        else                  j = 1200.0 * $sin(2.0 * 3.14159265358979 * real'(line_no) / 12.0);
        line_no++;
        #(j + 2000.0);
        HSYNC = 1'b1;
        #(T_LINE_PS / 8.0);
        HSYNC = 1'b0;
        #(T_LINE_PS * 0.875 - j - 2000.0);
      end
    end
  end

  // phase error per copy
  realtime t_hs;
  real     max_err [N];
  bit      measuring = 1'b0;
  always @(posedge HSYNC) t_hs = $realtime;
  for (genvar g = 0; g < N; g++) begin : g_meas
    always @(posedge FB_CLK[g]) begin
      real e, e2;
      if (measuring) begin
        e  = $realtime - t_hs;
        e2 = T_LINE_PS - e;
        if (e2 < e) e = e2;
        if (e > max_err[g]) max_err[g] = e;
      end
    end
  end

  real err_fast [N], err_slow [N];

  task automatic run(input int mode, input string name, output real err [N]);
    int line;
    #(1000.0);
    RESET = 1'b1;
    hsync_run = 1'b0;
    jitter_mode = mode;
    line_no = 0;
    #(20_000.0);
    RESET = 1'b0;
    hsync_run = 1'b1;
    line = 0;
    while (LOCK != '1 && line < 6000) begin
      @(posedge HSYNC);
      line++;
    end
    check(LOCK == '1, {name, ": all copies lock"});
    @(posedge HSYNC);
    foreach (max_err[i]) max_err[i] = 0.0;
    measuring = 1'b1;
    repeat (200) @(posedge HSYNC);
    measuring = 1'b0;
    foreach (max_err[i]) begin
      err[i] = max_err[i];
      $display("%s jitter, gain %0d %% of ideal: max phase error %0.3f ns",
               name, PCT[i], max_err[i] / 1000.0);
    end
  endtask

  initial begin
    #(200_000_000_000.0);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run(0, "fast", err_fast);
    run(1, "slow", err_slow);
    check(err_slow[1] < err_slow[0], "slow jitter: ideal gain beats half gain");
    check(err_fast[0] <= err_fast[2], "fast jitter: half gain no worse than double gain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
