// tb_adpll_modes: the ADPLL at its default parameters in the five display
// modes it is built for, each from reset to lock and then over 100 lines.
//
// Modes (60 Hz timings): VGA 800 pixels per line at 31.5 kHz (25.175 MHz
// pixel clock), SVGA 1056 at 37.9 kHz (40 MHz), XGA 1344 at 48.4 kHz
// (65 MHz), SXGA 1688 at 64 kHz (108 MHz), UXGA 2160 at 75 kHz (162 MHz).
// Each mode runs twice with the 8-bit fraction: with a clean HSYNC and the
// TDC loop off, and with +/-1.2 ns of uniform HSYNC jitter and the TDC loop
// on. Checks: lock within 6000 lines; the mean pixel period after lock equals
// line period / M within 0.1 %; every FB_CLK edge within a bound of its
// HSYNC edge (1 ns clean, 3 ns with jitter). The clean runs are repeated
// with the 6-bit fraction (bound 4 ns), and at UXGA the 6-bit error must
// exceed the 8-bit one. UXGA also runs with 0.2, 0.5 and 1.0 ns of jitter
// and the TDC loop on (bound 3 ns). A last UXGA run with jitter and
// the TDC loop off must show a larger phase error than with it on. The phase
// errors found are printed in ns and in % of the pixel period.
module tb_adpll_modes;

  timeunit 1ps;
  timeprecision 1fs;

  import adpll_pkg::*;

  logic        RESET = 1'b0;
  logic        HSYNC = 1'b0;
  logic        EN_CKOUT = 1'b1;
  logic        EN_TDC_LOOP = 1'b0;
  logic [1:0]  SD_MODE = 2'd0;
  logic [3:0]  DIVM_MODE = 4'd1;
  logic        HSYNCD, FB_CLK, CKOUT, LOCK;
  logic [1:0]  FSM;
  logic        PHASE_CLK, P_UP, P_DOWN;
  logic [DIVM_W-1:0] DIVM;
  logic [CODE_W-1:0] DCO_CODE_FRAC;
  logic [TDC_W-1:0]  TDC_CODE;
  logic [INT_W-1:0]  DCO_CODE_INT;

  adpll_top dut (.*);

  int checks = 0, failures = 0;
  real t_line_ps = 31_777.0e3;
  real jitter_ps = 0.0;
  bit  hsync_run = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    real j;
    forever begin
      if (!hsync_run) begin
        HSYNC = 1'b0;
        #(1000.0);
      end else begin
        j = (jitter_ps > 0.0) ? (real'($urandom_range(2000)) / 1000.0 - 1.0) * jitter_ps : 0.0;
        #(j + 2000.0);
        HSYNC = 1'b1;
        #(t_line_ps / 8.0);
        HSYNC = 1'b0;
        #(t_line_ps * 0.875 - j - 2000.0);
      end
    end
  end

  realtime t_hs;
  real     max_err;
  int      n_fb;
  bit      measuring = 1'b0;
  int unsigned n_pix;
  always @(posedge HSYNC) t_hs = $realtime;
  always @(posedge FB_CLK) begin
    real e, e2;
    if (measuring) begin
      e  = $realtime - t_hs;
      e2 = t_line_ps - e;
      if (e2 < e) e = e2;
      if (e > max_err) max_err = e;
      n_fb++;
    end
  end
  always @(posedge dut.pix_clk) if (measuring) n_pix++;

  task automatic run(input logic [3:0] mode, input real tline, input bit tdc,
                     input real jit, input real bound_ps, input string name,
                     input bit strict = 1'b1, input logic [1:0] sdm = 2'd0);
    int line;
    realtime t0;
    real mean, ideal;
    #(1000.0);
    RESET = 1'b1;
    hsync_run = 1'b0;
    DIVM_MODE = mode;
    EN_TDC_LOOP = tdc;
    SD_MODE = sdm;
    t_line_ps = tline;
    jitter_ps = jit;
    #(20_000.0);
    RESET = 1'b0;
    hsync_run = 1'b1;
    line = 0;
    while (!LOCK && line < 6000) begin
      @(posedge HSYNC);
      line++;
    end
    if (strict) check(LOCK === 1'b1, {name, ": lock"});
    @(posedge HSYNC);
    max_err = 0.0;
    n_fb = 0;
    n_pix = 0;
    measuring = 1'b1;
    t0 = $realtime;
    repeat (100) @(posedge HSYNC);
    measuring = 1'b0;
    mean  = ($realtime - t0) / real'(n_pix);
    ideal = tline / real'(divm_value(mode));
    $display("%s: lock after %0d lines; pixel period %0.2f ps (ideal %0.2f); max phase error %0.3f ns = %0.1f %% of a pixel",
             name, line, mean, ideal, max_err / 1000.0, 100.0 * max_err / ideal);
    if (strict) begin
      check(n_fb >= 99, {name, ": FB_CLK at the line rate"});
      check(mean > ideal * 0.999 && mean < ideal * 1.001, {name, ": pixel period"});
      check(max_err < bound_ps, {name, ": phase error"});
    end
    last_err = max_err;
  endtask

  real last_err, err_tdc_on, err_8bit;

  initial begin
    #(2_000_000_000_000.0);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run(4'd1, 800.0  * 1.0e6 / 25.175, 1'b0, 0.0, 1000.0, "VGA");
    run(4'd2, 1056.0 * 1.0e6 / 40.0,   1'b0, 0.0, 1000.0, "SVGA");
    run(4'd3, 1344.0 * 1.0e6 / 65.0,   1'b0, 0.0, 1000.0, "XGA");
    run(4'd4, 1688.0 * 1.0e6 / 108.0,  1'b0, 0.0, 1000.0, "SXGA");
    run(4'd5, 2160.0 * 1.0e6 / 162.0,  1'b0, 0.0, 1000.0, "UXGA");
    err_8bit = last_err;
    // 6-bit fraction: coarser equivalent step, larger phase excursions
    run(4'd1, 800.0  * 1.0e6 / 25.175, 1'b0, 0.0, 4000.0, "VGA 6-bit", 1'b1, 2'd1);
    run(4'd2, 1056.0 * 1.0e6 / 40.0,   1'b0, 0.0, 4000.0, "SVGA 6-bit", 1'b1, 2'd1);
    run(4'd3, 1344.0 * 1.0e6 / 65.0,   1'b0, 0.0, 4000.0, "XGA 6-bit", 1'b1, 2'd1);
    run(4'd4, 1688.0 * 1.0e6 / 108.0,  1'b0, 0.0, 4000.0, "SXGA 6-bit", 1'b1, 2'd1);
    run(4'd5, 2160.0 * 1.0e6 / 162.0,  1'b0, 0.0, 4000.0, "UXGA 6-bit", 1'b1, 2'd1);
    check(last_err > err_8bit, "8-bit fraction tracks UXGA closer than 6-bit");
    run(4'd1, 800.0  * 1.0e6 / 25.175, 1'b1, 1200.0, 3000.0, "VGA jitter+TDC");
    run(4'd2, 1056.0 * 1.0e6 / 40.0,   1'b1, 1200.0, 3000.0, "SVGA jitter+TDC");
    run(4'd3, 1344.0 * 1.0e6 / 65.0,   1'b1, 1200.0, 3000.0, "XGA jitter+TDC");
    run(4'd4, 1688.0 * 1.0e6 / 108.0,  1'b1, 1200.0, 3000.0, "SXGA jitter+TDC");
    run(4'd5, 2160.0 * 1.0e6 / 162.0,  1'b1, 1200.0, 3000.0, "UXGA jitter+TDC");
    err_tdc_on = last_err;
    // smaller jitter amplitudes at UXGA, TDC loop on
    run(4'd5, 2160.0 * 1.0e6 / 162.0,  1'b1, 200.0,  3000.0, "UXGA jitter 0.2 ns +TDC");
    run(4'd5, 2160.0 * 1.0e6 / 162.0,  1'b1, 500.0,  3000.0, "UXGA jitter 0.5 ns +TDC");
    run(4'd5, 2160.0 * 1.0e6 / 162.0,  1'b1, 1000.0, 3000.0, "UXGA jitter 1.0 ns +TDC");
    // the same jitter without the TDC loop (measured after lock or after
    // 6000 lines, whichever comes first): the phase error must be larger
    run(4'd5, 2160.0 * 1.0e6 / 162.0,  1'b0, 1200.0, 0.0, "UXGA jitter, TDC off", 1'b0);
    check(err_tdc_on < last_err, "TDC loop reduces the UXGA phase error under jitter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
