// tb_adpll_top: end-to-end test of the video clock ADPLL.
//
// Drives HSYNC at a fixed line rate and runs the loop from reset to LOCK in
// several configurations: the 32x test mode (6 MHz HSYNC, 192 MHz pixel
// clock) with 8-, 6- and 4-bit fractions, with and without the TDC loop,
// with and without HSYNC jitter, and with the SDM switched off (SD_MODE 3).
// For each run it checks, against numbers worked out here from the stimulus:
//   - LOCK rises within a bounded number of lines, after the FSM has passed
//     through states 0, 1, 2 and 3 in order;
//   - after lock the mean pixel-clock period equals T_HSYNC / M within 0.3 %;
//   - after lock every FB_CLK rising edge lies within a bound of the HSYNC
//     edge (the phase error the design exists to keep small);
//   - CKOUT toggles only while EN_CKOUT is high.
// It counts each mechanism of the design as it happens (each FSM state,
// phase polarity, filter-average reload, SDM dithering, a non-zero TDC-loop
// correction, a comparison in the PFD dead zone, lock) and fails a mechanism
// that never happened.
module tb_adpll_top;

  timeunit 1ps;
  timeprecision 1fs;

  import adpll_pkg::*;

  logic        RESET = 1'b0;   // raised by each run, so the resets see an edge
  logic        HSYNC = 1'b0;
  logic        EN_CKOUT = 1'b1;
  logic        EN_TDC_LOOP = 1'b0;
  logic [1:0]  SD_MODE = 2'd0;
  logic [3:0]  DIVM_MODE = 4'd6;
  logic        HSYNCD, FB_CLK, CKOUT, LOCK;
  logic [1:0]  FSM;
  logic        PHASE_CLK, P_UP, P_DOWN;
  logic [DIVM_W-1:0] DIVM;
  logic [CODE_W-1:0] DCO_CODE_FRAC;
  logic [TDC_W-1:0]  TDC_CODE;
  logic [INT_W-1:0]  DCO_CODE_INT;

  adpll_top dut (.*);

  int checks = 0, failures = 0;

  // mechanism counters
  int n_state [4];
  int n_polarity = 0, n_reload = 0, n_dither = 0, n_tdc_corr = 0;
  int n_deadzone = 0, n_lock = 0, n_gated = 0;

  real t_line_ps   = 166_666.667;  // 6 MHz HSYNC
  real jitter_ps   = 0.0;          // peak HSYNC jitter (uniform)
  bit  hsync_run   = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // HSYNC source: period t_line_ps, edge jitter +/- jitter_ps
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
        #(t_line_ps / 4.0);
        HSYNC = 1'b0;
        #(t_line_ps * 0.75 - j - 2000.0);
      end
    end
  end

  // Mechanism monitors
  logic [1:0] fsm_prev = 2'd0;
  // sampled at the phase-clock edge, before the controller's registers move
  always @(posedge PHASE_CLK) begin
    if (!RESET) begin
      n_state[FSM]++;
      if (dut.u_ctrl.polarity) n_polarity++;
      if (dut.u_ctrl.polarity && dut.filter_ok) n_reload++;
      if (dut.flag_u && dut.flag_d) n_deadzone++;
    end
  end

  always @(posedge PHASE_CLK) begin
    #1;
    if (dut.cp_code != 0) n_tdc_corr++;
  end

  logic [INT_W-1:0] int_prev;
  always @(posedge dut.pix_clk) begin
    #1;
    if (DCO_CODE_INT != int_prev && dut.sync_out[CODE_W]) n_dither++;
    int_prev = DCO_CODE_INT;
  end

  // phase measurement: time of the last HSYNC rise and FB_CLK rise
  realtime t_hs, t_fb;
  real     max_err;
  int      n_fb;
  bit      measuring = 1'b0;
  always @(posedge HSYNC) t_hs = $realtime;
  always @(posedge FB_CLK) begin
    real e, e2;
    t_fb = $realtime;
    if (measuring) begin
      e  = t_fb - t_hs;                 // FB after last HSYNC
      e2 = t_line_ps - e;               // or before the next one
      if (e2 < e) e = e2;
      if (e > max_err) max_err = e;
      n_fb++;
    end
  end

  // pixel clock count for the mean period
  int unsigned n_pix;
  always @(posedge dut.pix_clk) if (measuring) n_pix++;

  int unsigned n_ck;
  always @(posedge CKOUT) n_ck++;

  // One run from reset to lock, then measure `lines` lines.
  task automatic run(input logic [3:0] mode, input logic [1:0] sdm, input bit tdc,
                     input real tline, input real jit, input int max_lines,
                     input int lines, input real err_bound_ps, input string name);
    int   seq_ok;
    logic [1:0] last;
    int   line;
    realtime t0;
    real  mean, ideal;
    #(1000.0);
    RESET = 1'b1;
    hsync_run = 1'b0;
    DIVM_MODE = mode;
    SD_MODE = sdm;
    EN_TDC_LOOP = tdc;
    t_line_ps = tline;
    jitter_ps = jit;
    #(20_000.0);
    RESET = 1'b0;
    hsync_run = 1'b1;
    seq_ok = 1;
    last = 2'd0;
    line = 0;
    while (!LOCK && line < max_lines) begin
      @(posedge HSYNC);
      line++;
      if (FSM != last) begin
        if (FSM != last + 2'd1) seq_ok = 0;
        last = FSM;
      end
    end
    check(LOCK === 1'b1, {name, ": LOCK rises"});
    check(seq_ok == 1 && last == 2'd3, {name, ": FSM passes 0,1,2,3 in order"});
    if (LOCK) n_lock++;
    $display("%s: lock after %0d lines, code %h", name, line, DCO_CODE_FRAC);
    // settle one extra line, then measure
    @(posedge HSYNC);
    max_err = 0.0;
    n_fb = 0;
    n_pix = 0;
    measuring = 1'b1;
    t0 = $realtime;
    repeat (lines) @(posedge HSYNC);
    measuring = 1'b0;
    mean  = ($realtime - t0) / real'(n_pix);
    ideal = tline / real'(divm_value(mode));
    $display("%s: mean pixel period %0.2f ps (ideal %0.2f), max phase error %0.1f ps over %0d edges",
             name, mean, ideal, max_err, n_fb);
    check(n_fb >= lines - 1, {name, ": FB_CLK runs at the line rate"});
    check(mean > ideal * 0.997 && mean < ideal * 1.003, {name, ": mean pixel period"});
    check(max_err < err_bound_ps, {name, ": phase error bound"});
  endtask

  initial begin
    // watchdog
    #(2_000_000_000.0);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (n_state[i]) n_state[i] = 0;
    // 32x test mode, 8-bit fraction, no jitter, TDC loop off
    run(4'd6, 2'd0, 1'b0, 166_666.667, 0.0, 8000, 200, 2000.0, "test32_sd8");
    // 6-bit fraction
    run(4'd6, 2'd1, 1'b0, 166_666.667, 0.0, 8000, 200, 2000.0, "test32_sd6");
    // 4-bit fraction
    run(4'd6, 2'd2, 1'b0, 166_666.667, 0.0, 8000, 200, 4000.0, "test32_sd4");
    // SDM off: integer code only, larger phase excursions allowed
    run(4'd6, 2'd3, 1'b0, 166_666.667, 0.0, 8000, 200, 20000.0, "test32_sdoff");
    // HSYNC jitter with the TDC loop on
    run(4'd6, 2'd0, 1'b1, 166_666.667, 1200.0, 8000, 300, 4000.0, "test32_jit_tdc");
    // 64x mode at 3 MHz HSYNC
    run(4'd7, 2'd0, 1'b1, 333_333.333, 0.0, 8000, 200, 3000.0, "test64_tdc");

    // CKOUT gating
    EN_CKOUT = 1'b0;
    repeat (2) @(posedge HSYNC);
    n_ck = 0;
    repeat (3) @(posedge HSYNC);
    check(n_ck == 0, "CKOUT stopped while EN_CKOUT low");
    if (n_ck == 0) n_gated++;
    EN_CKOUT = 1'b1;
    repeat (2) @(posedge HSYNC);
    n_ck = 0;
    repeat (3) @(posedge HSYNC);
    check(n_ck > 3 * 60, "CKOUT runs while EN_CKOUT high");

    $display("mechanisms: states %0d/%0d/%0d/%0d polarity %0d reload %0d dither %0d tdc %0d deadzone %0d lock %0d gated %0d",
             n_state[0], n_state[1], n_state[2], n_state[3], n_polarity, n_reload,
             n_dither, n_tdc_corr, n_deadzone, n_lock, n_gated);
    foreach (n_state[i]) check(n_state[i] > 0, $sformatf("state %0d visited", i));
    check(n_polarity > 0, "phase polarity happened");
    check(n_reload > 0, "filter average reload happened");
    check(n_dither > 0, "SDM dithering happened");
    check(n_tdc_corr > 0, "TDC-loop correction happened");
    check(n_lock > 0, "lock happened");
    check(n_deadzone > 0, "comparison inside the PFD dead zone happened");
    check(n_gated > 0, "clock gating happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
