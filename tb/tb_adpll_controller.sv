// tb_adpll_controller: directed test of the PLL controller.
//
// Drives lead/lag flags one phase clock at a time and checks, against codes
// worked out here by hand, the whole state sequence: coarse SAR with step 8
// halved at every phase polarity, entry to frequency search when the step
// reaches 1, the filter-average reload on polarity, the exit after 15
// polarities with the average coarse code and a filter flush, the fine &
// fraction SAR with step {0,32,0} halved down to the SD_MODE minimum
// (13 polarities for 8 fraction bits, 11 for 6 bits), and LOCK after exactly
// 128 polarities of phase tracking. Also checks that a dead-zone comparison
// changes nothing and the SDM/TDC-loop enables per state.
module tb_adpll_controller;

  timeunit 1ps;
  timeprecision 1fs;

  import adpll_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b1, flag_u = 1'b1, flag_d = 1'b1;
  logic [1:0]  sd_mode = 2'd0;
  logic [20:0] avg_code = '0;
  logic        filter_ok = 1'b0;
  logic        lead, lag, polarity, filter_load, filter_flush;
  ctrl_state_t state;
  logic [20:0] dco_code_base;
  logic        sdm_en, tdc_en, lock;
  int checks = 0, failures = 0;

  adpll_controller dut (.*);

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL: %s (state %0d code %h)", m, state, dco_code_base);
    end
  endtask

  // dir: 1 = FB led (code up), 0 = FB lagged (code down), 2 = dead zone
  task automatic tick(input int dir);
    flag_u = (dir != 0);
    flag_d = (dir != 1);
    #1000 clk = 1'b1;
    #1000 clk = 1'b0;
  endtask

  function automatic logic [20:0] code(input int c, input int low);
    return {7'(c), 14'(low)};
  endfunction

  task automatic reset_dut();
    rst_n = 1'b0;
    #1000 rst_n = 1'b1;
    #1000;
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int low, step, pols;
    #1000;
    reset_dut();
    chk(dco_code_base == code(0, 32 << 8), "start code {0,32,0}");
    chk(state == ST_COARSE_SAR && !sdm_en && !tdc_en && !lock, "start in coarse SAR");
    // coarse SAR
    repeat (5) tick(1);
    chk(dco_code_base == code(40, 32 << 8), "five steps of 8 up");
    tick(2);
    chk(dco_code_base == code(40, 32 << 8), "dead zone leaves the code");
    tick(0);
    chk(dco_code_base == code(36, 32 << 8), "polarity halves the step to 4");
    tick(0);
    chk(dco_code_base == code(32, 32 << 8), "step 4 down");
    tick(1);
    chk(dco_code_base == code(34, 32 << 8), "polarity: step 2 up");
    chk(state == ST_COARSE_SAR, "still coarse SAR at step 2");
    tick(0);
    chk(dco_code_base == code(33, 32 << 8) && state == ST_FREQ_SRCH, "step 1: frequency search");
    // frequency search: 15 polarities, filter average reload
    tick(0);
    chk(dco_code_base == code(32, 32 << 8), "step {1,0,0} down");
    filter_ok = 1'b1;
    avg_code  = code(50, 14'h1234);
    for (int i = 1; i <= 14; i++) begin
      tick(i % 2);
      chk(dco_code_base == code(50, 32 << 8) && state == ST_FREQ_SRCH,
          $sformatf("search polarity %0d reloads the average coarse code", i));
    end
    avg_code = code(60, 14'h0100);
    tick(1);
    chk(state == ST_FINE_SAR && dco_code_base == code(60, 32 << 8) && filter_flush,
        "15th polarity: coarse code fixed, fine SAR, filter flushed");
    chk(sdm_en && !tdc_en, "SDM on in fine SAR");
    // fine & fraction SAR, filter not yet full
    filter_ok = 1'b0;
    low  = 32 << 8;
    step = 32 << 8;
    tick(0);
    low -= step;
    chk(dco_code_base == code(60, low), "fine step {0,32,0} down");
    pols = 0;
    for (int i = 0; i < 13; i++) begin
      tick(i % 2 == 0 ? 1 : 0);
      step = step >> 1;
      low  = (i % 2 == 0) ? low + step : low - step;
      pols++;
      chk(dco_code_base == code(60, low), $sformatf("fine SAR polarity %0d step %0d", pols, step));
      chk(state == ((pols < 13) ? ST_FINE_SAR : ST_PHASE_TRK), "state during fine SAR");
    end
    chk(tdc_en && sdm_en, "TDC loop on in phase tracking");
    // phase tracking: minimum step, reload average, lock after 128 polarities
    tick(1);   // same direction as the last: no polarity
    low += 1;
    chk(dco_code_base == code(60, low), "tracking step {0,0,1}");
    filter_ok = 1'b1;
    avg_code  = code(60, 14'h2abc);
    for (int i = 1; i <= 128; i++) begin
      tick(i % 2 == 1 ? 0 : 1);
      if (i == 1) chk(dco_code_base == code(60, 14'h2abc), "tracking reloads the filter average");
      if (i == 127) chk(!lock, "no lock after 127 polarities");
    end
    chk(lock, "lock after 128 polarities");
    chk(dco_code_base[20:14] == 7'd60, "coarse code held in tracking");

    // 6-bit fraction: fine SAR ends at step 4 (11 polarities)
    reset_dut();
    sd_mode = 2'd1;
    filter_ok = 1'b0;
    repeat (2) tick(1);
    tick(0); tick(1); tick(0);                 // 8 -> 4 -> 2 -> 1
    chk(state == ST_FREQ_SRCH, "6-bit run: frequency search");
    for (int i = 0; i < 15; i++) tick((i + 1) % 2);
    chk(state == ST_FINE_SAR, "6-bit run: fine SAR");
    tick(0);                                   // first decision, no polarity
    for (int i = 0; i < 11; i++) begin
      chk(state == ST_FINE_SAR, "6-bit run: fine SAR before 11 polarities");
      tick((i + 1) % 2);
    end
    chk(state == ST_PHASE_TRK, "6-bit run: tracking after 11 polarities");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
