// adpll_top: fast phase-tracking all-digital PLL that turns the HSYNC pulse
// of a video source into the pixel clock, M = 800..2160 times faster and
// phase-aligned to HSYNC.
//
// Loop: the PFD compares HSYNC (REF_CLK) with FB_CLK, the DCO clock divided
// by M. Its lead/lag flags drive the controller, which searches the coarse
// code, then the fine and fractional code, then tracks phase (FSM output 0..3)
// and keeps a loop filter of recent codes whose trimmed average is the
// baseline it falls back to on each phase reversal. Two TDCs measure how far
// FB_CLK led or lagged; in phase tracking the TDC loop adds that error, times
// a gain, to the code for one line only. The 21-bit result crosses into the
// pixel-clock domain, where a first-order sigma-delta modulator dithers the
// 13-bit integer DCO code so the average period over a line has the
// resolution of the 8-bit fraction. The divider closes the loop.
//
// Clock domains: the phase clock (one pulse per comparison, made by the PFD)
// runs controller, filter and TDC loop; the pixel clock (the DCO output) runs
// the SDM and the divider; code_sync carries the code between them on the
// falling edge of the phase clock, after both domain's inputs have settled.
//
// Ports follow the chip's pad list: RESET, HSYNC, EN_CKOUT, EN_TDC_LOOP,
// SD_MODE (fraction bits 8/6/4/0), DIVM_MODE (multiplication factor) in;
// HSYNCD, FB_CLK, CKOUT, LOCK, FSM out. The internal buses shown in the
// design's post-layout waveform (divider factor, DCO code, TDC code, p_up,
// p_down) are brought out as observation ports.
//
// This design's choices: RESET is active high and asynchronous for both
// domains (the DCO is stopped while it is asserted, so its release is
// clean); CKOUT is gated by EN_CKOUT sampled on the falling pixel-clock edge;
// the TDC loop gain for each DIVM_MODE is computed at elaboration from the
// document's ideal-gain formula and the TDC and DCO fine resolutions,
// scaled by TDC_GAIN_PCT.
//
// Lint note: the controller's polarity strobe and the TDC loop's signed
// correction cp_code are not used inside the top; they are kept as named
// nets so that a testbench can observe them.
module adpll_top
  import adpll_pkg::*;
#(
  parameter real         T_INTR_PS    = 2630.0,  // DCO period at code 0
  parameter real         T_COARSE_PS  = 448.02,  // DCO coarse step
  parameter real         T_FINE_PS    = 11.48,   // DCO fine step
  parameter real         T_TDC_PS     = 100.0,   // TDC resolution
  parameter real         T_TDC_DZ_PS  = 190.0,   // TDC dead zone
  parameter int unsigned TDC_GAIN_PCT = 100      // TDC loop gain, % of ideal
) (
  input  logic                RESET,
  input  logic                HSYNC,
  input  logic                EN_CKOUT,
  input  logic                EN_TDC_LOOP,
  input  logic [1:0]          SD_MODE,
  input  logic [3:0]          DIVM_MODE,
  output logic                HSYNCD,
  output logic                FB_CLK,
  output logic                CKOUT,
  output logic                LOCK,
  output logic [1:0]          FSM,
  // observation
  output logic                PHASE_CLK,
  output logic                P_UP,          // FB_CLK led: code goes up
  output logic                P_DOWN,        // FB_CLK lagged: code goes down
  output logic [DIVM_W-1:0]   DIVM,
  output logic [CODE_W-1:0]   DCO_CODE_FRAC,
  output logic [TDC_W-1:0]    TDC_CODE,
  output logic [INT_W-1:0]    DCO_CODE_INT
);

  timeunit 1ps;
  timeprecision 1fs;

  // Ideal TDC gain, Q8.4 in fraction LSBs per TDC count, per DIVM_MODE.
  typedef logic [11:0] gain_lut_t [16];

  function automatic gain_lut_t make_gain_lut();
    gain_lut_t lut;
    real g;
    for (int i = 0; i < 16; i++) begin
      g = T_TDC_PS * real'(1 << FRAC_W) * 16.0 * real'(TDC_GAIN_PCT)
          / (100.0 * T_FINE_PS * real'(divm_value(4'(i))));
      lut[i] = (g > 4095.0) ? 12'hFFF : 12'($rtoi(g + 0.5));
    end
    return lut;
  endfunction

  localparam gain_lut_t GAIN_LUT = make_gain_lut();

  logic rst_n;
  logic pix_clk;
  logic phase_clk, phase_clk_n;
  logic flag_u, flag_d;
  logic lead, lag, polarity;
  logic [TDC_W-1:0] code_lead, code_lag;
  logic filter_load, filter_flush, filter_ok;
  logic [CODE_W-1:0] avg_code, code_base, code_frac;
  ctrl_state_t state;
  logic sdm_en, tdc_en, lock;
  logic signed [LOW_W+1:0] cp_code;

  // pixel-clock domain
  logic [CODE_W:0]   sync_in, sync_out;   // {sdm_en, code}
  logic [INT_W-1:0]  code_int;
  logic [2**COARSE_W-1:0] coarse_sel;
  logic [2**FINE_W-1:0]   fine_sel;
  logic en_ck_q;

  assign rst_n       = !RESET;
  assign phase_clk_n = !phase_clk;

  pfd u_pfd (
    .rst_n     (rst_n),
    .ref_clk   (HSYNC),
    .fb_clk    (FB_CLK),
    .flag_u    (flag_u),
    .flag_d    (flag_d),
    .phase_clk (phase_clk)
  );

  tdc #(.T_RES_PS(T_TDC_PS), .T_DZ_PS(T_TDC_DZ_PS)) u_tdc_lag (
    .rst_n (rst_n),
    .start (HSYNC),
    .stop  (FB_CLK),
    .code  (code_lag)     // REF first: FB_CLK lagged
  );

  tdc #(.T_RES_PS(T_TDC_PS), .T_DZ_PS(T_TDC_DZ_PS)) u_tdc_lead (
    .rst_n (rst_n),
    .start (FB_CLK),
    .stop  (HSYNC),
    .code  (code_lead)    // FB first: FB_CLK led
  );

  adpll_controller u_ctrl (
    .clk           (phase_clk),
    .rst_n         (rst_n),
    .flag_u        (flag_u),
    .flag_d        (flag_d),
    .sd_mode       (SD_MODE),
    .avg_code      (avg_code),
    .filter_ok     (filter_ok),
    .lead          (lead),
    .lag           (lag),
    .polarity      (polarity),
    .filter_load   (filter_load),
    .filter_flush  (filter_flush),
    .state         (state),
    .dco_code_base (code_base),
    .sdm_en        (sdm_en),
    .tdc_en        (tdc_en),
    .lock          (lock)
  );

  loop_filter u_filter (
    .clk     (phase_clk),
    .rst_n   (rst_n),
    .load    (filter_load),
    .flush   (filter_flush),
    .code_in (code_base),
    .avg     (avg_code),
    .ok      (filter_ok)
  );

  tdc_loop u_tdc_loop (
    .clk           (phase_clk),
    .rst_n         (rst_n),
    .en            (tdc_en && EN_TDC_LOOP),
    .lead          (lead),
    .lag           (lag),
    .code_lead     (code_lead),
    .code_lag      (code_lag),
    .gain          (GAIN_LUT[DIVM_MODE]),
    .dco_code_base (code_base),
    .cp_code       (cp_code),
    .dco_code_frac (code_frac)
  );

  assign sync_in = {sdm_en, code_frac};

  code_sync #(
    .W         (CODE_W + 1),
    .RESET_VAL ({1'b0, COARSE_W'(0), LOW_W'(32) << FRAC_W})
  ) u_sync (
    .src_clk   (phase_clk_n),
    .src_rst_n (rst_n),
    .src_load  (1'b1),
    .src_data  (sync_in),
    .dst_clk   (pix_clk),
    .dst_rst_n (rst_n),
    .dst_data  (sync_out)
  );

  sdm u_sdm (
    .clk      (pix_clk),
    .rst_n    (rst_n),
    .en       (sync_out[CODE_W]),
    .sd_mode  (SD_MODE),
    .code_in  (sync_out[CODE_W-1:0]),
    .code_out (code_int)
  );

  dco_decoder u_dec (
    .code       (code_int),
    .coarse_sel (coarse_sel),
    .fine_sel   (fine_sel)
  );

  dco #(
    .T_INTR_PS   (T_INTR_PS),
    .T_COARSE_PS (T_COARSE_PS),
    .T_FINE_PS   (T_FINE_PS)
  ) u_dco (
    .reset_n    (rst_n),
    .coarse_sel (coarse_sel),
    .fine_sel   (fine_sel),
    .ck_out     (pix_clk)
  );

  freq_divider u_div (
    .clk       (pix_clk),
    .rst_n     (rst_n),
    .divm_mode (DIVM_MODE),
    .divm      (DIVM),
    .fb_clk    (FB_CLK)
  );

  always_ff @(negedge pix_clk or negedge rst_n) begin
    if (!rst_n) en_ck_q <= 1'b0;
    else        en_ck_q <= EN_CKOUT;
  end

  assign CKOUT         = pix_clk & en_ck_q;
  assign HSYNCD        = HSYNC;
  assign LOCK          = lock;
  assign FSM           = state;
  assign PHASE_CLK     = phase_clk;
  assign P_UP          = lead;
  assign P_DOWN        = lag;
  assign DCO_CODE_FRAC = code_frac;
  assign TDC_CODE      = lead ? code_lead : (lag ? code_lag : '0);
  assign DCO_CODE_INT  = code_int;

endmodule
