// adpll_controller: the PLL control logic, clocked by the slow phase clock
// (one tick per HSYNC comparison).
//
// It reads the PFD's lead/lag flags and steers the 21-bit DCO control word
// {coarse[6:0], fine[5:0], frac[7:0]} through four states (the 2-bit FSM
// output):
//   0 Coarse SAR: step {8,0,0}; each tick the code moves one step up (FB_CLK
//     led HSYNC, so the period is too short) or down (FB_CLK lagged). On a
//     phase polarity (the lead/lag result differs from the previous one) the
//     step is halved and, once the loop filter holds enough codes, the code
//     is reloaded with the filter's average. When the step reaches {1,0,0}:
//   1 Frequency search: step {1,0,0} for 15 phase polarities, so the filter
//     can settle on an average coarse code. Then the coarse code is set to
//     that average and held from here on (coarse and fine never move at the
//     same time, which avoids the non-monotonic coarse/fine boundary), the
//     fine code is set to mid-range and the filter is emptied.
//   2 Fine & fraction SAR: like state 0 on the 14-bit fine+fraction field
//     with initial step {0,32,0}; the sigma-delta modulator is switched on.
//     When the step reaches the smallest step of the selected fraction width
//     ({0,0,1} with 8 bits):
//   3 Phase tracking: the code moves by the smallest step each tick and is
//     reloaded with the filter average on every polarity; the TDC loop is
//     switched on. After 128 polarities LOCK is raised.
// The state sequence, steps and counts follow the document.
//
// This design's choices: the start code is {0,32,0} (coarse at its fastest
// end, fine mid-range); a comparison in the PFD dead zone (both flags high)
// leaves the code and the polarity history unchanged; when the filter is not
// yet full a polarity moves the code by the halved step instead of
// reloading; the fine+fraction field saturates instead of carrying into the
// coarse field; LOCK stays high until reset.
//
// Timing: all outputs are registered on the phase clock except lead/lag and
// filter_load, which are decoded from the flags at the clock edge.
module adpll_controller
  import adpll_pkg::*;
#(
  parameter int unsigned COARSE_STEP0 = 8,    // initial coarse step
  parameter int unsigned FINE_STEP0   = 32,   // initial fine step
  parameter int unsigned FS_POLS      = 15,   // polarities in frequency search
  parameter int unsigned LOCK_POLS    = 128,  // polarities in tracking to lock
  parameter int unsigned FINE_INIT    = 32    // fine code at start and after search
) (
  input  logic              clk,        // phase clock
  input  logic              rst_n,
  input  logic              flag_u,     // low: FB_CLK lagged REF_CLK
  input  logic              flag_d,     // low: FB_CLK led REF_CLK
  input  logic [1:0]        sd_mode,
  input  logic [CODE_W-1:0] avg_code,   // from the loop filter
  input  logic              filter_ok,
  output logic              lead,
  output logic              lag,
  output logic              polarity,
  output logic              filter_load,
  output logic              filter_flush,
  output ctrl_state_t       state,
  output logic [CODE_W-1:0] dco_code_base,
  output logic              sdm_en,
  output logic              tdc_en,
  output logic              lock
);

  timeunit 1ps;
  timeprecision 1fs;

  localparam logic [LOW_W-1:0] FINE_INIT_LOW = LOW_W'(FINE_INIT) << FRAC_W;

  logic [COARSE_W-1:0] step_c;
  logic [LOW_W-1:0]    step_l;
  logic                prev_lead, have_prev;
  logic [7:0]          pol_cnt;
  logic                valid;
  logic [LOW_W-1:0]    min_step;

  logic [COARSE_W-1:0] coarse;
  logic [LOW_W-1:0]    low;

  assign coarse = dco_code_base[CODE_W-1:LOW_W];
  assign low    = dco_code_base[LOW_W-1:0];

  assign lead        = flag_u && !flag_d;
  assign lag         = flag_d && !flag_u;
  assign valid       = lead || lag;
  assign polarity    = valid && have_prev && (lead != prev_lead);
  assign filter_load = valid;
  assign min_step    = sd_min_step(sd_mode);

  // Saturating moves of the two fields.
  function automatic logic [COARSE_W-1:0] move_c(input logic [COARSE_W-1:0] v,
                                                  input logic [COARSE_W-1:0] s,
                                                  input logic up);
    logic [COARSE_W:0] t;
    if (up) begin
      t = {1'b0, v} + {1'b0, s};
      return t[COARSE_W] ? '1 : t[COARSE_W-1:0];
    end else begin
      return (v < s) ? '0 : v - s;
    end
  endfunction

  function automatic logic [LOW_W-1:0] move_l(input logic [LOW_W-1:0] v,
                                              input logic [LOW_W-1:0] s,
                                              input logic up);
    logic [LOW_W:0] t;
    if (up) begin
      t = {1'b0, v} + {1'b0, s};
      return t[LOW_W] ? '1 : t[LOW_W-1:0];
    end else begin
      return (v < s) ? '0 : v - s;
    end
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= ST_COARSE_SAR;
      dco_code_base <= {COARSE_W'(0), FINE_INIT_LOW};
      step_c        <= COARSE_W'(COARSE_STEP0);
      step_l        <= LOW_W'(FINE_STEP0) << FRAC_W;
      prev_lead     <= 1'b0;
      have_prev     <= 1'b0;
      pol_cnt       <= '0;
      filter_flush  <= 1'b0;
      lock          <= 1'b0;
    end else begin
      filter_flush <= 1'b0;
      if (valid) begin
        prev_lead <= lead;
        have_prev <= 1'b1;
        unique case (state)
          ST_COARSE_SAR: begin
            if (polarity) begin
              step_c <= step_c >> 1;
              if (filter_ok) dco_code_base <= {avg_code[CODE_W-1:LOW_W], FINE_INIT_LOW};
              else           dco_code_base <= {move_c(coarse, step_c >> 1, lead), low};
              if ((step_c >> 1) <= 1) begin
                state   <= ST_FREQ_SRCH;
                pol_cnt <= 8'(FS_POLS);
              end
            end else begin
              dco_code_base <= {move_c(coarse, step_c, lead), low};
            end
          end
          ST_FREQ_SRCH: begin
            if (polarity) begin
              pol_cnt <= pol_cnt - 1'b1;
              if (pol_cnt <= 1) begin
                // best coarse code found: hold it, restart the fine search
                dco_code_base <= {avg_code[CODE_W-1:LOW_W], FINE_INIT_LOW};
                state         <= ST_FINE_SAR;
                step_l        <= LOW_W'(FINE_STEP0) << FRAC_W;
                filter_flush  <= 1'b1;
                have_prev     <= 1'b0;
              end else if (filter_ok) begin
                dco_code_base <= {avg_code[CODE_W-1:LOW_W], FINE_INIT_LOW};
              end else begin
                dco_code_base <= {move_c(coarse, 1, lead), low};
              end
            end else begin
              dco_code_base <= {move_c(coarse, 1, lead), low};
            end
          end
          ST_FINE_SAR: begin
            if (polarity) begin
              step_l <= step_l >> 1;
              if (filter_ok) dco_code_base <= {coarse, avg_code[LOW_W-1:0]};
              else           dco_code_base <= {coarse, move_l(low, step_l >> 1, lead)};
              if ((step_l >> 1) <= min_step) begin
                state   <= ST_PHASE_TRK;
                pol_cnt <= '0;
              end
            end else begin
              dco_code_base <= {coarse, move_l(low, step_l, lead)};
            end
          end
          ST_PHASE_TRK: begin
            if (polarity) begin
              if (filter_ok) dco_code_base <= {coarse, avg_code[LOW_W-1:0]};
              else           dco_code_base <= {coarse, move_l(low, min_step, lead)};
              if (pol_cnt < 8'(LOCK_POLS)) pol_cnt <= pol_cnt + 1'b1;
              if (pol_cnt >= 8'(LOCK_POLS - 1)) lock <= 1'b1;
            end else begin
              dco_code_base <= {coarse, move_l(low, min_step, lead)};
            end
          end
          default: state <= ST_COARSE_SAR;
        endcase
      end
    end
  end

  assign sdm_en = (state == ST_FINE_SAR) || (state == ST_PHASE_TRK);
  assign tdc_en = (state == ST_PHASE_TRK);

endmodule
