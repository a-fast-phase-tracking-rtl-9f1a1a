// pfd: behavioural model of the modified three-state phase/frequency detector
// with digital pulse amplifiers and lead/lag flag flip-flops. Not
// synthesizable: it is a gate-level circuit whose function depends on gate
// delays (the reset path, the pulse stretch, the dead zone).
//
// How it works (following the document): two flip-flops are set by the
// rising edges of REF_CLK (HSYNC) and FB_CLK (the divided DCO clock) and both
// are cleared, after the reset-path delay T_RST, once both are set. While
// only the REF flip-flop is set, OUTU is low; while only the FB flip-flop is
// set, OUTD is low. A digital pulse amplifier stretches each low pulse by
// T_AMP so that the flag flip-flops can see it: flagU is cleared by the
// stretched OUTU pulse and set again by the next REF_CLK edge; flagD likewise
// with OUTD and FB_CLK. So flagU low means FB_CLK lags REF_CLK, flagD low
// means FB_CLK leads. Pulses narrower than the dead zone T_DZ (16 ps in the
// document's slow-corner circuit simulation) leave both flags high: no
// information.
//
// This model's own choices: a flag is cleared when a qualifying pulse ends
// rather than at its start (the flags are only read later, by phase_clk); and
// phase_clk, the slow clock of the controller and TDC loop, is a pulse of
// width T_PCLK_W issued T_PCLK after both edges have arrived, i.e. once per
// comparison, when flags and TDC codes are settled. The document names the
// phase clock but does not say how it is made.
//
// Interface: rst_n low clears the state flip-flops and sets both flags.
module pfd #(
  parameter real T_RST_PS    = 150.0,   // reset path delay of the 3-state PFD
  parameter real T_AMP_PS    = 200.0,   // low-pulse stretch of the amplifier
  parameter real T_DZ_PS     = 16.0,    // dead zone
  parameter real T_PCLK_PS   = 2000.0,  // phase_clk rise after both edges
  parameter real T_PCLK_W_PS = 2000.0   // phase_clk pulse width
) (
  input  logic rst_n,
  input  logic ref_clk,
  input  logic fb_clk,
  output logic flag_u,
  output logic flag_d,
  output logic phase_clk
);

  timeunit 1ps;
  timeprecision 1fs;

  logic    q_ref, q_fb;
  logic    outu_n, outd_n;
  realtime t_u_fall, t_d_fall;

  initial begin
    q_ref     = 1'b0;
    q_fb      = 1'b0;
    flag_u    = 1'b1;
    flag_d    = 1'b1;
    phase_clk = 1'b0;
    t_u_fall  = 0.0;
    t_d_fall  = 0.0;
  end

  // State flip-flops with the shared reset path.
  always @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) q_ref <= 1'b0;
    else        q_ref <= 1'b1;
  end

  always @(posedge fb_clk or negedge rst_n) begin
    if (!rst_n) q_fb <= 1'b0;
    else        q_fb <= 1'b1;
  end

  always @(posedge q_ref or posedge q_fb) begin
    if (q_ref && q_fb) begin
      #(T_RST_PS);
      q_ref <= 1'b0;
      q_fb <= 1'b0;
    end
  end

  assign outu_n = !(q_ref && !q_fb);
  assign outd_n = !(q_fb && !q_ref);

  // Pulse amplifiers and flag flip-flops.
  always @(negedge outu_n) t_u_fall <= $realtime;
  always @(negedge outd_n) t_d_fall <= $realtime;

  always @(posedge outu_n) begin
    if ($realtime - t_u_fall >= T_DZ_PS) begin
      #(T_AMP_PS);
      flag_u <= 1'b0;
    end
  end

  always @(posedge outd_n) begin
    if ($realtime - t_d_fall >= T_DZ_PS) begin
      #(T_AMP_PS);
      flag_d <= 1'b0;
    end
  end

  always @(posedge ref_clk or negedge rst_n) flag_u <= 1'b1;
  always @(posedge fb_clk  or negedge rst_n) flag_d <= 1'b1;

  // Phase clock: one pulse per completed comparison.
  always @(posedge q_ref or posedge q_fb) begin
    if (q_ref && q_fb) begin
      #(T_PCLK_PS);
      phase_clk <= 1'b1;
      #(T_PCLK_W_PS);
      phase_clk <= 1'b0;
    end
  end

endmodule
