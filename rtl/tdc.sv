// tdc: behavioural model of one delay-line time-to-digital converter. Not
// synthesizable: a real TDC measures time with the delay of a chain of cells.
//
// A conventional TDC: the start edge runs down a line of N_STAGES (64) delay
// cells of T_RES each, and the stop edge latches the line; the number of
// cells passed, read as a thermometer code and encoded to binary, is the
// time from start to stop. The model gives the same result directly:
// code = floor((t_stop - t_start) / T_RES), saturated at N_STAGES-1. Two
// instances form the lead/lag pair of the chip (REF->FB and FB->REF); the
// PFD result chooses which code is used.
//
// Default resolution 100 ps, 64 stages (6.4 ns range) and a 190 ps dead zone
// are the document's slow-corner TDC figures; intervals below the dead zone
// read as 0. A stop edge with no start since the last stop also reads 0.
//
// Timing: code changes at the stop edge and holds until the next stop.
module tdc #(
  parameter real         T_RES_PS = 100.0,
  parameter real         T_DZ_PS  = 190.0,
  parameter int unsigned N_STAGES = 64
) (
  input  logic                        rst_n,
  input  logic                        start,
  input  logic                        stop,
  output logic [$clog2(N_STAGES)-1:0] code
);

  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned CW = $clog2(N_STAGES);

  realtime t_start;   // last start edge
  realtime t_stop;    // last stop edge; armed while t_start is later

  initial begin
    code    = '0;
    t_start = -1.0;
    t_stop  = 0.0;
  end

  always @(posedge start or negedge rst_n) begin
    if (!rst_n) t_start <= -1.0;
    else        t_start <= $realtime;
  end

  always @(posedge stop or negedge rst_n) begin
    real cells;
    if (!rst_n) begin
      code   <= '0;
      t_stop <= 0.0;
    end else begin
      if (t_start > t_stop && ($realtime - t_start) >= T_DZ_PS) begin
        cells = ($realtime - t_start) / T_RES_PS;
        if (cells >= real'(N_STAGES - 1)) code <= CW'(N_STAGES - 1);
        else                              code <= CW'($rtoi(cells));
      end else begin
        code <= '0;
      end
      t_stop <= $realtime;
    end
  end

endmodule
