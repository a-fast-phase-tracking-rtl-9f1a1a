// tb_dco: checks the DCO model's period against T = 2630 + 448.02*coarse +
// 11.48*fine ps for a set of codes, including the ends of both ranges, and
// that the output stays low while reset_n is low.
module tb_dco;

  timeunit 1ps;
  timeprecision 1fs;

  logic         reset_n = 1'b0;
  logic [127:0] coarse_sel = 128'd1;
  logic [63:0]  fine_sel = '0;
  logic         ck_out;
  int checks = 0, failures = 0;

  dco dut (.*);

  int unsigned n_edges = 0;
  always @(posedge ck_out) n_edges++;

  task automatic try(input int c, input int f);
    realtime t0, t1;
    real expected;
    coarse_sel = 128'd1 << c;
    fine_sel   = (f == 64) ? '1 : (64'd1 << f) - 64'd1;
    repeat (3) @(posedge ck_out);
    t0 = $realtime;
    repeat (10) @(posedge ck_out);
    t1 = $realtime;
    expected = 2630.0 + 448.02 * c + 11.48 * f;
    checks++;
    if ((t1 - t0) / 10.0 < expected - 0.01 || (t1 - t0) / 10.0 > expected + 0.01) begin
      failures++;
      $display("FAIL: coarse %0d fine %0d period %0.3f expected %0.3f", c, f, (t1 - t0) / 10.0, expected);
    end
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50_000;
    checks++;
    if (n_edges != 0) begin
      failures++;
      $display("FAIL: clock ran during reset");
    end
    reset_n = 1'b1;
    try(0, 0);
    try(0, 64);
    try(5, 32);
    try(8, 0);
    try(82, 17);
    try(127, 0);
    try(127, 64);
    for (int i = 0; i < 10; i++) try($urandom_range(127), $urandom_range(64));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
