// tb_freq_divider: checks the feedback divider.
//
// For several DIVM_MODE values it counts input clocks between FB_CLK rising
// edges (must equal the pad table's factor for every listed mode, 32 to 5600,
// with the unlisted codes 0 and 15 falling back to 32) and the
// clocks FB_CLK stays high (floor(M/2)), and checks the `divm` output.
module tb_freq_divider;

  timeunit 1ps;
  timeprecision 1fs;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [3:0]  divm_mode = 4'd6;
  logic [12:0] divm;
  logic        fb_clk;
  int checks = 0, failures = 0;

  freq_divider dut (.*);

  always #2500 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) cyc++;

  task automatic measure(input logic [3:0] mode, input int m);
    int t0, t1, th;
    divm_mode = mode;
    // let the new factor take effect
    repeat (2) @(posedge fb_clk);
    @(posedge fb_clk);
    t0 = cyc;
    @(negedge fb_clk);
    th = cyc;
    @(posedge fb_clk);
    t1 = cyc;
    checks += 3;
    if (t1 - t0 != m) begin
      failures++;
      $display("FAIL: mode %0d period %0d expected %0d", mode, t1 - t0, m);
    end
    if (th - t0 != m / 2) begin
      failures++;
      $display("FAIL: mode %0d high time %0d expected %0d", mode, th - t0, m / 2);
    end
    if (divm != 13'(m)) begin
      failures++;
      $display("FAIL: divm %0d expected %0d", divm, m);
    end
  endtask

  initial begin
    #1_000_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    measure(4'd6, 32);
    measure(4'd7, 64);
    measure(4'd1, 800);
    measure(4'd2, 1056);
    measure(4'd5, 2160);
    measure(4'd3, 1344);
    measure(4'd4, 1688);
    measure(4'd8, 128);
    measure(4'd9, 256);
    measure(4'd10, 512);
    measure(4'd11, 1024);
    measure(4'd12, 2048);
    measure(4'd13, 4096);
    measure(4'd14, 5600);
    measure(4'd0, 32);
    measure(4'd15, 32);
    measure(4'd6, 32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
