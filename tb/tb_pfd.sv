// tb_pfd: checks the phase/frequency detector model.
//
// Drives REF_CLK and FB_CLK at the same 100 ns period with FB_CLK offset by
// a chosen amount. After each comparison (phase_clk rising) it checks the
// flags: FB_CLK later than REF_CLK by more than the 16 ps dead zone must give
// flagU low, flagD high; earlier must give flagD low, flagU high; inside the
// dead zone both stay high. It also checks one phase_clk per REF period and
// the frequency behaviour: an FB_CLK at twice the REF rate reads as leading.
module tb_pfd;

  timeunit 1ps;
  timeprecision 1fs;

  logic rst_n = 1'b0, ref_clk = 1'b0, fb_clk = 1'b0;
  logic flag_u, flag_d, phase_clk;
  int checks = 0, failures = 0;

  pfd dut (.*);

  int n_pclk = 0;
  always @(posedge phase_clk) n_pclk++;

  // one period: REF rises at 10 ns, FB at 10 ns + off
  task automatic period(input real off);
    fork
      begin #(10_000.0); ref_clk = 1'b1; #(50_000.0); ref_clk = 1'b0; end
      begin #(10_000.0 + off); fb_clk = 1'b1; #(50_000.0); fb_clk = 1'b0; end
    join
    #(40_000.0 - off);
  endtask

  task automatic expect_flags(input real off, input logic eu, input logic ed);
    int n0;
    period(off);      // settle
    n0 = n_pclk;
    period(off);
    checks += 2;
    if (n_pclk != n0 + 1) begin
      failures++;
      $display("FAIL: %0d phase clocks in one period", n_pclk - n0);
    end
    if (flag_u !== eu || flag_d !== ed) begin
      failures++;
      $display("FAIL: offset %0.1f flags u=%b d=%b expected %b %b", off, flag_u, flag_d, eu, ed);
    end
  endtask

  // flags are sampled at the phase clock
  logic su, sd;
  always @(posedge phase_clk) begin
    su = flag_u;
    sd = flag_d;
  end

  task automatic expect_at_pclk(input real off, input logic eu, input logic ed);
    period(off);
    period(off);
    checks++;
    if (su !== eu || sd !== ed) begin
      failures++;
      $display("FAIL: offset %0.1f at phase_clk u=%b d=%b expected %b %b", off, su, sd, eu, ed);
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
    #5000;
    rst_n = 1'b1;
    expect_at_pclk(3000.0, 1'b0, 1'b1);     // FB lags
    expect_at_pclk(-3000.0, 1'b1, 1'b0);    // FB leads
    expect_at_pclk(40.0, 1'b0, 1'b1);
    expect_at_pclk(-40.0, 1'b1, 1'b0);
    expect_at_pclk(0.0, 1'b1, 1'b1);        // dead zone
    expect_at_pclk(10.0, 1'b1, 1'b1);
    expect_at_pclk(-10.0, 1'b1, 1'b1);
    for (int i = 0; i < 20; i++) begin
      real off;
      off = real'($urandom_range(8000)) - 4000.0;
      if (off > 20.0)       expect_at_pclk(off, 1'b0, 1'b1);
      else if (off < -20.0) expect_at_pclk(off, 1'b1, 1'b0);
    end
    expect_flags(2000.0, 1'b0, 1'b1);
    // FB at twice the REF rate: reads as leading
    repeat (3) fork
      begin #(10_000.0); ref_clk = 1'b1; #(50_000.0); ref_clk = 1'b0; #(40_000.0); end
      begin
        #(5_000.0);  fb_clk = 1'b1; #(25_000.0); fb_clk = 1'b0;
        #(25_000.0); fb_clk = 1'b1; #(25_000.0); fb_clk = 1'b0; #(20_000.0);
      end
    join
    checks++;
    if (su !== 1'b1 || sd !== 1'b0) begin
      failures++;
      $display("FAIL: fast FB not seen as leading");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
