// tb_tdc: checks the TDC model: code = floor(interval / 100 ps) for
// intervals from the 190 ps dead zone to the 6.4 ns range, 0 inside the dead
// zone, 63 beyond the range, and 0 for a stop with no preceding start.
module tb_tdc;

  timeunit 1ps;
  timeprecision 1fs;

  logic       rst_n = 1'b0, start = 1'b0, stop = 1'b0;
  logic [5:0] code;
  int checks = 0, failures = 0;

  tdc dut (.*);

  task automatic meas(input real dt, input int expected);
    start = 1'b1;
    #(dt);
    stop = 1'b1;
    #(1000.0);
    start = 1'b0;
    stop  = 1'b0;
    #(1000.0);
    checks++;
    if (int'(code) != expected) begin
      failures++;
      $display("FAIL: interval %0.1f code %0d expected %0d", dt, code, expected);
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
    real dt;
    #1000;
    rst_n = 1'b1;
    #1000;
    meas(50.0, 0);
    meas(189.0, 0);
    meas(190.0, 1);
    meas(250.0, 2);
    meas(1234.5, 12);
    meas(6299.0, 62);
    meas(6400.0, 63);
    meas(9000.0, 63);
    for (int i = 0; i < 50; i++) begin
      dt = 190.0 + real'($urandom_range(600000)) / 100.0;
      meas(dt, (dt / 100.0 >= 63.0) ? 63 : int'($floor(dt / 100.0)));
    end
    // stop without start
    stop = 1'b1;
    #1000;
    stop = 1'b0;
    #1000;
    checks++;
    if (code != 0) begin
      failures++;
      $display("FAIL: stop without start gave %0d", code);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
