// tb_sdm: checks the first-order sigma-delta modulator.
//
// For fractional codes x = xi + xf/256 it runs 256 pixel clocks and checks,
// against arithmetic done here, that every output is xi or xi+1, that the
// number of xi+1 outputs is xf (first-order SDM: the carry count over 2^F
// cycles equals the fraction exactly) and that no two carries come closer
// than the even spacing allows (for xf < 128 no two adjacent carries). It
// then checks the SD_MODE masks (6 and 4 fraction bits), SD_MODE 3 and
// en = 0 (no dithering), and that the carry never ripples out of a fine
// field of 63 into the coarse field.
module tb_sdm;

  timeunit 1ps;
  timeprecision 1fs;

  logic        clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [1:0]  sd_mode = 2'd0;
  logic [20:0] code_in = '0;
  logic [12:0] code_out;
  int checks = 0, failures = 0;

  sdm dut (.*);

  always #2500 clk = ~clk;

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL: %s", m);
    end
  endtask

  // run 256 cycles at code {xi, xf}; return number of carries
  task automatic run(input logic [12:0] xi, input logic [7:0] xf, input logic [1:0] mode,
                     input bit e, output int ones, output bit adjacent, output bit in_range);
    bit prev;
    @(negedge clk);
    code_in = {xi, xf};
    sd_mode = mode;
    en = e;
    // restart the accumulator
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    ones = 0;
    adjacent = 0;
    in_range = 1;
    prev = 0;
    repeat (256) begin
      @(posedge clk);
      #1;
      if (code_out == xi + 13'd1) begin
        ones++;
        if (prev) adjacent = 1;
        prev = 1;
      end else begin
        prev = 0;
        if (code_out != xi) in_range = 0;
      end
    end
  endtask

  initial begin
    #500_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones;
    bit adj, rng;
    logic [7:0] xf;
    logic [12:0] xi;
    for (int k = 0; k < 40; k++) begin
      xf = (k < 4) ? 8'(k * 64 + 1) : 8'($urandom);
      xi = {7'($urandom_range(127)), 6'($urandom_range(62))};
      run(xi, xf, 2'd0, 1'b1, ones, adj, rng);
      chk(rng, $sformatf("output within {xi, xi+1} for xf=%0d", xf));
      chk(ones == int'(xf), $sformatf("carries %0d expected %0d", ones, xf));
      if (xf < 128) chk(!adj, $sformatf("carries spread for xf=%0d", xf));
    end
    // 6 and 4 fraction bits
    xf = 8'b1011_0111;
    run(13'h0455, xf, 2'd1, 1'b1, ones, adj, rng);
    chk(ones == int'(xf & 8'hFC), "SD_MODE 1 keeps 6 bits");
    run(13'h0455, xf, 2'd2, 1'b1, ones, adj, rng);
    chk(ones == int'(xf & 8'hF0), "SD_MODE 2 keeps 4 bits");
    // SDM off
    run(13'h0455, xf, 2'd3, 1'b1, ones, adj, rng);
    chk(ones == 0 && rng, "SD_MODE 3 gives the integer code");
    run(13'h0455, xf, 2'd0, 1'b0, ones, adj, rng);
    chk(ones == 0 && rng, "en low gives the integer code");
    // fine field at 63: never carry into coarse
    run({7'd5, 6'd63}, 8'd200, 2'd0, 1'b1, ones, adj, rng);
    chk(ones == 0 && rng, "no carry out of a full fine field");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
