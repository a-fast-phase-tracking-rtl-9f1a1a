// tb_code_sync: self-checking test of the phase-clock to pixel-clock word
// crossing.
//
// The source clock (197.3 ns period) and the destination clock (5.01 ns) are
// unrelated, as the phase clock and the pixel clock are in the PLL. The
// source offers a new random word on most of its cycles; on the others
// src_load is low and the word must not cross. Checks, against a copy of
// the last loaded word kept here:
//   - after reset, dst_data is RESET_VAL;
//   - dst_data equals the loaded word no later than 4 destination clocks
//     after the source edge that loaded it, and then stays unchanged until
//     the next load;
//   - a cycle with src_load low changes nothing.
module tb_code_sync;

  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned W = 24;
  localparam logic [W-1:0] RST = 24'h00_2000;

  logic         src_clk, dst_clk;
  logic         rst_n = 1'b0;
  logic         src_load = 1'b0;
  logic [W-1:0] src_data = '0;
  logic [W-1:0] dst_data;

  code_sync #(.W(W), .RESET_VAL(RST)) dut (
    .src_clk   (src_clk),
    .src_rst_n (rst_n),
    .src_load  (src_load),
    .src_data  (src_data),
    .dst_clk   (dst_clk),
    .dst_rst_n (rst_n),
    .dst_data  (dst_data)
  );

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    src_clk = 1'b0;
    forever #(98_650.0) src_clk = ~src_clk;
  end

  initial begin
    dst_clk = 1'b0;
    forever #(2_505.0) dst_clk = ~dst_clk;
  end

  initial begin
    #(1_000_000_000.0);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] expected;
  int           n_loads = 0, n_holds = 0;

  initial begin
    #(1000.0);
    rst_n = 1'b1;        // edge for the asynchronous resets
    #(1000.0);
    rst_n = 1'b0;
    #(10_000.0);
    check(dst_data == RST, "reset value");
    rst_n = 1'b1;
    expected = RST;
    repeat (300) begin
      @(negedge src_clk);
      src_load = ($urandom_range(3) != 0);
      src_data = W'($urandom);
      @(posedge src_clk);
      if (src_load) begin
        expected = src_data;
        n_loads++;
      end else begin
        n_holds++;
      end
      // by 4 destination clocks later the word must have arrived
      repeat (4) @(posedge dst_clk);
      #1;
      check(dst_data == expected,
            $sformatf("word %h after 4 destination clocks (got %h)", expected, dst_data));
      // and it must hold until just before the next source edge
      fork
        begin : hold_watch
          @(dst_data);
          check(1'b0, $sformatf("word changed between loads to %h", dst_data));
        end
        begin
          @(negedge src_clk);
        end
      join_any
      disable fork;
    end
    check(n_loads > 100 && n_holds > 30, "both load and hold cycles exercised");
    $display("loads %0d holds %0d", n_loads, n_holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
