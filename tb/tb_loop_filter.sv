// tb_loop_filter: checks the trimmed-average loop filter.
//
// Pushes random 21-bit codes (and runs of nearly equal codes with one
// outlier, as HSYNC jitter gives) and compares `avg` after every push with a
// reference computed here from the last ten codes: sort, drop the largest
// and the smallest, average the other eight (rounded down). Also checks that
// `ok` rises exactly at the tenth code and that `flush` empties the filter.
module tb_loop_filter;

  timeunit 1ps;
  timeprecision 1fs;

  logic        clk = 1'b0, rst_n = 1'b0, load = 1'b0, flush = 1'b0;
  logic [20:0] code_in = '0, avg;
  logic        ok;
  int checks = 0, failures = 0;

  loop_filter dut (.*);

  always #5000 clk = ~clk;

  logic [20:0] hist [$];

  function automatic logic [20:0] ref_avg();
    logic [20:0] s [$];
    longint sum = 0;
    s = hist;
    s.sort();
    for (int i = 1; i < 9; i++) sum += s[i];
    return 21'(sum / 8);
  endfunction

  task automatic push(input logic [20:0] c);
    @(negedge clk);
    code_in = c;
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    hist.push_front(c);
    if (hist.size() > 10) void'(hist.pop_back());
    checks++;
    if (ok !== (hist.size() == 10)) begin
      failures++;
      $display("FAIL: ok=%b with %0d codes", ok, hist.size());
    end
    if (hist.size() == 10) begin
      checks++;
      if (avg !== ref_avg()) begin
        failures++;
        $display("FAIL: avg %h expected %h", avg, ref_avg());
      end
    end
  endtask

  initial begin
    #200_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) push(21'($urandom));
    // a steady code with single outliers: the outlier must not move avg
    for (int i = 0; i < 40; i++)
      push((i % 7 == 3) ? 21'h1F0000 : 21'h015d00 + 21'($urandom_range(4)));
    // flush
    @(negedge clk);
    flush = 1'b1;
    @(negedge clk);
    flush = 1'b0;
    hist.delete();
    checks++;
    if (ok !== 1'b0) begin
      failures++;
      $display("FAIL: ok after flush");
    end
    for (int i = 0; i < 30; i++) push(21'h010000 + 21'($urandom_range(1000)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
