// tb_dco_decoder: exhaustive check of the DCO select decoder: for every
// 13-bit code, coarse_sel has exactly one bit set, at the coarse code, and
// fine_sel has exactly the low `fine` bits set.
module tb_dco_decoder;

  timeunit 1ps;
  timeprecision 1fs;

  logic [12:0]  code;
  logic [127:0] coarse_sel;
  logic [63:0]  fine_sel;
  int checks = 0, failures = 0;

  dco_decoder dut (.*);

  initial begin
    logic [127:0] exp_c;
    logic [63:0]  exp_f;
    for (int c = 0; c < 8192; c++) begin
      code = 13'(c);
      #1;
      exp_c = 128'd1 << (c >> 6);
      exp_f = (64'd1 << (c & 63)) - 64'd1;
      checks++;
      if (coarse_sel !== exp_c || fine_sel !== exp_f) begin
        failures++;
        if (failures < 10) $display("FAIL: code %0d", c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
