// code_sync: carries the DCO control word from the slow phase-clock domain
// into the fast pixel-clock domain.
//
// The source side registers the word on each `src_load` and flips a toggle
// bit; the destination side passes the toggle through two flip-flops and, on
// a change, copies the (by then long-stable) word. The word changes at most
// once per phase-clock period (one HSYNC line), far slower than the three
// pixel clocks the transfer takes, so no word is lost.
//
// How the two clock domains of the chip exchange the code is not described
// in the document; this toggle handshake is this design's choice.
//
// Latency: 3 to 4 destination clocks from the source edge.
module code_sync #(
  parameter int unsigned W         = 24,
  parameter logic [W-1:0] RESET_VAL = '0   // word seen before the first load
) (
  input  logic         src_clk,
  input  logic         src_rst_n,
  input  logic         src_load,
  input  logic [W-1:0] src_data,
  input  logic         dst_clk,
  input  logic         dst_rst_n,
  output logic [W-1:0] dst_data
);

  timeunit 1ps;
  timeprecision 1fs;

  logic [W-1:0] hold;
  logic         tog_src;
  logic [2:0]   tog_dst;

  always_ff @(posedge src_clk or negedge src_rst_n) begin
    if (!src_rst_n) begin
      hold    <= RESET_VAL;
      tog_src <= 1'b0;
    end else if (src_load) begin
      hold    <= src_data;
      tog_src <= ~tog_src;
    end
  end

  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) begin
      tog_dst  <= '0;
      dst_data <= RESET_VAL;
    end else begin
      tog_dst <= {tog_dst[1:0], tog_src};
      if (tog_dst[2] != tog_dst[1]) dst_data <= hold;
    end
  end

endmodule
