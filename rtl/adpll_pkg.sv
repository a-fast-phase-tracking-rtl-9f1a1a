// adpll_pkg: widths, types and small helper functions shared by the video
// clock ADPLL.
//
// The DCO control word is {coarse, fine, fraction} = 7 + 6 + 8 = 21 bits, as
// in the controller description of the design (a 13-bit integer DCO code plus
// an 8-bit fraction that the sigma-delta modulator dithers). The controller
// state encoding follows the 2-bit FSM output pad (0 = coarse SAR,
// 1 = frequency search, 2 = fine & fraction SAR, 3 = phase tracking).
// The DIVM_MODE and SD_MODE decodes follow the chip's pad table; codes the
// table leaves unused (DIVM_MODE 0 and 15) are this design's choice and map
// to the 32x test mode.
//
// Lint note: modules that import the whole package and use only some of its
// widths draw an unused-parameter warning for the rest; it is harmless.
package adpll_pkg;

  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned COARSE_W = 7;
  localparam int unsigned FINE_W   = 6;
  localparam int unsigned FRAC_W   = 8;
  localparam int unsigned INT_W    = COARSE_W + FINE_W;        // 13
  localparam int unsigned CODE_W   = COARSE_W + FINE_W + FRAC_W; // 21
  localparam int unsigned LOW_W    = FINE_W + FRAC_W;          // 14: fine+frac field
  localparam int unsigned DIVM_W   = 13;                       // M up to 5600
  localparam int unsigned TDC_W    = 6;                        // TDC code 0..63

  typedef logic [CODE_W-1:0] dco_code_t;

  typedef enum logic [1:0] {
    ST_COARSE_SAR = 2'd0,
    ST_FREQ_SRCH  = 2'd1,
    ST_FINE_SAR   = 2'd2,
    ST_PHASE_TRK  = 2'd3
  } ctrl_state_t;

  // Multiplication factor selected by the 4-bit DIVM_MODE input.
  function automatic logic [DIVM_W-1:0] divm_value(input logic [3:0] mode);
    case (mode)
      4'd1:  return 13'd800;   // VGA
      4'd2:  return 13'd1056;  // SVGA
      4'd3:  return 13'd1344;  // XGA
      4'd4:  return 13'd1688;  // SXGA
      4'd5:  return 13'd2160;  // UXGA
      4'd6:  return 13'd32;
      4'd7:  return 13'd64;
      4'd8:  return 13'd128;
      4'd9:  return 13'd256;
      4'd10: return 13'd512;
      4'd11: return 13'd1024;
      4'd12: return 13'd2048;
      4'd13: return 13'd4096;
      4'd14: return 13'd5600;
      default: return 13'd32;  // unused codes: test mode
    endcase
  endfunction

  // Number of fractional code bits in use for the 2-bit SD_MODE input.
  function automatic int unsigned sd_frac_bits(input logic [1:0] mode);
    case (mode)
      2'd0:    return 8;
      2'd1:    return 6;
      2'd2:    return 4;
      default: return 0;       // SDM off
    endcase
  endfunction

  // Mask that keeps only the fractional bits in use (upper bits of the
  // 8-bit fraction field).
  function automatic logic [FRAC_W-1:0] sd_frac_mask(input logic [1:0] mode);
    case (mode)
      2'd0:    return 8'hFF;
      2'd1:    return 8'hFC;
      2'd2:    return 8'hF0;
      default: return 8'h00;
    endcase
  endfunction

  // Smallest step of the fine+fraction field, in fraction LSBs, for SD_MODE.
  function automatic logic [LOW_W-1:0] sd_min_step(input logic [1:0] mode);
    case (mode)
      2'd0:    return 14'd1;
      2'd1:    return 14'd4;
      2'd2:    return 14'd16;
      default: return 14'd256;   // one fine step
    endcase
  endfunction

endpackage
