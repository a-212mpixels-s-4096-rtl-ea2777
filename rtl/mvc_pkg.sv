// mvc_pkg: types and constants shared by the multiview encoder blocks.
//
// The encoder runs an 8-stage macroblock (MB) pipeline: IMDE prefetch, IMDE,
// NOP, FMDE prefetch, FMDE, IP/MDC, REC and EC/DB. Every MB in flight is
// tagged with the view it belongs to and its index inside the frame. The
// stage list, the 16x16 MB size and the 4096x2160 frame follow the chip's
// specification. The tag widths (3 bits of view for up to 7 views, 16 bits
// of MB index) and the 32-bit cache word of four 8-bit pixels are this
// design's own choices.
//
// The package also carries the H.264 CABAC tables (range of the least
// probable symbol and its state transition) and the 4x4 quantiser tables of
// the standard, used by ec_core and rec_core.
package mvc_pkg;

  localparam int unsigned NUM_STAGES = 8;
  localparam int unsigned MAX_VIEWS  = 7;
  localparam int unsigned MB_SIZE    = 16;
  localparam int unsigned PIX_W      = 8;
  localparam int unsigned WORD_PIX   = 4;          // pixels in one cache word
  localparam int unsigned WORD_W     = WORD_PIX * PIX_W;

  typedef logic [PIX_W-1:0] pix_t;
  typedef logic [WORD_W-1:0] word_t;
  typedef logic signed [15:0] coef_t;

  // Pipeline stages, numbered as in the chip's schedule (stage 1 first).
  typedef enum logic [2:0] {
    ST_IMDE_PF = 3'd0,
    ST_IMDE    = 3'd1,
    ST_NOP     = 3'd2,
    ST_FMDE_PF = 3'd3,
    ST_FMDE    = 3'd4,
    ST_IP_MDC  = 3'd5,
    ST_REC     = 3'd6,
    ST_EC_DB   = 3'd7
  } stage_e;

  typedef struct packed {
    logic        valid;
    logic [2:0]  view;
    logic [15:0] mb;
  } mb_tag_t;

  // Motion / disparity vector in integer pixels.
  typedef struct packed {
    logic signed [9:0] x;
    logic signed [9:0] y;
  } mv_t;

  // Operating modes of the shared multi-transform.
  typedef enum logic [2:0] {
    TR_DCT4  = 3'd0,   // two 4x4 forward core transforms
    TR_HAD4  = 3'd1,   // two 4x4 Hadamard transforms
    TR_IDCT4 = 3'd2,   // two 4x4 inverse core transforms
    TR_DCT8  = 3'd3,   // one 8x8 forward transform
    TR_IDCT8 = 3'd4    // one 8x8 inverse transform
  } tr_mode_e;

  // Intra prediction modes built by the predictor generator (H.264 numbering).
  typedef enum logic [1:0] {
    IPM_VER = 2'd0,
    IPM_HOR = 2'd1,
    IPM_DC  = 2'd2
  } ipred_mode_e;

  // CABAC: rangeTabLPS[state][(range>>6)&3] of H.264 clause 9.3.4.2.
  function automatic logic [7:0] cabac_lps(input logic [5:0] s, input logic [1:0] q);
    logic [31:0] row;
    case (s)
      6'd0:  row = {8'd128, 8'd176, 8'd208, 8'd240};
      6'd1:  row = {8'd128, 8'd167, 8'd197, 8'd227};
      6'd2:  row = {8'd128, 8'd158, 8'd187, 8'd216};
      6'd3:  row = {8'd123, 8'd150, 8'd178, 8'd205};
      6'd4:  row = {8'd116, 8'd142, 8'd169, 8'd195};
      6'd5:  row = {8'd111, 8'd135, 8'd160, 8'd185};
      6'd6:  row = {8'd105, 8'd128, 8'd152, 8'd175};
      6'd7:  row = {8'd100, 8'd122, 8'd144, 8'd166};
      6'd8:  row = {8'd95,  8'd116, 8'd137, 8'd158};
      6'd9:  row = {8'd90,  8'd110, 8'd130, 8'd150};
      6'd10: row = {8'd85,  8'd104, 8'd123, 8'd142};
      6'd11: row = {8'd81,  8'd99,  8'd117, 8'd135};
      6'd12: row = {8'd77,  8'd94,  8'd111, 8'd128};
      6'd13: row = {8'd73,  8'd89,  8'd105, 8'd122};
      6'd14: row = {8'd69,  8'd85,  8'd100, 8'd116};
      6'd15: row = {8'd66,  8'd80,  8'd95,  8'd110};
      6'd16: row = {8'd62,  8'd76,  8'd90,  8'd104};
      6'd17: row = {8'd59,  8'd72,  8'd86,  8'd99};
      6'd18: row = {8'd56,  8'd69,  8'd81,  8'd94};
      6'd19: row = {8'd53,  8'd65,  8'd77,  8'd89};
      6'd20: row = {8'd51,  8'd62,  8'd73,  8'd85};
      6'd21: row = {8'd48,  8'd59,  8'd69,  8'd80};
      6'd22: row = {8'd46,  8'd56,  8'd66,  8'd76};
      6'd23: row = {8'd43,  8'd53,  8'd63,  8'd72};
      6'd24: row = {8'd41,  8'd50,  8'd59,  8'd69};
      6'd25: row = {8'd39,  8'd48,  8'd56,  8'd65};
      6'd26: row = {8'd37,  8'd45,  8'd54,  8'd62};
      6'd27: row = {8'd35,  8'd43,  8'd51,  8'd59};
      6'd28: row = {8'd33,  8'd41,  8'd48,  8'd56};
      6'd29: row = {8'd32,  8'd39,  8'd46,  8'd53};
      6'd30: row = {8'd30,  8'd37,  8'd43,  8'd50};
      6'd31: row = {8'd29,  8'd35,  8'd41,  8'd48};
      6'd32: row = {8'd27,  8'd33,  8'd39,  8'd45};
      6'd33: row = {8'd26,  8'd31,  8'd37,  8'd43};
      6'd34: row = {8'd24,  8'd30,  8'd35,  8'd41};
      6'd35: row = {8'd23,  8'd28,  8'd33,  8'd39};
      6'd36: row = {8'd22,  8'd27,  8'd32,  8'd37};
      6'd37: row = {8'd21,  8'd26,  8'd30,  8'd35};
      6'd38: row = {8'd20,  8'd24,  8'd29,  8'd33};
      6'd39: row = {8'd19,  8'd23,  8'd27,  8'd31};
      6'd40: row = {8'd18,  8'd22,  8'd26,  8'd30};
      6'd41: row = {8'd17,  8'd21,  8'd25,  8'd28};
      6'd42: row = {8'd16,  8'd20,  8'd23,  8'd27};
      6'd43: row = {8'd15,  8'd19,  8'd22,  8'd25};
      6'd44: row = {8'd14,  8'd18,  8'd21,  8'd24};
      6'd45: row = {8'd14,  8'd17,  8'd20,  8'd23};
      6'd46: row = {8'd13,  8'd16,  8'd19,  8'd22};
      6'd47: row = {8'd12,  8'd15,  8'd18,  8'd21};
      6'd48: row = {8'd12,  8'd14,  8'd17,  8'd20};
      6'd49: row = {8'd11,  8'd14,  8'd16,  8'd19};
      6'd50: row = {8'd11,  8'd13,  8'd15,  8'd18};
      6'd51: row = {8'd10,  8'd12,  8'd15,  8'd17};
      6'd52: row = {8'd10,  8'd12,  8'd14,  8'd16};
      6'd53: row = {8'd9,   8'd11,  8'd13,  8'd15};
      6'd54: row = {8'd9,   8'd11,  8'd12,  8'd14};
      6'd55: row = {8'd8,   8'd10,  8'd12,  8'd14};
      6'd56: row = {8'd8,   8'd9,   8'd11,  8'd13};
      6'd57: row = {8'd7,   8'd9,   8'd11,  8'd12};
      6'd58: row = {8'd7,   8'd9,   8'd10,  8'd12};
      6'd59: row = {8'd7,   8'd8,   8'd10,  8'd11};
      6'd60: row = {8'd6,   8'd8,   8'd9,   8'd11};
      6'd61: row = {8'd6,   8'd7,   8'd9,   8'd10};
      6'd62: row = {8'd6,   8'd7,   8'd8,   8'd9};
      default: row = {8'd2, 8'd2,   8'd2,   8'd2};
    endcase
    return row[8*(3-int'(q)) +: 8];
  endfunction

  // CABAC: transIdxLPS[state]; transIdxMPS is min(state+1, 62).
  function automatic logic [5:0] cabac_next_lps(input logic [5:0] s);
    logic [5:0] t [64];
    t = '{6'd0,  6'd0,  6'd1,  6'd2,  6'd2,  6'd4,  6'd4,  6'd5,
          6'd6,  6'd7,  6'd8,  6'd9,  6'd9,  6'd11, 6'd11, 6'd12,
          6'd13, 6'd13, 6'd15, 6'd15, 6'd16, 6'd16, 6'd18, 6'd18,
          6'd19, 6'd19, 6'd21, 6'd21, 6'd22, 6'd22, 6'd23, 6'd24,
          6'd24, 6'd25, 6'd26, 6'd26, 6'd27, 6'd27, 6'd28, 6'd29,
          6'd29, 6'd30, 6'd30, 6'd30, 6'd31, 6'd32, 6'd32, 6'd33,
          6'd33, 6'd33, 6'd34, 6'd34, 6'd35, 6'd35, 6'd35, 6'd36,
          6'd36, 6'd36, 6'd37, 6'd37, 6'd37, 6'd38, 6'd38, 6'd63};
    return t[s];
  endfunction

  // 4x4 forward quantiser multiplier MF(qp%6, class): class 0 for positions
  // (even,even), 1 for (odd,odd), 2 otherwise.
  function automatic logic [13:0] quant_mf(input logic [2:0] qrem, input logic [1:0] cls);
    logic [41:0] row;
    case (qrem)
      3'd0: row = {14'd13107, 14'd5243, 14'd8066};
      3'd1: row = {14'd11916, 14'd4660, 14'd7490};
      3'd2: row = {14'd10082, 14'd4194, 14'd6554};
      3'd3: row = {14'd9362,  14'd3647, 14'd5825};
      3'd4: row = {14'd8192,  14'd3355, 14'd5243};
      default: row = {14'd7282, 14'd2893, 14'd4559};
    endcase
    return row[14*(2-int'(cls)) +: 14];
  endfunction

  // 4x4 dequantiser scale V(qp%6, class), same classes as quant_mf.
  function automatic logic [4:0] dequant_v(input logic [2:0] qrem, input logic [1:0] cls);
    logic [14:0] row;
    case (qrem)
      3'd0: row = {5'd10, 5'd16, 5'd13};
      3'd1: row = {5'd11, 5'd18, 5'd14};
      3'd2: row = {5'd13, 5'd20, 5'd16};
      3'd3: row = {5'd14, 5'd23, 5'd18};
      3'd4: row = {5'd16, 5'd25, 5'd20};
      default: row = {5'd18, 5'd29, 5'd23};
    endcase
    return row[5*(2-int'(cls)) +: 5];
  endfunction

endpackage
