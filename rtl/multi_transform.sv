// multi_transform: the reconfigurable transform shared by intra cost
// estimation and reconstruction.
//
// One block of 8x8 signed 16-bit values is accepted per cycle when in_valid
// is high; the result appears one cycle later with out_valid. The mode
// selects one of five configurations:
//   TR_DCT4  / TR_HAD4 / TR_IDCT4 : two 4x4 transforms side by side. Rows 0-3
//                                   hold the two blocks (columns 0-3 and 4-7);
//                                   rows 4-7 of the result are zero.
//   TR_DCT8  / TR_IDCT8           : one 8x8 transform of the whole block.
// The choice of "two 4x4 Hadamard/DCT/IDCT or one 8x8 DCT/IDCT" follows the
// chip's description of its multi-transform. The arithmetic is the H.264
// integer core transform: forward 4x4 with the matrix rows (1 1 1 1),
// (2 1 -1 -2), (1 -1 -1 1), (1 -2 2 -1); the unnormalised 4x4 Hadamard; the
// standard's 4x4 and 8x8 inverse butterflies; and the usual shift-based 8x8
// forward transform. The inverse transforms leave out the final (x+32)>>6,
// which the reconstruction applies. Working on a whole 8x8 block per cycle
// (rather than 8 pixels per cycle with a transpose buffer) and the 16-bit
// saturating output are this design's own choices.
module multi_transform
  import mvc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  tr_mode_e mode,
  input  coef_t    in_blk  [8][8],   // [row][column]
  output logic     out_valid,
  output coef_t    out_blk [8][8]
);

  typedef int vec8_t [8];
  typedef int vec4_t [4];

  function automatic vec4_t fwd4(input vec4_t p);
    int a0, a1, a2, a3;
    vec4_t r;
    a0 = p[0] + p[3];
    a1 = p[1] + p[2];
    a2 = p[1] - p[2];
    a3 = p[0] - p[3];
    r[0] = a0 + a1;
    r[2] = a0 - a1;
    r[1] = 2 * a3 + a2;
    r[3] = a3 - 2 * a2;
    return r;
  endfunction

  function automatic vec4_t had4(input vec4_t p);
    int a0, a1, a2, a3;
    vec4_t r;
    a0 = p[0] + p[3];
    a1 = p[1] + p[2];
    a2 = p[1] - p[2];
    a3 = p[0] - p[3];
    r[0] = a0 + a1;
    r[1] = a3 + a2;
    r[2] = a0 - a1;
    r[3] = a3 - a2;
    return r;
  endfunction

  function automatic vec4_t inv4(input vec4_t d);
    int e0, e1, e2, e3;
    vec4_t r;
    e0 = d[0] + d[2];
    e1 = d[0] - d[2];
    e2 = (d[1] >>> 1) - d[3];
    e3 = d[1] + (d[3] >>> 1);
    r[0] = e0 + e3;
    r[1] = e1 + e2;
    r[2] = e1 - e2;
    r[3] = e0 - e3;
    return r;
  endfunction

  function automatic vec8_t fwd8(input vec8_t p);
    int a0, a1, a2, a3, a4, a5, a6, a7;
    int b0, b1, b2, b3, b4, b5, b6, b7;
    vec8_t r;
    a0 = p[0] + p[7];  a1 = p[1] + p[6];  a2 = p[2] + p[5];  a3 = p[3] + p[4];
    a4 = p[0] - p[7];  a5 = p[1] - p[6];  a6 = p[2] - p[5];  a7 = p[3] - p[4];
    b0 = a0 + a3;  b1 = a1 + a2;  b2 = a0 - a3;  b3 = a1 - a2;
    b4 = a5 + a6 + ((a4 >>> 1) + a4);
    b5 = a4 - a7 - ((a6 >>> 1) + a6);
    b6 = a4 + a7 - ((a5 >>> 1) + a5);
    b7 = a5 - a6 + ((a7 >>> 1) + a7);
    r[0] = b0 + b1;
    r[2] = b2 + (b3 >>> 1);
    r[4] = b0 - b1;
    r[6] = (b2 >>> 1) - b3;
    r[1] = b4 + (b7 >>> 2);
    r[3] = b5 + (b6 >>> 2);
    r[5] = b6 - (b5 >>> 2);
    r[7] = (b4 >>> 2) - b7;
    return r;
  endfunction

  function automatic vec8_t inv8(input vec8_t d);
    int e0, e1, e2, e3, e4, e5, e6, e7;
    int f0, f1, f2, f3, f4, f5, f6, f7;
    vec8_t r;
    e0 = d[0] + d[4];
    e1 = -d[3] + d[5] - d[7] - (d[7] >>> 1);
    e2 = d[0] - d[4];
    e3 = d[1] + d[7] - d[3] - (d[3] >>> 1);
    e4 = (d[2] >>> 1) - d[6];
    e5 = -d[1] + d[7] + d[5] + (d[5] >>> 1);
    e6 = d[2] + (d[6] >>> 1);
    e7 = d[3] + d[5] + d[1] + (d[1] >>> 1);
    f0 = e0 + e6;  f1 = e1 + (e7 >>> 2);
    f2 = e2 + e4;  f3 = e3 + (e5 >>> 2);
    f4 = e2 - e4;  f5 = (e3 >>> 2) - e5;
    f6 = e0 - e6;  f7 = e7 - (e1 >>> 2);
    r[0] = f0 + f7;  r[1] = f2 + f5;  r[2] = f4 + f3;  r[3] = f6 + f1;
    r[4] = f6 - f1;  r[5] = f4 - f3;  r[6] = f2 - f5;  r[7] = f0 - f7;
    return r;
  endfunction

  function automatic vec4_t t4(input tr_mode_e m, input vec4_t v);
    case (m)
      TR_HAD4:  return had4(v);
      TR_IDCT4: return inv4(v);
      default:  return fwd4(v);
    endcase
  endfunction

  function automatic coef_t sat16(input int v);
    if (v > 32767)       return 16'sd32767;
    else if (v < -32768) return -16'sd32768;
    else                 return coef_t'(v);
  endfunction

  int    stage [8][8];   // after the row pass
  int    res   [8][8];   // after the column pass

  always_comb begin
    vec4_t v4;
    vec8_t v8;
    v4 = '{default: 0};
    v8 = '{default: 0};
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) begin
        stage[r][c] = 0;
        res[r][c]   = 0;
      end
    if (mode == TR_DCT8 || mode == TR_IDCT8) begin
      for (int r = 0; r < 8; r++) begin
        for (int c = 0; c < 8; c++) v8[c] = int'(in_blk[r][c]);
        v8 = (mode == TR_DCT8) ? fwd8(v8) : inv8(v8);
        for (int c = 0; c < 8; c++) stage[r][c] = v8[c];
      end
      for (int c = 0; c < 8; c++) begin
        for (int r = 0; r < 8; r++) v8[r] = stage[r][c];
        v8 = (mode == TR_DCT8) ? fwd8(v8) : inv8(v8);
        for (int r = 0; r < 8; r++) res[r][c] = v8[r];
      end
    end else begin
      for (int b = 0; b < 2; b++) begin
        for (int r = 0; r < 4; r++) begin
          for (int c = 0; c < 4; c++) v4[c] = int'(in_blk[r][4*b+c]);
          v4 = t4(mode, v4);
          for (int c = 0; c < 4; c++) stage[r][4*b+c] = v4[c];
        end
        for (int c = 0; c < 4; c++) begin
          for (int r = 0; r < 4; r++) v4[r] = stage[r][4*b+c];
          v4 = t4(mode, v4);
          for (int r = 0; r < 4; r++) res[r][4*b+c] = v4[r];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) out_blk[r][c] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        for (int r = 0; r < 8; r++)
          for (int c = 0; c < 8; c++) out_blk[r][c] <= sat16(res[r][c]);
    end
  end

endmodule
