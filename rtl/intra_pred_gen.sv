// intra_pred_gen: reconfigurable intra luma predictor generator, 8
// predictors per cycle.
//
// With i4 = 0 it produces row `row` (0..7) of an Intra_8x8 prediction from
// the 8 pixels above (top) and the 8 pixels to the left (left0). With i4 = 1
// it produces row `row` (0..3) of two 4x4 blocks side by side: block 0 uses
// top[0..3] and left0[0..3], block 1 uses top[4..7] and left1[0..3]. Each
// mode is one of vertical, horizontal and DC (H.264 modes 0, 1, 2).
// Combinational.
//
// One generator giving 8 predictors for Intra_8x8 or 8 predictors for two
// 4x4 sub-blocks follows the chip's description of its intra predictor
// generator. Only the three modes above are generated; the diagonal modes,
// the reference smoothing of Intra_8x8 and the handling of unavailable
// neighbours are left out, and all neighbours are taken as available.
module intra_pred_gen
  import mvc_pkg::*;
(
  input  logic        i4,
  input  ipred_mode_e mode,
  input  logic [2:0]  row,
  input  pix_t        top   [8],
  input  pix_t        left0 [8],
  input  pix_t        left1 [4],
  output pix_t        pred  [8]
);

  logic [11:0] sum_t8, sum_l8, sum_t0, sum_t1, sum_l0, sum_l1;
  pix_t        dc8, dc4_0, dc4_1;

  always_comb begin
    sum_t8 = '0; sum_l8 = '0;
    sum_t0 = '0; sum_t1 = '0; sum_l0 = '0; sum_l1 = '0;
    for (int i = 0; i < 8; i++) begin
      sum_t8 = sum_t8 + 12'(top[i]);
      sum_l8 = sum_l8 + 12'(left0[i]);
    end
    for (int i = 0; i < 4; i++) begin
      sum_t0 = sum_t0 + 12'(top[i]);
      sum_t1 = sum_t1 + 12'(top[4+i]);
      sum_l0 = sum_l0 + 12'(left0[i]);
      sum_l1 = sum_l1 + 12'(left1[i]);
    end
    dc8   = 8'((sum_t8 + sum_l8 + 12'd8) >> 4);
    dc4_0 = 8'((sum_t0 + sum_l0 + 12'd4) >> 3);
    dc4_1 = 8'((sum_t1 + sum_l1 + 12'd4) >> 3);

    for (int c = 0; c < 8; c++) begin
      case (mode)
        IPM_VER: pred[c] = top[c];
        IPM_HOR: begin
          if (!i4)       pred[c] = left0[row];
          else if (c < 4) pred[c] = left0[{1'b0, row[1:0]}];
          else           pred[c] = left1[row[1:0]];
        end
        default: begin
          if (!i4)       pred[c] = dc8;
          else if (c < 4) pred[c] = dc4_0;
          else           pred[c] = dc4_1;
        end
      endcase
    end
  end

endmodule
