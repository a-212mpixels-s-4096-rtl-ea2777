// ip_core: hybrid open-closed loop intra prediction and mode decision for
// one 8x8 luma block, 8 pixels per cycle.
//
// Hybrid neighbours: pixels above and to the left of the block that lie in
// a neighbouring MB are the reconstructed pixels forwarded by the REC stage
// (rec_top / rec_left); neighbours inside the current MB are original pixels
// (orig_top / orig_left for the 8x8 block, the block's own pixels for its
// inner 4x4 sub-blocks). This removes the wait for the reconstruction of the
// current MB, which is what lets IP and REC sit in separate pipeline stages.
//
// Two paths run side by side, as in the chip: an Intra_8x8 path and an
// Intra_4x4 path (the four 4x4 sub-blocks of the 8x8 block, two side by
// side per row). For each of the three modes (vertical, horizontal, DC) one
// row of 8 predictions per path is made each cycle and subtracted from the
// current row; every fourth row, four rows of differences go through a
// multi-transform set to two 4x4 Hadamard transforms. The cost of a 4x4
// block is SATD = (sum of |Hadamard coefficients|) / 2; the 8x8 cost is the
// sum over its four 4x4 blocks. The best mode per 4x4 sub-block and for the
// 8x8 block is kept (first minimum in mode order), and the block is coded as
// Intra_4x4 when the sum of the four sub-block costs is strictly lower than
// the Intra_8x8 cost.
//
// Timing: the inputs are sampled when start is high; the 24 rows (3 modes x
// 8 rows) take 24 cycles and done pulses 28 cycles after start.
//
// From the chip's description: the hybrid use of forwarded reconstructed
// boundary pixels and original inner pixels, the I4 and I8 predictor paths
// at 8 pixels per cycle, the transform (T), mode decision and best-mode
// register of each path. This design's own choices: only three prediction
// modes, SATD as the cost (the chip also uses a DCT-based RDO cost), and the
// I4/I8 decision rule.
module ip_core
  import mvc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  pix_t        cur       [8][8],
  input  pix_t        rec_top   [8],     // forwarded reconstructed pixels (MB above)
  input  pix_t        rec_left  [8],     // forwarded reconstructed pixels (MB to the left)
  input  pix_t        orig_top  [8],     // original pixels above, inside the MB
  input  pix_t        orig_left [8],     // original pixels to the left, inside the MB
  input  logic        on_top_edge,       // block touches the top edge of its MB
  input  logic        on_left_edge,      // block touches the left edge of its MB
  output logic        busy,
  output logic        done,
  output logic        use_i4,
  output ipred_mode_e mode8,
  output logic [15:0] cost8,
  output ipred_mode_e mode4 [4],         // sub-blocks in raster order
  output logic [15:0] cost4
);

  typedef enum logic [1:0] {S_IDLE, S_ROWS, S_DRAIN, S_DECIDE} state_e;
  state_e state;

  pix_t        cq [8][8];
  pix_t        top8 [8];
  pix_t        left8 [8];
  logic [1:0]  m;           // mode being evaluated
  logic [2:0]  r;           // row being predicted
  logic [1:0]  drain;
  coef_t       d8 [4][8];   // rows of differences, 8x8 path
  coef_t       d4 [4][8];   // rows of differences, 4x4 path

  // ------------------------------------------------------------ predictors
  pix_t p8 [8], p4 [8];
  pix_t t4 [8], l40 [8], l41 [4];
  always_comb begin
    logic by;
    by = r[2];
    for (int c = 0; c < 8; c++) t4[c] = by ? cq[3][c] : top8[c];
    for (int i = 0; i < 8; i++) l40[i] = '0;
    for (int i = 0; i < 4; i++) begin
      l40[i] = by ? left8[4+i] : left8[i];
      l41[i] = cq[(by ? 4 : 0) + i][3];
    end
  end

  intra_pred_gen u_gen8 (.i4(1'b0), .mode(ipred_mode_e'(m)), .row(r), .top(top8),
                         .left0(left8), .left1(l41), .pred(p8));
  intra_pred_gen u_gen4 (.i4(1'b1), .mode(ipred_mode_e'(m)), .row({1'b0, r[1:0]}), .top(t4),
                         .left0(l40), .left1(l41), .pred(p4));

  // ------------------------------------------------------------ transforms
  logic  tr_go;
  coef_t h8_in [8][8], h4_in [8][8], h8_out [8][8], h4_out [8][8];
  logic  h8_v, h4_v;

  always_comb begin
    tr_go = (state == S_ROWS) && (r[1:0] == 2'd3);
    for (int i = 0; i < 8; i++)
      for (int c = 0; c < 8; c++) begin
        h8_in[i][c] = '0;
        h4_in[i][c] = '0;
      end
    for (int i = 0; i < 3; i++)
      for (int c = 0; c < 8; c++) begin
        h8_in[i][c] = d8[i][c];
        h4_in[i][c] = d4[i][c];
      end
    for (int c = 0; c < 8; c++) begin
      h8_in[3][c] = coef_t'(int'(cq[r][c]) - int'(p8[c]));
      h4_in[3][c] = coef_t'(int'(cq[r][c]) - int'(p4[c]));
    end
  end

  multi_transform u_t8 (.clk(clk), .rst_n(rst_n), .in_valid(tr_go), .mode(TR_HAD4),
                        .in_blk(h8_in), .out_valid(h8_v), .out_blk(h8_out));
  multi_transform u_t4 (.clk(clk), .rst_n(rst_n), .in_valid(tr_go), .mode(TR_HAD4),
                        .in_blk(h4_in), .out_valid(h4_v), .out_blk(h4_out));

  // SATD of the two 4x4 blocks that leave each transform
  logic [15:0] s8 [2], s4 [2];
  always_comb begin
    for (int b = 0; b < 2; b++) begin
      logic [16:0] a8, a4;
      a8 = '0;
      a4 = '0;
      for (int i = 0; i < 4; i++)
        for (int c = 0; c < 4; c++) begin
          a8 = a8 + 17'((h8_out[i][4*b+c] < 0) ? -int'(h8_out[i][4*b+c]) : int'(h8_out[i][4*b+c]));
          a4 = a4 + 17'((h4_out[i][4*b+c] < 0) ? -int'(h4_out[i][4*b+c]) : int'(h4_out[i][4*b+c]));
        end
      s8[b] = a8[16:1];
      s4[b] = a4[16:1];
    end
  end

  // ------------------------------------------------------ cost bookkeeping
  logic [1:0]  out_m;       // mode of the block now leaving the transforms
  logic        out_by;      // upper or lower pair of sub-blocks
  logic [15:0] acc8;
  logic [15:0] best4 [4];

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      m      <= '0;
      r      <= '0;
      drain  <= '0;
      out_m  <= '0;
      out_by <= 1'b0;
      acc8   <= '0;
      done   <= 1'b0;
      use_i4 <= 1'b0;
      mode8  <= IPM_VER;
      cost8  <= '1;
      cost4  <= '0;
      for (int i = 0; i < 8; i++) begin
        top8[i]  <= '0;
        left8[i] <= '0;
        for (int c = 0; c < 8; c++) cq[i][c] <= '0;
      end
      for (int i = 0; i < 4; i++) begin
        mode4[i] <= IPM_VER;
        best4[i] <= '1;
        for (int c = 0; c < 8; c++) begin
          d8[i][c] <= '0;
          d4[i][c] <= '0;
        end
      end
    end else begin
      done <= 1'b0;

      // results of the transforms, one cycle after each fourth row
      if (h8_v) begin
        logic [15:0] tot8;
        tot8 = acc8 + s8[0] + s8[1];
        if (out_by) begin
          // the 8x8 block of mode out_m is complete
          if (tot8 < cost8) begin
            cost8 <= tot8;
            mode8 <= ipred_mode_e'(out_m);
          end
          acc8 <= '0;
        end else begin
          acc8 <= tot8;
        end
      end
      if (h4_v)
        for (int b = 0; b < 2; b++)
          if (s4[b] < best4[2*out_by+b]) begin
            best4[2*out_by+b] <= s4[b];
            mode4[2*out_by+b] <= ipred_mode_e'(out_m);
          end

      case (state)
        S_IDLE: if (start) begin
          cq <= cur;
          for (int i = 0; i < 8; i++) begin
            top8[i]  <= on_top_edge  ? rec_top[i]  : orig_top[i];
            left8[i] <= on_left_edge ? rec_left[i] : orig_left[i];
          end
          for (int i = 0; i < 4; i++) best4[i] <= '1;
          cost8 <= '1;
          acc8  <= '0;
          m     <= '0;
          r     <= '0;
          state <= S_ROWS;
        end

        S_ROWS: begin
          for (int c = 0; c < 8; c++) begin
            d8[r[1:0]][c] <= coef_t'(int'(cq[r][c]) - int'(p8[c]));
            d4[r[1:0]][c] <= coef_t'(int'(cq[r][c]) - int'(p4[c]));
          end
          if (tr_go) begin
            out_m  <= m;
            out_by <= r[2];
          end
          r <= r + 3'd1;
          if (r == 3'd7) begin
            if (m == 2'd2) begin
              drain <= '0;
              state <= S_DRAIN;
            end
            m <= m + 2'd1;
          end
        end

        S_DRAIN: begin   // wait until the last transform result is taken
          drain <= drain + 2'd1;
          if (drain == 2'd1) state <= S_DECIDE;
        end

        default: begin  // S_DECIDE
          logic [15:0] sum4;
          sum4   = best4[0] + best4[1] + best4[2] + best4[3];
          cost4  <= sum4;
          use_i4 <= (sum4 < cost8);
          done   <= 1'b1;
          state  <= S_IDLE;
        end
      endcase
    end
  end

endmodule
