// rec_core: pixel-forwarding reconstruction (REC) of 4x8 pixels, that is
// two 4x4 blocks side by side, per job.
//
// For each job the core forms the residual (current minus prediction),
// transforms it with the shared multi-transform (two 4x4 forward core
// transforms), quantises the coefficients, dequantises them, transforms
// them back (two 4x4 inverse transforms on the same multi-transform),
// rounds with (x+32)>>6, adds the prediction and clips to 0..255. The
// quantised levels go to the coefficient buffer for entropy coding (coef_out)
// and the reconstructed pixels to the reconstruction buffer (rec_out); the
// reconstructed pixels on an MB boundary are what the intra predictor of the
// next MB uses, which is the point of forwarding them.
//
// Timing: cur/pred/qp/intra are sampled in the cycle in which start is high;
// done is high 5 cycles later, and rec_out and coef_out then hold until the
// next job ends. The multi-transform is fed in cycles 1 and 3 of a job.
//
// Quantiser (H.264 4x4, flat scaling): level = sign(c) * ((|c| * MF + f) >>
// (15 + qp/6)) with f = 2^(15+qp/6)/3 for intra and /6 for inter MBs;
// dequantiser: d = level * V << (qp/6). MF and V come from mvc_pkg.
// The subtract / multi-transform / Q / IQ / reconstruction-buffer structure
// follows the chip's REC core; working on two 4x4 blocks (the 8x8 transform
// of Intra_8x8 and inter 8x8 blocks is not used for reconstruction here),
// the rounding offsets and the job timing are this design's own choices.
module rec_core
  import mvc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  pix_t       cur   [4][8],
  input  pix_t       pred  [4][8],
  input  logic [5:0] qp,            // 0..51
  input  logic       intra,
  output logic       busy,
  output logic       done,
  output pix_t       rec_out  [4][8],
  output coef_t      coef_out [4][8],
  output logic [5:0] nz_count       // non-zero levels in the job
);

  typedef enum logic [2:0] {S_IDLE, S_FWD, S_Q, S_INV, S_ADD} state_e;
  state_e state;

  logic     tr_valid, tr_out_valid;
  tr_mode_e tr_mode;
  coef_t    tr_in  [8][8];
  coef_t    tr_out [8][8];

  multi_transform u_tr (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (tr_valid),
    .mode     (tr_mode),
    .in_blk   (tr_in),
    .out_valid(tr_out_valid),
    .out_blk  (tr_out)
  );

  pix_t       pred_q [4][8];
  pix_t       cur_q  [4][8];
  logic [5:0] qp_q;
  logic       intra_q;
  coef_t      lvl    [4][8];
  coef_t      lvl_c  [4][8];
  coef_t      deq    [4][8];
  logic [5:0] nz_c;

  function automatic logic [1:0] pos_class(input int r, input int c);
    if ((r % 2 == 0) && (c % 2 == 0)) return 2'd0;
    if ((r % 2 == 1) && (c % 2 == 1)) return 2'd1;
    return 2'd2;
  endfunction

  // quantise the forward result, dequantise the levels
  always_comb begin
    logic [2:0] qrem;
    logic [3:0] qdiv;
    qdiv = 4'(qp_q / 6);
    qrem = 3'(qp_q % 6);
    nz_c = '0;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 8; c++) begin
        logic [31:0] mag, prod, fofs;
        logic [1:0]  cls;
        int          lv;
        cls  = pos_class(r, c % 4);
        mag  = 32'((tr_out[r][c] < 0) ? -int'(tr_out[r][c]) : int'(tr_out[r][c]));
        fofs = intra_q ? ((32'd1 << (15 + qdiv)) / 3) : ((32'd1 << (15 + qdiv)) / 6);
        prod = (mag * 32'(quant_mf(qrem, cls)) + fofs) >> (15 + qdiv);
        lv   = (tr_out[r][c] < 0) ? -int'(prod) : int'(prod);
        lvl_c[r][c] = coef_t'(lv);
        if (lv != 0) nz_c = nz_c + 6'd1;
      end
  end

  always_comb begin
    logic [2:0] qrem;
    logic [3:0] qdiv;
    qdiv = 4'(qp_q / 6);
    qrem = 3'(qp_q % 6);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 8; c++)
        deq[r][c] = coef_t'((int'(lvl[r][c]) * int'(dequant_v(qrem, pos_class(r, c % 4)))) <<< qdiv);
  end

  // transform input: residual in S_FWD, dequantised levels in S_INV
  always_comb begin
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) tr_in[r][c] = '0;
    tr_valid = 1'b0;
    tr_mode  = TR_DCT4;
    if (state == S_FWD) begin
      tr_valid = 1'b1;
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 8; c++)
          tr_in[r][c] = coef_t'(int'(cur_q[r][c]) - int'(pred_q[r][c]));
    end else if (state == S_INV) begin
      tr_valid = 1'b1;
      tr_mode  = TR_IDCT4;
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 8; c++) tr_in[r][c] = deq[r][c];
    end
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      done     <= 1'b0;
      qp_q     <= '0;
      intra_q  <= 1'b0;
      nz_count <= '0;
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 8; c++) begin
          pred_q[r][c]   <= '0;
          cur_q[r][c]    <= '0;
          lvl[r][c]      <= '0;
          rec_out[r][c]  <= '0;
          coef_out[r][c] <= '0;
        end
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          cur_q   <= cur;
          pred_q  <= pred;
          qp_q    <= qp;
          intra_q <= intra;
          state   <= S_FWD;
        end
        S_FWD: state <= S_Q;
        S_Q: if (tr_out_valid) begin
          lvl      <= lvl_c;
          coef_out <= lvl_c;
          nz_count <= nz_c;
          state    <= S_INV;
        end
        S_INV: state <= S_ADD;
        default: if (tr_out_valid) begin  // S_ADD
          for (int r = 0; r < 4; r++)
            for (int c = 0; c < 8; c++) begin
              int v;
              v = int'(pred_q[r][c]) + ((int'(tr_out[r][c]) + 32) >>> 6);
              rec_out[r][c] <= (v < 0) ? 8'd0 : (v > 255 ? 8'd255 : 8'(v));
            end
          done  <= 1'b1;
          state <= S_IDLE;
        end
      endcase
    end
  end

endmodule
