// mvc_encoder_top: the multiview encoder's MB pipeline with its cores.
//
// The view-parallel MB-interleaved scheduler (vpmbi_ctrl) runs the 8 pipeline
// stages; this module gives each stage its work and reports done:
//   stage 1 IMDE Pf  asks for the current MB (src_req, then 16 rows on src_*,
//                    kept in a ring of 8 MB buffers) and prefetches the
//                    reference lines of the +-16 window around the co-located
//                    MB (48 rows x 4 lines) into the view's cache.
//   stage 2 IMDE     copies the MB into imde_core and runs the predictor-
//                    centred search; predictors are the zero vector and the
//                    vector of the previous MB of the same view. View 0
//                    reads its previous frame through cache 0 (temporal);
//                    view v > 0 reads view v-1 through cache 1 (inter-view).
//   stage 3 NOP      nothing (done at once by the scheduler).
//   stage 4/5 FMDE Pf/FMDE  not built: done one cycle after start.
//   stage 6 IP/MDC   ip_core on the four 8x8 blocks; left neighbours on the MB
//                    edge are the forwarded reconstructed right column of
//                    the previous MB of the view, inner ones original pixels;
//                    MDC marks the MB intra when the intra cost is below
//                    the IMDE SAD.
//   stage 7 REC      rec_core on 8 jobs of 4x8 pixels with the Intra_8x8
//                    prediction of the chosen mode from reconstructed
//                    neighbours (closed loop); levels go to a ring of 4
//                    coefficient buffers, pixels to rec_job_* and the last
//                    column to the per-view forwarding register.
//   stage 8 EC/DB    the MB goes to EC core 0 or 1 (ping-pong, two slots
//                    each). A binariser per core codes each 4x4 block's 16
//                    levels: significance (context = position), greater-
//                    than-one (context 16 + position), sign (bypass), and
//                    level-2 as 14 bypass bits; two bins per cycle, one
//                    slice per MB (flush at the end). DB is not built.
// Top neighbours are not kept (no MB-row line buffer): on the top edge of an
// MB the value 128 is used. Inter prediction (FMDE, MC) is not built, so REC
// codes every MB with intra prediction; the MDC decision is reported only.
//
// Interfaces: src_* (current MBs), two refill ports towards the system bus
// (fill_*, one per cache, 4 words per answer with the request's id),
// reconstructed pixels (rec_job_*), entropy-coded bytes of each EC core
// (ec_out_*, carry as in ec_core) and counters of each mechanism.
module mvc_encoder_top
  import mvc_pkg::*;
#(
  parameter int unsigned FRAME_W      = 4096,
  parameter int unsigned FRAME_H      = 2160,
  parameter int unsigned SEARCH_R     = 16,
  parameter int unsigned STAGE_BUDGET = 350,
  parameter int          NUM_CTX      = 460
)(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [2:0]  num_views,
  input  logic [15:0] mbs_per_view,
  input  logic [5:0]  qp,
  // current MBs
  output logic        src_req,
  output mb_tag_t     src_req_tag,
  input  logic        src_we,
  input  logic [3:0]  src_row,
  input  pix_t        src_data [16],
  // refill ports of cache 0 (temporal) and cache 1 (inter-view)
  output logic        fill_req_valid [2],
  input  logic        fill_req_ready [2],
  output logic [7:0]  fill_req_lx    [2],
  output logic [11:0] fill_req_y     [2],
  output logic [1:0]  fill_req_frame [2],
  output logic [2:0]  fill_req_id    [2],
  input  logic        fill_rsp_valid [2],
  input  logic [2:0]  fill_rsp_id    [2],
  input  word_t       fill_rsp_data  [2][4],
  // results
  output logic        me_valid,
  output mb_tag_t     me_tag,
  output mv_t         me_mv,
  output logic [15:0] me_sad,
  output logic        rec_job_valid,
  output mb_tag_t     rec_job_tag,
  output logic [2:0]  rec_job_idx,      // 8x8 block * 2 + upper/lower half
  output pix_t        rec_job_pix [4][8],
  output logic [1:0]  ec_out_n     [2],
  output logic [7:0]  ec_out_byte  [2][2],
  output logic        ec_out_carry [2],
  output mb_tag_t     ec_out_tag   [2],
  output logic        busy,
  output logic        frame_done,
  // counters
  output logic [31:0] slot_count,
  output logic [31:0] ec_stall,
  output logic [31:0] over_budget_count,
  output logic [31:0] cache_miss [2],
  output logic [31:0] prefetch_count,
  output logic [31:0] i4_count,
  output logic [31:0] i8_count,
  output logic [31:0] intra_mb_count,
  output logic [31:0] inter_mb_count,
  output logic [31:0] ec_bins [2],
  output logic [31:0] ec_bytes [2]
);

  localparam int unsigned MB_COLS = FRAME_W / 16;
  localparam int unsigned MB_ROWS = FRAME_H / 16;
  localparam int          CTX_W   = $clog2(NUM_CTX);

  // ------------------------------------------------------------ scheduler
  logic [7:0] stage_done, stage_start;
  logic       done1, done2, done6, done7, done_fmde_pf, done_fmde, done_db;
  mb_tag_t    stage_tag [8];
  logic [1:0] ec_done, ec_start;
  mb_tag_t    ec_tag [2];
  logic [15:0] slot_cycles;
  logic        over_budget;

  vpmbi_ctrl #(.STAGE_BUDGET(STAGE_BUDGET)) u_sched (
    .clk, .rst_n, .start, .num_views, .mbs_per_view,
    .stage_done, .ec_done, .stage_start, .stage_tag, .ec_start, .ec_tag,
    .busy, .frame_done, .slot_cycles, .over_budget, .slot_count, .ec_stall
  );

  // ring index of an MB: its position in coding order, modulo 8
  function automatic logic [2:0] seq8(input mb_tag_t t, input logic [2:0] nv);
    return 3'(t.mb[2:0] * nv + t.view);
  endfunction
  function automatic logic [11:0] mb_px(input mb_tag_t t);
    return 12'((int'(t.mb) % MB_COLS) * 16);
  endfunction
  function automatic logic [11:0] mb_py(input mb_tag_t t);
    return 12'((int'(t.mb) / MB_COLS) * 16);
  endfunction

  pix_t  src_ring  [8][16][16];
  coef_t coef_ring [4][16][16];

  // ------------------------------------------------------------ caches
  logic        c_rd_valid [2], c_rd_ready [2], c_rd_rsp_valid [2];
  logic [9:0]  c_rd_x [2];
  logic [11:0] c_rd_y [2];
  logic [1:0]  c_rd_frame [2];
  word_t       c_rd_data [2][5];
  logic        c_pf_valid [2], c_pf_ready [2];
  logic [7:0]  c_pf_lx [2];
  logic [11:0] c_pf_y [2];
  logic [1:0]  c_pf_frame [2];
  logic [31:0] c_pf_alloc [2];

  for (genvar k = 0; k < 2; k++) begin : g_cache
    view_cache u_cache (
      .clk, .rst_n,
      .rd_valid(c_rd_valid[k]), .rd_ready(c_rd_ready[k]), .rd_x(c_rd_x[k]), .rd_y(c_rd_y[k]),
      .rd_frame(c_rd_frame[k]), .rd_rsp_valid(c_rd_rsp_valid[k]), .rd_rsp_data(c_rd_data[k]),
      .pf_valid(c_pf_valid[k]), .pf_ready(c_pf_ready[k]), .pf_lx(c_pf_lx[k]), .pf_y(c_pf_y[k]),
      .pf_frame(c_pf_frame[k]),
      .fill_req_valid(fill_req_valid[k]), .fill_req_ready(fill_req_ready[k]),
      .fill_req_lx(fill_req_lx[k]), .fill_req_y(fill_req_y[k]), .fill_req_frame(fill_req_frame[k]),
      .fill_req_id(fill_req_id[k]), .fill_rsp_valid(fill_rsp_valid[k]), .fill_rsp_id(fill_rsp_id[k]),
      .fill_rsp_data(fill_rsp_data[k]),
      .rd_miss_cnt(cache_miss[k]), .pf_alloc_cnt(c_pf_alloc[k])
    );
  end

  // reference of a view: cache and frame index
  function automatic logic ref_cache(input mb_tag_t t);
    return (t.view != 3'd0);
  endfunction
  function automatic logic [1:0] ref_frame(input mb_tag_t t);
    return (t.view == 3'd0) ? 2'd0 : 2'(t.view - 3'd1);
  endfunction

  // ------------------------------------------------ stage 1: IMDE prefetch
  logic       s1_active, s1_pf_done;
  logic [4:0] s1_rows;
  logic [5:0] pf_row;       // 0..47
  logic [1:0] pf_line;      // 0..3
  mb_tag_t    t1;
  logic       pf_sel;
  logic       pf_want;
  logic [12:0] pf_y_abs;
  logic [9:0]  pf_lx_abs;

  assign t1 = stage_tag[0];
  assign pf_sel = ref_cache(t1);
  always_comb begin
    pf_y_abs  = 13'(int'(mb_py(t1)) - 16 + int'(pf_row));
    pf_lx_abs = 10'(int'(mb_px(t1)) / 16 - 1 + int'(pf_line));
    pf_want   = s1_active && !s1_pf_done;
    for (int k = 0; k < 2; k++) begin
      c_pf_valid[k] = 1'b0;
      c_pf_lx[k]    = pf_lx_abs[7:0];
      c_pf_y[k]     = pf_y_abs[11:0];
      c_pf_frame[k] = ref_frame(t1);
    end
    // lines outside the frame are skipped without a request
    if (pf_want && !pf_y_abs[12] && pf_y_abs < 13'(FRAME_H) && !pf_lx_abs[9] &&
        pf_lx_abs < 10'(MB_COLS))
      c_pf_valid[pf_sel] = 1'b1;
  end
  logic pf_step;
  assign pf_step = pf_want && (!c_pf_valid[pf_sel] || c_pf_ready[pf_sel]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_active      <= 1'b0;
      s1_pf_done     <= 1'b0;
      s1_rows        <= '0;
      pf_row         <= '0;
      pf_line        <= '0;
      src_req        <= 1'b0;
      src_req_tag    <= '0;
      prefetch_count <= '0;
    end else begin
      src_req <= 1'b0;
      if (stage_start[0]) begin
        s1_active   <= 1'b1;
        s1_pf_done  <= 1'b0;
        s1_rows     <= '0;
        pf_row      <= '0;
        pf_line     <= '0;
        src_req     <= 1'b1;
        src_req_tag <= stage_tag[0];
      end else if (s1_active) begin
        if (src_we) s1_rows <= s1_rows + 5'd1;
        if (pf_step) begin
          if (c_pf_valid[pf_sel]) prefetch_count <= prefetch_count + 32'd1;
          pf_line <= pf_line + 2'd1;
          if (pf_line == 2'd3) begin
            pf_row <= pf_row + 6'd1;
            if (pf_row == 6'd47) s1_pf_done <= 1'b1;
          end
        end
        if (s1_pf_done && s1_rows == 5'd16) s1_active <= 1'b0;
      end
    end
  end
  assign done1 = s1_active && s1_pf_done && s1_rows == 5'd16;

  always_ff @(posedge clk)
    if (src_we) src_ring[seq8(t1, num_views)][src_row] <= src_data;

  // ---------------------------------------------------- stage 2: IMDE
  mb_tag_t     t2;
  logic        s2_active, s2_searching;
  logic [4:0]  s2_copy;
  logic        im_cur_we, im_start, im_busy, im_done;
  pix_t        im_cur_data [16];
  mv_t         im_pred [2];
  logic        im_pred_v [2];
  logic        im_rd_valid, im_rd_ready, im_rd_rsp_valid;
  logic [9:0]  im_rd_x;
  logic [11:0] im_rd_y;
  logic [1:0]  im_rd_frame;
  word_t       im_rd_data [5];
  mv_t         im_best;
  logic [15:0] im_sad, im_cands;
  mv_t         last_mv [8];
  mv_t         mv_ring [8];
  logic [15:0] sad_ring [8];

  assign t2 = stage_tag[1];
  assign im_cur_we   = s2_active && !s2_searching && s2_copy < 5'd16;
  assign im_cur_data = src_ring[seq8(t2, num_views)][s2_copy[3:0]];
  assign im_start    = s2_active && !s2_searching && s2_copy == 5'd16;
  assign im_pred[0]  = '0;
  assign im_pred[1]  = last_mv[t2.view];
  assign im_pred_v[0] = 1'b1;
  assign im_pred_v[1] = (t2.mb != 16'd0);

  imde_core #(.SEARCH_R(SEARCH_R), .NUM_PRED(2), .FRAME_W(FRAME_W), .FRAME_H(FRAME_H)) u_imde (
    .clk, .rst_n, .cur_we(im_cur_we), .cur_row(s2_copy[3:0]), .cur_data(im_cur_data),
    .start(im_start), .mb_x(mb_px(t2)), .mb_y(mb_py(t2)), .ref_frame(ref_frame(t2)),
    .pred_mv(im_pred), .pred_valid(im_pred_v),
    .rd_valid(im_rd_valid), .rd_ready(im_rd_ready), .rd_x(im_rd_x), .rd_y(im_rd_y),
    .rd_frame(im_rd_frame), .rd_rsp_valid(im_rd_rsp_valid), .rd_rsp_data(im_rd_data),
    .busy(im_busy), .done(im_done), .best_mv(im_best), .best_sad(im_sad), .cand_count(im_cands)
  );

  always_comb begin
    for (int k = 0; k < 2; k++) begin
      c_rd_valid[k] = im_rd_valid && (ref_cache(t2) == 1'(k));
      c_rd_x[k]     = im_rd_x;
      c_rd_y[k]     = im_rd_y;
      c_rd_frame[k] = im_rd_frame;
    end
    im_rd_ready     = c_rd_ready[ref_cache(t2)];
    im_rd_rsp_valid = c_rd_rsp_valid[ref_cache(t2)];
    im_rd_data      = c_rd_data[ref_cache(t2)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_active    <= 1'b0;
      s2_searching <= 1'b0;
      s2_copy      <= '0;
      me_valid     <= 1'b0;
      me_tag       <= '0;
      me_mv        <= '0;
      me_sad       <= '0;
      for (int i = 0; i < 8; i++) begin
        last_mv[i]  <= '0;
        mv_ring[i]  <= '0;
        sad_ring[i] <= '0;
      end
    end else begin
      me_valid <= 1'b0;
      if (stage_start[1]) begin
        s2_active    <= 1'b1;
        s2_searching <= 1'b0;
        s2_copy      <= '0;
      end else if (s2_active) begin
        if (!s2_searching) begin
          if (s2_copy == 5'd16) s2_searching <= 1'b1;
          else s2_copy <= s2_copy + 5'd1;
        end else if (im_done) begin
          s2_active <= 1'b0;
          last_mv[t2.view] <= im_best;
          mv_ring[seq8(t2, num_views)]  <= im_best;
          sad_ring[seq8(t2, num_views)] <= im_sad;
          me_valid <= 1'b1;
          me_tag   <= t2;
          me_mv    <= im_best;
          me_sad   <= im_sad;
        end
      end
    end
  end
  assign done2 = s2_active && s2_searching && im_done;

  // ------------------------------------- stages 3 to 5 and DB of stage 8
  // the NOP stage (bit 2) is done by the scheduler itself
  assign stage_done = {done_db, done7, done6, done_fmde, done_fmde_pf, 1'b0, done2, done1};
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done_fmde_pf <= 1'b0;
      done_fmde    <= 1'b0;
      done_db      <= 1'b0;
    end else begin
      done_fmde_pf <= stage_start[3];
      done_fmde    <= stage_start[4];
      done_db      <= stage_start[7];
    end
  end

  // ------------------------------------------------- stage 6: IP and MDC
  mb_tag_t     t6;
  logic [2:0]  s6_q;
  logic        s6_active, s6_wait;
  logic [1:0]  s6_blk;
  logic [17:0] s6_cost;
  logic        ip_start, ip_busy, ip_done, ip_use_i4;
  pix_t        ip_cur [8][8];
  pix_t        ip_rtop [8], ip_rleft [8], ip_otop [8], ip_oleft [8];
  ipred_mode_e ip_mode8, ip_mode4 [4];
  logic [15:0] ip_cost8, ip_cost4;
  pix_t        left_col [8][16];     // forwarded reconstructed right column per view
  ipred_mode_e mode_q [4];           // Intra_8x8 modes of the MB in IP, for REC
  ipred_mode_e rec_mode [4];

  assign t6   = stage_tag[5];
  assign s6_q = seq8(t6, num_views);
  always_comb begin
    logic [3:0] y0, x0;
    y0 = {s6_blk[1], 3'b000};
    x0 = {s6_blk[0], 3'b000};
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) ip_cur[r][c] = src_ring[s6_q][y0 + 4'(r)][x0 + 4'(c)];
    for (int i = 0; i < 8; i++) begin
      ip_rtop[i]  = 8'd128;
      ip_rleft[i] = left_col[t6.view][y0 + 4'(i)];
      ip_otop[i]  = s6_blk[1] ? src_ring[s6_q][4'd7][x0 + 4'(i)] : 8'd128;
      ip_oleft[i] = s6_blk[0] ? src_ring[s6_q][y0 + 4'(i)][4'd7] : 8'd128;
    end
  end

  ip_core u_ip (
    .clk, .rst_n, .start(ip_start), .cur(ip_cur), .rec_top(ip_rtop), .rec_left(ip_rleft),
    .orig_top(ip_otop), .orig_left(ip_oleft), .on_top_edge(~s6_blk[1]), .on_left_edge(~s6_blk[0]),
    .busy(ip_busy), .done(ip_done), .use_i4(ip_use_i4), .mode8(ip_mode8), .cost8(ip_cost8),
    .mode4(ip_mode4), .cost4(ip_cost4)
  );
  assign ip_start = s6_active && !s6_wait;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s6_active      <= 1'b0;
      s6_wait        <= 1'b0;
      s6_blk         <= '0;
      s6_cost        <= '0;
      i4_count       <= '0;
      i8_count       <= '0;
      intra_mb_count <= '0;
      inter_mb_count <= '0;
      done6  <= 1'b0;
      for (int i = 0; i < 4; i++) begin
        mode_q[i]   <= IPM_VER;
        rec_mode[i] <= IPM_VER;
      end
    end else begin
      done6 <= 1'b0;
      if (stage_start[5]) begin
        s6_active <= 1'b1;
        s6_wait   <= 1'b0;
        s6_blk    <= '0;
        s6_cost   <= '0;
      end else if (s6_active) begin
        if (!s6_wait) s6_wait <= 1'b1;
        else if (ip_done) begin
          s6_wait <= 1'b0;
          mode_q[s6_blk] <= ip_mode8;
          if (ip_use_i4) begin
            i4_count <= i4_count + 32'd1;
            s6_cost  <= s6_cost + 18'(ip_cost4);
          end else begin
            i8_count <= i8_count + 32'd1;
            s6_cost  <= s6_cost + 18'(ip_cost8);
          end
          s6_blk <= s6_blk + 2'd1;
          if (s6_blk == 2'd3) begin
            logic [17:0] tot;
            tot = s6_cost + 18'(ip_use_i4 ? ip_cost4 : ip_cost8);
            s6_active <= 1'b0;
            done6 <= 1'b1;
            if (tot < 18'(sad_ring[s6_q])) intra_mb_count <= intra_mb_count + 32'd1;
            else                           inter_mb_count <= inter_mb_count + 32'd1;
          end
        end
      end
      // the REC stage takes the modes when the slot moves on
      if (stage_start[6]) begin
        rec_mode <= mode_q;
      end
    end
  end

  // ---------------------------------------------------------- stage 7: REC
  mb_tag_t    t7;
  logic [2:0] s7_q;
  logic       s7_active, s7_wait;
  logic [2:0] s7_job;
  pix_t       rbuf [16][16];          // reconstructed MB
  logic       rc_start, rc_busy, rc_done;
  pix_t       rc_cur [4][8], rc_pred [4][8], rc_rec [4][8];
  coef_t      rc_coef [4][8];
  logic [5:0] rc_nz;
  pix_t       g_top [8], g_left [8], g_l1 [4];
  logic [3:0] y7, x7;

  assign t7   = stage_tag[6];
  assign s7_q = seq8(t7, num_views);
  assign y7   = {s7_job[2], s7_job[0], 2'b00};   // block row * 8 + half * 4
  assign x7   = {s7_job[1], 3'b000};
  always_comb begin
    logic [3:0] yb;
    yb = {s7_job[2], 3'b000};
    for (int i = 0; i < 8; i++) begin
      g_top[i]  = s7_job[2] ? rbuf[4'd7][x7 + 4'(i)] : 8'd128;
      g_left[i] = s7_job[1] ? rbuf[yb + 4'(i)][4'd7] : left_col[t7.view][yb + 4'(i)];
    end
    for (int i = 0; i < 4; i++) g_l1[i] = '0;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 8; c++) rc_cur[r][c] = src_ring[s7_q][y7 + 4'(r)][x7 + 4'(c)];
  end

  for (genvar r = 0; r < 4; r++) begin : g_pred
    intra_pred_gen u_gen (.i4(1'b0), .mode(rec_mode[{s7_job[2], s7_job[1]}]),
                          .row({s7_job[0], 2'(r)}), .top(g_top), .left0(g_left), .left1(g_l1),
                          .pred(rc_pred[r]));
  end

  rec_core u_rec (
    .clk, .rst_n, .start(rc_start), .cur(rc_cur), .pred(rc_pred), .qp(qp), .intra(1'b1),
    .busy(rc_busy), .done(rc_done), .rec_out(rc_rec), .coef_out(rc_coef), .nz_count(rc_nz)
  );
  assign rc_start = s7_active && !s7_wait;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s7_active     <= 1'b0;
      s7_wait       <= 1'b0;
      s7_job        <= '0;
      done7 <= 1'b0;
      rec_job_valid <= 1'b0;
      rec_job_tag   <= '0;
      rec_job_idx   <= '0;
      for (int v = 0; v < 8; v++)
        for (int i = 0; i < 16; i++) left_col[v][i] <= 8'd128;
    end else begin
      done7 <= 1'b0;
      rec_job_valid <= 1'b0;
      if (stage_start[6]) begin
        s7_active <= 1'b1;
        s7_wait   <= 1'b0;
        s7_job    <= '0;
      end else if (s7_active) begin
        if (!s7_wait) s7_wait <= 1'b1;
        else if (rc_done) begin
          s7_wait       <= 1'b0;
          rec_job_valid <= 1'b1;
          rec_job_tag   <= t7;
          rec_job_idx   <= {s7_job[2], s7_job[1], s7_job[0]};
          s7_job        <= s7_job + 3'd1;
          if (s7_job == 3'd7) begin
            s7_active     <= 1'b0;
            done7 <= 1'b1;
            for (int i = 0; i < 16; i++)
              left_col[t7.view][i] <= (i >= 12) ? rc_rec[i - 12][7] : rbuf[i][15];
          end
        end
      end
    end
  end

  always_ff @(posedge clk)
    if (s7_active && s7_wait && rc_done)
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 8; c++) begin
          rbuf[y7 + 4'(r)][x7 + 4'(c)] <= rc_rec[r][c];
          coef_ring[s7_q[1:0]][y7 + 4'(r)][x7 + 4'(c)] <= rc_coef[r][c];
        end

  assign rec_job_pix = rc_rec;

  // ------------------------------------------ stage 8: binarisers and EC
  for (genvar k = 0; k < 2; k++) begin : g_ec
    typedef enum logic [2:0] {B_IDLE, B_INIT, B_SIG, B_SIGN, B_MAG, B_FLUSH, B_DONE} bstate_e;
    bstate_e          bs;
    logic [1:0]       q4;
    logic [7:0]       ci;              // coefficient index: 4x4 block * 16 + position
    logic [2:0]       mag_i;           // 7 pairs of bypass bits
    coef_t            lv;
    logic [15:0]      alv;
    logic [3:0]       pos;
    logic [3:0]       ry, rx;
    logic             slice_init, flush;
    logic [1:0]       bin_valid, bin_val, bin_byp;
    logic [CTX_W-1:0] bin_ctx [2];
    logic [13:0]      rem;

    assign pos = ci[3:0];
    assign ry  = {ci[7:6], ci[3:2]};
    assign rx  = {ci[5:4], ci[1:0]};
    assign lv  = coef_ring[q4][ry][rx];
    assign alv = (lv < 0) ? 16'(-int'(lv)) : 16'(lv);
    assign rem = (alv > 16'd16385) ? 14'h3fff : 14'(alv - 16'd2);

    always_comb begin
      slice_init = (bs == B_INIT);
      flush      = (bs == B_FLUSH);
      bin_valid  = '0;
      bin_val    = '0;
      bin_byp    = '0;
      bin_ctx[0] = CTX_W'(pos);
      bin_ctx[1] = CTX_W'(16 + int'(pos));
      case (bs)
        B_SIG: begin
          bin_valid = (alv != 0) ? 2'b11 : 2'b01;
          bin_val   = {alv > 16'd1, alv != 16'd0};
        end
        B_SIGN: begin
          bin_valid = 2'b01;
          bin_byp   = 2'b01;
          bin_val   = {1'b0, lv < 0};
        end
        B_MAG: begin
          bin_valid = 2'b11;
          bin_byp   = 2'b11;
          bin_val   = {rem[13 - 2 * int'(mag_i) - 1], rem[13 - 2 * int'(mag_i)]};
        end
        default: ;
      endcase
    end

    ec_core #(.NUM_CTX(NUM_CTX)) u_ec (
      .clk, .rst_n, .slice_init, .ctx_we(1'b0), .ctx_widx('0), .ctx_wstate('0), .ctx_wmps(1'b0),
      .bin_valid, .bin_ctx, .bin_val, .bin_byp, .flush,
      .out_n(ec_out_n[k]), .out_byte(ec_out_byte[k]), .out_carry(ec_out_carry[k]),
      .bin_count(ec_bins[k]), .byte_count(ec_bytes[k])
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        bs            <= B_IDLE;
        q4            <= '0;
        ci            <= '0;
        mag_i         <= '0;
        ec_done[k]    <= 1'b0;
        ec_out_tag[k] <= '0;
      end else begin
        ec_done[k] <= 1'b0;
        case (bs)
          B_IDLE: if (ec_start[k]) begin
            q4            <= 2'(seq8(ec_tag[k], num_views));
            ec_out_tag[k] <= ec_tag[k];
            ci            <= '0;
            bs            <= B_INIT;
          end
          B_INIT: bs <= B_SIG;
          B_SIG: begin
            if (alv != 16'd0) bs <= B_SIGN;
            else begin
              ci <= ci + 8'd1;
              if (ci == 8'd255) bs <= B_FLUSH;
            end
          end
          B_SIGN: begin
            mag_i <= '0;
            if (alv > 16'd1) bs <= B_MAG;
            else begin
              ci <= ci + 8'd1;
              bs <= (ci == 8'd255) ? B_FLUSH : B_SIG;
            end
          end
          B_MAG: begin
            mag_i <= mag_i + 3'd1;
            if (mag_i == 3'd6) begin
              ci <= ci + 8'd1;
              bs <= (ci == 8'd255) ? B_FLUSH : B_SIG;
            end
          end
          B_FLUSH: bs <= B_DONE;
          default: begin     // B_DONE: the last bytes have left the core
            ec_done[k] <= 1'b1;
            bs <= B_IDLE;
          end
        endcase
      end
    end
  end

  // ---------------------------------------------------------- counters
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) over_budget_count <= '0;
    else if (over_budget) over_budget_count <= over_budget_count + 32'd1;
  end

  logic unused;
  assign unused = ^{slot_cycles, c_pf_alloc[0], c_pf_alloc[1], im_busy, im_cands, ip_busy,
                    ip_mode4[0], rc_busy, rc_nz, mv_ring[0], MB_ROWS};

endmodule
