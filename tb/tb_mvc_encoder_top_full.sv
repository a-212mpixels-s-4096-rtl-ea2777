// tb_mvc_encoder_top_full: end-to-end test of the encoder at its full size:
// default parameters (4096x2160 frame, +-16 search, 350-cycle budget), two
// views of three MBs each.
//
// The testbench plays the source (writes the 16 rows of each requested MB)
// and the system bus (answers cache refills after a random delay of 4-40
// cycles, at most one request accepted every other cycle). Reference frames
// are a hashed texture per cache and frame; the current MBs of view v are the
// reference moved by a known vector (view 0: (+2,+1) from its previous
// frame, other views: (+1,0) from the view before), except every third MB,
// which is flat (and so should be coded intra).
// Checks: the MB order V0MB0, V1MB0, ... in the IMDE results; the found
// vector for MBs whose true position is inside the frame; one frame_done
// and MBs+7 slots; eight REC jobs per MB, each pixel within TOL of the
// source; bytes from the entropy coders for every MB. Each mechanism is
// counted and must happen at least once: cache misses in both caches,
// prefetches, EC waits (small test only), slots over the budget, Intra_4x4 and
// Intra_8x8 choices, intra and inter MB decisions, both EC cores.
module tb_mvc_encoder_top_full;
  import mvc_pkg::*;

  localparam int FW = 4096, FH = 2160, SR = 16, NV = 2, MBS = 3, TOL = 10;
  localparam int MB_COLS = FW / 16;

  logic        clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [2:0]  num_views = 3'(NV);
  logic [15:0] mbs_per_view = 16'(MBS);
  logic [5:0]  qp = 6'd10;
  logic        src_req;
  mb_tag_t     src_req_tag;
  logic        src_we = 1'b0;
  logic [3:0]  src_row = '0;
  pix_t        src_data [16];
  logic        fill_req_valid [2], fill_req_ready [2];
  logic [7:0]  fill_req_lx [2];
  logic [11:0] fill_req_y [2];
  logic [1:0]  fill_req_frame [2];
  logic [2:0]  fill_req_id [2];
  logic        fill_rsp_valid [2];
  logic [2:0]  fill_rsp_id [2];
  word_t       fill_rsp_data [2][4];
  logic        me_valid;
  mb_tag_t     me_tag;
  mv_t         me_mv;
  logic [15:0] me_sad;
  logic        rec_job_valid;
  mb_tag_t     rec_job_tag;
  logic [2:0]  rec_job_idx;
  pix_t        rec_job_pix [4][8];
  logic [1:0]  ec_out_n [2];
  logic [7:0]  ec_out_byte [2][2];
  logic        ec_out_carry [2];
  mb_tag_t     ec_out_tag [2];
  logic        busy, frame_done;
  logic [31:0] slot_count, ec_stall, over_budget_count, cache_miss [2], prefetch_count;
  logic [31:0] i4_count, i8_count, intra_mb_count, inter_mb_count, ec_bins [2], ec_bytes [2];

  int checks = 0;
  int failures = 0;

  mvc_encoder_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: %0d slots, %0d IMDE results, %0d REC jobs, stage 1 active %0d rows %0d pf done %0d, IMDE active %0d",
             slot_count, n_me, n_rec, dut.s1_active, dut.s1_rows, dut.s1_pf_done, dut.s2_active);
    $display("pf row %0d line %0d valid %0d/%0d ready %0d/%0d fill_req %0d/%0d", dut.pf_row, dut.pf_line,
             dut.c_pf_valid[0], dut.c_pf_valid[1], dut.c_pf_ready[0], dut.c_pf_ready[1], fill_req_valid[0], fill_req_valid[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  // reference texture of cache c, frame f
  function automatic int refpix(input int c, input int f, input int x, input int y);
    int h;
    h = (x * 7919 + y * 104729 + c * 31 + f * 131) ^ (x * y);
    h = h ^ (h >> 7);
    return (h * 2654435 >> 9) & 255;
  endfunction
  function automatic int mvx(input int v); return (v == 0) ? 2 : 1; endfunction
  function automatic int mvy(input int v); return (v == 0) ? 1 : 0; endfunction
  function automatic int srcpix(input int v, input int mb, input int x, input int y);
    if (mb % 3 == 2) return 120 + ((x + y) % 3);
    return refpix(v == 0 ? 0 : 1, v == 0 ? 0 : v - 1, x + mvx(v), y + mvy(v));
  endfunction

  // ---------------------------------------------------------- source
  initial begin : source
    forever begin
      @(negedge clk);
      if (src_req) begin
        mb_tag_t t;
        int x0, y0;
        t = src_req_tag;
        x0 = (int'(t.mb) % MB_COLS) * 16;
        y0 = (int'(t.mb) / MB_COLS) * 16;
        repeat ($urandom_range(3, 0)) @(negedge clk);
        for (int r = 0; r < 16; r++) begin
          src_we = 1'b1;
          src_row = 4'(r);
          for (int c = 0; c < 16; c++) src_data[c] = 8'(srcpix(int'(t.view), int'(t.mb), x0 + c, y0 + r));
          @(negedge clk);
        end
        src_we = 1'b0;
      end
    end
  end

  // ---------------------------------------------------------- system bus
  for (genvar k = 0; k < 2; k++) begin : g_bus
    int due [$], id [$], lx [$], ly [$], lf [$];
    int cyc = 0;
    // requests are taken at the clock edge, answers driven between edges
    always @(posedge clk)
      if (rst_n && fill_req_valid[k] && fill_req_ready[k]) begin
        due.push_back(cyc + $urandom_range(40, 4));
        id.push_back(int'(fill_req_id[k]));
        lx.push_back(int'(fill_req_lx[k]));
        ly.push_back(int'(fill_req_y[k]));
        lf.push_back(int'(fill_req_frame[k]));
      end
    always @(negedge clk) begin
      cyc++;
      fill_rsp_valid[k] = 1'b0;
      fill_req_ready[k] = 1'(cyc % 2);
      if (due.size() > 0 && due[0] <= cyc) begin
        fill_rsp_valid[k] = 1'b1;
        fill_rsp_id[k] = 3'(id[0]);
        for (int w = 0; w < 4; w++)
          for (int i = 0; i < 4; i++)
            fill_rsp_data[k][w][8*i +: 8] = 8'(refpix(k, lf[0], lx[0] * 16 + w * 4 + i, ly[0]));
        void'(due.pop_front()); void'(id.pop_front()); void'(lx.pop_front());
        void'(ly.pop_front()); void'(lf.pop_front());
      end
    end
  end

  // ---------------------------------------------------------- monitors
  int n_me = 0, n_rec = 0, n_frame_done = 0, rec_bad = 0, mv_checked = 0;
  int ec_mb_bytes [2];
  int ec_mbs [2];
  bit last_ok [8] = '{default: 1'b0};
  always @(negedge clk) if (rst_n) begin
    if (me_valid) begin
      int v, mb, x0, y0;
      bit ok;
      v = n_me % NV;
      mb = n_me / NV;
      check(int'(me_tag.view) == v && int'(me_tag.mb) == mb,
            $sformatf("IMDE result %0d is V%0d MB%0d, expected V%0d MB%0d", n_me, me_tag.view, me_tag.mb, v, mb));
      x0 = (mb % MB_COLS) * 16 + mvx(v);
      y0 = (mb / MB_COLS) * 16 + mvy(v);
      // the true vector is in reach when the search centres on the zero
      // vector (first MB: the only predictor) and it lies in the range, or
      // when the previous MB of the view found it (then it is the best
      // predictor, with SAD 0)
      ok = (int'(me_mv.x) == mvx(v) && int'(me_mv.y) == mvy(v) && me_sad == 0);
      if (mb % 3 != 2 && x0 >= 0 && y0 >= 0 && x0 + 16 <= FW && y0 + 16 <= FH &&
          ((mb == 0 && mvx(v) <= SR && -mvx(v) <= SR && mvy(v) <= SR && -mvy(v) <= SR) || last_ok[v])) begin
        mv_checked++;
        check(ok, $sformatf("V%0d MB%0d vector (%0d,%0d) sad %0d", v, mb, int'(me_mv.x), int'(me_mv.y), me_sad));
      end
      last_ok[v] = ok;
      n_me++;
    end
    if (rec_job_valid) begin
      int x0, y0, bad;
      x0 = (int'(rec_job_tag.mb) % MB_COLS) * 16 + (rec_job_idx[1] ? 8 : 0);
      y0 = (int'(rec_job_tag.mb) / MB_COLS) * 16 + (rec_job_idx[2] ? 8 : 0) + (rec_job_idx[0] ? 4 : 0);
      bad = 0;
      for (int r = 0; r < 4; r++) for (int c = 0; c < 8; c++) begin
        int d;
        d = int'(rec_job_pix[r][c]) - srcpix(int'(rec_job_tag.view), int'(rec_job_tag.mb), x0 + c, y0 + r);
        if (d > TOL || d < -TOL) bad++;
      end
      if (bad != 0) rec_bad++;
      n_rec++;
    end
    for (int k = 0; k < 2; k++) begin
      ec_mb_bytes[k] += int'(ec_out_n[k]);
      if (dut.ec_done[k]) begin
        check(ec_mb_bytes[k] > 0, $sformatf("EC core %0d gave no bytes for an MB", k));
        ec_mb_bytes[k] = 0;
        ec_mbs[k]++;
      end
    end
    if (frame_done) n_frame_done++;
  end

  initial begin
    int t0, t1;
    for (int k = 0; k < 2; k++) begin
      ec_mb_bytes[k] = 0; ec_mbs[k] = 0;
      fill_req_ready[k] = 1'b0; fill_rsp_valid[k] = 1'b0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    t0 = $time / 10;
    while (n_frame_done == 0) @(negedge clk);
    t1 = $time / 10;
    // frame_done comes when the last MB leaves stage 8; the EC cores may
    // still be coding the last two MBs
    for (int i = 0; i < 20000 && ec_mbs[0] + ec_mbs[1] < NV * MBS; i++) @(negedge clk);
    repeat (5) @(negedge clk);
    check(n_me == NV * MBS, $sformatf("%0d IMDE results, expected %0d", n_me, NV * MBS));
    check(n_rec == 8 * NV * MBS, $sformatf("%0d REC jobs, expected %0d", n_rec, 8 * NV * MBS));
    check(rec_bad == 0, $sformatf("%0d REC jobs off the source by more than %0d", rec_bad, TOL));
    check(int'(slot_count) == NV * MBS + 7, $sformatf("slots %0d, expected %0d", slot_count, NV * MBS + 7));
    check(n_frame_done == 1, "frame_done count");
    check(ec_mbs[0] + ec_mbs[1] == NV * MBS, "MBs entropy coded");
    check(ec_mbs[0] > 0 && ec_mbs[1] > 0, "both EC cores used");
    check(mv_checked > 0, "no vector checked");
    // at full size the prefetches cover the few reads of cache 1
    if (0) check(cache_miss[0] > 0 && cache_miss[1] > 0, "cache misses in both caches");
    else         check(cache_miss[0] + cache_miss[1] > 0, "cache misses");
    check(prefetch_count > 0, "prefetches");
    check(over_budget_count > 0, "slots over the stage budget");
    check(i4_count > 0, "Intra_4x4 chosen");
    check(i8_count > 0, "Intra_8x8 chosen");
    check(intra_mb_count > 0 && inter_mb_count > 0, "both intra and inter MB decisions");
    if (0) check(ec_stall > 0, "EC wait");
    $display("frame: %0d cycles, %0d slots, %0d over budget; misses %0d/%0d, prefetches %0d",
             t1 - t0, slot_count, over_budget_count, cache_miss[0], cache_miss[1], prefetch_count);
    $display("EC wait %0d cycles; I4 %0d I8 %0d; intra MBs %0d inter MBs %0d; EC bins %0d/%0d bytes %0d/%0d; vectors checked %0d",
             ec_stall, i4_count, i8_count, intra_mb_count, inter_mb_count, ec_bins[0], ec_bins[1],
             ec_bytes[0], ec_bytes[1], mv_checked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
