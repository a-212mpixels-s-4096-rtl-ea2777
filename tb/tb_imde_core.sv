// tb_imde_core: self-checking test of the integer ME/DE core.
//
// A behavioural reference memory answers the core's row reads in order,
// with random stalls on the request side and random answer delays. The
// reference frame is a pseudo-random pattern; the current MB is a copy of a
// reference block at a known displacement, with small noise added. The
// test computes the predictor-centred search independently (SAD of every
// valid predictor, then of every position within the range around the best
// one, first minimum kept) and compares the vector, the SAD and the number
// of candidates. The full +-16 range is used.
module tb_imde_core;
  import mvc_pkg::*;

  localparam int R = 16;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        cur_we = 1'b0;
  logic [3:0]  cur_row = '0;
  pix_t        cur_data [16];
  logic        start = 1'b0;
  logic [11:0] mb_x = '0, mb_y = '0;
  logic [1:0]  ref_frame = '0;
  mv_t         pred_mv [4];
  logic        pred_valid [4];
  logic        rd_valid, rd_ready;
  logic [9:0]  rd_x;
  logic [11:0] rd_y;
  logic [1:0]  rd_frame;
  logic        rd_rsp_valid = 1'b0;
  word_t       rd_rsp_data [5];
  logic        busy, done;
  mv_t         best_mv;
  logic [15:0] best_sad, cand_count;

  int checks = 0;
  int failures = 0;

  imde_core #(.SEARCH_R(R), .NUM_PRED(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (600000) @(posedge clk);
    failures++;
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

  function automatic int ref_pix(input int x, input int y, input int f);
    int h;
    h = x * 7919 + y * 104729 + f * 1299709;
    h = h ^ (h >>> 7);
    h = h * 31 + (x * y);
    return (h >>> 3) & 255;
  endfunction

  // ----------------------------------------------- reference memory model
  typedef struct { int x; int y; int f; int due; } req_t;
  req_t q [$];
  int cyc = 0;
  always_ff @(posedge clk) rd_ready <= ($urandom_range(3, 0) != 0);
  always @(posedge clk) begin
    cyc++;
    rd_rsp_valid <= 1'b0;
    if (q.size() > 0 && q[0].due <= cyc) begin
      req_t r;
      r = q.pop_front();
      rd_rsp_valid <= 1'b1;
      for (int j = 0; j < 5; j++)
        for (int i = 0; i < 4; i++)
          rd_rsp_data[j][8*i +: 8] <= 8'(ref_pix(4 * (r.x + j) + i, r.y, r.f));
    end
    if (rd_valid && rd_ready) begin
      int d;
      d = cyc + 1 + $urandom_range(2, 0);
      if (q.size() > 0 && q[$].due > d) d = q[$].due;
      q.push_back('{x: int'(rd_x), y: int'(rd_y), f: int'(rd_frame), due: d});
    end
  end

  int cur_m [16][16];

  function automatic int sad_at(input int bx, input int by, input int f);
    int s = 0;
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 16; c++) begin
        int d;
        d = cur_m[r][c] - ref_pix(bx + c, by + r, f);
        s += (d < 0) ? -d : d;
      end
    return s;
  endfunction

  task automatic run_mb(input int mx, input int my, input int f, input int tx, input int ty,
                        input int pv [4][2], input bit pok [4]);
    int best, bmx, bmy, n, cx, cy, t0, t1;
    // current MB: reference block at (mx+tx, my+ty) plus noise
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 16; c++) begin
        int v;
        v = ref_pix(mx + tx + c, my + ty + r, f) + $urandom_range(4, 0) - 2;
        cur_m[r][c] = (v < 0) ? 0 : (v > 255 ? 255 : v);
      end
    for (int r = 0; r < 16; r++) begin
      @(negedge clk);
      cur_we = 1'b1;
      cur_row = 4'(r);
      for (int c = 0; c < 16; c++) cur_data[c] = 8'(cur_m[r][c]);
    end
    @(negedge clk);
    cur_we = 1'b0;
    // independent model of the search
    best = 65535; bmx = 0; bmy = 0; n = 0;
    for (int p = 0; p < 4; p++) begin
      int bx, by;
      bx = mx + pv[p][0]; by = my + pv[p][1];
      if (pok[p] && bx >= 0 && by >= 0 && bx <= 4096 - 16 && by <= 2160 - 16) begin
        int s;
        s = sad_at(bx, by, f);
        n++;
        if (s < best) begin best = s; bmx = pv[p][0]; bmy = pv[p][1]; end
      end
    end
    cx = bmx; cy = bmy;
    for (int dy = -R; dy <= R; dy++)
      for (int dx = -R; dx <= R; dx++) begin
        int bx, by;
        bx = mx + cx + dx; by = my + cy + dy;
        if (bx >= 0 && by >= 0 && bx <= 4096 - 16 && by <= 2160 - 16) begin
          int s;
          s = sad_at(bx, by, f);
          n++;
          if (s < best) begin best = s; bmx = cx + dx; bmy = cy + dy; end
        end
      end
    // run the core
    mb_x = 12'(mx); mb_y = 12'(my); ref_frame = 2'(f);
    for (int p = 0; p < 4; p++) begin
      pred_mv[p].x = 10'(pv[p][0]);
      pred_mv[p].y = 10'(pv[p][1]);
      pred_valid[p] = pok[p];
    end
    start = 1'b1;
    t0 = cyc;
    @(negedge clk);
    start = 1'b0;
    wait (done);
    t1 = cyc;
    @(negedge clk);
    check(int'(best_mv.x) == bmx && int'(best_mv.y) == bmy,
          $sformatf("MB (%0d,%0d): vector (%0d,%0d), expected (%0d,%0d)", mx, my,
                    int'(best_mv.x), int'(best_mv.y), bmx, bmy));
    check(int'(best_sad) == best, $sformatf("SAD %0d, expected %0d", best_sad, best));
    check(int'(cand_count) == n, $sformatf("%0d candidates, expected %0d", cand_count, n));
    check(bmx == tx && bmy == ty, $sformatf("true displacement (%0d,%0d) not found", tx, ty));
    // each candidate needs at least its 16 row reads
    check(t1 - t0 >= 16 * n, "finished faster than one row read per cycle");
    $display("MB (%0d,%0d): vector (%0d,%0d) SAD %0d, %0d candidates in %0d cycles",
             mx, my, int'(best_mv.x), int'(best_mv.y), best_sad, cand_count, t1 - t0);
  endtask

  initial begin
    int pv [4][2];
    bit pok [4];
    for (int c = 0; c < 16; c++) cur_data[c] = '0;
    for (int p = 0; p < 4; p++) begin pred_mv[p] = '0; pred_valid[p] = 1'b0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // true vector near predictor 2, far from the others
    pv = '{'{-40, 3}, '{30, -20}, '{21, 9}, '{0, 0}};
    pok = '{1'b1, 1'b1, 1'b1, 1'b1};
    run_mb(128, 96, 1, 25, 4, pv, pok);
    // disparity search in another frame, predictor 0 invalid, some candidates out of frame
    pv = '{'{60, 0}, '{-8, 2}, '{0, 0}, '{2, -5}};
    pok = '{1'b0, 1'b1, 1'b1, 1'b1};
    run_mb(16, 8, 2, -12, -3, pv, pok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
