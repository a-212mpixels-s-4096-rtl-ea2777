// tb_ip_core: self-checking test of the hybrid open-closed loop intra
// prediction core.
//
// Random 8x8 blocks (smooth, striped or noisy so that each mode wins
// sometimes) with random neighbours are evaluated by the core and by an
// independent model: predictions written from the mode definitions, 4x4
// Hadamard by matrix products, SATD = sum/2, first minimum kept. The test
// checks the 8x8 mode and cost, the four 4x4 modes and their summed cost,
// the I4/I8 choice, that neighbours come from the forwarded reconstructed
// pixels exactly when the block touches the MB edge, and the latency.
module tb_ip_core;
  import mvc_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  pix_t        cur [8][8];
  pix_t        rec_top [8], rec_left [8], orig_top [8], orig_left [8];
  logic        on_top_edge = 1'b0, on_left_edge = 1'b0;
  logic        busy, done, use_i4;
  ipred_mode_e mode8;
  logic [15:0] cost8, cost4;
  ipred_mode_e mode4 [4];

  int checks = 0;
  int failures = 0;

  ip_core dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
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

  int H4 [4][4] = '{'{1, 1, 1, 1}, '{1, 1, -1, -1}, '{1, -1, -1, 1}, '{1, -1, 1, -1}};

  // SATD of the 4x4 difference block at (r0, c0) of d
  function automatic int satd(input int d [8][8], input int r0, input int c0);
    int s = 0;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
      int t = 0;
      for (int k = 0; k < 4; k++) for (int l = 0; l < 4; l++) t += H4[i][k] * H4[j][l] * d[r0+k][c0+l];
      s += (t < 0) ? -t : t;
    end
    return s / 2;
  endfunction

  int e_mode8, e_cost8, e_mode4 [4], e_cost4, e_i4;
  int mode_wins [3];

  task automatic model();
    int top [8], left [8], best4 [4];
    e_cost8 = 1 << 30;
    for (int b = 0; b < 4; b++) best4[b] = 1 << 30;
    for (int i = 0; i < 8; i++) begin
      top[i]  = on_top_edge  ? rec_top[i]  : orig_top[i];
      left[i] = on_left_edge ? rec_left[i] : orig_left[i];
    end
    for (int m = 0; m < 3; m++) begin
      int d8 [8][8], d4 [8][8], c8, dc;
      // 8x8 prediction
      dc = 8;
      for (int i = 0; i < 8; i++) dc += top[i] + left[i];
      dc = dc / 16;
      for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++) begin
        int p;
        p = (m == 0) ? top[x] : (m == 1) ? left[y] : dc;
        d8[y][x] = int'(cur[y][x]) - p;
      end
      // 4x4 predictions: inner neighbours are original pixels of the block
      for (int by = 0; by < 2; by++) for (int bx = 0; bx < 2; bx++) begin
        int t [4], l [4], dc4;
        for (int i = 0; i < 4; i++) begin
          t[i] = (by == 0) ? top[4*bx+i] : int'(cur[3][4*bx+i]);
          l[i] = (bx == 0) ? left[4*by+i] : int'(cur[4*by+i][3]);
        end
        dc4 = 4;
        for (int i = 0; i < 4; i++) dc4 += t[i] + l[i];
        dc4 = dc4 / 8;
        for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++) begin
          int p;
          p = (m == 0) ? t[x] : (m == 1) ? l[y] : dc4;
          d4[4*by+y][4*bx+x] = int'(cur[4*by+y][4*bx+x]) - p;
        end
      end
      c8 = satd(d8, 0, 0) + satd(d8, 0, 4) + satd(d8, 4, 0) + satd(d8, 4, 4);
      if (c8 < e_cost8) begin e_cost8 = c8; e_mode8 = m; end
      for (int b = 0; b < 4; b++) begin
        int c4;
        c4 = satd(d4, 4 * (b / 2), 4 * (b % 2));
        if (c4 < best4[b]) begin best4[b] = c4; e_mode4[b] = m; end
      end
    end
    e_cost4 = best4[0] + best4[1] + best4[2] + best4[3];
    e_i4 = (e_cost4 < e_cost8) ? 1 : 0;
  endtask

  task automatic run_block(input int kind);
    int lat;
    for (int i = 0; i < 8; i++) begin
      rec_top[i]   = 8'($urandom_range(255, 0));
      rec_left[i]  = 8'($urandom_range(255, 0));
      orig_top[i]  = 8'($urandom_range(255, 0));
      orig_left[i] = 8'($urandom_range(255, 0));
    end
    on_top_edge  = 1'($urandom_range(1, 0));
    on_left_edge = 1'($urandom_range(1, 0));
    for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++) begin
      int v;
      case (kind)
        0: v = (on_top_edge ? rec_top[x] : orig_top[x]) + $urandom_range(6, 0) - 3;    // vertical stripes
        1: v = (on_left_edge ? rec_left[y] : orig_left[y]) + $urandom_range(6, 0) - 3; // horizontal
        2: v = 128 + $urandom_range(6, 0) - 3;                                          // flat
        default: v = $urandom_range(255, 0);
      endcase
      cur[y][x] = 8'(v < 0 ? 0 : (v > 255 ? 255 : v));
    end
    model();
    mode_wins[e_mode8]++;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done && lat < 100) begin @(negedge clk); lat++; end
    check(lat == 28, $sformatf("latency %0d, expected 28", lat));
    check(int'(mode8) == e_mode8 && int'(cost8) == e_cost8,
          $sformatf("8x8: mode %0d cost %0d, expected %0d %0d", mode8, cost8, e_mode8, e_cost8));
    for (int b = 0; b < 4; b++)
      check(int'(mode4[b]) == e_mode4[b], $sformatf("4x4 block %0d: mode %0d, expected %0d", b, mode4[b], e_mode4[b]));
    check(int'(cost4) == e_cost4, $sformatf("4x4 cost %0d, expected %0d", cost4, e_cost4));
    check(int'(use_i4) == e_i4, "I4/I8 decision");
  endtask

  initial begin
    for (int i = 0; i < 3; i++) mode_wins[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) run_block(i % 4);
    for (int i = 0; i < 3; i++) check(mode_wins[i] > 0, $sformatf("mode %0d never chosen", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
