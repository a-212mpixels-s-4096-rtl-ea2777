// tb_rec_core: self-checking test of the reconstruction core.
//
// Random current and prediction pixels at random QPs, intra and inter, are
// reconstructed by the core and by an independent model here (matrix form of
// the 4x4 forward transform, the quantiser with its own copy of the H.264
// tables, dequantiser, inverse transform with per-term halving, rounding and
// clipping). Levels, non-zero count, reconstructed pixels and the five-cycle
// latency are checked, and at QP 0 the reconstruction must stay within 2 of
// the current pixels.
module tb_rec_core;
  import mvc_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       start = 1'b0;
  pix_t       cur  [4][8];
  pix_t       pred [4][8];
  logic [5:0] qp = '0;
  logic       intra = 1'b0;
  logic       busy, done;
  pix_t       rec_out  [4][8];
  coef_t      coef_out [4][8];
  logic [5:0] nz_count;

  int checks = 0;
  int failures = 0;

  rec_core dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
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

  int MFt [6][3] = '{'{13107, 5243, 8066}, '{11916, 4660, 7490}, '{10082, 4194, 6554},
                     '{9362, 3647, 5825}, '{8192, 3355, 5243}, '{7282, 2893, 4559}};
  int Vt  [6][3] = '{'{10, 16, 13}, '{11, 18, 14}, '{13, 20, 16},
                     '{14, 23, 18}, '{16, 25, 20}, '{18, 29, 23}};
  int C4  [4][4] = '{'{1, 1, 1, 1}, '{2, 1, -1, -2}, '{1, -1, -1, 1}, '{1, -2, 2, -1}};

  function automatic int cls(input int r, input int c);
    if (r % 2 == 0 && c % 2 == 0) return 0;
    if (r % 2 == 1 && c % 2 == 1) return 1;
    return 2;
  endfunction

  // one output of the 1-D inverse: sum of weighted inputs, halves per term
  function automatic int inv1(input int d [4], input int n);
    case (n)
      0: return d[0] + d[1] + d[2] + (d[3] >>> 1);
      1: return d[0] + (d[1] >>> 1) - d[2] - d[3];
      2: return d[0] - (d[1] >>> 1) - d[2] + d[3];
      default: return d[0] - d[1] + d[2] - (d[3] >>> 1);
    endcase
  endfunction

  int e_lvl [4][8];
  int e_rec [4][8];
  int e_nz;

  task automatic model(input int q, input bit intr);
    for (int b = 0; b < 2; b++) begin
      int x [4][4], y [4][4], d [4][4], t [4][4], o [4][4];
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++)
        x[r][c] = int'(cur[r][4*b+c]) - int'(pred[r][4*b+c]);
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
        int s = 0;
        for (int k = 0; k < 4; k++) for (int l = 0; l < 4; l++) s += C4[i][k] * C4[j][l] * x[k][l];
        y[i][j] = s;
      end
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
        longint a, lv, qb, f;
        qb = 15 + q / 6;
        f  = intr ? (64'd1 << qb) / 3 : (64'd1 << qb) / 6;
        a  = (y[i][j] < 0) ? -y[i][j] : y[i][j];
        lv = (a * MFt[q % 6][cls(i, j)] + f) >> qb;
        if (y[i][j] < 0) lv = -lv;
        e_lvl[i][4*b+j] = int'(lv);
        d[i][j] = int'(lv) * Vt[q % 6][cls(i, j)] * (1 << (q / 6));
      end
      for (int r = 0; r < 4; r++) for (int n = 0; n < 4; n++) begin
        int v [4];
        for (int k = 0; k < 4; k++) v[k] = d[r][k];
        t[r][n] = inv1(v, n);
      end
      for (int c = 0; c < 4; c++) for (int n = 0; n < 4; n++) begin
        int v [4];
        for (int k = 0; k < 4; k++) v[k] = t[k][c];
        o[n][c] = inv1(v, n);
      end
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
        int p;
        p = int'(pred[r][4*b+c]) + ((o[r][c] + 32) >>> 6);
        e_rec[r][4*b+c] = p < 0 ? 0 : (p > 255 ? 255 : p);
      end
    end
    e_nz = 0;
    for (int r = 0; r < 4; r++) for (int c = 0; c < 8; c++) if (e_lvl[r][c] != 0) e_nz++;
  endtask

  task automatic run_job(input int q, input bit intr, input int spread);
    int lat;
    for (int r = 0; r < 4; r++) for (int c = 0; c < 8; c++) begin
      int p, v;
      p = $urandom_range(255, 0);
      v = p + $urandom_range(2 * spread, 0) - spread;
      pred[r][c] = 8'(p);
      cur[r][c]  = 8'(v < 0 ? 0 : (v > 255 ? 255 : v));
    end
    model(q, intr);
    @(negedge clk);
    qp = 6'(q); intra = intr; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done && lat < 20) begin @(negedge clk); lat++; end
    check(lat == 5, $sformatf("latency %0d cycles, expected 5", lat));
    for (int r = 0; r < 4; r++) for (int c = 0; c < 8; c++) begin
      check(int'(coef_out[r][c]) == e_lvl[r][c],
            $sformatf("qp %0d level [%0d][%0d] %0d, expected %0d", q, r, c, coef_out[r][c], e_lvl[r][c]));
      check(int'(rec_out[r][c]) == e_rec[r][c],
            $sformatf("qp %0d rec [%0d][%0d] %0d, expected %0d", q, r, c, rec_out[r][c], e_rec[r][c]));
      if (q == 0) begin
        int df;
        df = int'(rec_out[r][c]) - int'(cur[r][c]);
        check(df <= 2 && df >= -2, "QP 0 reconstruction far from the source");
      end
    end
    check(int'(nz_count) == e_nz, $sformatf("nz_count %0d, expected %0d", nz_count, e_nz));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++)
      run_job((i < 10) ? 0 : $urandom_range(51, 0), 1'(i % 2), (i % 3 == 0) ? 100 : 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
