// tb_multi_transform: self-checking test of the shared multi-transform.
//
// Each test applies one random block in one of the five modes and compares
// the registered result, one cycle later, with a reference computed by
// matrix products: the 4x4 forward and Hadamard transforms exactly; the 4x4
// inverse with per-coefficient halving; and the 8x8 forward and inverse
// through the 8x8 integer basis matrix divided by 8 per dimension, on inputs
// that are multiples of 64 so that every shift of the butterflies is exact.
module tb_multi_transform;
  import mvc_pkg::*;

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  logic     in_valid = 1'b0;
  tr_mode_e mode = TR_DCT4;
  coef_t    in_blk  [8][8];
  logic     out_valid;
  coef_t    out_blk [8][8];

  int checks = 0;
  int failures = 0;

  multi_transform dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int C4 [4][4] = '{'{1, 1, 1, 1}, '{2, 1, -1, -2}, '{1, -1, -1, 1}, '{1, -2, 2, -1}};
  int H4 [4][4] = '{'{1, 1, 1, 1}, '{1, 1, -1, -1}, '{1, -1, -1, 1}, '{1, -1, 1, -1}};
  int T8 [8][8] = '{'{8, 8, 8, 8, 8, 8, 8, 8},
                    '{12, 10, 6, 3, -3, -6, -10, -12},
                    '{8, 4, -4, -8, -8, -4, 4, 8},
                    '{10, -3, -12, -6, 6, 12, 3, -10},
                    '{8, -8, -8, 8, 8, -8, -8, 8},
                    '{6, -12, 3, 10, -10, -3, 12, -6},
                    '{4, -8, 8, -4, -4, 8, -8, 4},
                    '{3, -6, 10, -12, 12, -10, 6, -3}};

  int x   [8][8];
  int ref_o [8][8];

  // One row of the 4x4 inverse as a weighted sum, halves taken per term.
  function automatic int inv4_term(input int k, input int n, input int d);
    // weight of input k in output n: 1, -1, 1/2 or -1/2
    int w [4][4] = '{'{2, 2, 2, 2}, '{2, 1, -1, -2}, '{2, -2, -2, 2}, '{1, -2, 2, -1}};
    int v;
    v = w[k][n];
    if (v == 2) return d;
    if (v == -2) return -d;
    if (v == 1) return d >>> 1;
    return -(d >>> 1);
  endfunction

  task automatic compute_ref(input tr_mode_e m);
    int t [8][8];
    for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) begin t[r][c] = 0; ref_o[r][c] = 0; end
    case (m)
      TR_DCT4, TR_HAD4: begin
        for (int b = 0; b < 2; b++)
          for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
            int s = 0;
            for (int k = 0; k < 4; k++) for (int l = 0; l < 4; l++)
              s += (m == TR_DCT4 ? C4[i][k] * C4[j][l] : H4[i][k] * H4[j][l]) * x[k][4*b+l];
            ref_o[i][4*b+j] = s;
          end
      end
      TR_IDCT4: begin
        for (int b = 0; b < 2; b++) begin
          for (int r = 0; r < 4; r++) for (int n = 0; n < 4; n++) begin
            int s = 0;
            for (int k = 0; k < 4; k++) s += inv4_term(k, n, x[r][4*b+k]);
            t[r][4*b+n] = s;
          end
          for (int c = 0; c < 4; c++) for (int n = 0; n < 4; n++) begin
            int s = 0;
            for (int k = 0; k < 4; k++) s += inv4_term(k, n, t[k][4*b+c]);
            ref_o[n][4*b+c] = s;
          end
        end
      end
      TR_DCT8: begin
        for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) begin
          int s = 0;
          for (int k = 0; k < 8; k++) for (int l = 0; l < 8; l++) s += T8[i][k] * T8[j][l] * x[k][l];
          ref_o[i][j] = s / 64;
        end
      end
      default: begin
        for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) begin
          int s = 0;
          for (int k = 0; k < 8; k++) for (int l = 0; l < 8; l++) s += T8[k][i] * T8[l][j] * x[k][l];
          ref_o[i][j] = s / 64;
        end
      end
    endcase
  endtask

  task automatic run_one(input tr_mode_e m);
    for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) begin
      if (m == TR_DCT8 || m == TR_IDCT8) x[r][c] = 64 * ($signed($urandom_range(8, 0)) - 4);
      else if (r < 4) x[r][c] = $signed($urandom_range(510, 0)) - 255;
      else x[r][c] = 0;
      in_blk[r][c] = coef_t'(x[r][c]);
    end
    compute_ref(m);
    @(negedge clk);
    mode = m;
    in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    checks++;
    if (!out_valid) begin
      failures++;
      $display("FAIL mode %s: out_valid not raised after one cycle", m.name());
    end
    for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) begin
      checks++;
      if (int'(out_blk[r][c]) != ref_o[r][c]) begin
        failures++;
        if (failures < 10)
          $display("FAIL mode %s [%0d][%0d]: got %0d expected %0d", m.name(), r, c, out_blk[r][c], ref_o[r][c]);
      end
    end
  endtask

  initial begin
    for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) in_blk[r][c] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) run_one(tr_mode_e'(i % 5));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
