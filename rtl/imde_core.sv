// imde_core: integer motion / disparity estimation (IMDE) of one 16x16
// luma MB with the predictor-centred search.
//
// Motion estimation (reference frame of the same view) and disparity
// estimation (frame of another view) are the same operation here; the caller
// chooses the reference with ref_frame. The search runs in two phases:
//   1. every valid predictor vector (the 16x16 vectors of the left,
//      top-left, top and top-right MBs) is evaluated by its SAD, and the best
//      one becomes the refining centre;
//   2. every integer position within +-SEARCH_R of that centre is evaluated,
//      row by row from the top left; a candidate replaces the best only with
//      a strictly smaller SAD.
// Candidates whose block would leave the frame are skipped.
//
// The current MB is written into the core's own buffer (cur_we, one row of
// 16 pixels per cycle) before start. Reference rows are read through a
// cache read port (rd_*, see view_cache): one request per row asks for the 5
// words (20 pixels) starting at word (x>>2); the 16 pixels at offset (x&3)
// are used. Requests for the 16 rows of a candidate are issued back to back
// and the SAD is accumulated as the answers return, so a candidate takes 17
// cycles plus the cache's stalls. done pulses with best_mv, best_sad and
// the number of candidates evaluated.
//
// From the chip's description: the predictor set, SAD as the matching cost
// and the +-16 range around the best predictor. This design's own choices:
// a single row-serial SAD unit (the chip evaluates many candidates in
// parallel to fit its 350-cycle stage budget; this core needs about
// 1100 x 17 cycles for the full +-16 range), no vector cost in the SAD, and
// the skip rule for out-of-frame candidates. A pixel i of a word sits in
// bits [8i+7:8i].
module imde_core
  import mvc_pkg::*;
#(
  parameter int unsigned SEARCH_R = 16,
  parameter int unsigned NUM_PRED = 4,
  parameter int unsigned FRAME_W  = 4096,
  parameter int unsigned FRAME_H  = 2160,
  parameter int unsigned X_W      = 10,
  parameter int unsigned Y_W      = 12,
  parameter int unsigned F_W      = 2
) (
  input  logic            clk,
  input  logic            rst_n,
  // current MB buffer
  input  logic            cur_we,
  input  logic [3:0]      cur_row,
  input  pix_t            cur_data [16],
  // job
  input  logic            start,
  input  logic [11:0]     mb_x,          // pixel position of the MB
  input  logic [11:0]     mb_y,
  input  logic [F_W-1:0]  ref_frame,
  input  mv_t             pred_mv    [NUM_PRED],
  input  logic            pred_valid [NUM_PRED],
  // cache read port
  output logic            rd_valid,
  input  logic            rd_ready,
  output logic [X_W-1:0]  rd_x,
  output logic [Y_W-1:0]  rd_y,
  output logic [F_W-1:0]  rd_frame,
  input  logic            rd_rsp_valid,
  input  word_t           rd_rsp_data [5],
  // result
  output logic            busy,
  output logic            done,
  output mv_t             best_mv,
  output logic [15:0]     best_sad,
  output logic [15:0]     cand_count
);

  localparam int SPAN = 2 * SEARCH_R + 1;

  typedef enum logic [1:0] {S_IDLE, S_PICK, S_EVAL} state_e;
  state_e state;

  pix_t cur [16][16];

  logic        phase_search;          // 0: predictors, 1: window
  logic [7:0]  pidx;                  // predictor index
  logic [7:0]  sx, sy;                // window counters 0..SPAN-1
  mv_t         centre, cand;
  logic [4:0]  iss, rcv;
  logic [1:0]  off;
  logic [15:0] acc;
  logic [13:0] px, py;                // candidate position (signed)

  // candidate under consideration in S_PICK
  mv_t         pick;
  logic        pick_ok, pick_last;
  always_comb begin
    logic signed [13:0] cx, cy;
    pick      = '0;
    pick_ok   = 1'b0;
    pick_last = 1'b0;
    if (!phase_search) begin
      pick      = pred_mv[int'(pidx) % NUM_PRED];
      pick_ok   = pred_valid[int'(pidx) % NUM_PRED];
      pick_last = 1'b0;
    end else begin
      pick.x    = centre.x + 10'(signed'({2'b0, sx}) - SEARCH_R);
      pick.y    = centre.y + 10'(signed'({2'b0, sy}) - SEARCH_R);
      pick_ok   = 1'b1;
      pick_last = (int'(sx) == SPAN - 1) && (int'(sy) == SPAN - 1);
    end
    cx = signed'({2'b0, mb_x}) + 14'(pick.x);
    cy = signed'({2'b0, mb_y}) + 14'(pick.y);
    if (cx < 0 || cy < 0 || int'(cx) > int'(FRAME_W) - 16 || int'(cy) > int'(FRAME_H) - 16)
      pick_ok = 1'b0;
  end

  // SAD of one returned row
  logic [11:0] row_sad;
  always_comb begin
    pix_t r [20];
    for (int j = 0; j < 5; j++)
      for (int i = 0; i < 4; i++) r[4*j+i] = rd_rsp_data[j][8*i +: 8];
    row_sad = '0;
    for (int i = 0; i < 16; i++) begin
      pix_t a, b;
      a = cur[rcv[3:0]][i];
      b = r[int'(off) + i];
      row_sad = row_sad + ((a > b) ? 12'(a) - 12'(b) : 12'(b) - 12'(a));
    end
  end

  assign rd_valid = (state == S_EVAL) && (iss < 5'd16);
  assign rd_x     = X_W'(px[13:2]);
  assign rd_y     = Y_W'(py + 14'(iss));
  assign rd_frame = ref_frame;
  assign busy     = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (cur_we) cur[cur_row] <= cur_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      phase_search <= 1'b0;
      pidx         <= '0;
      sx           <= '0;
      sy           <= '0;
      centre       <= '0;
      cand         <= '0;
      iss          <= '0;
      rcv          <= '0;
      off          <= '0;
      acc          <= '0;
      px           <= '0;
      py           <= '0;
      done         <= 1'b0;
      best_mv      <= '0;
      best_sad     <= '1;
      cand_count   <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          phase_search <= 1'b0;
          pidx         <= '0;
          sx           <= '0;
          sy           <= '0;
          best_mv      <= '0;
          best_sad     <= '1;
          cand_count   <= '0;
          state        <= S_PICK;
        end

        S_PICK: begin
          if (!phase_search && int'(pidx) >= int'(NUM_PRED)) begin
            // predictors done: search around the best one
            phase_search <= 1'b1;
            centre       <= best_mv;
          end else begin
            if (pick_ok) begin
              cand  <= pick;
              px    <= signed'({2'b0, mb_x}) + 14'(pick.x);
              py    <= signed'({2'b0, mb_y}) + 14'(pick.y);
              off   <= 2'(mb_x[1:0] + 2'(pick.x));
              iss   <= '0;
              rcv   <= '0;
              acc   <= '0;
              state <= S_EVAL;
            end
            // advance the candidate counters
            if (!phase_search) pidx <= pidx + 8'd1;
            else if (int'(sx) == SPAN - 1) begin
              sx <= '0;
              sy <= sy + 8'd1;
            end else sx <= sx + 8'd1;
            if (phase_search && pick_last && !pick_ok) begin
              done  <= 1'b1;
              state <= S_IDLE;
            end
          end
        end

        default: begin  // S_EVAL
          if (rd_valid && rd_ready) iss <= iss + 5'd1;
          if (rd_rsp_valid) begin
            rcv <= rcv + 5'd1;
            acc <= acc + 16'(row_sad);
          end
          if (rcv == 5'd16) begin
            cand_count <= cand_count + 16'd1;
            if (acc < best_sad) begin
              best_sad <= acc;
              best_mv  <= cand;
            end
            // the last window position has been evaluated
            if (phase_search && sx == 8'd0 && int'(sy) == SPAN) begin
              done  <= 1'b1;
              state <= S_IDLE;
            end else begin
              state <= S_PICK;
            end
          end
        end
      endcase
    end
  end

endmodule
