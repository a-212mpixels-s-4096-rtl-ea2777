// vpmbi_ctrl: view-parallel MB-interleaved (VPMBI) scheduler of the 8-stage
// macroblock pipeline.
//
// The controller walks through the MBs of a frame, taking views in turn:
// V0 MB0, V1 MB0, ..., V(n-1) MB0, V0 MB1, ... Every new MB enters stage 1
// (IMDE prefetch) and one pipeline slot later moves to the next stage, so
// that stage 2 (IMDE) of an MB never overlaps with stage 1 of the next MB of
// the same view as long as two or more views are coded; this interleaving,
// the stage list and the NOP stage 3 follow the chip's schedule. The NOP
// stage has no core: the controller treats it as done at once.
//
// A slot begins by shifting the MB tags one stage down and pulsing
// stage_start[s] for each stage s that holds an MB. Each core answers with a
// one-cycle stage_done[s] pulse; the slot ends when every occupied stage has
// answered. Stage 8 holds the deblocking filter (stage_start[7]/
// stage_done[7]) and the two entropy coders: the MB entering stage 8 is also
// handed to EC core ec_sel, and ec_sel toggles, so that each EC core has two
// slots for its MB (ping-pong). An EC core is busy from ec_start to its
// ec_done pulse; a slot that must hand an MB to a busy core waits, and
// ec_stall counts those cycles. slot_cycles reports the length of the last
// slot and over_budget pulses when it exceeded STAGE_BUDGET, the cycle budget
// of one stage (350 cycles at the chip's highest specification).
//
// Handshake timing (stage_start pulses one cycle after the slot starts, done
// pulses of one cycle, the stall rule for a busy EC core) and the counters
// are this design's own choices.
module vpmbi_ctrl
  import mvc_pkg::*;
#(
  parameter int unsigned STAGE_BUDGET = 350
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,            // one-cycle pulse: encode one frame of all views
  input  logic [2:0]  num_views,        // 1..7 views coded in parallel
  input  logic [15:0] mbs_per_view,     // MBs in one frame of one view (>= 1)
  input  logic [7:0]  stage_done,       // done pulses of the stage cores, stage 1 at bit 0
  input  logic [1:0]  ec_done,          // done pulses of EC core 0 and 1
  output logic [7:0]  stage_start,      // start pulses, stage 1 at bit 0
  output mb_tag_t     stage_tag [8],    // MB held by each stage in this slot
  output logic [1:0]  ec_start,         // start pulse of EC core 0 or 1
  output mb_tag_t     ec_tag [2],       // MB held by each EC core
  output logic        busy,
  output logic        frame_done,       // one-cycle pulse when the last MB leaves stage 8
  output logic [15:0] slot_cycles,      // length of the last completed slot
  output logic        over_budget,      // pulse: last slot was longer than STAGE_BUDGET
  output logic [31:0] slot_count,       // slots run since start
  output logic [31:0] ec_stall          // cycles spent waiting for a busy EC core
);

  typedef enum logic [1:0] {S_IDLE, S_LAUNCH, S_WAIT} state_e;
  state_e state;

  logic [2:0]  nxt_view;
  logic [15:0] nxt_mb;
  logic [31:0] issued, total;
  logic [7:0]  done_seen;
  logic [1:0]  ec_busy;
  logic        ec_sel;
  logic [15:0] cyc;

  // occupancy of each stage, and whether every occupied stage has answered
  logic [7:0] occupied;
  logic       all_done, pipe_empty, ec_blocked;
  always_comb begin
    for (int s = 0; s < 8; s++) occupied[s] = stage_tag[s].valid;
    all_done   = ((done_seen | stage_done) & occupied) == occupied;
    pipe_empty = (occupied[6:0] == 7'd0) && (issued == total);
    // the MB now in stage 7 enters stage 8 at the next launch
    ec_blocked = occupied[6] && ec_busy[ec_sel];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      nxt_view    <= '0;
      nxt_mb      <= '0;
      issued      <= '0;
      total       <= '0;
      done_seen   <= '0;
      ec_busy     <= '0;
      ec_sel      <= 1'b0;
      cyc         <= '0;
      stage_start <= '0;
      ec_start    <= '0;
      frame_done  <= 1'b0;
      slot_cycles <= '0;
      over_budget <= 1'b0;
      slot_count  <= '0;
      ec_stall    <= '0;
      for (int s = 0; s < 8; s++) stage_tag[s] <= '0;
      ec_tag[0] <= '0;
      ec_tag[1] <= '0;
    end else begin
      stage_start <= '0;
      ec_start    <= '0;
      frame_done  <= 1'b0;
      over_budget <= 1'b0;
      for (int e = 0; e < 2; e++)
        if (ec_done[e]) ec_busy[e] <= 1'b0;

      case (state)
        S_IDLE: begin
          if (start) begin
            nxt_view   <= '0;
            nxt_mb     <= '0;
            issued     <= '0;
            total      <= 32'(mbs_per_view) * 32'(num_views);
            ec_sel     <= 1'b0;
            slot_count <= '0;
            ec_stall   <= '0;
            for (int s = 0; s < 8; s++) stage_tag[s] <= '0;
            state      <= S_LAUNCH;
          end
        end

        S_LAUNCH: begin
          if (ec_blocked) begin
            ec_stall <= ec_stall + 1;
          end else if (pipe_empty) begin
            for (int s = 0; s < 8; s++) stage_tag[s] <= '0;
            frame_done <= 1'b1;
            state      <= S_IDLE;
          end else begin
            // shift the MBs one stage down and admit the next MB at stage 1
            for (int s = 7; s > 0; s--) stage_tag[s] <= stage_tag[s-1];
            if (issued < total) begin
              stage_tag[0] <= '{valid: 1'b1, view: nxt_view, mb: nxt_mb};
              issued <= issued + 1;
              if (nxt_view + 3'd1 >= num_views) begin
                nxt_view <= '0;
                nxt_mb   <= nxt_mb + 16'd1;
              end else begin
                nxt_view <= nxt_view + 3'd1;
              end
            end else begin
              stage_tag[0] <= '0;
            end
            for (int s = 1; s < 8; s++) stage_start[s] <= stage_tag[s-1].valid;
            stage_start[0] <= (issued < total);
            if (stage_tag[6].valid) begin
              ec_start[ec_sel] <= 1'b1;
              ec_busy[ec_sel]  <= 1'b1;
              ec_tag[ec_sel]   <= stage_tag[6];
              ec_sel           <= ~ec_sel;
            end
            done_seen  <= '0;
            cyc        <= 16'd1;
            slot_count <= slot_count + 1;
            state      <= S_WAIT;
          end
        end

        default: begin  // S_WAIT
          cyc       <= cyc + 16'd1;
          done_seen <= done_seen | stage_done;
          // NOP stage: no core, complete at once
          done_seen[ST_NOP] <= 1'b1;
          if (cyc >= 16'd2 && all_done) begin
            slot_cycles <= cyc;
            over_budget <= (32'(cyc) > STAGE_BUDGET);
            state       <= S_LAUNCH;
          end
        end
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // every start pulse goes to an occupied stage
  assert property (@(posedge clk) disable iff (!rst_n)
                   ((stage_start & ~occupied) == 8'd0))
    else $error("stage_start pulsed for an empty stage");
  // an EC core reports done only while it holds an MB
  assert property (@(posedge clk) disable iff (!rst_n)
                   ((ec_done & ~ec_busy) == 2'd0))
    else $error("ec_done from an idle EC core");

endmodule
