// tb_vpmbi_ctrl: self-checking test of the VPMBI pipeline scheduler.
//
// Behavioural cores answer every stage_start with a done pulse after a
// random delay; the two EC cores take random times that sometimes exceed two
// slots, so that the scheduler has to wait for a busy EC core. The test
// checks, for frames of 1, 2, 3 and 7 views:
//   * the order in which MBs enter stage 1 (views interleaved per MB index),
//   * that each MB moves exactly one stage per slot,
//   * that EC cores are used alternately (ping-pong) and get the MB that
//     leaves stage 7,
//   * the number of slots (MBs + 7) and the reported slot lengths,
//   * that a wait for a busy EC core happened at least once.
module tb_vpmbi_ctrl;
  import mvc_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic [2:0]  num_views = 3'd2;
  logic [15:0] mbs_per_view = 16'd5;
  logic [7:0]  stage_done;
  logic [1:0]  ec_done;
  logic [7:0]  stage_start;
  mb_tag_t     stage_tag [8];
  logic [1:0]  ec_start;
  mb_tag_t     ec_tag [2];
  logic        busy, frame_done, over_budget;
  logic [15:0] slot_cycles;
  logic [31:0] slot_count, ec_stall;

  int checks = 0;
  int failures = 0;

  vpmbi_ctrl #(.STAGE_BUDGET(20)) dut (.*);

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

  // behavioural stage cores
  int cnt [8];
  int ec_cnt [2];
  int ec_long;   // 1: EC cores take longer than two slots
  always_ff @(posedge clk) begin
    for (int s = 0; s < 8; s++) begin
      stage_done[s] <= 1'b0;
      if (stage_start[s] && s != 2) cnt[s] <= 1 + $urandom_range(12, 0);
      else if (cnt[s] > 1) cnt[s] <= cnt[s] - 1;
      else if (cnt[s] == 1) begin stage_done[s] <= 1'b1; cnt[s] <= 0; end
    end
    for (int e = 0; e < 2; e++) begin
      ec_done[e] <= 1'b0;
      if (ec_start[e]) ec_cnt[e] <= 1 + (ec_long != 0 ? 40 + $urandom_range(40, 0) : $urandom_range(3, 0));
      else if (ec_cnt[e] > 1) ec_cnt[e] <= ec_cnt[e] - 1;
      else if (ec_cnt[e] == 1) begin ec_done[e] <= 1'b1; ec_cnt[e] <= 0; end
    end
  end

  // slot-by-slot observation
  mb_tag_t prev [8];
  int      slots_seen, ec_last, slot_len, cyc_since;
  logic    in_frame;
  int      exp_view, exp_mb;
  int      ob_count = 0, exp_ob = 0;
  logic [31:0] last_stall = '0;
  always @(posedge clk) begin
    if (!rst_n) begin
      slots_seen = 0; ec_last = 1; cyc_since = 0; in_frame = 0;
      for (int s = 0; s < 8; s++) begin prev[s] = '0; cnt[s] = 0; end
      ec_cnt[0] = 0; ec_cnt[1] = 0;
    end else begin
      cyc_since++;
      if (over_budget) ob_count++;
      if (|stage_start || |ec_start) begin
        // first cycle of a new slot: tags already shifted
        if (slots_seen > 0) begin
          // cycles spent waiting for a busy EC core do not belong to the slot
          check(slot_cycles == 16'(cyc_since - 1 - int'(ec_stall - last_stall)),
                $sformatf("slot length %0d, counted %0d", slot_cycles, cyc_since - 1));
          if (slot_cycles > 16'd20) exp_ob++;
        end
        cyc_since = 0;
        last_stall = ec_stall;
        slots_seen++;
        for (int s = 1; s < 8; s++)
          check(stage_tag[s] == prev[s-1], $sformatf("stage %0d tag did not follow stage %0d", s + 1, s));
        if (stage_tag[0].valid) begin
          check(stage_tag[0].view == 3'(exp_view) && stage_tag[0].mb == 16'(exp_mb),
                $sformatf("stage 1 got V%0d MB%0d, expected V%0d MB%0d",
                          stage_tag[0].view, stage_tag[0].mb, exp_view, exp_mb));
          exp_view++;
          if (exp_view >= int'(num_views)) begin exp_view = 0; exp_mb++; end
        end
        for (int s = 0; s < 8; s++) check(stage_start[s] == stage_tag[s].valid, "start pulse vs occupancy");
        if (stage_tag[7].valid) begin
          check(ec_start != 2'b00 && ec_start != 2'b11, "exactly one EC core started");
          check(ec_start[1 - ec_last] == 1'b1, "EC cores not used alternately");
          ec_last = ec_start[1] ? 1 : 0;
          check(ec_tag[ec_last] == stage_tag[7], "EC core got a different MB");
        end
        for (int s = 0; s < 8; s++) prev[s] = stage_tag[s];
      end
    end
  end

  int stall_seen = 0;
  task automatic run_frame(input int views, input int mbs, input int long_ec);
    exp_view = 0; exp_mb = 0;
    ec_long = long_ec;
    ec_last = 1;
    slots_seen = 0;
    last_stall = '0;
    for (int s = 0; s < 8; s++) prev[s] = '0;
    @(negedge clk);
    num_views = 3'(views);
    mbs_per_view = 16'(mbs);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    wait (frame_done);
    @(negedge clk);
    check(slot_count == 32'(views * mbs + 7), $sformatf("slot_count %0d for %0d MBs", slot_count, views * mbs));
    check(slots_seen == views * mbs + 7, "observed slot count");
    check(ob_count == exp_ob, $sformatf("over_budget pulses %0d, slots over budget %0d", ob_count, exp_ob));
    check(exp_mb == mbs && exp_view == 0, "not every MB entered stage 1");
    if (ec_stall != 0) stall_seen++;
    if (long_ec != 0) check(ec_stall != 0, "slow EC cores caused no wait");
    else check(ec_stall == 0, "fast EC cores caused a wait");
    repeat (100) @(posedge clk);   // let behavioural EC cores finish
  endtask

  initial begin
    stage_done = '0;
    ec_done = '0;
    ec_long = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_frame(2, 5, 0);
    run_frame(1, 9, 0);
    run_frame(3, 4, 1);
    run_frame(7, 2, 0);
    run_frame(2, 6, 1);
    check(stall_seen > 0, "EC wait mechanism never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
