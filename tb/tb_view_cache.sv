// tb_view_cache: self-checking test of the 2D reference cache.
//
// A behavioural system memory answers line refills after a random delay,
// possibly out of order; every word of the frame carries its own coordinates
// ({frame, y, x, 8'hA5}), so any word returned can be checked without a copy
// of the cache's state. The test runs random reads and prefetches over a
// small area (so that lines are evicted and refetched), checks every
// response in order, checks that misses are non-blocking (several refills
// in flight at once) and that reads that hit are served one per cycle with a
// one-cycle latency.
module tb_view_cache;
  import mvc_pkg::*;

  localparam int X_W = 10, Y_W = 12, F_W = 2;

  logic           clk = 1'b0;
  logic           rst_n = 1'b0;
  logic           rd_valid = 1'b0;
  logic           rd_ready;
  logic [X_W-1:0] rd_x = '0;
  logic [Y_W-1:0] rd_y = '0;
  logic [F_W-1:0] rd_frame = '0;
  logic           rd_rsp_valid;
  word_t          rd_rsp_data [5];
  logic           pf_valid = 1'b0;
  logic           pf_ready;
  logic [X_W-3:0] pf_lx = '0;
  logic [Y_W-1:0] pf_y = '0;
  logic [F_W-1:0] pf_frame = '0;
  logic           fill_req_valid;
  logic           fill_req_ready;
  logic [X_W-3:0] fill_req_lx;
  logic [Y_W-1:0] fill_req_y;
  logic [F_W-1:0] fill_req_frame;
  logic [2:0]     fill_req_id;
  logic           fill_rsp_valid;
  logic [2:0]     fill_rsp_id;
  word_t          fill_rsp_data [4];
  logic [31:0]    rd_miss_cnt, pf_alloc_cnt;

  int checks = 0;
  int failures = 0;

  view_cache dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
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

  function automatic word_t mem_word(input int x, input int y, input int f);
    return {2'(f), 12'(y), 10'(x), 8'hA5};
  endfunction

  // ---------------------------------------------------- system memory model
  typedef struct { int id; int lx; int y; int f; int due; } fill_t;
  fill_t pend [$];
  int    cyc = 0;
  int    max_out = 0;
  int    slow_bus = 0;
  assign fill_req_ready = 1'b1;

  always @(posedge clk) begin
    cyc++;
    fill_rsp_valid <= 1'b0;
    if (rst_n) begin
      // answer one due refill, choosing any of them (out of order)
      if (pend.size() > 0) begin
        int k;
        k = $urandom_range(pend.size() - 1, 0);
        if (pend[k].due <= cyc) begin
          fill_rsp_valid <= 1'b1;
          fill_rsp_id    <= 3'(pend[k].id);
          for (int i = 0; i < 4; i++)
            fill_rsp_data[i] <= mem_word(4 * pend[k].lx + i, pend[k].y, pend[k].f);
          pend.delete(k);
        end
      end
      if (fill_req_valid) begin
        fill_t t;
        t.id = int'(fill_req_id); t.lx = int'(fill_req_lx); t.y = int'(fill_req_y);
        t.f = int'(fill_req_frame);
        t.due = cyc + 2 + (slow_bus != 0 ? 20 + $urandom_range(20, 0) : $urandom_range(8, 0));
        pend.push_back(t);
      end
      if (pend.size() > max_out) max_out = pend.size();
    end
  end

  // ----------------------------------------------------- response checker
  typedef struct { int x; int y; int f; int t; } rd_t;
  rd_t exp_q [$];
  int  n_rsp = 0;
  int  lat_last = 0;
  always @(posedge clk) begin
    if (rst_n && rd_rsp_valid) begin
      rd_t e;
      if (exp_q.size() == 0) begin
        check(0, "response without request");
      end else begin
        e = exp_q.pop_front();
        for (int j = 0; j < 5; j++)
          check(rd_rsp_data[j] == mem_word(e.x + j, e.y, e.f),
                $sformatf("word %0d of read (%0d,%0d,%0d): got %h", j, e.x, e.y, e.f, rd_rsp_data[j]));
        lat_last = cyc - e.t;
        n_rsp++;
      end
    end
  end

  task automatic do_read(input int x, input int y, input int f);
    @(negedge clk);
    rd_valid = 1'b1; rd_x = X_W'(x); rd_y = Y_W'(y); rd_frame = F_W'(f);
    @(posedge clk);
    while (!rd_ready) @(posedge clk);
    exp_q.push_back('{x: x, y: y, f: f, t: cyc});
    @(negedge clk);
    rd_valid = 1'b0;
  endtask

  task automatic do_pf(input int lx, input int y, input int f);
    @(negedge clk);
    pf_valid = 1'b1; pf_lx = (X_W-2)'(lx); pf_y = Y_W'(y); pf_frame = F_W'(f);
    @(posedge clk);
    while (!pf_ready) @(posedge clk);
    @(negedge clk);
    pf_valid = 1'b0;
  endtask

  initial begin
    int t0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1. prefetch a row of 16 lines with a slow bus: many refills in flight
    slow_bus = 1;
    for (int l = 0; l < 8; l++) do_pf(l, 3, 1);
    check(max_out >= 4, $sformatf("only %0d refills were in flight at once", max_out));
    check(pf_alloc_cnt == 8, $sformatf("pf_alloc_cnt %0d", pf_alloc_cnt));
    slow_bus = 0;
    repeat (60) @(posedge clk);

    // 2. back-to-back reads of prefetched lines: one per cycle, latency 1
    t0 = n_rsp;
    @(negedge clk);
    for (int i = 0; i < 20; i++) begin
      rd_valid = 1'b1; rd_x = X_W'(i % 27); rd_y = 12'd3; rd_frame = 2'd1;
      @(posedge clk);
      check(rd_ready == 1'b1, "read of a prefetched line was not accepted at once");
      exp_q.push_back('{x: i % 27, y: 3, f: 1, t: cyc});
      @(negedge clk);
    end
    rd_valid = 1'b0;
    // the response is valid in the cycle after acceptance; it is sampled at
    // the clock edge that ends that cycle
    @(posedge clk);
    @(posedge clk);
    @(negedge clk);
    check(n_rsp - t0 == 20, $sformatf("%0d of 20 hit responses after 22 edges", n_rsp - t0));
    check(lat_last == 2, $sformatf("hit response sampled %0d edges after acceptance", lat_last));
    check(rd_miss_cnt == 0, "prefetched lines missed");

    // 3. random reads and prefetches over a small area of two frames
    for (int i = 0; i < 3000; i++) begin
      if ($urandom_range(3, 0) == 0)
        do_pf($urandom_range(15, 0), 8 + $urandom_range(15, 0), $urandom_range(1, 0));
      else
        do_read($urandom_range(60, 0), 8 + $urandom_range(15, 0), $urandom_range(1, 0));
    end
    repeat (200) @(posedge clk);
    check(exp_q.size() == 0, $sformatf("%0d reads never answered", exp_q.size()));
    check(rd_miss_cnt > 100, $sformatf("only %0d read misses", rd_miss_cnt));

    $display("cache: %0d responses, %0d read misses, %0d prefetch refills, %0d refills at most in flight",
             n_rsp, rd_miss_cnt, pf_alloc_cnt, max_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
