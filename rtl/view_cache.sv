// view_cache: reference-frame cache of one view, replacing a search-window
// buffer in front of the prediction core (IMDE + FMDE).
//
// Addressing keeps the 2D nature of a frame. A reference word (four 8-bit
// pixels side by side) is named by (word x, row y, frame index). A cache
// line is LINE_WORDS words of one row; the line's tag address (set) is made
// of the low bits of its line-x and of y, and the tag of the frame index and
// the remaining bits of line-x and y. Each set has WAYS ways.
//
// Ports:
//   read    rd_*      one request names the leftmost of 5 consecutive words
//                     of a row (20 pixels, enough for a 16-pixel row at any
//                     pixel offset). When both lines it touches hit, the 5
//                     words arrive on rd_rsp_data one cycle after the
//                     request is accepted; requests are served in order, one
//                     per cycle while they hit.
//   prefetch pf_*     names one line; a line that is neither present nor
//                     already being fetched is allocated a refill entry.
//                     A prefetch never waits for data.
//   refill   fill_*   towards the system bus: a line request carries the
//                     index of its refill entry; the answer brings the 4
//                     words of the line at once, tagged with that index.
// Misses are non-blocking: up to MSHR (6) lines can be outstanding, shared
// by read misses and prefetches, and a prefetch may allocate while a read
// waits for its line.
//
// Data live in BANKS (5) two-port banks. Word x goes to bank (x mod 5), so
// the 5 words of a read always fall in 5 different banks and the 4 words of
// a refill in 4 different banks: 5 words are read and 4 refilled per cycle
// with no penalty when a read spans two lines. The in-bank address is
// {set, way, word within line}.
//
// From the chip's description: 2D (x, y, frame-index) addressing split into
// tag address and tag, 4 ways, 5 banks of two-port SRAM, reading after up to
// 6 misses, concurrent reading and prefetching, 5 words read and 4 words
// refilled per cycle. This design's own choices: 4-pixel words, lines of one
// row of 4 words, the set/tag bit split and sizes, the bank rule "x mod 5"
// (so each bank has room for every word slot, a quarter of it unused),
// round-robin replacement that skips ways with a refill in flight, in-order
// reads that wait on a miss (the reading buffer that lets later hits pass a
// miss is left out), and no line locking.
module view_cache
  import mvc_pkg::*;
#(
  parameter int unsigned SET_X_BITS = 2,
  parameter int unsigned SET_Y_BITS = 3,
  parameter int unsigned WAYS       = 4,
  parameter int unsigned BANKS      = 5,
  parameter int unsigned MSHR       = 6,
  parameter int unsigned X_W        = 10,   // word x: 4096 pixels / 4
  parameter int unsigned Y_W        = 12,   // row: up to 4095
  parameter int unsigned F_W        = 2     // reference frame index
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // read port
  input  logic                   rd_valid,
  output logic                   rd_ready,
  input  logic [X_W-1:0]         rd_x,
  input  logic [Y_W-1:0]         rd_y,
  input  logic [F_W-1:0]         rd_frame,
  output logic                   rd_rsp_valid,
  output word_t                  rd_rsp_data [5],
  // prefetch port (line granularity)
  input  logic                   pf_valid,
  output logic                   pf_ready,
  input  logic [X_W-3:0]         pf_lx,
  input  logic [Y_W-1:0]         pf_y,
  input  logic [F_W-1:0]         pf_frame,
  // refill port towards the system bus
  output logic                   fill_req_valid,
  input  logic                   fill_req_ready,
  output logic [X_W-3:0]         fill_req_lx,
  output logic [Y_W-1:0]         fill_req_y,
  output logic [F_W-1:0]         fill_req_frame,
  output logic [2:0]             fill_req_id,
  input  logic                   fill_rsp_valid,
  input  logic [2:0]             fill_rsp_id,
  input  word_t                  fill_rsp_data [4],
  // statistics
  output logic [31:0]            rd_miss_cnt,   // read lines that had to be fetched
  output logic [31:0]            pf_alloc_cnt   // lines fetched for a prefetch
);

  localparam int unsigned LINE_WORDS = 4;
  localparam int unsigned LX_W   = X_W - 2;
  localparam int unsigned SETS   = 1 << (SET_X_BITS + SET_Y_BITS);
  localparam int unsigned SET_W  = SET_X_BITS + SET_Y_BITS;
  localparam int unsigned WAY_W  = $clog2(WAYS);
  localparam int unsigned TAG_W  = F_W + (Y_W - SET_Y_BITS) + (LX_W - SET_X_BITS);
  localparam int unsigned DEPTH  = SETS * WAYS * LINE_WORDS;
  localparam int unsigned ADDR_W = $clog2(DEPTH);
  localparam int unsigned MID_W  = $clog2(MSHR);

  typedef struct packed {
    logic [LX_W-1:0] lx;
    logic [Y_W-1:0]  y;
    logic [F_W-1:0]  f;
  } line_t;

  typedef struct packed {
    logic             valid;
    logic             sent;
    logic             for_read;
    line_t            line;
    logic [WAY_W-1:0] way;
  } mshr_t;

  function automatic logic [SET_W-1:0] set_of(input line_t l);
    return {l.y[SET_Y_BITS-1:0], l.lx[SET_X_BITS-1:0]};
  endfunction

  function automatic logic [TAG_W-1:0] tag_of(input line_t l);
    return {l.f, l.y[Y_W-1:SET_Y_BITS], l.lx[LX_W-1:SET_X_BITS]};
  endfunction

  // tag register file
  logic             tag_v   [SETS][WAYS];
  logic [TAG_W-1:0] tag_mem [SETS][WAYS];
  logic [WAY_W-1:0] rr      [SETS];
  mshr_t            mshr    [MSHR];

  // held read request
  logic           rq_valid;
  logic [X_W-1:0] rq_x;
  logic [Y_W-1:0] rq_y;
  logic [F_W-1:0] rq_f;

  // ---------------------------------------------------------------- lookup
  line_t rl [2];
  line_t pl;
  logic  r_hit [2];
  logic  r_pend [2];
  logic [WAY_W-1:0] r_way [2];
  logic  p_hit, p_pend;

  always_comb begin
    rl[0] = '{lx: rq_x[X_W-1:2], y: rq_y, f: rq_f};
    rl[1] = '{lx: rq_x[X_W-1:2] + 1'b1, y: rq_y, f: rq_f};
    pl    = '{lx: pf_lx, y: pf_y, f: pf_frame};
    for (int i = 0; i < 2; i++) begin
      r_hit[i]  = 1'b0;
      r_way[i]  = '0;
      r_pend[i] = 1'b0;
      for (int w = 0; w < WAYS; w++)
        if (tag_v[set_of(rl[i])][w] && tag_mem[set_of(rl[i])][w] == tag_of(rl[i])) begin
          r_hit[i] = 1'b1;
          r_way[i] = WAY_W'(w);
        end
      for (int m = 0; m < MSHR; m++)
        if (mshr[m].valid && mshr[m].line == rl[i]) r_pend[i] = 1'b1;
    end
    p_hit  = 1'b0;
    p_pend = 1'b0;
    for (int w = 0; w < WAYS; w++)
      if (tag_v[set_of(pl)][w] && tag_mem[set_of(pl)][w] == tag_of(pl)) p_hit = 1'b1;
    for (int m = 0; m < MSHR; m++)
      if (mshr[m].valid && mshr[m].line == pl) p_pend = 1'b1;
  end

  // ------------------------------------------------------------ allocation
  logic             free_ok;
  logic [MID_W-1:0] free_id;
  logic             alloc_rd, alloc_pf, alloc;
  line_t            alloc_line;
  logic             way_ok;
  logic [WAY_W-1:0] victim;
  logic             rd_both_hit;

  always_comb begin
    free_ok = 1'b0;
    free_id = '0;
    for (int m = MSHR - 1; m >= 0; m--)
      if (!mshr[m].valid) begin free_ok = 1'b1; free_id = MID_W'(m); end

    rd_both_hit = rq_valid && r_hit[0] && r_hit[1];
    alloc_rd   = 1'b0;
    alloc_line = rl[0];
    if (rq_valid && !r_hit[0] && !r_pend[0]) begin
      alloc_rd = 1'b1; alloc_line = rl[0];
    end else if (rq_valid && !r_hit[1] && !r_pend[1]) begin
      alloc_rd = 1'b1; alloc_line = rl[1];
    end
    alloc_pf = !alloc_rd && pf_valid && !p_hit && !p_pend;
    if (alloc_pf) alloc_line = pl;

    // victim: round robin from rr, skipping ways with a refill in flight
    way_ok = 1'b0;
    victim = '0;
    for (int k = WAYS - 1; k >= 0; k--) begin
      logic [WAY_W-1:0] w;
      logic             busy_w;
      w = rr[set_of(alloc_line)] + WAY_W'(k);
      busy_w = 1'b0;
      for (int m = 0; m < MSHR; m++)
        if (mshr[m].valid && set_of(mshr[m].line) == set_of(alloc_line) && mshr[m].way == w)
          busy_w = 1'b1;
      if (!busy_w) begin way_ok = 1'b1; victim = w; end
    end
    alloc = (alloc_rd || alloc_pf) && free_ok && way_ok;
  end

  assign rd_ready = !rq_valid || rd_both_hit;
  assign pf_ready = pf_valid && (p_hit || p_pend || (alloc_pf && alloc));

  // --------------------------------------------------------- refill request
  logic             send_ok;
  logic [MID_W-1:0] send_id;
  always_comb begin
    send_ok = 1'b0;
    send_id = '0;
    for (int m = MSHR - 1; m >= 0; m--)
      if (mshr[m].valid && !mshr[m].sent) begin send_ok = 1'b1; send_id = MID_W'(m); end
    // read misses go first
    for (int m = MSHR - 1; m >= 0; m--)
      if (mshr[m].valid && !mshr[m].sent && mshr[m].for_read) send_id = MID_W'(m);
  end
  assign fill_req_valid = send_ok;
  assign fill_req_lx    = mshr[send_id].line.lx;
  assign fill_req_y     = mshr[send_id].line.y;
  assign fill_req_frame = mshr[send_id].line.f;
  assign fill_req_id    = 3'(send_id);

  // -------------------------------------------------------- control state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rq_valid     <= 1'b0;
      rq_x         <= '0;
      rq_y         <= '0;
      rq_f         <= '0;
      rd_miss_cnt  <= '0;
      pf_alloc_cnt <= '0;
      for (int s = 0; s < SETS; s++) begin
        rr[s] <= '0;
        for (int w = 0; w < WAYS; w++) begin
          tag_v[s][w]   <= 1'b0;
          tag_mem[s][w] <= '0;
        end
      end
      for (int m = 0; m < MSHR; m++) mshr[m] <= '0;
    end else begin
      // accept / retire reads
      if (rd_ready) begin
        rq_valid <= rd_valid;
        if (rd_valid) begin
          rq_x <= rd_x;
          rq_y <= rd_y;
          rq_f <= rd_frame;
        end
      end
      // refill data arrives: the line becomes valid
      if (fill_rsp_valid) begin
        tag_v[set_of(mshr[fill_rsp_id].line)][mshr[fill_rsp_id].way]   <= 1'b1;
        tag_mem[set_of(mshr[fill_rsp_id].line)][mshr[fill_rsp_id].way] <= tag_of(mshr[fill_rsp_id].line);
        mshr[fill_rsp_id].valid <= 1'b0;
      end
      if (fill_req_valid && fill_req_ready) mshr[send_id].sent <= 1'b1;
      // allocate a refill entry and evict the victim
      if (alloc) begin
        mshr[free_id] <= '{valid: 1'b1, sent: 1'b0, for_read: alloc_rd, line: alloc_line, way: victim};
        tag_v[set_of(alloc_line)][victim] <= 1'b0;
        rr[set_of(alloc_line)] <= victim + 1'b1;
        if (alloc_rd) rd_miss_cnt  <= rd_miss_cnt + 1;
        else          pf_alloc_cnt <= pf_alloc_cnt + 1;
      end
    end
  end

  // ------------------------------------------------------------ data banks
  logic [X_W-1:0] rsp_x;
  word_t          bank_q [BANKS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_rsp_valid <= 1'b0;
      rsp_x        <= '0;
    end else begin
      rd_rsp_valid <= rd_both_hit;
      if (rd_both_hit) rsp_x <= rq_x;
    end
  end

  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    word_t             mem [DEPTH];
    logic [ADDR_W-1:0] raddr, waddr;
    logic              we;
    word_t             wdata;

    always_comb begin
      logic [X_W-1:0] wx;
      logic [X_W-1:0] fx;
      int             j, i;
      // read: the word of this request that falls in bank b
      j  = (b + BANKS - (int'(rq_x) % BANKS)) % BANKS;
      wx = rq_x + X_W'(j);
      if (wx[X_W-1:2] == rq_x[X_W-1:2])
        raddr = {set_of(rl[0]), r_way[0], wx[1:0]};
      else
        raddr = {set_of(rl[1]), r_way[1], wx[1:0]};
      // refill: the word of the incoming line that falls in bank b
      fx = {mshr[fill_rsp_id].line.lx, 2'b00};
      i  = (b + BANKS - (int'(fx) % BANKS)) % BANKS;
      we    = fill_rsp_valid && (i < LINE_WORDS);
      wdata = fill_rsp_data[i % LINE_WORDS];
      waddr = {set_of(mshr[fill_rsp_id].line), mshr[fill_rsp_id].way, 2'(i)};
    end

    always_ff @(posedge clk) begin
      if (we) mem[waddr] <= wdata;
      if (rd_both_hit) bank_q[b] <= mem[raddr];
    end
  end

  always_comb
    for (int j = 0; j < 5; j++)
      rd_rsp_data[j] = bank_q[((int'(rsp_x) % BANKS) + j) % BANKS];

  // a refill answer must name an entry that is waiting for it
  assert property (@(posedge clk) disable iff (!rst_n)
                   fill_rsp_valid |-> (mshr[fill_rsp_id].valid && mshr[fill_rsp_id].sent))
    else $error("refill answer for an idle entry");

endmodule
