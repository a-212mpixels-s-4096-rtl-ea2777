// tb_ec_core: self-checking round-trip test of the two-bin-per-cycle CABAC
// coder.
//
// Three slices of random bins (skewed context-coded bins on 8 contexts, some
// bypass bins, pairs that reuse one context, cycles with one or no bin) are
// coded. The bytes leaving the core are collected into a byte buffer that
// applies the carries, then decoded by a bit-serial CABAC decoder written
// here in the form of the H.264 decoding process (9-bit offset, range 510,
// renormalisation bit by bit, bypass by offset doubling). Every decoded bin
// must equal the coded one. The test also checks bin and byte counters, that
// a pair of bins costs one cycle, that skewed bins compress, and that a
// context loaded through the write port is used.
module tb_ec_core;
  import mvc_pkg::*;

  localparam int NUM_CTX = 460;
  localparam int CTX_W   = 9;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             slice_init = 1'b0;
  logic             ctx_we = 1'b0;
  logic [CTX_W-1:0] ctx_widx = '0;
  logic [5:0]       ctx_wstate = '0;
  logic             ctx_wmps = 1'b0;
  logic [1:0]       bin_valid = '0;
  logic [CTX_W-1:0] bin_ctx [2];
  logic [1:0]       bin_val = '0;
  logic [1:0]       bin_byp = '0;
  logic             flush = 1'b0;
  logic [1:0]       out_n;
  logic [7:0]       out_byte [2];
  logic             out_carry;
  logic [31:0]      bin_count, byte_count;

  int checks = 0;
  int failures = 0;

  ec_core #(.NUM_CTX(NUM_CTX)) dut (.*);

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

  // byte buffer with carry propagation
  byte unsigned stream [$];
  int carries = 0;
  always @(negedge clk) if (rst_n) begin
    if (out_carry) begin
      automatic int k = stream.size() - 1;
      carries++;
      while (k >= 0) begin
        stream[k] = stream[k] + 8'd1;
        if (stream[k] != 8'd0) break;
        k--;
      end
    end
    for (int i = 0; i < int'(out_n); i++) stream.push_back(out_byte[i]);
  end

  // coded bins
  int q_ctx [$], q_val [$], q_byp [$];

  // decoder
  int d_pos;
  function automatic int rd_bit();
    int b;
    b = (d_pos / 8 < stream.size()) ? ((int'(stream[d_pos / 8]) >> (7 - d_pos % 8)) & 1) : 0;
    d_pos++;
    return b;
  endfunction

  task automatic decode_and_compare(input int st_init [NUM_CTX], input int mps_init [NUM_CTX]);
    int rng, ofs, st [NUM_CTX], mp [NUM_CTX], errs;
    st = st_init;
    mp = mps_init;
    d_pos = 0;
    rng = 510;
    ofs = 0;
    errs = 0;
    for (int i = 0; i < 9; i++) ofs = (ofs << 1) | rd_bit();
    for (int n = 0; n < q_ctx.size(); n++) begin
      int b;
      if (q_byp[n] != 0) begin
        ofs = (ofs << 1) | rd_bit();
        if (ofs >= rng) begin b = 1; ofs -= rng; end else b = 0;
      end else begin
        int c, rl;
        c  = q_ctx[n];
        rl = int'(cabac_lps(6'(st[c]), 2'((rng >> 6) & 3)));
        rng -= rl;
        if (ofs >= rng) begin
          b = 1 - mp[c];
          ofs -= rng;
          rng = rl;
          if (st[c] == 0) mp[c] = 1 - mp[c];
          st[c] = int'(cabac_next_lps(6'(st[c])));
        end else begin
          b = mp[c];
          if (st[c] < 62) st[c]++;
        end
        while (rng < 256) begin
          rng = rng << 1;
          ofs = (ofs << 1) | rd_bit();
        end
      end
      if (b != q_val[n]) errs++;
      if (errs == 1 && b != q_val[n]) $display("FAIL first wrong bin %0d of %0d", n, q_ctx.size());
    end
    check(errs == 0, $sformatf("%0d bins decoded wrongly", errs));
  endtask

  task automatic run_slice(input int nbins, input int skew, input bit load_ctx);
    int st0 [NUM_CTX], mp0 [NUM_CTX];
    int p1 [8];
    int sent, cycles, bins0, bytes0, ctx_bins;
    for (int i = 0; i < NUM_CTX; i++) begin st0[i] = 0; mp0[i] = 0; end
    for (int c = 0; c < 8; c++) p1[c] = (c % 2 == 0) ? skew : 100 - skew;  // % chance of a 1
    q_ctx.delete(); q_val.delete(); q_byp.delete();
    @(negedge clk);
    slice_init = 1'b1;
    @(negedge clk);
    slice_init = 1'b0;
    stream.delete();
    if (load_ctx) begin
      ctx_we = 1'b1; ctx_widx = 9'd5; ctx_wstate = 6'd40; ctx_wmps = 1'b1;
      st0[5] = 40; mp0[5] = 1;
      @(negedge clk);
      ctx_we = 1'b0;
    end
    bins0 = int'(bin_count);
    bytes0 = int'(byte_count);
    sent = 0;
    cycles = 0;
    ctx_bins = 0;
    while (sent < nbins) begin
      int k;
      k = $urandom_range(9, 0);
      k = (k == 0) ? 0 : (k < 3 ? 1 : 2);
      if (sent + k > nbins) k = nbins - sent;
      bin_valid = 2'b00;
      for (int j = 0; j < k; j++) begin
        int c, v, y;
        y = ($urandom_range(9, 0) == 0) ? 1 : 0; // bypass bin
        c = (j == 1 && $urandom_range(3, 0) == 0) ? int'(bin_ctx[0]) : $urandom_range(7, 0);
        if (c > 7) c = 7;
        v = ($urandom_range(99, 0) < ((y != 0) ? 50 : p1[c])) ? 1 : 0;
        bin_valid[j] = 1'b1;
        bin_ctx[j] = CTX_W'(c);
        bin_val[j] = 1'(v);
        bin_byp[j] = 1'(y);
        q_ctx.push_back(c); q_val.push_back(v); q_byp.push_back(y);
        if (y == 0) ctx_bins++;
      end
      sent += k;
      cycles++;
      @(negedge clk);
    end
    bin_valid = 2'b00;
    flush = 1'b1;
    @(negedge clk);
    flush = 1'b0;
    @(negedge clk);
    check(int'(bin_count) - bins0 == nbins, "bin counter");
    check(int'(byte_count) - bytes0 == stream.size(), "byte counter vs bytes received");
    check(cycles <= nbins, "two bins per cycle");
    if (skew <= 10)
      check(stream.size() * 8 < nbins * 6 / 10, $sformatf("skewed bins: %0d bytes for %0d bins", stream.size(), nbins));
    decode_and_compare(st0, mp0);
    $display("slice: %0d bins (%0d context coded) in %0d cycles -> %0d bytes", nbins, ctx_bins, cycles, stream.size());
  endtask

  initial begin
    bin_ctx[0] = '0;
    bin_ctx[1] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_slice(4000, 5, 1'b0);
    run_slice(3000, 30, 1'b1);
    run_slice(500, 2, 1'b0);
    check(carries > 0, "no carry into sent bytes ever happened");
    $display("carries into sent bytes: %0d", carries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
