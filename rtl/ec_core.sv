// ec_core: context-adaptive binary arithmetic coder (CABAC engine) that
// codes up to two bins per cycle.
//
// Each cycle the core takes up to two bins (bin_valid[0] for the first,
// bin_valid[1] for the second; the second is only taken with the first).
// A bin is either a context-coded decision (bin_byp = 0, context index
// bin_ctx) or a bypass bin. The two bins are coded by two cascaded copies of
// the H.264 coding step: table lookup of the LPS range from the context
// state and range bits [7:6], range subdivision, low update, state
// transition and renormalisation by a leading-zero shift. If both bins use
// the same context, the second sees the state written by the first. The
// context memory (state and MPS per context) is a register file written at
// the end of the cycle, so bins of the next cycle see it at once.
//
// Output: the code value is kept in a wide low register. Bits that have
// left the 9-bit arithmetic window are collected, and each group of 8 is
// sent out as a byte (up to two per cycle: out_n = 0, 1 or 2, out_byte[0]
// first). A carry out of the window can still reach bytes already sent; it
// is sent as out_carry (valid whatever out_n is), and the bitstream buffer
// must add it to the bytes written before this cycle's bytes (a carry into the
// last byte that is not 0xFF stops there; 0xFF bytes become 0x00 and pass it
// on). Outputs are registered: bytes of the bins taken in cycle t appear in
// cycle t+1.
//
// flush (without bins in that cycle) ends the slice: the whole window is
// shifted out and padded with zeros to a byte boundary (two bytes), which
// a standard CABAC decoder reads as a value inside the final interval.
// slice_init resets the coder and sets every context to state 0, MPS 0;
// ctx_we writes one context, for loading the QP-dependent initial states.
//
// From the chip's description: two bins per cycle per EC core, two cores
// working on alternate MBs. This design's own choices: the byte output with
// a carry flag handed to the bitstream buffer, the flush, the context count
// (H.264 frame coding uses 460 contexts) and the context write port.
module ec_core
  import mvc_pkg::*;
#(
  parameter int NUM_CTX = 460,
  parameter int CTX_W   = $clog2(NUM_CTX)
)(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             slice_init,
  input  logic             ctx_we,
  input  logic [CTX_W-1:0] ctx_widx,
  input  logic [5:0]       ctx_wstate,
  input  logic             ctx_wmps,
  input  logic [1:0]       bin_valid,
  input  logic [CTX_W-1:0] bin_ctx  [2],
  input  logic [1:0]       bin_val,
  input  logic [1:0]       bin_byp,
  input  logic             flush,
  output logic [1:0]       out_n,
  output logic [7:0]       out_byte [2],
  output logic             out_carry,
  output logic [31:0]      bin_count,
  output logic [31:0]      byte_count
);

  localparam int LW = 30;   // window (9) + up to 19 waiting bits + carry + 1

  logic [5:0]  st  [NUM_CTX];
  logic        mps [NUM_CTX];
  logic [8:0]  range_q;
  logic [LW-1:0] low_q;
  logic [4:0]  q_q;         // bits waiting above the window (0..7 between cycles)

  // one coding step
  typedef struct packed {
    logic [8:0]    range;
    logic [LW-1:0] low;
    logic [3:0]    shift;
    logic [5:0]    st;
    logic          mps;
  } step_t;

  function automatic step_t code_bin(input logic [8:0] range, input logic [LW-1:0] low,
                                     input logic [5:0] s, input logic m,
                                     input logic b, input logic byp);
    step_t      o;
    logic [8:0] rlps, rmps, rn;
    logic [LW-1:0] ln;
    logic [3:0] sh;
    o.st  = s;
    o.mps = m;
    if (byp) begin
      o.range = range;
      o.low   = (low << 1) + (b ? LW'(range) : '0);
      o.shift = 4'd1;
    end else begin
      rlps = 9'(cabac_lps(s, range[7:6]));
      rmps = range - rlps;
      if (b != m) begin
        ln = low + LW'(rmps);
        rn = rlps;
        if (s == 6'd0) o.mps = ~m;
        o.st = cabac_next_lps(s);
      end else begin
        ln = low;
        rn = rmps;
        if (s < 6'd62) o.st = s + 6'd1;
      end
      sh = '0;
      for (int i = 8; i >= 0; i--)
        if (rn[i]) begin sh = 4'(8 - i); break; end
      o.range = rn << sh;
      o.low   = ln << sh;
      o.shift = sh;
    end
    return o;
  endfunction

  // two cascaded steps
  step_t     s0, s1;
  logic [5:0] st1_in;
  logic       mps1_in;
  logic [8:0] range_n;
  logic [LW-1:0] low_n;
  logic [4:0] q_n;

  always_comb begin
    s0 = code_bin(range_q, low_q, st[bin_ctx[0]], mps[bin_ctx[0]], bin_val[0], bin_byp[0]);
    if (!bin_byp[0] && bin_ctx[1] == bin_ctx[0]) begin
      st1_in  = s0.st;
      mps1_in = s0.mps;
    end else begin
      st1_in  = st[bin_ctx[1]];
      mps1_in = mps[bin_ctx[1]];
    end
    s1 = code_bin(s0.range, s0.low, st1_in, mps1_in, bin_val[1], bin_byp[1]);
    range_n = range_q;
    low_n   = low_q;
    q_n     = q_q;
    if (flush) begin
      low_n = low_q << (5'd16 - q_q);
      q_n   = 5'd16;
    end else if (bin_valid[1]) begin
      range_n = s1.range;
      low_n   = s1.low;
      q_n     = q_q + 5'(s0.shift) + 5'(s1.shift);
    end else if (bin_valid[0]) begin
      range_n = s0.range;
      low_n   = s0.low;
      q_n     = q_q + 5'(s0.shift);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      range_q    <= 9'd510;
      low_q      <= '0;
      q_q        <= '0;
      out_n      <= '0;
      out_byte   <= '{default: '0};
      out_carry  <= 1'b0;
      bin_count  <= '0;
      byte_count <= '0;
      for (int i = 0; i < NUM_CTX; i++) begin
        st[i]  <= '0;
        mps[i] <= 1'b0;
      end
    end else if (slice_init) begin
      range_q   <= 9'd510;
      low_q     <= '0;
      q_q       <= '0;
      out_n     <= '0;
      out_carry <= 1'b0;
      for (int i = 0; i < NUM_CTX; i++) begin
        st[i]  <= '0;
        mps[i] <= 1'b0;
      end
    end else begin
      logic [LW-1:0] keep;
      logic [LW+7:0] ext;
      // context updates (the second bin last, so it wins on equal contexts)
      if (!flush && bin_valid[0] && !bin_byp[0]) begin
        st[bin_ctx[0]]  <= s0.st;
        mps[bin_ctx[0]] <= s0.mps;
      end
      if (!flush && bin_valid[1] && !bin_byp[1]) begin
        st[bin_ctx[1]]  <= s1.st;
        mps[bin_ctx[1]] <= s1.mps;
      end
      if (ctx_we) begin
        st[ctx_widx]  <= ctx_wstate;
        mps[ctx_widx] <= ctx_wmps;
      end
      bin_count <= bin_count + ((!flush && bin_valid[0]) ? 32'd1 : 32'd0)
                             + ((!flush && bin_valid[1]) ? 32'd1 : 32'd0);
      range_q <= range_n;
      // bytes: the oldest waiting bits sit at 9+q_n-1 downwards, a carry
      // into bytes already sent at 9+q_n
      ext = {low_n, 8'd0};
      out_carry   <= ext[q_n + 17];
      out_byte[0] <= ext[q_n + 16 -: 8];
      out_byte[1] <= ext[q_n + 8 -: 8];
      keep = '0;
      if (q_n >= 5'd16) begin
        out_n      <= 2'd2;
        q_q        <= q_n - 5'd16;
        byte_count <= byte_count + 32'd2;
        keep       = (LW'(1) << (9 + q_n - 16)) - LW'(1);
      end else if (q_n >= 5'd8) begin
        out_n      <= 2'd1;
        q_q        <= q_n - 5'd8;
        byte_count <= byte_count + 32'd1;
        keep       = (LW'(1) << (9 + q_n - 8)) - LW'(1);
      end else begin
        out_n      <= 2'd0;
        q_q        <= q_n;
        keep       = (LW'(1) << (9 + q_n)) - LW'(1);
      end
      low_q <= low_n & keep;
    end
  end

endmodule
