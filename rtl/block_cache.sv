// block_cache: stores the dependence-chain micro-ops of basic-block segments.
//
// Data store: ENTRIES entries, WAYS-way set associative, indexed by the cache
// line of the segment's first PC (segments of one code line sit in different
// ways of one set; even and odd lines form the two banks) and tagged with the
// full PC of the first instruction. An entry holds the segment length, a
// MASK_W-bit mask (1 = micro-op is in an H2P dependence chain) and up to
// SEG_UOPS decoded chain micro-ops (4 bytes each) with their positions.
// Zero-tag store: ZERO_ENTRIES extra tags for segments with no chain
// micro-op; a hit there tells the TEA thread to continue past the segment.
//
// Writes (one segment per cycle from the segment builder):
//   * a segment with chain micro-ops that hits merges by OR-ing the masks and
//     taking the union of the micro-ops (positions beyond SEG_UOPS chain
//     micro-ops are dropped, own choice); one that misses allocates a way
//     (invalid first, else round-robin per set - own choice) and removes a
//     zero tag for the same PC;
//   * an empty segment only allocates a zero tag when the PC is in neither
//     store.
// Every RESET_PERIOD retired instructions all masks are cleared, so stale
// chains stop being fetched and stop seeding later walks; entries then act as
// empty segments until a walk fills them again.
//
// Lookup (combinational): lk_pc is compared with both stores; lk_hit is a
// data-store hit with its length, mask and micro-ops, lk_zhit a zero-tag hit.
// This RTL serves one segment per lookup; the fetch unit walks the segments
// of a fetch block one per cycle.
module block_cache
  import tea_pkg::*;
#(
  parameter int ENTRIES      = 512,
  parameter int WAYS         = 8,
  parameter int ZERO_ENTRIES = 256,
  parameter int ZERO_WAYS    = 8,
  parameter int LINE_B       = 64,
  parameter int RESET_PERIOD = 500000,
  parameter int RET_W        = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // lookup
  input  logic [PC_W-1:0]   lk_pc,
  output logic              lk_hit,
  output logic              lk_zhit,
  output logic [LEN_W-1:0]  lk_len,
  output logic [MASK_W-1:0] lk_mask,
  output logic [$clog2(SEG_UOPS+1)-1:0] lk_cnt,
  output bc_uop_t           lk_uops [SEG_UOPS],
  // segment write
  input  logic              wr_valid,
  input  logic [PC_W-1:0]   wr_tag,
  input  logic [LEN_W-1:0]  wr_len,
  input  logic [MASK_W-1:0] wr_mask,
  input  logic [$clog2(SEG_UOPS+1)-1:0] wr_cnt,
  input  bc_uop_t           wr_uops [SEG_UOPS],
  // periodic mask reset
  input  logic [$clog2(RET_W+1)-1:0] retire_cnt,
  output logic              mask_reset
);
  localparam int CW    = $clog2(SEG_UOPS+1);
  localparam int SETS  = ENTRIES / WAYS;
  localparam int ZSETS = ZERO_ENTRIES / ZERO_WAYS;
  localparam int IW    = $clog2(SETS);
  localparam int ZIW   = $clog2(ZSETS);
  localparam int LW    = $clog2(LINE_B);
  localparam int WW    = $clog2(WAYS);
  localparam int ZWW   = $clog2(ZERO_WAYS);
  localparam int RCW   = $clog2(RESET_PERIOD + RET_W + 1);

  typedef struct packed {
    logic              valid;
    logic [PC_W-1:0]   tag;
    logic [LEN_W-1:0]  len;
    logic [MASK_W-1:0] mask;
    logic [CW-1:0]     cnt;
  } dhdr_t;
  typedef struct packed {
    logic             valid;
    logic [PC_W-1:0]  tag;
    logic [LEN_W-1:0] len;
  } ztag_t;

  dhdr_t   dh   [SETS][WAYS];
  bc_uop_t du   [SETS][WAYS][SEG_UOPS];
  ztag_t   zt   [ZSETS][ZERO_WAYS];
  logic [WW-1:0]  rr  [SETS];
  logic [ZWW-1:0] zrr [ZSETS];
  logic [RCW-1:0] rcnt;

  function automatic logic [IW-1:0] set_of(logic [PC_W-1:0] pc);
    return pc[LW +: IW];
  endfunction
  function automatic logic [ZIW-1:0] zset_of(logic [PC_W-1:0] pc);
    return pc[LW +: ZIW];
  endfunction

  // ---------------- lookup ----------------
  always_comb begin
    lk_hit = 1'b0; lk_zhit = 1'b0;
    lk_len = '0; lk_mask = '0; lk_cnt = '0;
    for (int i = 0; i < SEG_UOPS; i++) lk_uops[i] = '0;
    for (int w = 0; w < WAYS; w++)
      if (dh[set_of(lk_pc)][w].valid && dh[set_of(lk_pc)][w].tag == lk_pc) begin
        lk_hit  = 1'b1;
        lk_len  = dh[set_of(lk_pc)][w].len;
        lk_mask = dh[set_of(lk_pc)][w].mask;
        lk_cnt  = dh[set_of(lk_pc)][w].cnt;
        for (int i = 0; i < SEG_UOPS; i++) lk_uops[i] = du[set_of(lk_pc)][w][i];
      end
    if (!lk_hit)
      for (int w = 0; w < ZERO_WAYS; w++)
        if (zt[zset_of(lk_pc)][w].valid && zt[zset_of(lk_pc)][w].tag == lk_pc) begin
          lk_zhit = 1'b1;
          lk_len  = zt[zset_of(lk_pc)][w].len;
        end
  end

  // ---------------- write side ----------------
  logic [IW-1:0]  w_set;
  logic [ZIW-1:0] w_zset;
  logic           w_hit, w_zhit, w_inv;
  logic [WW-1:0]  w_way, w_inv_way;
  logic [ZWW-1:0] w_zway, w_zinv_way;
  logic           w_zinv;
  always_comb begin
    w_set = set_of(wr_tag);
    w_zset = zset_of(wr_tag);
    w_hit = 1'b0; w_way = '0; w_inv = 1'b0; w_inv_way = '0;
    for (int w = WAYS-1; w >= 0; w--) begin
      if (dh[w_set][w].valid && dh[w_set][w].tag == wr_tag) begin w_hit = 1'b1; w_way = WW'(w); end
      if (!dh[w_set][w].valid) begin w_inv = 1'b1; w_inv_way = WW'(w); end
    end
    w_zhit = 1'b0; w_zway = '0; w_zinv = 1'b0; w_zinv_way = '0;
    for (int w = ZERO_WAYS-1; w >= 0; w--) begin
      if (zt[w_zset][w].valid && zt[w_zset][w].tag == wr_tag) begin w_zhit = 1'b1; w_zway = ZWW'(w); end
      if (!zt[w_zset][w].valid) begin w_zinv = 1'b1; w_zinv_way = ZWW'(w); end
    end
  end

  // merge of an existing entry with the incoming segment: OR of the masks,
  // union of the micro-ops in position order
  logic [MASK_W-1:0] m_mask;
  logic [CW-1:0]     m_cnt;
  bc_uop_t           m_uops [SEG_UOPS];
  logic [MASK_W-1:0] m_om;
  bc_uop_t           m_sel;
  logic [CW-1:0]     m_k;
  always_comb begin
    m_om = dh[w_set][w_way].mask;
    m_sel = '0;
    m_mask = '0;
    m_k = '0;
    for (int i = 0; i < SEG_UOPS; i++) m_uops[i] = '0;
    for (int p = 0; p < MASK_W; p++) begin
      if ((m_om[p] || wr_mask[p]) && m_k < CW'(SEG_UOPS)) begin
        m_sel = '0;
        for (int i = 0; i < SEG_UOPS; i++) begin
          if (wr_mask[p] && i < int'(wr_cnt) && wr_uops[i].pos == (LEN_W-1)'(p)) m_sel = wr_uops[i];
        end
        for (int i = 0; i < SEG_UOPS; i++) begin
          if (m_om[p] && i < int'(dh[w_set][w_way].cnt) && du[w_set][w_way][i].pos == (LEN_W-1)'(p))
            m_sel = du[w_set][w_way][i];
        end
        m_uops[m_k[CW-2:0]] = m_sel;
        m_mask[p] = 1'b1;
        m_k = m_k + 1'b1;
      end
    end
    m_cnt = m_k;
  end

  wire do_reset = (rcnt + RCW'(retire_cnt)) >= RCW'(RESET_PERIOD);
  assign mask_reset = do_reset;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rcnt <= '0;
      for (int s = 0; s < SETS; s++) begin
        rr[s] <= '0;
        for (int w = 0; w < WAYS; w++) dh[s][w] <= '0;
      end
      for (int s = 0; s < ZSETS; s++) begin
        zrr[s] <= '0;
        for (int w = 0; w < ZERO_WAYS; w++) zt[s][w] <= '0;
      end
    end else begin
      rcnt <= do_reset ? rcnt + RCW'(retire_cnt) - RCW'(RESET_PERIOD) : rcnt + RCW'(retire_cnt);
      if (do_reset)
        for (int s = 0; s < SETS; s++)
          for (int w = 0; w < WAYS; w++) begin
            dh[s][w].mask <= '0;
            dh[s][w].cnt  <= '0;
          end
      if (wr_valid) begin
        if (wr_mask != '0) begin
          if (w_hit) begin
            dh[w_set][w_way].mask <= m_mask;
            dh[w_set][w_way].cnt  <= m_cnt;
            if (wr_len > dh[w_set][w_way].len) dh[w_set][w_way].len <= wr_len;
          end else begin
            logic [WW-1:0] v;
            v = w_inv ? w_inv_way : rr[w_set];
            dh[w_set][v] <= '{valid: 1'b1, tag: wr_tag, len: wr_len, mask: wr_mask, cnt: wr_cnt};
            if (!w_inv) rr[w_set] <= rr[w_set] + 1'b1;
            if (w_zhit) zt[w_zset][w_zway].valid <= 1'b0;
          end
        end else if (!w_hit && !w_zhit) begin
          logic [ZWW-1:0] zv;
          zv = w_zinv ? w_zinv_way : zrr[w_zset];
          zt[w_zset][zv] <= '{valid: 1'b1, tag: wr_tag, len: wr_len};
          if (!w_zinv) zrr[w_zset] <= zrr[w_zset] + 1'b1;
        end
      end
    end
  end

  // micro-op payload (no reset needed: read only under a valid header)
  always_ff @(posedge clk) begin
    if (wr_valid && wr_mask != '0) begin
      if (w_hit) begin
        for (int i = 0; i < SEG_UOPS; i++) du[w_set][w_way][i] <= m_uops[i];
      end else begin
        for (int i = 0; i < SEG_UOPS; i++) du[w_set][w_inv ? w_inv_way : rr[w_set]][i] <= wr_uops[i];
      end
    end
  end
endmodule
