// tea_top: TEA branch precomputation added to an out-of-order core.
//
// The TEA thread is a second, speculative instruction stream that contains
// only the dependence chains of hard-to-predict (H2P) branches. It has its
// own fetch (from the Block Cache) and rename (shadow RAT) stages, shares
// Issue, Reservation Stations, registers and execution units with the main
// thread, and runs ahead of it because it skips everything outside the
// chains. When a TEA branch finds that the predictor was wrong, it flushes
// the core at the branch's timestamp - the same timestamp its main-thread
// copy carries - so the wrong path is cut before the main branch executes.
//
// Construction path (backend side):
//   retire -> h2p_table marks H2P branches -> fill_buffer (+ source_list)
//   walks the chains backwards -> segment_builder -> block_cache.
// Fetch path (frontend side):
//   branch predictor -> fetch_queue (main, 128) and fetch_queue (shadow)
//   -> tea_fetch (Block Cache lookups) -> shadow_rat -> issue_arbiter, which
//   merges the TEA group and the main rename group, TEA first.
// Support: pr_ref_table frees TEA registers without a ROB, store_data_cache
// holds TEA store values, poison_tracker checks the chains against the main
// thread, inflight_branch_queue matches TEA and main branch results by
// timestamp and produces early and corrective flushes, tea_controller starts
// and ends threads.
//
// Not inside this block (ports instead): the branch predictor, the main
// thread's fetch/decode/rename and RAT, the I-cache, the ROB, reservation
// stations, execution units and D-cache. The main thread reads fetch
// addresses from mfq_*, the bit-masks from mq_*, and gives its rename group
// with each micro-op's mask bit on m_*. Retired micro-ops enter one per
// cycle. Flushes leave on flush_*; the core applies them to its backend,
// while the fetch queues, the shadow RAT and the TEA fetch stage are
// flushed here (partially, by timestamp).
module tea_top
  import tea_pkg::*;
#(
  parameter int FB_ENTRIES   = 512,
  parameter int SL_MEM       = 16,
  parameter int H2P_ENTRIES  = 256,
  parameter int H2P_WAYS     = 8,
  parameter int DECAY_PERIOD = 50000,
  parameter int BC_ENTRIES   = 512,
  parameter int BC_WAYS      = 8,
  parameter int BC_ZERO      = 256,
  parameter int RESET_PERIOD = 500000,
  parameter int FQ_DEPTH     = 128,
  parameter int SFQ_DEPTH    = 16,
  parameter int MQ_DEPTH     = 16,
  parameter int IBQ_ENTRIES  = 256,
  parameter int RS_TOTAL     = 352,
  parameter int TEA_RS       = 192,
  parameter int TEA_PR_BASE  = 208,
  parameter int TEA_PRS      = 192,
  parameter int SDC_ENTRIES  = 16,
  parameter int LATE_MAX     = 4,
  parameter int RET_W        = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // retirement
  input  logic              ret_valid,
  input  ret_uop_t          ret_uop,       // h2p field is filled in here
  input  logic [$clog2(RET_W+1)-1:0] retire_cnt,
  input  logic              mispred_valid,
  input  logic [PC_W-1:0]   mispred_pc,
  // decoupled branch predictor
  input  logic              bp_valid,
  input  fetch_addr_t       bp_addr,
  input  logic              bp_dir,
  input  logic [PC_W-1:0]   bp_tgt,
  output logic              bp_ready,
  // main-thread fetch
  input  logic              mfq_pop,
  output logic              mfq_valid,
  output fetch_addr_t       mfq_addr,
  // bit-mask queue to the main thread {segment PC, length, mask}
  input  logic              mq_pop,
  output logic              mq_valid,
  output logic [PC_W+LEN_W+MASK_W-1:0] mq_data,
  // main-thread rename group and RAT
  input  logic [WIDTH-1:0]  m_valid,
  input  ren_uop_t          m_uops [WIDTH],
  input  logic [WIDTH-1:0]  m_mask,
  input  logic [PREG_W-1:0] main_rat [AREG_N],
  output logic [$clog2(WIDTH+1)-1:0] main_take,
  // issue to the reservation stations
  output logic [WIDTH-1:0]  issue_valid,
  output ren_uop_t          issue_uops [WIDTH],
  input  logic [$clog2(WIDTH+1)-1:0] tea_rs_release,
  input  logic [$clog2(WIDTH+1)-1:0] main_rs_release,
  // TEA operand reads (just before execution)
  input  logic [7:0]        rd_v,
  input  logic [PREG_W-1:0] rd [8],
  // branch resolution
  input  logic              tea_br_valid,
  input  logic [TS_W-1:0]   tea_br_ts,
  input  logic              tea_br_dir,
  input  logic [PC_W-1:0]   tea_br_tgt,
  input  logic              main_br_valid,
  input  logic [TS_W-1:0]   main_br_ts,
  input  logic              main_br_dir,
  input  logic [PC_W-1:0]   main_br_tgt,
  // TEA stores and loads
  input  logic              st_valid,
  input  logic [ADDR_W-1:0] st_addr,
  input  logic [7:0]        st_be,
  input  logic [63:0]       st_data,
  input  logic [ADDR_W-1:0] ld_addr,
  output logic [7:0]        ld_bvalid,
  output logic [63:0]       ld_data,
  // flush
  output logic              flush_valid,
  output logic [TS_W-1:0]   flush_ts,
  output logic              flush_dir,
  output logic [PC_W-1:0]   flush_tgt,
  output logic              flush_early,
  output logic              fq_partial_flush,
  // status
  output logic              tea_active,
  output logic              tea_covered,
  output logic              tea_late,
  output logic              tea_blocked,
  output logic              walk_done,
  output logic              bc_mask_reset,
  output logic              h2p_decay,
  output logic [15:0]       n_start,
  output logic [15:0]       n_miss,
  output logic [15:0]       n_wrong,
  output logic [15:0]       n_poison,
  output logic [15:0]       n_late_end
);
  localparam int CW = $clog2(SEG_UOPS+1);

  // ---------------- chain construction ----------------
  logic     ret_h2p;
  ret_uop_t fb_in;
  h2p_table #(.ENTRIES(H2P_ENTRIES), .WAYS(H2P_WAYS), .DECAY_PERIOD(DECAY_PERIOD), .RET_W(RET_W)) u_h2p (
    .clk, .rst_n, .lookup_pc(ret_uop.pc), .lookup_h2p(ret_h2p),
    .mispred_valid, .mispred_pc, .retire_cnt, .decay_pulse(h2p_decay));

  always_comb begin
    fb_in = ret_uop;
    fb_in.h2p = ret_h2p;
  end

  logic            fb_valid, fb_chain, fb_last;
  logic [PC_W-1:0] fb_pc;
  dec_uop_t        fb_uop;
  fill_buffer #(.ENTRIES(FB_ENTRIES), .MEM_N(SL_MEM)) u_fb (
    .clk, .rst_n, .ret_valid, .ret_uop(fb_in), .ret_ready(),
    .out_valid(fb_valid), .out_pc(fb_pc), .out_uop(fb_uop), .out_chain(fb_chain),
    .out_last(fb_last), .walk_done, .walking());

  logic              sg_valid;
  logic [PC_W-1:0]   sg_tag;
  logic [LEN_W-1:0]  sg_len;
  logic [MASK_W-1:0] sg_mask;
  logic [CW-1:0]     sg_cnt;
  bc_uop_t           sg_uops [SEG_UOPS];
  segment_builder u_sb (
    .clk, .rst_n, .in_valid(fb_valid), .in_pc(fb_pc), .in_uop(fb_uop), .in_chain(fb_chain),
    .in_last(fb_last), .seg_valid(sg_valid), .seg_tag(sg_tag), .seg_len(sg_len),
    .seg_mask(sg_mask), .seg_cnt(sg_cnt), .seg_uops(sg_uops));

  logic [PC_W-1:0]   lk_pc;
  logic              lk_hit, lk_zhit;
  logic [LEN_W-1:0]  lk_len;
  logic [MASK_W-1:0] lk_mask;
  logic [CW-1:0]     lk_cnt;
  bc_uop_t           lk_uops [SEG_UOPS];
  block_cache #(.ENTRIES(BC_ENTRIES), .WAYS(BC_WAYS), .ZERO_ENTRIES(BC_ZERO),
                .RESET_PERIOD(RESET_PERIOD), .RET_W(RET_W)) u_bc (
    .clk, .rst_n, .lk_pc, .lk_hit, .lk_zhit, .lk_len, .lk_mask, .lk_cnt, .lk_uops,
    .wr_valid(sg_valid), .wr_tag(sg_tag), .wr_len(sg_len), .wr_mask(sg_mask),
    .wr_cnt(sg_cnt), .wr_uops(sg_uops), .retire_cnt, .mask_reset(bc_mask_reset));

  // ---------------- fetch queues ----------------
  logic        mfq_empty, mfq_full, sfq_empty, sfq_full, sfq_pop;
  fetch_addr_t sfq_head;
  wire bp_push = bp_valid && bp_ready;
  assign bp_ready = !mfq_full && !sfq_full;

  fetch_queue #(.DEPTH(FQ_DEPTH)) u_mfq (
    .clk, .rst_n, .push(bp_push), .wdata(bp_addr), .pop(mfq_pop), .rdata(mfq_addr),
    .empty(mfq_empty), .full(mfq_full), .count(),
    .flush_valid, .flush_ts, .flush_all(1'b0), .partial_flush(fq_partial_flush));
  assign mfq_valid = !mfq_empty;

  fetch_queue #(.DEPTH(SFQ_DEPTH)) u_sfq (
    .clk, .rst_n, .push(bp_push), .wdata(bp_addr), .pop(sfq_pop), .rdata(sfq_head),
    .empty(sfq_empty), .full(sfq_full), .count(),
    .flush_valid, .flush_ts, .flush_all(1'b0), .partial_flush());

  // ---------------- control ----------------
  logic idle, drop, init, tea_wrong, violation, block_all, block_valid, miss, start;
  logic [TS_W-1:0] viol_ts, block_ts;
  logic drained;

  // ---------------- TEA fetch and rename ----------------
  logic              mq_push, mq_full, mq_empty;
  logic [PC_W+LEN_W+MASK_W-1:0] mq_wdata;
  logic [WIDTH-1:0]  tf_valid;
  tea_uop_t          tf_uops [WIDTH];
  logic              sr_in_ready;
  // a flush that removes the block being walked restarts at the next block;
  // the TEA group waiting between fetch and rename is dropped only when it
  // is younger than the flushing branch (timestamp comparator per stage)
  wire head_flushed = flush_valid && !sfq_empty && ts_younger(sfq_head.ts, flush_ts);

  tea_fetch u_tf (
    .clk, .rst_n, .fq_valid(!sfq_empty), .fq_addr(sfq_head), .fq_pop(sfq_pop),
    .lk_pc, .lk_hit, .lk_zhit, .lk_len, .lk_mask, .lk_cnt, .lk_uops,
    .active(tea_active), .drop, .flush(head_flushed), .start, .miss,
    .mq_push, .mq_data(mq_wdata), .mq_full,
    .out_valid(tf_valid), .out_uops(tf_uops), .out_ready(flush_valid ? ts_younger(tf_uops[0].ts, flush_ts) : sr_in_ready));

  sync_fifo #(.W(PC_W+LEN_W+MASK_W), .DEPTH(MQ_DEPTH)) u_mq (
    .clk, .rst_n, .clear(1'b0), .push(mq_push), .wdata(mq_wdata), .pop(mq_pop),
    .rdata(mq_data), .empty(mq_empty), .full(mq_full));
  assign mq_valid = !mq_empty;

  logic [WIDTH-1:0]  sr_valid;
  ren_uop_t          sr_uops [WIDTH];
  logic              tea_take;
  logic              ev_fire;
  logic [WIDTH-1:0]  ev_src1_v, ev_src2_v, ev_prev_v, ev_new_v;
  logic [PREG_W-1:0] ev_src1 [WIDTH];
  logic [PREG_W-1:0] ev_src2 [WIDTH];
  logic [PREG_W-1:0] ev_prev [WIDTH];
  logic [PREG_W-1:0] ev_new  [WIDTH];
  logic [PREG_N-1:0] free_vec;

  shadow_rat #(.TEA_PR_BASE(TEA_PR_BASE), .TEA_PRS(TEA_PRS)) u_srat (
    .clk, .rst_n, .load(init), .restore(flush_valid && !idle), .restore_ts(flush_ts),
    .load_map(main_rat), .restore_hit(),
    .in_valid(tf_valid), .in_uops(tf_uops), .in_ready(sr_in_ready),
    .out_valid(sr_valid), .out_uops(sr_uops), .out_ready(tea_take),
    .ev_fire, .ev_src1_v, .ev_src2_v, .ev_prev_v, .ev_new_v,
    .ev_src1, .ev_src2, .ev_prev, .ev_new, .free_vec, .free_count());

  pr_ref_table #(.REN_W(WIDTH), .RD_W(8)) u_prt (
    .clk, .rst_n, .init, .ren_fire(ev_fire),
    .src1_v(ev_src1_v), .src2_v(ev_src2_v), .prev_v(ev_prev_v), .new_v(ev_new_v),
    .src1(ev_src1), .src2(ev_src2), .prev(ev_prev), .newr(ev_new),
    .rd_v, .rd, .free_vec, .valid_vec());

  // ---------------- issue ----------------
  logic [$clog2(RS_TOTAL+1)-1:0] tea_rs_used;
  issue_arbiter #(.RS_TOTAL(RS_TOTAL), .TEA_RS(TEA_RS)) u_iss (
    .clk, .rst_n, .tea_active(!idle), .tea_valid(sr_valid), .tea_uops(sr_uops),
    .main_valid(m_valid), .main_uops(m_uops), .tea_rs_release, .main_rs_release,
    .tea_take, .main_take, .issue_valid, .issue_uops, .tea_rs_used, .main_rs_used());

  assign drained = (tea_rs_used == '0) && (sr_valid == '0) && (tf_valid == '0);

  // ---------------- checking and flushing ----------------
  dec_uop_t        pm_uops [WIDTH];
  logic [TS_W-1:0] pm_ts   [WIDTH];
  always_comb for (int s = 0; s < WIDTH; s++) begin
    pm_uops[s] = m_uops[s].u;
    pm_ts[s]   = m_uops[s].ts;
  end
  poison_tracker u_pt (
    .clk, .rst_n, .init, .active(tea_active), .m_valid, .m_uops(pm_uops), .m_mask,
    .m_ts(pm_ts), .violation, .viol_ts, .poison_vec());

  inflight_branch_queue #(.ENTRIES(IBQ_ENTRIES)) u_ibq (
    .clk, .rst_n, .alloc_valid(bp_push), .alloc_ts(bp_addr.ts), .alloc_dir(bp_dir),
    .alloc_tgt(bp_tgt),
    .tea_valid(tea_br_valid), .tea_ts(tea_br_ts), .tea_dir(tea_br_dir), .tea_tgt(tea_br_tgt),
    .main_valid(main_br_valid), .main_ts(main_br_ts), .main_dir(main_br_dir), .main_tgt(main_br_tgt),
    .block_all, .block_valid, .block_ts,
    .flush_valid, .flush_ts, .flush_dir, .flush_tgt, .flush_early,
    .tea_wrong, .tea_late, .covered(tea_covered), .tea_blocked);

  store_data_cache #(.ENTRIES(SDC_ENTRIES)) u_sdc (
    .clk, .rst_n, .clear(init), .st_valid, .st_addr, .st_be, .st_data,
    .ld_addr, .ld_bvalid, .ld_data, .ld_hit());

  tea_controller #(.LATE_MAX(LATE_MAX)) u_ctl (
    .clk, .rst_n, .start, .miss, .tea_wrong, .violation, .viol_ts, .late(tea_late), .drained,
    .idle, .active(tea_active), .drop, .init, .block_all, .block_valid, .block_ts,
    .n_start, .n_miss, .n_wrong, .n_poison, .n_late_end);
endmodule
