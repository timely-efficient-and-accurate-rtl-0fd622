// tb_tea_top: end-to-end run of the TEA design at its default sizes.
//
// Program (4-byte instructions, one micro-op each), a loop with an H2P branch:
//   A 0x1000: r1 <- load [r4+r5] ; flags <- cmp r1 ; jne (H2P) -> C, else B
//   B 0x100C: r7 <- r8 ; jmp C
//   C 0x1100: r9 <- r9 ; r5 <- r5+1 ; flags <- cmp r5,r7 ; jne -> A
// Phase 1 trains the H2P table, retires 600 loop micro-ops so that the Fill
// Buffer walks and the Block Cache receives A (3 chain uops), B (empty) and C
// (only r5 <- r5+1). Phase 2 lets a behavioural predictor push fetch blocks
// along its predicted path, a slow main thread consume them, and a
// behavioural backend execute what is issued: TEA branches resolve 6 cycles
// after issue, main branches 40 cycles after the main thread fetched them.
// Injected events: a fetch block with no Block Cache entry (miss), a
// poisoned-register read, one wrong TEA result, one late TEA result, TEA
// stores and loads. Phase 3 retires in bulk to reach the H2P decay and the
// Block Cache mask reset. Every mechanism is counted and must occur.
module tb_tea_top;
  import tea_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ret_valid, mispred_valid, bp_valid, bp_dir, bp_ready, mfq_pop, mfq_valid, mq_pop, mq_valid;
  ret_uop_t ret_uop;
  logic [4:0] retire_cnt;
  logic [PC_W-1:0] mispred_pc, bp_tgt;
  fetch_addr_t bp_addr, mfq_addr;
  logic [PC_W+LEN_W+MASK_W-1:0] mq_data;
  logic [WIDTH-1:0] m_valid, m_mask, issue_valid;
  ren_uop_t m_uops [WIDTH], issue_uops [WIDTH];
  logic [PREG_W-1:0] main_rat [AREG_N];
  logic [3:0] main_take, tea_rs_release, main_rs_release;
  logic [7:0] rd_v;
  logic [PREG_W-1:0] rd [8];
  logic tea_br_valid, tea_br_dir, main_br_valid, main_br_dir;
  logic [TS_W-1:0] tea_br_ts, main_br_ts, flush_ts;
  logic [PC_W-1:0] tea_br_tgt, main_br_tgt, flush_tgt;
  logic st_valid;
  logic [ADDR_W-1:0] st_addr, ld_addr;
  logic [7:0] st_be, ld_bvalid;
  logic [63:0] st_data, ld_data;
  logic flush_valid, flush_dir, flush_early, fq_partial_flush;
  logic tea_active, tea_covered, tea_late, tea_blocked, walk_done, bc_mask_reset, h2p_decay;
  logic [15:0] n_start, n_miss, n_wrong, n_poison, n_late_end;

  tea_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  localparam logic [PC_W-1:0] PA = 40'h1000, PB = 40'h100C, PC_ = 40'h1100, PD = 40'h2000;
  localparam int FL = 31;

  // ---------------- program ----------------
  function automatic dec_uop_t du(logic br, logic ld, int d, int s1, int s2);
    dec_uop_t u;
    u = '0;
    u.is_br = br; u.is_load = ld;
    u.has_dst = d >= 0;  u.dst  = AREG_W'(d < 0 ? 0 : d);
    u.has_src1 = s1 >= 0; u.src1 = AREG_W'(s1 < 0 ? 0 : s1);
    u.has_src2 = s2 >= 0; u.src2 = AREG_W'(s2 < 0 ? 0 : s2);
    return u;
  endfunction
  function automatic dec_uop_t prog(logic [PC_W-1:0] pc);
    case (pc)
      40'h1000: return du(0, 1, 1, 4, 5);
      40'h1004: return du(0, 0, FL, 1, -1);
      40'h1008: return du(1, 0, -1, FL, -1);
      40'h100C: return du(0, 0, 7, 8, -1);
      40'h1010: return du(1, 0, -1, -1, -1);
      40'h1100: return du(0, 0, 9, 9, -1);
      40'h1104: return du(0, 0, 5, 5, -1);
      40'h1108: return du(0, 0, FL, 5, 7);
      40'h110C: return du(1, 0, -1, FL, -1);
      default:  return du(1, 0, -1, -1, -1);
    endcase
  endfunction

  // ---------------- counters of mechanisms ----------------
  int c_h2p_mark, c_walk, c_start, c_tea_issue, c_prio, c_early, c_partial, c_covered, c_miss,
      c_poison, c_late, c_wrong, c_blocked, c_zhit, c_ckpt, c_prfree, c_sdc, c_mreset, c_decay,
      c_runahead, c_mask, c_ordinary;
  always @(posedge clk) if (rst_n) begin
    if (ret_valid && dut.u_fb.ret_ready && dut.fb_in.h2p && ret_uop.u.is_br) c_h2p_mark++;
    if (walk_done) c_walk++;
    if (dut.u_ctl.init) c_start++;
    if (dut.u_tf.look && dut.lk_zhit && tea_active) c_zhit++;
    if (dut.u_srat.restore_hit) c_ckpt++;
    if (dut.free_vec != '0) c_prfree++;
    if (fq_partial_flush) c_partial++;
    if (tea_covered) c_covered++;
    if (tea_late) c_late++;
    if (tea_blocked) c_blocked++;
    if (bc_mask_reset) c_mreset++;
    if (h2p_decay) c_decay++;
    if (mq_valid && mq_pop) c_mask++;
  end

  // ---------------- behavioural predictor / path ----------------
  typedef struct { logic v; logic [PC_W-1:0] blk; logic pred; logic truth; logic early; } rec_t;
  rec_t rec [1024];
  int next_ts;
  logic [PC_W-1:0] next_blk;
  int cyc;
  int force_miss_at, force_wrong_done, force_late_done, poison_at;

  function automatic logic [PC_W-1:0] blk_stop(logic [PC_W-1:0] b);
    case (b) PA: return PA + 12; PB: return PB + 8; PC_: return PC_ + 16; default: return b + 8; endcase
  endfunction
  function automatic logic [PC_W-1:0] succ(logic [PC_W-1:0] b, logic dir);
    case (b) PA: return dir ? PC_ : PB; PB: return PC_; PC_: return PA; default: return PA; endcase
  endfunction
  function automatic logic [PC_W-1:0] tgt_of(logic [PC_W-1:0] b);
    case (b) PA: return PC_; PB: return PC_; default: return PA; endcase
  endfunction

  // pending events: TEA and main resolves, TEA register reads, RS releases
  typedef struct { int due; int ts; logic dir; } ev_t;
  ev_t tea_ev [$], main_ev [$];
  int rd_q [$];
  int rel_due [$];

  function automatic logic younger(int a, int b);
    return ts_younger(TS_W'(a), TS_W'(b));
  endfunction

  task automatic on_flush(int fts, logic fdir);
    ev_t keep [$];
    for (int t = 0; t < 1024; t++) if (rec[t].v && younger(t, fts)) rec[t].v = 0;
    keep = {}; foreach (tea_ev[i]) if (!younger(tea_ev[i].ts, fts)) keep.push_back(tea_ev[i]); tea_ev = keep;
    keep = {}; foreach (main_ev[i]) if (!younger(main_ev[i].ts, fts)) keep.push_back(main_ev[i]); main_ev = keep;
    next_ts  = (fts + 1) % 1024;
    next_blk = succ(rec[fts].blk, fdir);
  endtask

  // ---------------- stimulus ----------------
  int last_main_ts;
  initial begin
    ret_valid = 0; ret_uop = '0; retire_cnt = 0; mispred_valid = 0; mispred_pc = 0;
    bp_valid = 0; bp_addr = '0; bp_dir = 0; bp_tgt = 0; mfq_pop = 0; mq_pop = 0;
    m_valid = 0; m_mask = 0; tea_rs_release = 0; main_rs_release = 0; rd_v = 0;
    tea_br_valid = 0; tea_br_ts = 0; tea_br_dir = 0; tea_br_tgt = 0;
    main_br_valid = 0; main_br_ts = 0; main_br_dir = 0; main_br_tgt = 0;
    st_valid = 0; st_addr = 0; st_be = 0; st_data = 0; ld_addr = 0;
    for (int i = 0; i < 8; i++) rd[i] = 0;
    for (int s = 0; s < WIDTH; s++) m_uops[s] = '0;
    for (int a = 0; a < AREG_N; a++) main_rat[a] = PREG_W'(a);
    for (int t = 0; t < 1024; t++) rec[t] = '{v: 0, blk: 0, pred: 0, truth: 0, early: 0};
    c_tea_issue = 0; c_prio = 0; c_early = 0; c_miss = 0; c_poison = 0; c_wrong = 0; c_sdc = 0;
    c_runahead = 0; c_ordinary = 0;
    repeat (3) @(negedge clk); rst_n = 1;

    // ---- phase 1: training and chain construction ----
    @(negedge clk); mispred_valid = 1; mispred_pc = PA + 8;
    @(negedge clk); @(negedge clk); mispred_valid = 0;
    begin
      logic [PC_W-1:0] pc;
      pc = PA;
      for (int n = 0; n < 1700; n++) begin
        @(negedge clk);
        ret_valid = 1; retire_cnt = 1;
        ret_uop = '0; ret_uop.pc = pc; ret_uop.u = prog(pc);
        ret_uop.maddr = ADDR_W'(32'h8000 + (n % 64) * 8);
        // next PC: A2 taken with probability 1/2
        if (pc == PA + 8) pc = ($urandom_range(0, 1) != 0) ? PC_ : PB;
        else if (pc == PB + 4) pc = PC_;
        else if (pc == PC_ + 12) pc = PA;
        else pc = pc + 4;
      end
      @(negedge clk); ret_valid = 0; retire_cnt = 0;
    end
    check(c_walk >= 1, "a Backward Dataflow Walk completed");
    check(c_h2p_mark > 0, "H2P branches marked at the Fill Buffer");

    // ---- phase 2: TEA execution ----
    next_ts = 1; next_blk = PA; last_main_ts = 0;
    force_miss_at = 400; force_wrong_done = 0; force_late_done = 0; poison_at = 900;
    for (cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // defaults
      bp_valid = 0; mfq_pop = 0; tea_br_valid = 0; main_br_valid = 0; rd_v = 0;
      st_valid = 0; m_valid = 0; m_mask = 0; mq_pop = mq_valid;
      main_rs_release = main_take;     // main stations drain at once
      // TEA station releases due now (at most 8)
      begin
        int r;
        r = 0;
        while (rel_due.size() > 0 && rel_due[0] <= cyc && r < 8) begin void'(rel_due.pop_front()); r++; end
        tea_rs_release = 4'(r);
      end
      // register reads
      for (int i = 0; i < 8; i++) if (rd_q.size() > 0) begin rd_v[i] = 1; rd[i] = PREG_W'(rd_q.pop_front()); end
      // predictor: one block per cycle while the queues have room and the path is not too far ahead
      if (bp_ready && !rec[next_ts].v) begin
        logic [PC_W-1:0] b;
        b = next_blk;
        if (cyc == force_miss_at) b = PD;
        rec[next_ts].v = 1; rec[next_ts].blk = b; rec[next_ts].early = 0;
        rec[next_ts].truth = (b == PA) ? ($urandom_range(0, 1) != 0) : 1'b1;
        rec[next_ts].pred  = (b == PA) ? ($urandom_range(0, 1) != 0) : 1'b1;
        bp_valid = 1;
        bp_addr = '{start: b, stop: blk_stop(b), ts: TS_W'(next_ts)};
        bp_dir = rec[next_ts].pred; bp_tgt = tgt_of(b);
        next_blk = succ(b, rec[next_ts].pred);
        next_ts  = (next_ts + 1) % 1024;
      end
      // main thread: pops a block every third cycle
      if (mfq_valid && cyc % 3 == 0) begin
        mfq_pop = 1;
        main_ev.push_back('{due: cyc + 40, ts: int'(mfq_addr.ts), dir: 1'b0});
        last_main_ts = int'(mfq_addr.ts);
      end
      // main rename group: 4 plain micro-ops (no destination)
      m_valid = 8'h0F;
      for (int s = 0; s < WIDTH; s++) begin m_uops[s] = '0; m_uops[s].pc = PC_W'(40'h9000 + s * 4); end
      if (cyc >= poison_at && tea_active && c_poison == 0) begin
        // non-chain write of r20, then chain read of r20
        m_uops[0].u = du(0, 0, 20, 21, -1); m_uops[0].ts = TS_W'(last_main_ts);
        m_uops[1].u = du(0, 0, 22, 20, -1); m_uops[1].ts = TS_W'(last_main_ts); m_mask = 8'b10;
        c_poison++;
      end
      // TEA stores / loads
      if (cyc == 50) begin st_valid = 1; st_addr = 40'h8040; st_be = 8'hFF; st_data = 64'h1122334455667788; end
      if (cyc == 51) begin
        ld_addr = 40'h8040; #1;
        check(ld_bvalid == 8'hFF && ld_data == 64'h1122334455667788, "TEA load reads TEA store value");
        c_sdc++;
      end
      // TEA branch resolves due now
      if (tea_ev.size() > 0 && tea_ev[0].due <= cyc) begin
        ev_t e;
        e = tea_ev.pop_front();
        if (rec[e.ts].v) begin
          logic dir;
          dir = rec[e.ts].truth;
          if (!force_wrong_done && cyc > 1500 && rec[e.ts].blk == PA) begin dir = !dir; force_wrong_done = 1; c_wrong++; end
          tea_br_valid = 1; tea_br_ts = TS_W'(e.ts); tea_br_dir = dir;
          tea_br_tgt = dir ? tgt_of(rec[e.ts].blk) : PC_W'(0);
        end
      end
      // main branch resolves due now
      if (main_ev.size() > 0 && main_ev[0].due <= cyc) begin
        ev_t e;
        e = main_ev.pop_front();
        if (rec[e.ts].v) begin
          main_br_valid = 1; main_br_ts = TS_W'(e.ts); main_br_dir = rec[e.ts].truth;
          main_br_tgt = rec[e.ts].truth ? tgt_of(rec[e.ts].blk) : PC_W'(0);
        end
      end
      #1;
      // ---- observe ----
      if (issue_valid[0] && issue_uops[0].tea) begin
        logic seen_main;
        seen_main = 0;
        for (int s = 1; s < WIDTH; s++) begin
          if (issue_valid[s] && !issue_uops[s].tea) seen_main = 1;
          if (issue_valid[s] && issue_uops[s].tea) check(!seen_main, "TEA micro-ops precede main ones in the issue group");
        end
        if (seen_main) c_prio++;
      end
      for (int s = 0; s < WIDTH; s++)
        if (issue_valid[s] && issue_uops[s].tea) begin
          logic [PC_W-1:0] p;
          p = issue_uops[s].pc;
          c_tea_issue++;
          check(p == PA || p == PA + 4 || p == PA + 8 || p == PC_ + 4,
                $sformatf("TEA micro-op from a dependence chain (pc %h)", p));
          check(issue_uops[s].u == prog(p), "TEA micro-op decoded as in the program");
          rel_due.push_back(cyc + 4);
          if (issue_uops[s].u.has_src1) rd_q.push_back(int'(issue_uops[s].psrc1));
          if (issue_uops[s].u.has_src2) rd_q.push_back(int'(issue_uops[s].psrc2));
          if (issue_uops[s].u.is_br) begin
            int d;
            d = 6;
            if (cyc >= 2000 && cyc < 2200) begin d = 80; force_late_done++; end
            tea_ev.push_back('{due: cyc + d, ts: int'(issue_uops[s].ts), dir: 1'b0});
            if (younger(int'(issue_uops[s].ts), last_main_ts)) c_runahead++;
          end
        end
      if (main_br_valid && !flush_valid && rec[int'(main_br_ts)].early && !tea_br_valid)
        check(tea_covered, "early-flushed branch resolves as covered");
      if (flush_valid) begin
        int f;
        f = int'(flush_ts);
        if (flush_early) begin
          c_early++;
          check(tea_br_dir != rec[f].pred, "early flush only for a mispredicted branch");
          rec[f].early = 1;
        end else c_ordinary++;
        on_flush(f, flush_dir);
      end
      if (tea_late) check(!flush_valid || !flush_early, "a late TEA result flushes nothing");
      if (dut.u_tf.miss) c_miss++;
      tea_ev.sort() with (item.due);
    end
    @(negedge clk);
    bp_valid = 0; m_valid = 0; tea_br_valid = 0; main_br_valid = 0; rd_v = 0; main_rs_release = 0; mq_pop = 0; mfq_pop = 0;
    tea_rs_release = 0;

    // ---- phase 3: bulk retirement for decay and mask reset ----
    retire_cnt = 16;
    repeat (31260) @(negedge clk);
    retire_cnt = 0;
    @(negedge clk);

    $display("mechanisms: h2p_mark=%0d walk=%0d start=%0d tea_issue=%0d prio=%0d early=%0d partial_fq=%0d covered=%0d",
             c_h2p_mark, c_walk, c_start, c_tea_issue, c_prio, c_early, c_partial, c_covered);
    $display("  miss=%0d/%0d poison=%0d late=%0d/%0d wrong=%0d blocked=%0d zero_tag=%0d ckpt=%0d prfree=%0d sdc=%0d",
             c_miss, n_miss, n_poison, c_late, n_late_end, n_wrong, c_blocked, c_zhit, c_ckpt, c_prfree, c_sdc);
    $display("  mask_reset=%0d decay=%0d runahead=%0d mask_pop=%0d ordinary_flush=%0d",
             c_mreset, c_decay, c_runahead, c_mask, c_ordinary);
    check(c_start >= 1, "TEA thread started");
    check(c_tea_issue > 0, "TEA micro-ops issued");
    check(c_prio > 0, "TEA micro-ops took the first issue slots ahead of main ones");
    check(c_early > 0, "early misprediction flush");
    check(c_partial > 0, "partial fetch queue flush");
    check(c_covered > 0, "main branch resolved as covered");
    check(n_miss > 0, "thread ended by a Block Cache miss");
    check(n_poison > 0, "thread ended by RAT poisoning");
    check(c_late > 0, "late TEA result");
    check(n_late_end > 0, "thread ended after too many late results");
    check(n_wrong > 0, "wrong TEA result caught by the main branch");
    check(c_zhit > 0, "zero-tag segment passed over");
    check(c_ckpt > 0, "shadow RAT restored from a checkpoint");
    check(c_prfree > 0, "TEA registers freed");
    check(c_sdc > 0, "store data cache forwarded a TEA store");
    check(c_mreset > 0, "Block Cache masks reset");
    check(c_decay > 0, "H2P counters decayed");
    check(c_runahead > 0, "TEA branch issued before the main thread fetched it");
    check(c_mask > 0, "bit-masks delivered to the main thread");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
