// shadow_rat: the TEA thread's Rename stage with its own (shadow) RAT.
//
// The shadow RAT maps architectural to physical registers for TEA micro-ops.
// When a thread starts (load), the main RAT is copied in, so the TEA thread
// starts from the main thread's state; the TEA physical-register partition
// (TEA_PRS registers from TEA_PR_BASE) is then entirely free. Up to WIDTH
// micro-ops are renamed per cycle, in order, with bypassing of mappings made
// earlier in the same group; each destination gets a free register of the
// partition (lowest free first, own choice). A group is renamed only when
// enough registers are free (all or nothing).
//
// For the register reference table the stage reports, per slot, the source
// registers read (reference +1), the register previously mapped to the
// destination (now unmapped) and the newly allocated one. Registers that the
// table frees come back on free_vec; only those of the partition are reused.
//
// Recovery: at every TEA branch the map after that branch is checkpointed
// with the branch timestamp (NCKPT checkpoints, round robin). On a flush,
// restore_ts selects a matching checkpoint - the case where the TEA thread
// runs far ahead and the main RAT needs no recovery - otherwise the map is
// reloaded from load_map, the recovered main RAT. Registers allocated after
// the restored point are not returned before the next thread start (own
// simplification). Checkpoints younger than the flushing branch are
// discarded. The renamed group waiting for Issue is compared with the
// flushing timestamp (one timestamp per group) and kept when it is older.
//
// Timing: renamed group registered, held until out_ready.
module shadow_rat
  import tea_pkg::*;
#(
  parameter int TEA_PR_BASE = 208,
  parameter int TEA_PRS     = 192,
  parameter int NCKPT       = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,          // thread start: copy main RAT, free partition
  input  logic              restore,       // flush: checkpoint or recovered main RAT
  input  logic [TS_W-1:0]   restore_ts,
  input  logic [PREG_W-1:0] load_map [AREG_N],
  output logic              restore_hit,
  // from TEA fetch
  input  logic [WIDTH-1:0]  in_valid,
  input  tea_uop_t          in_uops [WIDTH],
  output logic              in_ready,
  // to issue
  output logic [WIDTH-1:0]  out_valid,
  output ren_uop_t          out_uops [WIDTH],
  input  logic              out_ready,
  // reference table events (valid in the cycle a group is renamed: ev_fire)
  output logic              ev_fire,
  output logic [WIDTH-1:0]  ev_src1_v, ev_src2_v, ev_prev_v, ev_new_v,
  output logic [PREG_W-1:0] ev_src1 [WIDTH],
  output logic [PREG_W-1:0] ev_src2 [WIDTH],
  output logic [PREG_W-1:0] ev_prev [WIDTH],
  output logic [PREG_W-1:0] ev_new  [WIDTH],
  input  logic [PREG_N-1:0] free_vec,
  output logic [$clog2(TEA_PRS+1)-1:0] free_count
);
  localparam int FW = $clog2(TEA_PRS+1);
  localparam int KW = $clog2(NCKPT);

  logic [PREG_W-1:0] map  [AREG_N];
  logic [TEA_PRS-1:0] freeb;
  logic [PREG_W-1:0] ck_map [NCKPT][AREG_N];
  logic [TS_W-1:0]   ck_ts  [NCKPT];
  logic              ck_v   [NCKPT];
  logic [KW-1:0]     ck_ptr;
  logic [WIDTH-1:0]  ov;
  ren_uop_t          ou [WIDTH];

  // free count
  always_comb begin
    free_count = '0;
    for (int i = 0; i < TEA_PRS; i++) free_count += FW'(freeb[i]);
  end

  // allocation and renaming of the incoming group
  logic [PREG_W-1:0] alloc [WIDTH];
  logic [PREG_W-1:0] nmap  [AREG_N];
  ren_uop_t          ru    [WIDTH];
  logic [FW-1:0]     need;
  logic [TEA_PRS-1:0] taken;
  logic              br_in;
  logic [TS_W-1:0]   br_ts;
  always_comb begin
    need  = '0;
    taken = '0;
    br_in = 1'b0;
    br_ts = '0;
    for (int a = 0; a < AREG_N; a++) nmap[a] = map[a];
    for (int s = 0; s < WIDTH; s++) begin
      alloc[s] = '0;
      ev_src1_v[s] = 1'b0; ev_src2_v[s] = 1'b0; ev_prev_v[s] = 1'b0; ev_new_v[s] = 1'b0;
      ev_src1[s] = '0; ev_src2[s] = '0; ev_prev[s] = '0; ev_new[s] = '0;
      ru[s] = '0;
      if (in_valid[s]) begin
        ru[s].pc    = in_uops[s].pc;
        ru[s].ts    = in_uops[s].ts;
        ru[s].u     = in_uops[s].u;
        ru[s].tea   = 1'b1;
        ru[s].psrc1 = nmap[in_uops[s].u.src1];
        ru[s].psrc2 = nmap[in_uops[s].u.src2];
        ev_src1_v[s] = in_uops[s].u.has_src1;  ev_src1[s] = ru[s].psrc1;
        ev_src2_v[s] = in_uops[s].u.has_src2;  ev_src2[s] = ru[s].psrc2;
        if (in_uops[s].u.is_br) begin
          br_in = 1'b1;
          br_ts = in_uops[s].ts;
        end
        if (in_uops[s].u.has_dst) begin
          need = need + 1'b1;
          for (int i = TEA_PRS-1; i >= 0; i--)
            if (freeb[i] && !taken[i]) alloc[s] = PREG_W'(TEA_PR_BASE + i);
          if (alloc[s] >= PREG_W'(TEA_PR_BASE))
            taken[$clog2(TEA_PRS)'(alloc[s] - PREG_W'(TEA_PR_BASE))] = 1'b1;
          ev_prev_v[s] = 1'b1;  ev_prev[s] = nmap[in_uops[s].u.dst];
          ev_new_v[s]  = 1'b1;  ev_new[s]  = alloc[s];
          ru[s].pdst = alloc[s];
          nmap[in_uops[s].u.dst] = alloc[s];
        end
      end
    end
  end

  wire out_free = (ov == '0) || out_ready;
  // in_ready does not look at load/restore (no path back to the fetch
  // stage); a group offered during a load or restore is dropped
  assign in_ready = out_free && (need <= free_count);
  wire fire = (in_valid != '0) && in_ready && !load && !restore;

  // events only count when the group is really renamed
  assign ev_fire = fire;

  // checkpoint lookup
  logic          ck_hit;
  logic [KW-1:0] ck_idx;
  always_comb begin
    ck_hit = 1'b0; ck_idx = '0;
    for (int k = 0; k < NCKPT; k++)
      if (ck_v[k] && ck_ts[k] == restore_ts) begin ck_hit = 1'b1; ck_idx = KW'(k); end
  end
  assign restore_hit = restore && ck_hit;

  assign out_valid = ov;
  always_comb for (int s = 0; s < WIDTH; s++) out_uops[s] = ou[s];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int a = 0; a < AREG_N; a++) map[a] <= PREG_W'(a);
      freeb  <= '1;
      ck_ptr <= '0;
      ov     <= '0;
      for (int k = 0; k < NCKPT; k++) begin ck_v[k] <= 1'b0; ck_ts[k] <= '0; end
      for (int s = 0; s < WIDTH; s++) ou[s] <= '0;
    end else begin
      logic [TEA_PRS-1:0] fb;
      fb = freeb;
      for (int i = 0; i < TEA_PRS; i++) if (free_vec[TEA_PR_BASE + i]) fb[i] = 1'b1;
      if (load) begin
        for (int a = 0; a < AREG_N; a++) map[a] <= load_map[a];
        fb = '1;
        ov <= '0;
        for (int k = 0; k < NCKPT; k++) ck_v[k] <= 1'b0;
      end else if (restore) begin
        for (int a = 0; a < AREG_N; a++) map[a] <= ck_hit ? ck_map[ck_idx][a] : load_map[a];
        // checkpoints of flushed branches go; the renamed group survives if
        // it is not younger than the flushing branch
        for (int k = 0; k < NCKPT; k++)
          if (ts_younger(ck_ts[k], restore_ts)) ck_v[k] <= 1'b0;
        if (out_ready || ts_younger(ou[0].ts, restore_ts)) ov <= '0;
      end else begin
        if (out_ready) ov <= '0;
        if (fire) begin
          fb = fb & ~taken;
          for (int a = 0; a < AREG_N; a++) map[a] <= nmap[a];
          ov <= in_valid;
          for (int s = 0; s < WIDTH; s++) ou[s] <= ru[s];
          if (br_in) begin
            ck_v[ck_ptr]  <= 1'b1;
            ck_ts[ck_ptr] <= br_ts;
            ck_ptr        <= ck_ptr + 1'b1;
          end
        end
      end
      freeb <= fb;
    end
  end

  always_ff @(posedge clk)
    if (!load && !restore && fire && br_in)
      for (int a = 0; a < AREG_N; a++) ck_map[ck_ptr][a] <= nmap[a];
endmodule
