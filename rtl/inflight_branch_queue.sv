// inflight_branch_queue: joins TEA branch results with their main-thread
// branches through synchronized timestamps.
//
// The branch predictor gives every predicted branch a timestamp; the TEA
// copy of the branch inherits it. An entry per in-flight main-thread branch
// (indexed by the low timestamp bits) holds the predicted direction and
// target, and a precomputed direction and target once the TEA copy resolves.
//   * TEA resolve: the result is stored. If it differs from the prediction,
//     an early misprediction flush is requested at that timestamp (wherever
//     the main branch is in the pipeline), unless TEA flushes are blocked for
//     that timestamp; the entry's prediction is updated to the precomputed
//     outcome, which the frontend now follows. A TEA result that arrives after
//     the main branch has resolved is reported as late.
//   * Main resolve: with a precomputed outcome that matches, nothing more is
//     needed (covered, when an early flush was issued for it). If the precomputed outcome was wrong, a second flush
//     corrects the control flow and tea_wrong ends the thread. Without one,
//     an ordinary misprediction flush is raised when the outcome differs from
//     the prediction.
//   * Any flush invalidates the entries younger than the flushing branch.
// Blocking: block_all stops every TEA flush; block_valid/block_ts stop those
// of branches younger than block_ts (RAT-poison detection). A blocked result
// is not recorded: its main branch resolves as if there were no TEA copy.
//
// Timing: lookups are combinational and the results (flush requests,
// statistics pulses) are combinational outputs of the resolve inputs;
// entries update at the clock edge. TEA and main resolves of one cycle are
// handled in that order; the main flush wins if both request one.
module inflight_branch_queue
  import tea_pkg::*;
#(
  parameter int ENTRIES = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              alloc_valid,
  input  logic [TS_W-1:0]   alloc_ts,
  input  logic              alloc_dir,
  input  logic [PC_W-1:0]   alloc_tgt,
  input  logic              tea_valid,
  input  logic [TS_W-1:0]   tea_ts,
  input  logic              tea_dir,
  input  logic [PC_W-1:0]   tea_tgt,
  input  logic              main_valid,
  input  logic [TS_W-1:0]   main_ts,
  input  logic              main_dir,
  input  logic [PC_W-1:0]   main_tgt,
  input  logic              block_all,
  input  logic              block_valid,
  input  logic [TS_W-1:0]   block_ts,
  // resulting flush (one per cycle)
  output logic              flush_valid,
  output logic [TS_W-1:0]   flush_ts,
  output logic              flush_dir,
  output logic [PC_W-1:0]   flush_tgt,
  output logic              flush_early,   // flush comes from the TEA thread
  output logic              tea_wrong,
  output logic              tea_late,
  output logic              covered,
  output logic              tea_blocked
);
  localparam int IW = $clog2(ENTRIES);
  typedef struct packed {
    logic            valid;
    logic            done;
    logic [TS_W-1:0] ts;
    logic            pdir;
    logic [PC_W-1:0] ptgt;
    logic            pre_v;
    logic            early;      // an early flush was issued for it
    logic            pre_dir;
    logic [PC_W-1:0] pre_tgt;
  } ent_t;
  ent_t q [ENTRIES];

  wire [IW-1:0] ti = tea_ts[IW-1:0];
  wire [IW-1:0] mi = main_ts[IW-1:0];
  wire tea_match  = q[ti].valid && q[ti].ts == tea_ts && !q[ti].done;
  wire tea_after  = q[ti].valid && q[ti].ts == tea_ts && q[ti].done;
  wire tea_diff   = (tea_dir != q[ti].pdir) || (tea_dir && tea_tgt != q[ti].ptgt);
  wire tea_block  = block_all || (block_valid && ts_younger(tea_ts, block_ts));
  wire tea_flush  = tea_valid && tea_match && tea_diff && !tea_block;

  wire main_match = main_valid && q[mi].valid && q[mi].ts == main_ts && !q[mi].done;
  wire pre_ok     = (main_dir == q[mi].pre_dir) && (!main_dir || main_tgt == q[mi].pre_tgt);
  wire pred_ok    = (main_dir == q[mi].pdir) && (!main_dir || main_tgt == q[mi].ptgt);
  wire main_flush = main_match && (q[mi].pre_v ? !pre_ok : !pred_ok);

  assign tea_wrong   = main_match && q[mi].pre_v && !pre_ok;
  assign covered     = main_match && q[mi].pre_v && pre_ok && q[mi].early;
  assign tea_late    = tea_valid && tea_after;
  assign tea_blocked = tea_valid && tea_match && tea_diff && tea_block;

  always_comb begin
    flush_valid = 1'b0; flush_ts = '0; flush_dir = 1'b0; flush_tgt = '0; flush_early = 1'b0;
    if (main_flush) begin
      flush_valid = 1'b1; flush_ts = main_ts; flush_dir = main_dir; flush_tgt = main_tgt;
    end else if (tea_flush) begin
      flush_valid = 1'b1; flush_ts = tea_ts; flush_dir = tea_dir; flush_tgt = tea_tgt;
      flush_early = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) q[i] <= '0;
    end else begin
      if (flush_valid)
        for (int i = 0; i < ENTRIES; i++)
          if (q[i].valid && ts_younger(q[i].ts, flush_ts)) q[i].valid <= 1'b0;
      if (alloc_valid && !flush_valid)
        q[alloc_ts[IW-1:0]] <= '{valid: 1'b1, done: 1'b0, ts: alloc_ts, pdir: alloc_dir,
                                 ptgt: alloc_tgt, pre_v: 1'b0, early: 1'b0, pre_dir: 1'b0, pre_tgt: '0};
      if (tea_valid && tea_match && !tea_block) begin
        q[ti].pre_v   <= 1'b1;
        q[ti].pre_dir <= tea_dir;
        q[ti].pre_tgt <= tea_tgt;
        if (tea_flush && !main_flush) begin
          q[ti].pdir <= tea_dir;
          q[ti].ptgt <= tea_tgt;
          q[ti].early <= 1'b1;
        end
      end
      if (main_match) q[mi].done <= 1'b1;
    end
  end
endmodule
