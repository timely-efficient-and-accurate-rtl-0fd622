// tea_fetch: the TEA thread's fetch stage.
//
// It consumes the same fetch addresses that the decoupled branch predictor
// gives the main thread (through the shadow fetch queue) and stitches
// together the Block Cache segments they cover. For the fetch block at the
// head of the queue it looks up the segment that starts at the current PC:
//   * data-store hit: the segment's chain micro-ops (up to 8) are sent to the
//     shadow Rename stage with their PCs and the block's branch timestamp,
//     and the segment's mask is pushed to the mask queue for the main thread;
//     an idle thread is started (start pulse) by such a hit;
//   * zero-tag hit: nothing to send, the thread continues;
//   * miss: an active thread ends (miss pulse); the rest of the block is
//     dropped.
// The PC then advances by the segment length; the block is popped when the
// PC reaches its end. While the controller drains a finished thread
// (drop=1), addresses are popped without lookups. One segment is handled per
// cycle (own simplification of the two-line, multi-segment read).
//
// Timing: the micro-op group is registered (one cycle from lookup to
// out_valid) and held until out_ready.
module tea_fetch
  import tea_pkg::*;
#(
  parameter int MQ_W = PC_W + LEN_W + MASK_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // shadow fetch queue head
  input  logic              fq_valid,
  input  fetch_addr_t       fq_addr,
  output logic              fq_pop,
  // block cache lookup
  output logic [PC_W-1:0]   lk_pc,
  input  logic              lk_hit,
  input  logic              lk_zhit,
  input  logic [LEN_W-1:0]  lk_len,
  input  logic [MASK_W-1:0] lk_mask,
  input  logic [$clog2(SEG_UOPS+1)-1:0] lk_cnt,
  input  bc_uop_t           lk_uops [SEG_UOPS],
  // thread control
  input  logic              active,
  input  logic              drop,
  input  logic              flush,       // discard the partly fetched block
  output logic              start,
  output logic              miss,
  // mask queue
  output logic              mq_push,
  output logic [MQ_W-1:0]   mq_data,
  input  logic              mq_full,
  // to shadow rename
  output logic [WIDTH-1:0]  out_valid,
  output tea_uop_t          out_uops [WIDTH],
  input  logic              out_ready
);
  logic              inseg;
  logic [PC_W-1:0]   cur;
  logic [WIDTH-1:0]  ov;
  tea_uop_t          ou [WIDTH];

  wire [PC_W-1:0] pc = inseg ? cur : fq_addr.start;
  assign lk_pc = pc;

  wire out_busy = (ov != '0) && !out_ready;
  wire look     = fq_valid && !drop && !flush;
  wire emit     = look && lk_hit && lk_cnt != '0;
  wire stall    = emit && (out_busy || mq_full);
  wire [PC_W-1:0] nxt = pc + PC_W'(lk_len) * PC_W'(INSN_B);
  wire block_end = (lk_len == '0) || (nxt >= fq_addr.stop) || (!lk_hit && !lk_zhit);

  assign start   = look && !active && lk_hit && !stall;
  assign miss    = look && active && !lk_hit && !lk_zhit;
  assign mq_push = emit && !stall && (active || start);
  assign mq_data = {pc, lk_len, lk_mask};
  assign fq_pop  = fq_valid && !flush && (drop || (!stall && block_end));

  assign out_valid = ov;
  always_comb for (int i = 0; i < WIDTH; i++) out_uops[i] = ou[i];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inseg <= 1'b0;
      cur   <= '0;
      ov    <= '0;
      for (int i = 0; i < WIDTH; i++) ou[i] <= '0;
    end else begin
      if (out_ready) ov <= '0;
      if (flush) begin
        inseg <= 1'b0;
      end else if (fq_valid && drop) begin
        inseg <= 1'b0;
      end else if (look && !stall) begin
        if (block_end) inseg <= 1'b0;
        else begin
          inseg <= 1'b1;
          cur   <= nxt;
        end
        if (emit && (active || start)) begin
          for (int i = 0; i < WIDTH; i++) begin
            ov[i] <= (i < int'(lk_cnt)) && (i < SEG_UOPS);
            if (i < SEG_UOPS)
              ou[i] <= '{pc: pc + PC_W'(lk_uops[i].pos) * PC_W'(INSN_B),
                         ts: fq_addr.ts, u: lk_uops[i].u};
          end
        end
      end
    end
  end
endmodule
