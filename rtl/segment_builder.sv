// segment_builder: cuts the drained Fill Buffer stream into basic-block
// segments for the Block Cache.
//
// Micro-ops arrive oldest first, one per cycle. A segment is tagged with the
// PC of its first micro-op and records, per position, a bit-mask bit that is 1
// for dependence-chain micro-ops; only those micro-ops are kept (with their
// position), at most SEG_UOPS of them. A segment is closed before a new
// micro-op when the previous one was a branch (end of basic block), when the
// PC is not sequential, when MASK_W positions are used, or when a chain
// micro-op arrives and SEG_UOPS are already held (a long segment is split
// into several entries). After the stream's last micro-op the open segment is
// emitted one cycle later. Segments with no chain micro-op are emitted too:
// the Block Cache keeps their tags in its zero-tag store.
//
// Interface: in_* is the stream (in_last marks its end); seg_valid pulses for
// one cycle with the segment on seg_*; seg_len counts micro-ops (positions).
module segment_builder
  import tea_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [PC_W-1:0]   in_pc,
  input  dec_uop_t          in_uop,
  input  logic              in_chain,
  input  logic              in_last,
  output logic              seg_valid,
  output logic [PC_W-1:0]   seg_tag,
  output logic [LEN_W-1:0]  seg_len,
  output logic [MASK_W-1:0] seg_mask,
  output logic [$clog2(SEG_UOPS+1)-1:0] seg_cnt,
  output bc_uop_t           seg_uops [SEG_UOPS]
);
  localparam int CW = $clog2(SEG_UOPS+1);
  logic              open, brk, pend;
  logic [PC_W-1:0]   tag;
  logic [LEN_W-1:0]  len;
  logic [MASK_W-1:0] mask;
  logic [CW-1:0]     cnt;
  bc_uop_t           uops [SEG_UOPS];

  // combinational: does the current segment end before the incoming uop?
  logic close_before;
  always_comb begin
    close_before = 1'b0;
    if (in_valid && open && !pend)
      close_before = brk ||
                     (in_pc != tag + PC_W'(len) * PC_W'(INSN_B)) ||
                     (len == LEN_W'(MASK_W)) ||
                     (in_chain && cnt == CW'(SEG_UOPS));
  end

  assign seg_valid = pend || close_before;
  assign seg_tag   = tag;
  assign seg_len   = len;
  assign seg_mask  = mask;
  assign seg_cnt   = cnt;
  always_comb for (int i = 0; i < SEG_UOPS; i++) seg_uops[i] = uops[i];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      open <= 1'b0; brk <= 1'b0; pend <= 1'b0;
      tag <= '0; len <= '0; mask <= '0; cnt <= '0;
      for (int i = 0; i < SEG_UOPS; i++) uops[i] <= '0;
    end else begin
      if (pend) begin
        pend <= 1'b0;
        open <= 1'b0;
      end
      if (in_valid) begin
        if (!open || pend || close_before) begin
          // start a new segment with this uop at position 0
          tag  <= in_pc;
          len  <= LEN_W'(1);
          mask <= MASK_W'(in_chain);
          cnt  <= CW'(in_chain);
          for (int i = 0; i < SEG_UOPS; i++) uops[i] <= '0;
          if (in_chain) uops[0] <= '{pos: '0, u: in_uop};
        end else begin
          len <= len + 1'b1;
          if (in_chain) begin
            mask[len[LEN_W-2:0]] <= 1'b1;
            uops[cnt[CW-2:0]]    <= '{pos: len[LEN_W-2:0], u: in_uop};
            cnt <= cnt + 1'b1;
          end
        end
        open <= 1'b1;
        brk  <= in_uop.is_br;
        pend <= in_last;
      end
    end
  end
endmodule
