// h2p_table: identifies hard-to-predict (H2P) branches.
//
// A set-associative table (256 entries, 8 ways, indexed by the branch PC) of
// 3-bit saturating misprediction counters. A mispredicted branch that misses
// allocates an entry with counter 1; a mispredicted branch that hits
// increments its counter. A branch is H2P when it hits and its counter is
// above 1. Every DECAY_PERIOD retired instructions all counters are
// decremented by one, so only branches that mispredict more often than about
// once per period stay H2P. Replacement prefers an invalid way, then a way
// whose counter is 0, then the way with the smallest counter (lowest way on a
// tie) - the last two tie-breaks are this design's own choice.
//
// Interface: lookup_pc -> lookup_h2p is combinational (single-cycle access),
// used to mark branches as they enter the Fill Buffer. mispred_valid/pc train
// the table (one per cycle). retire_cnt is the number of instructions retired
// this cycle and drives the decay counter. Updates take effect on the next
// clock edge.
module h2p_table
  import tea_pkg::*;
#(
  parameter int ENTRIES      = 256,
  parameter int WAYS         = 8,
  parameter int CTR_W        = 3,
  parameter int DECAY_PERIOD = 50000,
  parameter int RET_W        = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [PC_W-1:0]          lookup_pc,
  output logic                     lookup_h2p,
  input  logic                     mispred_valid,
  input  logic [PC_W-1:0]          mispred_pc,
  input  logic [$clog2(RET_W+1)-1:0] retire_cnt,
  output logic                     decay_pulse
);
  localparam int SETS = ENTRIES / WAYS;
  localparam int IW   = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int TW   = PC_W - IW;   // PCs of branches: tag is the rest of the PC
  localparam int DCW  = $clog2(DECAY_PERIOD + RET_W + 1);

  logic            valid [SETS][WAYS];
  logic [TW-1:0]   tag   [SETS][WAYS];
  logic [CTR_W-1:0] ctr  [SETS][WAYS];
  logic [DCW-1:0]  dcnt;

  function automatic logic [IW-1:0] idx_of(logic [PC_W-1:0] pc);
    return pc[IW-1:0];
  endfunction
  function automatic logic [TW-1:0] tag_of(logic [PC_W-1:0] pc);
    return pc[PC_W-1:IW];
  endfunction

  // lookup
  always_comb begin
    lookup_h2p = 1'b0;
    for (int w = 0; w < WAYS; w++)
      if (valid[idx_of(lookup_pc)][w] && tag[idx_of(lookup_pc)][w] == tag_of(lookup_pc) &&
          ctr[idx_of(lookup_pc)][w] > CTR_W'(1))
        lookup_h2p = 1'b1;
  end

  // training: hit way / victim way
  logic [IW-1:0] m_idx;
  logic          m_hit;
  logic [$clog2(WAYS)-1:0] m_way, m_vic;
  always_comb begin
    m_idx = idx_of(mispred_pc);
    m_hit = 1'b0;
    m_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (valid[m_idx][w] && tag[m_idx][w] == tag_of(mispred_pc)) begin
        m_hit = 1'b1;
        m_way = $clog2(WAYS)'(w);
      end
    // victim: first invalid way, else smallest counter (0 first)
    m_vic = '0;
    begin
      logic found;
      logic [CTR_W-1:0] best;
      found = 1'b0;
      best  = '1;
      for (int w = 0; w < WAYS; w++)
        if (!found && !valid[m_idx][w]) begin
          found = 1'b1;
          m_vic = $clog2(WAYS)'(w);
        end
      if (!found) begin
        best = ctr[m_idx][0];
        for (int w = 1; w < WAYS; w++)
          if (ctr[m_idx][w] < best) begin
            best  = ctr[m_idx][w];
            m_vic = $clog2(WAYS)'(w);
          end
      end
    end
  end

  wire decay = (dcnt + DCW'(retire_cnt)) >= DCW'(DECAY_PERIOD);
  assign decay_pulse = decay;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dcnt <= '0;
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++) begin
          valid[s][w] <= 1'b0;
          tag[s][w]   <= '0;
          ctr[s][w]   <= '0;
        end
    end else begin
      dcnt <= decay ? dcnt + DCW'(retire_cnt) - DCW'(DECAY_PERIOD) : dcnt + DCW'(retire_cnt);
      if (decay)
        for (int s = 0; s < SETS; s++)
          for (int w = 0; w < WAYS; w++)
            if (ctr[s][w] != '0) ctr[s][w] <= ctr[s][w] - 1'b1;
      if (mispred_valid) begin
        if (m_hit) begin
          // a decay in the same cycle and the increment cancel out
          if (decay) ctr[m_idx][m_way] <= ctr[m_idx][m_way];
          else if (ctr[m_idx][m_way] != '1) ctr[m_idx][m_way] <= ctr[m_idx][m_way] + 1'b1;
        end else begin
          valid[m_idx][m_vic] <= 1'b1;
          tag[m_idx][m_vic]   <= tag_of(mispred_pc);
          ctr[m_idx][m_vic]   <= CTR_W'(1);
        end
      end
    end
  end
endmodule
