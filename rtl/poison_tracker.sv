// poison_tracker: detects a TEA thread whose dependence chains are wrong.
//
// Each architectural register of the main RAT gets a poison bit, cleared for
// all registers when a TEA thread starts. Main-thread micro-ops at Rename
// carry the Block Cache mask bit that says whether the TEA thread also runs
// them. In program order within a group: a micro-op with mask bit 0 poisons
// its destination, one with mask bit 1 unpoisons it. A mask-bit-1 micro-op
// that reads a poisoned register shows that a chain needs a value produced
// outside the TEA thread: the precomputation cannot be trusted, and the
// timestamp of that micro-op is reported so that younger TEA branches can be
// kept from flushing.
//
// Interface: m_* is a main-thread rename group (valid prefix). violation and
// viol_ts are registered (one cycle after the group) and report the oldest
// violating micro-op of the group. Tracking runs only while active.
module poison_tracker
  import tea_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              init,
  input  logic              active,
  input  logic [WIDTH-1:0]  m_valid,
  input  dec_uop_t          m_uops [WIDTH],
  input  logic [WIDTH-1:0]  m_mask,
  input  logic [TS_W-1:0]   m_ts [WIDTH],
  output logic              violation,
  output logic [TS_W-1:0]   viol_ts,
  output logic [AREG_N-1:0] poison_vec
);
  logic [AREG_N-1:0] poison, np;
  logic              v;
  logic [TS_W-1:0]   vts;

  always_comb begin
    np = poison;
    v = 1'b0;
    vts = '0;
    for (int s = 0; s < WIDTH; s++)
      if (m_valid[s]) begin
        if (m_mask[s] && !v &&
            ((m_uops[s].has_src1 && np[m_uops[s].src1]) ||
             (m_uops[s].has_src2 && np[m_uops[s].src2]))) begin
          v = 1'b1;
          vts = m_ts[s];
        end
        if (m_uops[s].has_dst) np[m_uops[s].dst] = !m_mask[s];
      end
  end

  assign poison_vec = poison;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      poison <= '0; violation <= 1'b0; viol_ts <= '0;
    end else if (init) begin
      poison <= '0; violation <= 1'b0;
    end else begin
      violation <= active && v;
      if (active) begin
        poison <= np;
        if (v) viol_ts <= vts;
      end
    end
  end
endmodule
