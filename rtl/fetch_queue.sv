// fetch_queue: queue of fetch addresses from the decoupled branch predictor,
// with partial flush by timestamp.
//
// The predictor pushes one fetch block per cycle ([start, stop) and the
// timestamp of the branch ending it); the consumer (main-thread fetch, or the
// TEA fetch unit for the shadow queue) pops from the head. The main queue is
// deep (128 addresses) so that the predictor can run ahead of the main
// thread at the rate the TEA thread consumes addresses.
//
// Flush: on a misprediction flush with timestamp flush_ts, only the entries
// younger than the mispredicted branch are removed; older ones stay. This is
// the partial flush used when an early (TEA) flush finds its main-thread
// branch still in the frontend: a timestamp comparator per entry decides.
// Entries are in age order, so the queue is cut back to the last older entry.
// flush_all empties the queue. A flush has priority over a push in the same
// cycle (the predictor is being redirected).
//
// Interface: push/wdata, pop/rdata (head, valid while !empty), count.
// kept/removed give the outcome of the last flush (for statistics).
module fetch_queue
  import tea_pkg::*;
#(
  parameter int DEPTH = 128
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  fetch_addr_t  wdata,
  input  logic         pop,
  output fetch_addr_t  rdata,
  output logic         empty,
  output logic         full,
  output logic [$clog2(DEPTH+1)-1:0] count,
  input  logic         flush_valid,
  input  logic [TS_W-1:0] flush_ts,
  input  logic         flush_all,
  output logic         partial_flush   // flush removed some but not all entries
);
  localparam int AW = $clog2(DEPTH);
  localparam int CW = $clog2(DEPTH+1);
  fetch_addr_t   q [DEPTH];
  logic [AW-1:0] rp, wp;
  logic [CW-1:0] cnt;

  assign count = cnt;
  assign empty = (cnt == '0);
  assign full  = (cnt == CW'(DEPTH));
  assign rdata = q[rp];

  // number of entries (from the head) that are not younger than flush_ts
  logic [CW-1:0] keep;
  always_comb begin
    keep = '0;
    for (int i = 0; i < DEPTH; i++) begin
      logic [AW-1:0] j;
      j = rp + AW'(i);
      if (CW'(i) < cnt && !ts_younger(q[j].ts, flush_ts)) keep = CW'(i + 1);
    end
  end
  assign partial_flush = flush_valid && !flush_all && keep != '0 && keep != cnt;

  wire do_push = push && !full && !flush_valid && !flush_all;
  wire do_pop  = pop && !empty && !flush_all;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp <= '0; wp <= '0; cnt <= '0;
    end else if (flush_all) begin
      rp <= '0; wp <= '0; cnt <= '0;
    end else if (flush_valid) begin
      // keep the older entries; a pop in the same cycle still happens
      wp  <= rp + AW'(keep);
      if (do_pop && keep != '0) begin
        rp  <= rp + 1'b1;
        cnt <= keep - 1'b1;
      end else begin
        cnt <= keep;
      end
    end else begin
      if (do_push) wp <= wp + 1'b1;
      if (do_pop)  rp <= rp + 1'b1;
      cnt <= cnt + CW'(do_push) - CW'(do_pop);
    end
  end

  always_ff @(posedge clk) if (do_push) q[wp] <= wdata;

  a_no_push_full: assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !flush_valid && !flush_all));
endmodule
