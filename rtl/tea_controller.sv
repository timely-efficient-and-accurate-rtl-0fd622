// tea_controller: starts, ends and drains the TEA thread.
//
// States:
//   IDLE   - no thread. A Block Cache data hit in the TEA fetch unit starts
//            one: in that cycle the main RAT is copied into the shadow RAT,
//            the register reference table is initialised, poison bits and
//            the store data cache are cleared (init pulse).
//   ACTIVE - the thread fetches and runs. It ends (goes to DRAIN) on a Block
//            Cache miss (its remaining micro-ops still precompute), on a
//            wrongly precomputed branch (tea_wrong: remaining TEA flushes are
//            blocked), on a RAT-poison violation (TEA branches younger than
//            the violating micro-op are blocked), or when more than LATE_MAX
//            of its branch results arrived after the main branch resolved.
//   DRAIN  - the fetch unit drops fetch addresses; the remaining TEA micro-ops
//            leave the backend. When nothing of the thread is left
//            (drained), the controller returns to IDLE.
// Blocking state is cleared by the next start.
//
// Interface: single-cycle event inputs; init and the state outputs are
// combinational from the state and the start input. Counters of the events
// that ended threads are kept for statistics.
module tea_controller
  import tea_pkg::*;
#(
  parameter int LATE_MAX = 4,
  parameter int STAT_W   = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              miss,
  input  logic              tea_wrong,
  input  logic              violation,
  input  logic [TS_W-1:0]   viol_ts,
  input  logic              late,
  input  logic              drained,
  output logic              idle,
  output logic              active,
  output logic              drop,
  output logic              init,
  output logic              block_all,
  output logic              block_valid,
  output logic [TS_W-1:0]   block_ts,
  output logic [STAT_W-1:0] n_start,
  output logic [STAT_W-1:0] n_miss,
  output logic [STAT_W-1:0] n_wrong,
  output logic [STAT_W-1:0] n_poison,
  output logic [STAT_W-1:0] n_late_end
);
  typedef enum logic [1:0] {IDLE, ACTIVE, DRAIN} state_e;
  state_e state;
  logic [$clog2(LATE_MAX+2)-1:0] late_cnt;

  assign idle   = (state == IDLE);
  assign active = (state == ACTIVE);
  assign drop   = (state == DRAIN);
  assign init   = (state == IDLE) && start;

  wire late_end = late && (late_cnt == ($clog2(LATE_MAX+2))'(LATE_MAX));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      late_cnt <= '0;
      block_all <= 1'b0; block_valid <= 1'b0; block_ts <= '0;
      n_start <= '0; n_miss <= '0; n_wrong <= '0; n_poison <= '0; n_late_end <= '0;
    end else begin
      // blocking may also be raised by late events of a draining thread
      if (state != IDLE && tea_wrong) block_all <= 1'b1;
      if (state != IDLE && violation && (!block_valid || ts_younger(block_ts, viol_ts))) begin
        block_valid <= 1'b1;
        block_ts    <= viol_ts;
      end
      unique case (state)
        IDLE: if (start) begin
          state <= ACTIVE;
          late_cnt <= '0;
          block_all <= 1'b0; block_valid <= 1'b0;
          n_start <= n_start + 1'b1;
        end
        ACTIVE: begin
          if (late) late_cnt <= late_cnt + 1'b1;
          if (tea_wrong)      begin state <= DRAIN; n_wrong <= n_wrong + 1'b1; end
          else if (violation) begin state <= DRAIN; n_poison <= n_poison + 1'b1; end
          else if (late_end)  begin state <= DRAIN; n_late_end <= n_late_end + 1'b1; end
          else if (miss)      begin state <= DRAIN; n_miss <= n_miss + 1'b1; end
        end
        DRAIN: if (drained) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end
endmodule
