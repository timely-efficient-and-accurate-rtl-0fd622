// issue_arbiter: the shared Issue stage (Rename to Reservation Stations).
//
// Two renamed groups compete for the WIDTH issue slots of a cycle: the TEA
// thread's (from the shadow Rename stage) and the main thread's. TEA micro-ops
// have priority; the main thread gets the slots left over. While the TEA
// thread is active the Reservation Stations are statically partitioned:
// TEA_RS entries for the TEA thread, the rest (RS_TOTAL - TEA_RS) for the main
// thread; otherwise the main thread may use all of them. Occupancy is tracked
// with counters that the backend decrements (rs_release counts of entries
// leaving the stations). The TEA group is taken whole or not at all; the main
// group is taken as an in-order prefix. Issued TEA micro-ops keep their TEA
// bit, so the stations can discard them after execution.
//
// Interface: valid vectors are prefixes (slot 0 first). tea_take and
// main_take say what was issued this cycle (combinational); issue_* is the
// merged slot vector, TEA micro-ops in the low slots.
module issue_arbiter
  import tea_pkg::*;
#(
  parameter int RS_TOTAL = 352,
  parameter int TEA_RS   = 192
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tea_active,
  input  logic [WIDTH-1:0]  tea_valid,
  input  ren_uop_t          tea_uops [WIDTH],
  input  logic [WIDTH-1:0]  main_valid,
  input  ren_uop_t          main_uops [WIDTH],
  input  logic [$clog2(WIDTH+1)-1:0] tea_rs_release,
  input  logic [$clog2(WIDTH+1)-1:0] main_rs_release,
  output logic              tea_take,
  output logic [$clog2(WIDTH+1)-1:0] main_take,
  output logic [WIDTH-1:0]  issue_valid,
  output ren_uop_t          issue_uops [WIDTH],
  output logic [$clog2(RS_TOTAL+1)-1:0] tea_rs_used,
  output logic [$clog2(RS_TOTAL+1)-1:0] main_rs_used
);
  localparam int NW = $clog2(WIDTH+1);
  localparam int RW = $clog2(RS_TOTAL+1);
  logic [RW-1:0] tea_used, main_used;
  logic [NW-1:0] tea_n, main_n, tea_slots;
  logic [RW-1:0] main_cap;

  always_comb begin
    tea_n = '0; main_n = '0;
    for (int i = 0; i < WIDTH; i++) begin
      tea_n  += NW'(tea_valid[i]);
      main_n += NW'(main_valid[i]);
    end
    tea_take  = (tea_n != '0) && (RW'(tea_n) + tea_used <= RW'(TEA_RS));
    tea_slots = tea_take ? tea_n : '0;
    begin
      logic [RW-1:0] lim;
      lim = tea_active ? RW'(RS_TOTAL - TEA_RS) : RW'(RS_TOTAL);
      main_cap = (main_used >= lim) ? '0 : lim - main_used;
    end
    main_take = main_n;
    if (main_take > NW'(WIDTH) - tea_slots) main_take = NW'(WIDTH) - tea_slots;
    if (RW'(main_take) > main_cap) main_take = NW'(main_cap);
    for (int i = 0; i < WIDTH; i++) begin
      issue_valid[i] = 1'b0;
      issue_uops[i]  = '0;
      if (NW'(i) < tea_slots) begin
        issue_valid[i] = 1'b1;
        issue_uops[i]  = tea_uops[i];
      end else if (NW'(i) < tea_slots + main_take) begin
        issue_valid[i] = 1'b1;
        issue_uops[i]  = main_uops[3'(NW'(i) - tea_slots)];
      end
    end
  end

  assign tea_rs_used  = tea_used;
  assign main_rs_used = main_used;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tea_used <= '0; main_used <= '0;
    end else begin
      tea_used  <= tea_used + RW'(tea_slots) - RW'(tea_rs_release);
      main_used <= main_used + RW'(main_take) - RW'(main_rs_release);
    end
  end

  a_tea_release: assert property (@(posedge clk) disable iff (!rst_n) RW'(tea_rs_release) <= tea_used);
  a_main_release: assert property (@(posedge clk) disable iff (!rst_n) RW'(main_rs_release) <= main_used);
endmodule
