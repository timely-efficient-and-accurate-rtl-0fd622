// tb_shadow_rat: shadow RAT with a 4-register TEA partition (PRs 300..303).
// Checks the copy of the main RAT at thread start, renaming with bypass
// inside a group, allocation from the partition, the reference-table events,
// the all-or-nothing stall when registers run out, their return through
// free_vec, and recovery from a branch checkpoint and from the main RAT.
module tb_shadow_rat;
  import tea_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic load, restore, restore_hit, in_ready, out_ready, ev_fire;
  logic [TS_W-1:0] restore_ts;
  logic [PREG_W-1:0] load_map [AREG_N];
  logic [WIDTH-1:0] in_valid, out_valid, ev_src1_v, ev_src2_v, ev_prev_v, ev_new_v;
  tea_uop_t in_uops [WIDTH];
  ren_uop_t out_uops [WIDTH];
  logic [PREG_W-1:0] ev_src1 [WIDTH], ev_src2 [WIDTH], ev_prev [WIDTH], ev_new [WIDTH];
  logic [PREG_N-1:0] free_vec;
  logic [2:0] free_count;
  int checks = 0, failures = 0;

  shadow_rat #(.TEA_PR_BASE(300), .TEA_PRS(4), .NCKPT(2)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic tea_uop_t op(int d, int s1, int s2, logic br, int ts);
    tea_uop_t t;
    t = '0;
    t.ts = TS_W'(ts);
    t.u.is_br = br;
    t.u.has_dst = (d >= 0); t.u.dst = AREG_W'(d < 0 ? 0 : d);
    t.u.has_src1 = (s1 >= 0); t.u.src1 = AREG_W'(s1 < 0 ? 0 : s1);
    t.u.has_src2 = (s2 >= 0); t.u.src2 = AREG_W'(s2 < 0 ? 0 : s2);
    return t;
  endfunction
  task automatic clear_in();
    in_valid = '0;
    for (int i = 0; i < WIDTH; i++) in_uops[i] = '0;
  endtask

  initial begin
    repeat (300) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    load = 0; restore = 0; restore_ts = 0; out_ready = 1; free_vec = '0; clear_in();
    for (int a = 0; a < AREG_N; a++) load_map[a] = PREG_W'(100 + a);
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); load = 1; @(negedge clk); load = 0;
    check(dut.map[5] == 105 && free_count == 4, "main RAT copied, partition free");
    // group: r1 = r2 + r3 ; r4 = r1 + r1 ; branch on r4 (ts 7)
    in_valid = 3'b111;
    in_uops[0] = op(1, 2, 3, 0, 7); in_uops[1] = op(4, 1, 1, 0, 7); in_uops[2] = op(-1, 4, -1, 1, 7);
    #1;
    check(in_ready && ev_fire, "group accepted");
    check(ev_prev_v[0] && ev_prev[0] == 101 && ev_new[0] == 300, "slot0 unmaps 101, gets 300");
    check(ev_src1[1] == 300 && ev_src2[1] == 300, "bypass of r1 inside the group");
    check(ev_prev[1] == 104 && ev_new[1] == 301, "slot1 unmaps 104, gets 301");
    check(ev_src1[2] == 301 && !ev_prev_v[2] && !ev_new_v[2], "branch reads r4 = 301, no destination");
    @(negedge clk); clear_in();
    check(out_valid == 3'b111 && out_uops[1].pdst == 301 && out_uops[0].psrc1 == 102 && out_uops[2].tea, "renamed group out");
    check(free_count == 2, "two registers left");
    // group needing 3 registers must stall
    in_valid = 3'b111;
    in_uops[0] = op(5, 1, -1, 0, 8); in_uops[1] = op(6, 1, -1, 0, 8); in_uops[2] = op(7, 1, -1, 0, 8);
    #1; check(!in_ready, "stall: 3 needed, 2 free");
    @(negedge clk);
    free_vec[300] = 1;                  // reference table frees 300
    @(negedge clk); free_vec = '0; #1;
    check(free_count == 3 && in_ready, "freed register returned, group accepted");
    @(negedge clk); clear_in();
    check(dut.map[5] == 300 || dut.map[5] == 302, "r5 renamed into the partition");
    check(dut.map[1] == 300, "r1 still mapped by the first group");
    // restore to the checkpoint of branch ts 7: r5..r7 back to main mappings
    @(negedge clk); restore = 1; restore_ts = 7; #1;
    check(restore_hit, "checkpoint of ts 7 found");
    @(negedge clk); restore = 0;
    check(dut.map[5] == 105 && dut.map[4] == 301 && dut.map[1] == 300, "state after branch ts 7 restored");
    // restore with no checkpoint: main RAT reloaded
    for (int a = 0; a < AREG_N; a++) load_map[a] = PREG_W'(150 + a);
    @(negedge clk); restore = 1; restore_ts = 99; #1;
    check(!restore_hit, "no checkpoint for ts 99");
    @(negedge clk); restore = 0;
    check(dut.map[4] == 154, "recovered main RAT copied");
    // renamed group younger than the flushing branch is discarded, and so is
    // the checkpoint it made; an older group survives the flush
    out_ready = 0;
    in_valid = 3'b001; in_uops[0] = op(-1, 4, -1, 1, 12);
    @(negedge clk); clear_in();
    check(out_valid == 3'b001 && out_uops[0].ts == 12, "branch ts 12 renamed and held");
    restore = 1; restore_ts = 10;
    @(negedge clk); restore = 0;
    check(out_valid == '0, "group younger than the flush discarded");
    restore = 1; restore_ts = 12; #1;
    check(!restore_hit, "checkpoint of the flushed branch ts 12 discarded");
    @(negedge clk); restore = 0;
    in_valid = 3'b001; in_uops[0] = op(-1, 4, -1, 1, 13);
    @(negedge clk); clear_in();
    restore = 1; restore_ts = 14;
    @(negedge clk); restore = 0;
    check(out_valid == 3'b001 && out_uops[0].ts == 13, "group older than the flush kept");
    out_ready = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
