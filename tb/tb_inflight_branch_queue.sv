// tb_inflight_branch_queue: matching TEA and main branch results by
// timestamp. Scenarios: a correct prediction (no flush); a TEA result that
// corrects a misprediction (early flush, then the main branch resolves as
// covered without a flush, younger entries removed); a wrong TEA result
// (early flush, then a corrective flush and tea_wrong); a late TEA result; a
// blocked TEA flush; an ordinary misprediction with no TEA result.
module tb_inflight_branch_queue;
  import tea_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic alloc_valid, alloc_dir, tea_valid, tea_dir, main_valid, main_dir;
  logic [TS_W-1:0] alloc_ts, tea_ts, main_ts, block_ts, flush_ts;
  logic [PC_W-1:0] alloc_tgt, tea_tgt, main_tgt, flush_tgt;
  logic block_all, block_valid, flush_valid, flush_dir, flush_early, tea_wrong, tea_late, covered, tea_blocked;
  int checks = 0, failures = 0;

  inflight_branch_queue #(.ENTRIES(16)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic alloc(int ts, logic dir);
    @(negedge clk); alloc_valid = 1; alloc_ts = TS_W'(ts); alloc_dir = dir; alloc_tgt = 40'h500;
    @(negedge clk); alloc_valid = 0;
  endtask
  task automatic tea(int ts, logic dir);
    @(negedge clk); tea_valid = 1; tea_ts = TS_W'(ts); tea_dir = dir; tea_tgt = 40'h500; #1;
  endtask
  task automatic main(int ts, logic dir);
    @(negedge clk); main_valid = 1; main_ts = TS_W'(ts); main_dir = dir; main_tgt = 40'h500; #1;
  endtask
  task automatic done(); @(negedge clk); tea_valid = 0; main_valid = 0; endtask

  initial begin
    repeat (300) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    alloc_valid = 0; alloc_ts = 0; alloc_dir = 0; alloc_tgt = 0;
    tea_valid = 0; tea_ts = 0; tea_dir = 0; tea_tgt = 0;
    main_valid = 0; main_ts = 0; main_dir = 0; main_tgt = 0;
    block_all = 0; block_valid = 0; block_ts = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 1; t <= 6; t++) alloc(t, 0);     // all predicted not-taken
    // 1: correct prediction, TEA agrees
    tea(1, 0); check(!flush_valid, "TEA agrees with prediction: no flush"); done();
    main(1, 0); check(!flush_valid && !covered, "main correct: no flush"); done();
    // 2: mispredicted, TEA finds it first
    tea(2, 1); check(flush_valid && flush_early && flush_ts == 2 && flush_dir, "early flush at ts 2"); done();
    check(!dut.q[3].valid && !dut.q[6].valid, "younger branches removed by the flush");
    main(2, 1); check(!flush_valid && covered && !tea_wrong, "main resolves covered, no second flush"); done();
    // new path
    alloc(3, 0); alloc(4, 0); alloc(5, 1);
    // 3: TEA wrong
    tea(3, 1); check(flush_valid && flush_early, "TEA flush at ts 3"); done();
    main(3, 0); check(flush_valid && !flush_early && tea_wrong && !flush_dir, "corrective flush, tea_wrong"); done();
    alloc(4, 0); alloc(5, 1);
    // 4: main resolves first, TEA late
    main(4, 0); check(!flush_valid, "main correct"); done();
    tea(4, 0); check(tea_late && !flush_valid, "late TEA result"); done();
    // 5: blocked TEA flush
    block_valid = 1; block_ts = 4;
    tea(5, 0); check(!flush_valid && tea_blocked, "TEA flush blocked (younger than ts 4)"); done();
    main(5, 0); check(flush_valid && !flush_early && !tea_wrong, "TEA result was right but blocked: flushed at main"); done();
    block_valid = 0;
    alloc(6, 0);
    main(6, 1); check(flush_valid && flush_dir && flush_ts == 6, "ordinary misprediction flush"); done();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
