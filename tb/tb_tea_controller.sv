// tb_tea_controller: thread life cycle. Start on a hit (init pulse), end on a
// miss, on a wrong precomputation (block_all), on a poison violation
// (block_ts), and after the fifth late result; each ends in DRAIN until
// drained, then IDLE. Counters of the causes are checked.
module tb_tea_controller;
  import tea_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, miss, tea_wrong, violation, late, drained;
  logic [TS_W-1:0] viol_ts, block_ts;
  logic idle, active, drop, init, block_all, block_valid;
  logic [15:0] n_start, n_miss, n_wrong, n_poison, n_late_end;
  int checks = 0, failures = 0;

  tea_controller dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask
  task automatic begin_thread();
    @(negedge clk); start = 1; #1; check(init && idle, "init pulse in start cycle");
    @(negedge clk); start = 0;
    check(active && !block_all && !block_valid, "active after start");
  endtask
  task automatic finish_drain();
    check(drop && !active, "draining");
    @(negedge clk); drained = 1; @(negedge clk); drained = 0;
    check(idle, "idle after drain");
  endtask

  initial begin
    repeat (300) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    start = 0; miss = 0; tea_wrong = 0; violation = 0; late = 0; drained = 0; viol_ts = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); check(idle, "idle after reset");
    begin_thread(); pulse(miss); finish_drain();
    begin_thread(); pulse(tea_wrong); check(block_all, "wrong result blocks all TEA flushes"); finish_drain();
    begin_thread(); viol_ts = 33; pulse(violation); check(block_valid && block_ts == 33, "poison blocks younger"); finish_drain();
    begin_thread(); check(!block_all && !block_valid, "blocking cleared by new thread");
    repeat (4) pulse(late); check(active, "4 late results tolerated");
    pulse(late); finish_drain();
    check(n_start == 4 && n_miss == 1 && n_wrong == 1 && n_poison == 1 && n_late_end == 1, "cause counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
