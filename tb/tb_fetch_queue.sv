// tb_fetch_queue: 8-entry fetch queue. Checks FIFO order, full, a partial
// flush that keeps the entries older than the flushing branch (also across a
// timestamp wrap-around), a flush with a pop in the same cycle, and a flush
// that removes everything.
module tb_fetch_queue;
  import tea_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push, pop, empty, full, flush_valid, flush_all, partial_flush;
  fetch_addr_t wdata, rdata;
  logic [3:0] count;
  logic [TS_W-1:0] flush_ts;
  int checks = 0, failures = 0;

  fetch_queue #(.DEPTH(8)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic put(input int ts);
    @(negedge clk); push = 1; wdata = '{start: PC_W'(ts * 64), stop: PC_W'(ts * 64 + 32), ts: TS_W'(ts)};
    @(negedge clk); push = 0;
  endtask
  task automatic take(input int ts);
    @(negedge clk);
    check(!empty && rdata.ts == TS_W'(ts) && rdata.start == PC_W'(ts * 64), $sformatf("head ts %0d (got %0d)", ts, rdata.ts));
    pop = 1; @(negedge clk); pop = 0;
  endtask
  task automatic flush(input int ts, input logic with_pop);
    @(negedge clk); flush_valid = 1; flush_ts = TS_W'(ts); pop = with_pop; #1;
    @(negedge clk); flush_valid = 0; pop = 0;
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    push = 0; pop = 0; flush_valid = 0; flush_all = 0; flush_ts = 0; wdata = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 1; t <= 8; t++) put(t);
    check(full && count == 8, "full after 8 pushes");
    take(1); take(2);
    // flush at branch 5: keep 3,4,5, drop 6,7,8
    @(negedge clk); flush_valid = 1; flush_ts = 5; #1;
    check(partial_flush, "partial flush reported");
    @(negedge clk); flush_valid = 0;
    check(count == 3, $sformatf("3 entries kept, got %0d", count));
    put(6); put(7);
    take(3); take(4); take(5); take(6); take(7);
    check(empty, "empty after draining");
    // wrap-around of timestamps: 1022, 1023, 0, 1, 2
    put(1022); put(1023); put(0); put(1); put(2);
    flush(1023, 1);         // pop of 1022 in the same cycle
    check(count == 1, $sformatf("wrap flush keeps 1023 only, got %0d", count));
    take(1023);
    put(3); put(4);
    flush(2, 0);            // all entries younger
    check(empty, "flush older than every entry empties the queue");
    put(5); put(6);
    @(negedge clk); flush_all = 1; @(negedge clk); flush_all = 0;
    check(empty, "flush_all empties");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
