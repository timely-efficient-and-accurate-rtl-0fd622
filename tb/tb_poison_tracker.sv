// tb_poison_tracker: RAT poisoning. Main-thread groups with mask bits:
// non-chain writes poison, chain writes unpoison, a chain read of a poisoned
// register (also through an earlier slot of the same group) is a violation
// reported with its timestamp; nothing is tracked while inactive; init
// clears all poison bits.
module tb_poison_tracker;
  import tea_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic init, active, violation;
  logic [WIDTH-1:0] m_valid, m_mask;
  dec_uop_t m_uops [WIDTH];
  logic [TS_W-1:0] m_ts [WIDTH], viol_ts;
  logic [AREG_N-1:0] poison_vec;
  int checks = 0, failures = 0;

  poison_tracker dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic slot(int s, int d, int s1, logic mk, int ts);
    m_valid[s] = 1; m_mask[s] = mk; m_ts[s] = TS_W'(ts);
    m_uops[s] = '0;
    m_uops[s].has_dst = (d >= 0); m_uops[s].dst = AREG_W'(d < 0 ? 0 : d);
    m_uops[s].has_src1 = 1; m_uops[s].src1 = AREG_W'(s1);
  endtask
  task automatic none();
    m_valid = 0; m_mask = 0;
    for (int s = 0; s < WIDTH; s++) begin m_uops[s] = '0; m_ts[s] = '0; end
  endtask
  task automatic go(); @(negedge clk); none(); endtask

  initial begin
    repeat (300) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    init = 0; active = 0; none();
    repeat (2) @(negedge clk); rst_n = 1;
    // inactive: nothing tracked
    slot(0, 3, 1, 0, 1); go();
    check(poison_vec == 0, "inactive: no poison");
    @(negedge clk); init = 1; @(negedge clk); init = 0; active = 1;
    slot(0, 3, 1, 0, 2);            // non-chain write r3 -> poison
    slot(1, 4, 2, 1, 2);            // chain write r4 -> clean
    go();
    check(poison_vec[3] && !poison_vec[4] && !violation, "r3 poisoned, no violation");
    slot(0, 5, 4, 1, 3);            // chain reads clean r4
    go();
    check(!violation, "chain read of clean register");
    slot(0, 3, 6, 1, 4);            // chain write r3 -> unpoison
    slot(1, 7, 3, 1, 4);            // chain read r3 -> fine
    go(); @(negedge clk);
    check(!violation && !poison_vec[3], "chain write clears poison");
    slot(0, 8, 1, 0, 5);            // poison r8
    slot(1, 9, 8, 1, 6);            // chain read of r8 in same group -> violation ts 6
    slot(2, 9, 8, 1, 7);
    go();
    check(violation && viol_ts == 6, "violation of oldest chain reader, ts 6");
    @(negedge clk);
    check(!violation, "violation is a pulse");
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    check(poison_vec == 0, "init clears poison");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
