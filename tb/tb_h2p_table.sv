// tb_h2p_table: self-checking test of the H2P table.
// Small table (16 entries, 4 ways, decay every 20 retired instructions).
// Checks: first mispredict allocates with count 1 (not H2P), second makes the
// branch H2P, the counter saturates at 7, the periodic decay removes H2P
// status, and a full set replaces its lowest-count way.
module tb_h2p_table;
  import tea_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [PC_W-1:0] lookup_pc, mispred_pc;
  logic lookup_h2p, mispred_valid, decay_pulse;
  logic [4:0] retire_cnt;
  int checks = 0, failures = 0;

  h2p_table #(.ENTRIES(16), .WAYS(4), .DECAY_PERIOD(20)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic mispredict(input logic [PC_W-1:0] pc);
    @(negedge clk); mispred_valid = 1; mispred_pc = pc;
    @(negedge clk); mispred_valid = 0;
  endtask
  task automatic chk(input logic [PC_W-1:0] pc, input logic exp, input string what);
    lookup_pc = pc; #1;
    check(lookup_h2p == exp, what);
  endtask

  // set index = pc[1:0] (4 sets)
  localparam logic [PC_W-1:0] A = 40'h1000, B = 40'h2000, C = 40'h3000, D = 40'h4000, E = 40'h5000, F = 40'h1001;

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    mispred_valid = 0; mispred_pc = 0; retire_cnt = 0; lookup_pc = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    chk(A, 0, "empty table: not H2P");
    mispredict(A);
    chk(A, 0, "one mispredict: counter 1, not H2P");
    mispredict(A);
    chk(A, 1, "two mispredicts: H2P");
    chk(F, 0, "other set: not H2P");
    for (int i = 0; i < 10; i++) mispredict(A);
    check(dut.ctr[0][0] == 3'd7, "counter saturates at 7");
    // decay: 20 instructions -> one decrement per period
    @(negedge clk); retire_cnt = 5;
    repeat (4) @(negedge clk);
    retire_cnt = 0;
    check(dut.ctr[0][0] == 3'd6, "one decay after 20 retired");
    @(negedge clk); retire_cnt = 10;
    repeat (10) @(negedge clk);   // 100 more -> 5 decays
    retire_cnt = 0;
    @(negedge clk);
    check(dut.ctr[0][0] == 3'd1, "five more decays -> 1");
    chk(A, 0, "decayed branch no longer H2P");
    // fill set 0 with B, C, D (count 1), raise B, C, D to 2, A stays 1
    mispredict(B); mispredict(C); mispredict(D);
    mispredict(B); mispredict(C); mispredict(D);
    chk(B, 1, "B H2P"); chk(C, 1, "C H2P"); chk(D, 1, "D H2P");
    mispredict(E);   // set full: replaces A (lowest count)
    chk(A, 0, "E replaced A"); chk(B, 1, "B kept"); chk(C, 1, "C kept"); chk(D, 1, "D kept");
    mispredict(E);
    chk(E, 1, "E H2P after second mispredict");
    mispredict(A);
    chk(A, 0, "A re-allocated with counter 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
