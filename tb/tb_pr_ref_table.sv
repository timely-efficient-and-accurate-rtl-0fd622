// tb_pr_ref_table: register freeing without a ROB. Checks that a register
// still to be read is not freed when unmapped, is freed by its last read,
// that an unmapped register with no readers is freed at once, that several
// reads in one cycle count, that a register allocated and overwritten in the
// same group ends unmapped, and that init restores Valid=1, count 0.
module tb_pr_ref_table;
  import tea_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic init, ren_fire;
  logic [WIDTH-1:0] src1_v, src2_v, prev_v, new_v;
  logic [PREG_W-1:0] src1 [WIDTH], src2 [WIDTH], prev [WIDTH], newr [WIDTH];
  logic [7:0] rd_v;
  logic [PREG_W-1:0] rd [8];
  logic [PREG_N-1:0] free_vec, valid_vec;
  int checks = 0, failures = 0;
  int nfree [PREG_N];

  pr_ref_table dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask
  always @(posedge clk) if (rst_n) for (int p = 0; p < PREG_N; p++) if (free_vec[p]) nfree[p]++;
  task automatic idle();
    ren_fire = 0; src1_v = 0; src2_v = 0; prev_v = 0; new_v = 0; rd_v = 0;
    for (int i = 0; i < WIDTH; i++) begin src1[i] = 0; src2[i] = 0; prev[i] = 0; newr[i] = 0; end
    for (int i = 0; i < 8; i++) rd[i] = 0;
  endtask
  task automatic step(); @(negedge clk); idle(); @(negedge clk); endtask

  initial begin
    repeat (300) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int p = 0; p < PREG_N; p++) nfree[p] = 0;
    init = 0; idle();
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    // two readers of P10 (slot 0 src1, slot 1 src1 and src2 -> 3 refs), P20 new for r?
    ren_fire = 1;
    src1_v[0] = 1; src1[0] = 10;
    src1_v[1] = 1; src1[1] = 10; src2_v[1] = 1; src2[1] = 10;
    new_v[0] = 1; newr[0] = 220; prev_v[0] = 1; prev[0] = 30;   // P30 unmapped, no readers
    step();
    check(dut.cnt[10] == 3 && dut.v[10], "P10 has 3 references");
    check(nfree[30] == 1, "P30 freed at once (unmapped, no readers)");
    // unmap P10 while readers remain
    ren_fire = 1; prev_v[2] = 1; prev[2] = 10; new_v[2] = 1; newr[2] = 221;
    step();
    check(nfree[10] == 0 && !dut.v[10], "P10 unmapped but not freed");
    rd_v = 8'b011; rd[0] = 10; rd[1] = 10;       // two reads in one cycle
    step();
    check(dut.cnt[10] == 1 && nfree[10] == 0, "one reference left");
    rd_v = 8'b1; rd[0] = 10;
    step();
    check(nfree[10] == 1, "last read frees P10");
    // allocated and overwritten in the same group
    ren_fire = 1; new_v[0] = 1; newr[0] = 230; prev_v[1] = 1; prev[1] = 230; new_v[1] = 1; newr[1] = 231;
    step();
    check(!dut.v[230] && nfree[230] == 1 && dut.v[231], "P230 overwritten in its own group is freed");
    check(nfree[220] == 0 && nfree[221] == 0, "mapped registers stay");
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    check(dut.v[10] && dut.cnt[10] == 0 && valid_vec[230], "init: Valid=1, count 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
