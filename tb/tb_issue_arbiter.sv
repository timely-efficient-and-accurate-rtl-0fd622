// tb_issue_arbiter: 8-wide issue with a small station budget (16 entries,
// 6 for the TEA thread). Checks that TEA micro-ops take the first slots and
// the main thread the rest, that the main thread may use every station while
// no thread runs but only its share while one does, that a TEA group that
// does not fit in its partition waits whole, and release accounting.
module tb_issue_arbiter;
  import tea_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic tea_active, tea_take;
  logic [WIDTH-1:0] tea_valid, main_valid, issue_valid;
  ren_uop_t tea_uops [WIDTH], main_uops [WIDTH], issue_uops [WIDTH];
  logic [3:0] tea_rs_release, main_rs_release, main_take;
  logic [4:0] tea_rs_used, main_rs_used;
  int checks = 0, failures = 0;

  issue_arbiter #(.RS_TOTAL(16), .TEA_RS(6)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (300) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < WIDTH; i++) begin
      tea_uops[i] = '0; tea_uops[i].tea = 1; tea_uops[i].pc = PC_W'(100 + i);
      main_uops[i] = '0; main_uops[i].pc = PC_W'(200 + i);
    end
    tea_active = 0; tea_valid = 0; main_valid = 0; tea_rs_release = 0; main_rs_release = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    // no thread: main may fill 8 + 8 = 16 stations
    @(negedge clk); main_valid = 8'hFF; #1;
    check(main_take == 8 && issue_valid == 8'hFF && issue_uops[7].pc == 207, "main alone takes 8");
    @(negedge clk); #1;
    check(main_take == 8, "main fills all 16 stations");
    @(negedge clk); #1;
    check(main_take == 0, "stations full");
    main_rs_release = 8; @(negedge clk); main_rs_release = 0; main_valid = 0;
    check(main_rs_used == 8, "release of 8");
    // thread active: main share 10, 8 used -> 2 more
    tea_active = 1; tea_valid = 8'b111; main_valid = 8'hFF; #1;
    check(tea_take && main_take == 2, "TEA 3 first, main limited to its share");
    check(issue_uops[0].tea && issue_uops[2].pc == 102 && !issue_uops[3].tea && issue_uops[3].pc == 200 &&
          issue_valid == 8'b11111, "slot order: TEA then main");
    @(negedge clk); #1;
    check(tea_take && main_take == 0, "second TEA group of 3 fits (6)");
    @(negedge clk); #1;
    check(!tea_take && issue_valid == 0, "TEA partition full: group waits whole");
    tea_rs_release = 2; @(negedge clk); tea_rs_release = 0; #1;
    check(!tea_take, "4 used + 3 > 6: still waits");
    tea_rs_release = 1; @(negedge clk); tea_rs_release = 0; #1;
    check(tea_take, "3 used + 3 fits");
    @(negedge clk); tea_valid = 0; main_valid = 0;
    check(tea_rs_used == 6, "TEA occupancy counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
