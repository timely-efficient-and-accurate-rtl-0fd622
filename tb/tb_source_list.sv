// tb_source_list: walks the loop of a typical H2P example backwards
//   A0: load r1,[r4+r5]   A1: cmp flags <- r1   A2: jne (H2P, reads flags)
// preceded by an unrelated add and a store to the loaded address, and checks
// which micro-ops are marked and what the live-in list holds after each step.
module tb_source_list;
  import tea_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, step, chain_in, mark;
  dec_uop_t uop;
  logic [ADDR_W-1:0] maddr;
  logic [AREG_N-1:0] regs;
  logic [4:0] mem_count;
  int checks = 0, failures = 0;
  localparam int FL = 31;   // flags register number in this test

  source_list #(.MEM_N(16)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic dec_uop_t mk(logic br, logic ld, logic st, logic hd, int d, logic h1, int s1, logic h2, int s2);
    dec_uop_t u;
    u = '0;
    u.is_br = br; u.is_load = ld; u.is_store = st;
    u.has_dst = hd; u.dst = AREG_W'(d);
    u.has_src1 = h1; u.src1 = AREG_W'(s1);
    u.has_src2 = h2; u.src2 = AREG_W'(s2);
    return u;
  endfunction
  // visit one micro-op, check the mark decision, then update
  task automatic visit(input dec_uop_t u, input logic [ADDR_W-1:0] a, input logic ch, input logic exp, input string what);
    @(negedge clk);
    uop = u; maddr = a; chain_in = ch; step = 1; #1;
    check(mark == exp, what);
    @(negedge clk); step = 0;
  endtask

  initial begin
    repeat (200) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    clear = 0; step = 0; chain_in = 0; uop = '0; maddr = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    visit(mk(0,0,0,1,7,1,7,0,0), 0, 0, 0, "unrelated add before any H2P branch not marked");
    visit(mk(1,0,0,0,0,1,FL,0,0), 0, 1, 1, "H2P branch marked");
    check(regs == (AREG_N'(1) << FL), "flags is the only live-in");
    visit(mk(0,0,0,1,FL,1,1,0,0), 0, 0, 1, "cmp writing flags marked");
    check(regs == (AREG_N'(1) << 1), "flags replaced by r1");
    visit(mk(0,0,0,1,2,1,3,0,0), 0, 0, 0, "add r2 <- r3 not marked");
    visit(mk(0,1,0,1,1,1,4,1,5), 40'h8000, 0, 1, "load r1,[r4+r5] marked");
    check(regs == ((AREG_N'(1) << 4) | (AREG_N'(1) << 5)), "r4 and r5 live");
    check(mem_count == 1, "loaded address listed");
    visit(mk(0,0,1,0,0,1,9,1,10), 40'h9000, 0, 0, "store to other address not marked");
    visit(mk(0,0,1,0,0,1,6,1,8), 40'h8004, 0, 1, "store to listed address (same 8 bytes) marked");
    check(mem_count == 0, "stored address removed");
    check(regs[6] && regs[8] && regs[4] && regs[5], "store sources added");
    visit(mk(0,0,0,1,4,1,4,0,0), 0, 1, 1, "TEA-marked uop marked (initiation point)");
    check(regs[4], "r4 stays live (read and written)");
    // fill the 16-entry address buffer past its size
    for (int i = 0; i < 18; i++) visit(mk(0,1,0,1,20,0,0,0,0), 40'h10000 + 40'(i*8), 1, 1, "chain load");
    check(mem_count == 16, "address buffer holds 16");
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    check(regs == '0 && mem_count == 0, "clear empties the list");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
