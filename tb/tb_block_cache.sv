// tb_block_cache: small Block Cache (16 entries, 4 ways, 8 zero tags in 2
// ways, mask reset every 100 retired instructions). Checks hits and misses,
// merging two versions of a segment by OR-ing masks (paths A-B-D and A-C-D
// of a branch that needs the first or the second micro-op), zero tags,
// promotion of a zero tag to a data entry, way replacement and mask reset.
module tb_block_cache;
  import tea_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [PC_W-1:0] lk_pc, wr_tag;
  logic lk_hit, lk_zhit, wr_valid, mask_reset;
  logic [LEN_W-1:0] lk_len, wr_len;
  logic [MASK_W-1:0] lk_mask, wr_mask;
  logic [3:0] lk_cnt, wr_cnt;
  bc_uop_t lk_uops [SEG_UOPS], wr_uops [SEG_UOPS];
  logic [4:0] retire_cnt;
  int checks = 0, failures = 0;

  block_cache #(.ENTRIES(16), .WAYS(4), .ZERO_ENTRIES(8), .ZERO_WAYS(2), .RESET_PERIOD(100)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask
  // write a segment whose chain uops have opc = 10 + position
  task automatic wr(input logic [PC_W-1:0] tag, input int len, input logic [MASK_W-1:0] m);
    int k;
    @(negedge clk);
    wr_valid = 1; wr_tag = tag; wr_len = LEN_W'(len); wr_mask = m;
    k = 0;
    for (int i = 0; i < SEG_UOPS; i++) wr_uops[i] = '0;
    for (int p = 0; p < MASK_W; p++)
      if (m[p] && k < SEG_UOPS) begin
        wr_uops[k].pos = 5'(p); wr_uops[k].u.opc = 6'(10 + p); k++;
      end
    wr_cnt = 4'(k);
    @(negedge clk); wr_valid = 0;
  endtask
  task automatic look(input logic [PC_W-1:0] pc);
    lk_pc = pc; #1;
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    wr_valid = 0; wr_tag = 0; wr_len = 0; wr_mask = 0; wr_cnt = 0; lk_pc = 0; retire_cnt = 0;
    for (int i = 0; i < SEG_UOPS; i++) wr_uops[i] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    look(40'h1000); check(!lk_hit && !lk_zhit, "empty cache misses");
    wr(40'h1000, 4, 32'b1000);        // path A-B-D: 4th position (bit 3)
    look(40'h1000);
    check(lk_hit && lk_len == 4 && lk_cnt == 1 && lk_mask == 32'b1000, "first version stored");
    check(lk_uops[0].pos == 3 && lk_uops[0].u.opc == 13, "first version uop");
    wr(40'h1000, 4, 32'b0100);        // path A-C-D: bit 2
    look(40'h1000);
    check(lk_hit && lk_cnt == 2 && lk_mask == 32'b1100, "masks OR-ed");
    check(lk_uops[0].pos == 2 && lk_uops[0].u.opc == 12 && lk_uops[1].pos == 3 && lk_uops[1].u.opc == 13,
          "union of uops in position order");
    wr(40'h1000, 4, 32'b1000);        // same version again: no change
    look(40'h1000); check(lk_cnt == 2 && lk_mask == 32'b1100, "repeat write keeps union");
    wr(40'h1000, 4, 32'h0);           // empty version of a stored segment: no change
    look(40'h1000); check(lk_hit && !lk_zhit && lk_cnt == 2, "empty version does not remove entry");
    // zero tag
    wr(40'h2000, 6, 32'h0);
    look(40'h2000); check(!lk_hit && lk_zhit && lk_len == 6, "zero tag hit with length");
    look(40'h2004); check(!lk_hit && !lk_zhit, "mid-segment PC misses");
    // promote zero tag
    wr(40'h2000, 6, 32'b1);
    look(40'h2000); check(lk_hit && !lk_zhit && lk_cnt == 1, "zero tag promoted to data entry");
    check(dut.zt[0][0].valid == 0 && dut.zt[0][1].valid == 0, "zero tag removed");
    // overflow of chain uops: 6 + 4 positions -> only 8 kept
    wr(40'h3000, 12, 32'h03F);
    wr(40'h3000, 12, 32'hF00);
    look(40'h3000); check(lk_cnt == 8 && lk_mask == 32'h33F, "union limited to 8 chain uops");
    // replacement: set 0 (line bits [7:6]=0) has 4 ways: 0x1000,0x2000,0x3000 used
    wr(40'h4000, 2, 32'b1);
    wr(40'h5000, 2, 32'b1);      // evicts one way (round robin, way 0 = 0x1000)
    look(40'h5000); check(lk_hit, "new segment stored after eviction");
    look(40'h1000); check(!lk_hit, "round-robin victim evicted");
    look(40'h4000); check(lk_hit, "other ways kept");
    // mask reset after 100 retired instructions
    @(negedge clk); retire_cnt = 10;
    repeat (10) @(negedge clk);
    retire_cnt = 0;
    look(40'h4000); check(lk_hit && lk_mask == 0 && lk_cnt == 0, "masks cleared by periodic reset");
    look(40'h3000); check(lk_hit && lk_mask == 0, "all masks cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
