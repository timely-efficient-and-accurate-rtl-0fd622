// tb_tea_fetch: the TEA fetch stage against a behavioural Block Cache
// holding the segments of a loop (A: three chain uops ending in the H2P
// branch, B: empty segment, C: one chain uop Cx at position 1) plus a fetch
// block made of two sequential segments (E0, E1). Fetch addresses
// A, C, A, B, E, D (D misses). Checks the micro-ops and PCs delivered per
// cycle (A's segment in one cycle, C's in the next), thread start on the
// first hit, the bit-mask pushes, a back-pressure stall, the miss that ends
// the thread, and dropping while draining.
module tb_tea_fetch;
  import tea_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic fq_valid, fq_pop, lk_hit, lk_zhit, active, drop, flush, start, miss, mq_push, mq_full, out_ready;
  fetch_addr_t fq_addr;
  logic [PC_W-1:0] lk_pc;
  logic [LEN_W-1:0] lk_len;
  logic [MASK_W-1:0] lk_mask;
  logic [3:0] lk_cnt;
  bc_uop_t lk_uops [SEG_UOPS];
  logic [PC_W+LEN_W+MASK_W-1:0] mq_data;
  logic [WIDTH-1:0] out_valid;
  tea_uop_t out_uops [WIDTH];
  int checks = 0, failures = 0;

  tea_fetch dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // behavioural block cache: opc = position + 16*segment id
  always_comb begin
    lk_hit = 0; lk_zhit = 0; lk_len = 0; lk_mask = 0; lk_cnt = 0;
    for (int i = 0; i < SEG_UOPS; i++) lk_uops[i] = '0;
    case (lk_pc)
      40'h100: begin lk_hit = 1; lk_len = 3; lk_mask = 32'b111; lk_cnt = 3;
                 for (int i = 0; i < 3; i++) begin lk_uops[i].pos = 5'(i); lk_uops[i].u.opc = 6'(16 + i); end
                 lk_uops[2].u.is_br = 1; end
      40'h180: begin lk_zhit = 1; lk_len = 2; end
      40'h200: begin lk_hit = 1; lk_len = 4; lk_mask = 32'b0010; lk_cnt = 1;
                 lk_uops[0].pos = 1; lk_uops[0].u.opc = 6'(32 + 1); end
      40'h400: begin lk_hit = 1; lk_len = 4; lk_mask = 32'b0001; lk_cnt = 1; lk_uops[0].u.opc = 48; end
      40'h410: begin lk_hit = 1; lk_len = 4; lk_mask = 32'b1000; lk_cnt = 1;
                 lk_uops[0].pos = 3; lk_uops[0].u.opc = 6'(52 + 3); end
      default: ;
    endcase
  end

  fetch_addr_t q [$];
  assign fq_valid = q.size() > 0;
  assign fq_addr  = (q.size() > 0) ? q[0] : '0;
  always @(posedge clk) if (rst_n && fq_pop) void'(q.pop_front());
  // controller model
  always @(posedge clk) if (rst_n) begin
    if (start) active <= 1;
    if (miss) begin active <= 0; drop <= 1; end
  end

  int ncyc;
  logic [PC_W-1:0] got_pc [$];
  logic [5:0] got_opc [$];
  logic [TS_W-1:0] got_ts [$];
  int grp_size [$];
  int n_mq, n_start, n_miss;
  always @(posedge clk) if (rst_n) begin
    int n;
    n = 0;
    if (out_ready)
      for (int i = 0; i < WIDTH; i++)
        if (out_valid[i]) begin
          got_pc.push_back(out_uops[i].pc); got_opc.push_back(out_uops[i].u.opc);
          got_ts.push_back(out_uops[i].ts); n++;
        end
    if (n > 0) grp_size.push_back(n);
    if (mq_push) n_mq++;
    if (start) n_start++;
    if (miss) n_miss++;
  end

  initial begin
    repeat (300) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    active = 0; drop = 0; flush = 0; mq_full = 0; out_ready = 1;
    n_mq = 0; n_start = 0; n_miss = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    q.push_back('{start: 40'h100, stop: 40'h10C, ts: 1});
    q.push_back('{start: 40'h200, stop: 40'h210, ts: 2});
    q.push_back('{start: 40'h100, stop: 40'h10C, ts: 3});
    q.push_back('{start: 40'h180, stop: 40'h188, ts: 4});
    q.push_back('{start: 40'h400, stop: 40'h420, ts: 5});
    q.push_back('{start: 40'h300, stop: 40'h340, ts: 6});
    q.push_back('{start: 40'h100, stop: 40'h10C, ts: 7});
    // stall the output for two cycles in the middle
    repeat (3) @(negedge clk);
    out_ready = 0; repeat (2) @(negedge clk); out_ready = 1;
    repeat (12) @(negedge clk);
    check(n_start == 1, "thread started once");
    check(n_miss == 1, "one miss ends the thread");
    check(q.size() == 0, "all fetch addresses consumed (last one dropped while draining)");
    check(n_mq == 5, $sformatf("5 mask pushes, got %0d", n_mq));
    check(got_opc.size() == 9, $sformatf("9 TEA uops, got %0d", got_opc.size()));
    check(grp_size.size() == 5 && grp_size[0] == 3 && grp_size[1] == 1, "A delivered in one cycle, Cx alone in the next");
    if (got_opc.size() == 9) begin
      check(got_pc[0] == 40'h100 && got_pc[1] == 40'h104 && got_pc[2] == 40'h108, "A PCs");
      check(got_ts[0] == 1 && got_ts[3] == 2 && got_ts[4] == 3, "timestamps of fetch blocks");
      check(got_pc[3] == 40'h204 && got_opc[3] == 33, "Cx at PC 0x204");
      check(got_pc[7] == 40'h400 && got_pc[8] == 40'h41C, "two segments of one fetch block");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
