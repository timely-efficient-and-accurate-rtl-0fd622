// tb_store_data_cache: TEA store buffering in 16 half-lines of 32 bytes.
// A byte-level reference memory of the buffered stores is kept here; random
// stores and loads over 24 half-lines check data, byte-valid masks and the
// FIFO eviction of the oldest half-line. clear empties the cache.
module tb_store_data_cache;
  import tea_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, st_valid, ld_hit;
  logic [ADDR_W-1:0] st_addr, ld_addr;
  logic [7:0] st_be, ld_bvalid;
  logic [63:0] st_data, ld_data;
  int checks = 0, failures = 0;

  store_data_cache dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reference: half-lines in FIFO order with byte data and valids
  int          line_q [$];
  logic [7:0]  mem  [int][32];
  logic        mv   [int][32];

  task automatic ref_store(int line, int w, logic [7:0] be, logic [63:0] d);
    int found;
    found = 0;
    foreach (line_q[i]) if (line_q[i] == line) found = 1;
    if (!found) begin
      if (line_q.size() == 16) begin
        mem.delete(line_q[0]); mv.delete(line_q[0]); void'(line_q.pop_front());
      end
      line_q.push_back(line);
      for (int b = 0; b < 32; b++) begin mem[line][b] = 0; mv[line][b] = 0; end
    end
    for (int b = 0; b < 8; b++) if (be[b]) begin mem[line][w*8+b] = d[b*8 +: 8]; mv[line][w*8+b] = 1; end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    clear = 0; st_valid = 0; st_addr = 0; st_be = 0; st_data = 0; ld_addr = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      int line, w;
      line = $urandom_range(0, 23); w = $urandom_range(0, 3);
      @(negedge clk);
      if ($urandom_range(0, 1) == 0) begin
        st_valid = 1; st_addr = ADDR_W'(32'h8000 + line * 32 + w * 8);
        st_be = 8'($urandom_range(1, 255)); st_data = {$urandom, $urandom};
        ref_store(line, w, st_be, st_data);
      end else begin
        logic [7:0] eb; logic [63:0] ed;
        st_valid = 0;
        ld_addr = ADDR_W'(32'h8000 + line * 32 + w * 8); #1;
        eb = 0; ed = 0;
        if (mv.exists(line))
          for (int b = 0; b < 8; b++) if (mv[line][w*8+b]) begin eb[b] = 1; ed[b*8 +: 8] = mem[line][w*8+b]; end
        check(ld_bvalid == eb, $sformatf("byte valids line %0d word %0d", line, w));
        for (int b = 0; b < 8; b++) if (eb[b]) check(ld_data[b*8 +: 8] == ed[b*8 +: 8], "load data byte");
        check(ld_hit == (eb == 8'hFF), "hit flag");
      end
    end
    @(negedge clk); st_valid = 0; clear = 1; @(negedge clk); clear = 0;
    ld_addr = ADDR_W'(32'h8000 + line_q[0] * 32); #1;
    check(ld_bvalid == 0, "clear empties the cache");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
