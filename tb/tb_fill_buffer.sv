// tb_fill_buffer: fills a 32-entry Fill Buffer with random micro-ops (few
// registers and addresses, so chains form), then checks that
//   * the walk lasts one cycle per entry and drops micro-ops retired meanwhile,
//   * the drain streams every entry oldest first with the chain bits of a
//     reference backward walk computed here,
//   * filling restarts afterwards. Three rounds are run.
module tb_fill_buffer;
  import tea_pkg::*;
  localparam int N = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ret_valid, ret_ready, out_valid, out_chain, out_last, walk_done, walking;
  ret_uop_t ret_uop;
  logic [PC_W-1:0] out_pc;
  dec_uop_t out_uop;
  int checks = 0, failures = 0;

  fill_buffer #(.ENTRIES(N), .MEM_N(4)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  ret_uop_t sent [N];
  logic exp_chain [N];

  // reference walk (youngest to oldest) with a 4-entry FIFO address list
  task automatic ref_walk();
    logic [AREG_N-1:0] live;
    logic [ADDR_W-4:0] ma [4];
    logic mv [4];
    int mp;
    live = '0; mp = 0;
    for (int k = 0; k < 4; k++) begin mv[k] = 0; ma[k] = '0; end
    for (int i = N-1; i >= 0; i--) begin
      ret_uop_t r;
      logic m, hit;
      int hi;
      r = sent[i];
      hit = 0; hi = 0;
      for (int k = 0; k < 4; k++) if (mv[k] && ma[k] == r.maddr[ADDR_W-1:3]) begin hit = 1; hi = k; end
      m = (r.u.is_br && r.h2p) || r.tea || (r.u.has_dst && live[r.u.dst]) || (r.u.is_store && hit);
      exp_chain[i] = m;
      if (m) begin
        if (r.u.has_dst && !r.u.is_br) live[r.u.dst] = 0;
        if (r.u.has_src1) live[r.u.src1] = 1;
        if (r.u.has_src2) live[r.u.src2] = 1;
        if (r.u.is_store && hit) mv[hi] = 0;
        if (r.u.is_load && !hit) begin mv[mp] = 1; ma[mp] = r.maddr[ADDR_W-1:3]; mp = (mp + 1) % 4; end
      end
    end
  endtask

  function automatic ret_uop_t rnd(int i, int round);
    ret_uop_t r;
    int kind;
    r = '0;
    r.pc = PC_W'(32'h4000 + (round * N + i) * 4);
    kind = $urandom_range(0, 9);
    r.u.opc = 6'(kind);
    r.u.dst = AREG_W'($urandom_range(0, 5));
    r.u.src1 = AREG_W'($urandom_range(0, 5));
    r.u.src2 = AREG_W'($urandom_range(0, 5));
    r.u.has_src1 = 1;
    r.u.has_src2 = ($urandom_range(0, 1) == 1);
    r.maddr = ADDR_W'(32'h100 + 8 * $urandom_range(0, 5));
    case (kind)
      0, 1: begin r.u.is_br = 1; r.h2p = ($urandom_range(0, 2) == 0); end
      2, 3: begin r.u.is_load = 1; r.u.has_dst = 1; end
      4:    begin r.u.is_store = 1; end
      default: r.u.has_dst = 1;
    endcase
    r.tea = ($urandom_range(0, 15) == 0);
    return r;
  endfunction

  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int walk_cycles, nout;
    ret_valid = 0; ret_uop = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int round = 0; round < 3; round++) begin
      check(ret_ready, "ready to fill");
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        sent[i] = rnd(i, round);
        ret_valid = 1; ret_uop = sent[i];
      end
      @(negedge clk);
      // keep offering micro-ops during the walk: they must be dropped
      ret_uop = rnd(0, 99);
      ref_walk();
      walk_cycles = 0;
      while (!out_valid) begin
        if (walking) walk_cycles++;
        check(!ret_ready, "not accepting during the walk");
        @(negedge clk);
      end
      ret_valid = 0;
      check(walk_cycles == N, $sformatf("walk took %0d cycles, expected %0d", walk_cycles, N));
      nout = 0;
      while (out_valid) begin
        check(out_pc == sent[nout].pc, $sformatf("drain order entry %0d", nout));
        check(out_uop == sent[nout].u, "drained uop");
        check(out_chain == exp_chain[nout], $sformatf("chain bit entry %0d: got %0b exp %0b", nout, out_chain, exp_chain[nout]));
        check(out_last == (nout == N-1), "last flag");
        nout++;
        @(negedge clk);
      end
      check(nout == N, "all entries drained");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
