// tb_segment_builder: streams micro-ops and checks the segments produced.
// Stream (PCs in steps of 4):
//   0x100..0x108: 3 uops, chain 1,1,1, last is a branch      -> seg A
//   0x200..0x208: 3 uops, chain 0,0,0, last is a branch       -> seg B (empty)
//   0x300..0x328: 11 uops, chain on all -> split after 8 chain uops
//   0x400: 1 uop (non-sequential jump), stream end           -> final seg
module tb_segment_builder;
  import tea_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_chain, in_last, seg_valid;
  logic [PC_W-1:0] in_pc, seg_tag;
  dec_uop_t in_uop;
  logic [LEN_W-1:0] seg_len;
  logic [MASK_W-1:0] seg_mask;
  logic [3:0] seg_cnt;
  bc_uop_t seg_uops [SEG_UOPS];
  int checks = 0, failures = 0;

  segment_builder dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // collected segments
  logic [PC_W-1:0] t_q [$];
  int l_q [$], c_q [$];
  logic [MASK_W-1:0] m_q [$];
  logic [5:0] opc0_q [$];
  logic [4:0] pos1_q [$];
  always @(posedge clk) if (rst_n && seg_valid) begin
    t_q.push_back(seg_tag); l_q.push_back(int'(seg_len)); c_q.push_back(int'(seg_cnt));
    m_q.push_back(seg_mask); opc0_q.push_back(seg_uops[0].u.opc); pos1_q.push_back(seg_uops[1].pos);
  end

  task automatic send(input logic [PC_W-1:0] pc, input logic br, input logic ch, input logic last, input int op);
    @(negedge clk);
    in_valid = 1; in_pc = pc; in_chain = ch; in_last = last;
    in_uop = '0; in_uop.is_br = br; in_uop.opc = 6'(op);
  endtask

  initial begin
    repeat (300) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    in_valid = 0; in_pc = 0; in_chain = 0; in_last = 0; in_uop = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    send(40'h100, 0, 1, 0, 1); send(40'h104, 0, 1, 0, 2); send(40'h108, 1, 1, 0, 3);
    send(40'h200, 0, 0, 0, 4); send(40'h204, 0, 0, 0, 5); send(40'h208, 1, 0, 0, 6);
    for (int i = 0; i < 11; i++) send(40'h300 + 40'(4*i), 0, 1, 0, 10 + i);
    send(40'h400, 0, 1, 1, 30);
    @(negedge clk); in_valid = 0;
    repeat (3) @(negedge clk);
    foreach (t_q[i]) $display("seg %h len %0d cnt %0d mask %h", t_q[i], l_q[i], c_q[i], m_q[i]);
    check(t_q.size() == 5, $sformatf("5 segments, got %0d", t_q.size()));
    if (t_q.size() == 5) begin
      check(t_q[0] == 40'h100 && l_q[0] == 3 && c_q[0] == 3 && m_q[0] == 32'h7, "segment A");
      check(opc0_q[0] == 1 && pos1_q[0] == 1, "segment A uops");
      check(t_q[1] == 40'h200 && l_q[1] == 3 && c_q[1] == 0 && m_q[1] == 0, "segment B empty");
      check(t_q[2] == 40'h300 && l_q[2] == 8 && c_q[2] == 8 && m_q[2] == 32'hFF, "long segment, first 8");
      check(t_q[3] == 40'h320 && l_q[3] == 3 && c_q[3] == 3 && m_q[3] == 32'h7, "long segment, rest");
      check(opc0_q[3] == 18, "rest starts with 9th uop");
      check(t_q[4] == 40'h400 && l_q[4] == 1 && c_q[4] == 1, "final segment after stream end");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
