// source_list: the live-in set of the Backward Dataflow Walk.
//
// Register live-ins are a bit vector with one bit per architectural register;
// memory live-ins are a 16-entry buffer of data addresses (compared at 8-byte
// granularity, this design's choice). The walk visits the Fill Buffer from
// youngest to oldest, one micro-op per cycle, and asks this block whether the
// micro-op is part of a dependence chain:
//   * a micro-op whose chain bit is already set (an H2P branch, or an
//     instruction the TEA thread fetched) starts or extends a chain;
//   * a micro-op that writes a listed register, or a store to a listed
//     address, is a chain member.
// A marked micro-op removes its destination register (and, for a store, the
// address it writes) from the list and adds its source registers (and, for a
// load, the address it reads). When the address buffer is full the oldest
// address is overwritten (own choice).
//
// Interface: step/uop/maddr/chain_in give one visited micro-op; mark is the
// combinational decision; the list is updated at the clock edge when step is
// high. clear empties the list before a walk.
module source_list
  import tea_pkg::*;
#(
  parameter int MEM_N = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              step,
  input  dec_uop_t          uop,
  input  logic [ADDR_W-1:0] maddr,
  input  logic              chain_in,
  output logic              mark,
  output logic [AREG_N-1:0] regs,      // current register live-ins (observability)
  output logic [$clog2(MEM_N+1)-1:0] mem_count
);
  localparam int MW = $clog2(MEM_N);
  logic [AREG_N-1:0]     rlist;
  logic                  mvalid [MEM_N];
  logic [ADDR_W-4:0]     maddr_q [MEM_N];
  logic [MW-1:0]         mptr;

  wire [ADDR_W-4:0] akey = maddr[ADDR_W-1:3];

  logic mem_hit;
  logic [MW-1:0] mem_hit_idx;
  always_comb begin
    mem_hit = 1'b0;
    mem_hit_idx = '0;
    for (int i = 0; i < MEM_N; i++)
      if (mvalid[i] && maddr_q[i] == akey) begin
        mem_hit = 1'b1;
        mem_hit_idx = MW'(i);
      end
  end

  wire writes_reg = uop.has_dst && rlist[uop.dst];
  wire writes_mem = uop.is_store && mem_hit;
  assign mark = chain_in || writes_reg || writes_mem;
  assign regs = rlist;

  always_comb begin
    mem_count = '0;
    for (int i = 0; i < MEM_N; i++) mem_count += ($clog2(MEM_N+1))'(mvalid[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rlist <= '0;
      mptr  <= '0;
      for (int i = 0; i < MEM_N; i++) begin
        mvalid[i]  <= 1'b0;
        maddr_q[i] <= '0;
      end
    end else if (clear) begin
      rlist <= '0;
      mptr  <= '0;
      for (int i = 0; i < MEM_N; i++) mvalid[i] <= 1'b0;
    end else if (step && mark) begin
      logic [AREG_N-1:0] nl;
      nl = rlist;
      if (uop.has_dst && !uop.is_br) nl[uop.dst] = 1'b0;
      if (uop.has_src1) nl[uop.src1] = 1'b1;
      if (uop.has_src2) nl[uop.src2] = 1'b1;
      rlist <= nl;
      if (uop.is_store && mem_hit) mvalid[mem_hit_idx] <= 1'b0;
      if (uop.is_load && !mem_hit) begin
        mvalid[mptr]  <= 1'b1;
        maddr_q[mptr] <= akey;
        mptr <= (mptr == MW'(MEM_N-1)) ? '0 : mptr + 1'b1;
      end
    end
  end
endmodule
