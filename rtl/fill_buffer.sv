// fill_buffer: post-retire buffer that traces H2P branch dependence chains.
//
// Three phases, controlled by a small state machine:
//   FILL  - retired micro-ops are written in program order, one per cycle
//           (single access port). Each entry holds the PC, the decoded uop
//           (registers read and written), the load/store address and a chain
//           bit, set on entry for H2P branches and for micro-ops that the TEA
//           thread also fetched (these become extra starting points, which
//           lets chains grow longer over several walks).
//   WALK  - once full, the Backward Dataflow Walk visits the entries from the
//           youngest to the oldest, one per cycle (ENTRIES cycles, about 500
//           for the default), consulting the Source List and setting the chain
//           bit of every dependence-chain micro-op. Micro-ops retired during
//           the walk are dropped, so the buffer samples the retired stream.
//   DRAIN - the entries are streamed out oldest first, with their chain bits,
//           to the segment builder that writes the Block Cache (ENTRIES
//           cycles; retired micro-ops are dropped here too - own choice).
// Then the buffer is emptied and filling starts again.
//
// Interface: ret_valid/ret_uop accept one retired uop per cycle in FILL
// (ret_ready tells whether it was taken). out_valid/out_pc/out_uop/out_chain
// /out_last carry the drained stream; out_last flags the oldest-to-youngest
// stream's final entry. walk_done pulses when a walk ends.
module fill_buffer
  import tea_pkg::*;
#(
  parameter int ENTRIES = 512,
  parameter int MEM_N   = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            ret_valid,
  input  ret_uop_t        ret_uop,
  output logic            ret_ready,
  output logic            out_valid,
  output logic [PC_W-1:0] out_pc,
  output dec_uop_t        out_uop,
  output logic            out_chain,
  output logic            out_last,
  output logic            walk_done,
  output logic            walking
);
  localparam int AW = $clog2(ENTRIES);
  typedef enum logic [1:0] {FILL, WALK, DRAIN} state_e;
  state_e state;

  ret_uop_t      buf_q [ENTRIES];
  logic [ENTRIES-1:0] chain;
  logic [AW:0]   wcnt;    // entries filled
  logic [AW-1:0] ptr;     // walk / drain pointer

  ret_uop_t cur;
  assign cur = buf_q[ptr];

  logic sl_mark;
  source_list #(.MEM_N(MEM_N)) u_sl (
    .clk, .rst_n,
    .clear    (state == FILL),
    .step     (state == WALK),
    .uop      (cur.u),
    .maddr    (cur.maddr),
    .chain_in (chain[ptr]),
    .mark     (sl_mark),
    .regs     (),
    .mem_count()
  );

  assign ret_ready = (state == FILL);
  assign walking   = (state == WALK);
  assign out_valid = (state == DRAIN);
  assign out_pc    = cur.pc;
  assign out_uop   = cur.u;
  assign out_chain = chain[ptr];
  assign out_last  = (state == DRAIN) && (ptr == AW'(ENTRIES-1));
  assign walk_done = (state == WALK) && (ptr == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= FILL;
      wcnt  <= '0;
      ptr   <= '0;
      chain <= '0;
    end else begin
      unique case (state)
        FILL: if (ret_valid) begin
          chain[wcnt[AW-1:0]] <= (ret_uop.u.is_br && ret_uop.h2p) || ret_uop.tea;
          if (wcnt == (AW+1)'(ENTRIES-1)) begin
            state <= WALK;
            ptr   <= AW'(ENTRIES-1);
            wcnt  <= '0;
          end else begin
            wcnt <= wcnt + 1'b1;
          end
        end
        WALK: begin
          if (sl_mark) chain[ptr] <= 1'b1;
          if (ptr == '0) state <= DRAIN;
          else ptr <= ptr - 1'b1;
        end
        DRAIN: begin
          if (ptr == AW'(ENTRIES-1)) begin
            state <= FILL;
            ptr   <= '0;
            chain <= '0;
          end else ptr <= ptr + 1'b1;
        end
        default: state <= FILL;
      endcase
    end
  end

  always_ff @(posedge clk)
    if (state == FILL && ret_valid) buf_q[wcnt[AW-1:0]] <= ret_uop;
endmodule
