// sync_fifo: small synchronous FIFO (helper). One push and one pop per cycle,
// registered storage, first-word-fall-through read (rdata is the head while
// !empty). Pushing when full or popping when empty is ignored; the assertions
// flag it. Used for the bit-mask queue that feeds the main thread.
module sync_fifo #(
  parameter int W     = 8,
  parameter int DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         push,
  input  logic [W-1:0] wdata,
  input  logic         pop,
  output logic [W-1:0] rdata,
  output logic         empty,
  output logic         full
);
  localparam int AW = $clog2(DEPTH);
  logic [W-1:0] mem [DEPTH];
  logic [AW-1:0] rp, wp;
  logic [AW:0]   cnt;

  assign empty = (cnt == 0);
  assign full  = (cnt == (AW+1)'(DEPTH));
  assign rdata = mem[rp];

  wire do_push = push && !full;
  wire do_pop  = pop && !empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp <= '0; wp <= '0; cnt <= '0;
    end else if (clear) begin
      rp <= '0; wp <= '0; cnt <= '0;
    end else begin
      if (do_push) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (do_pop)  rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      cnt <= cnt + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk) if (do_push) mem[wp] <= wdata;

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !clear));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty && !clear));
endmodule
