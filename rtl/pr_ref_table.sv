// pr_ref_table: frees the physical registers of TEA micro-ops without a ROB.
//
// TEA micro-ops retire out of order and never enter the ROB, so their
// registers are freed through a table with, per physical register, a Valid
// bit (the register is still mapped in the shadow RAT) and a 5-bit reference
// counter (renamed readers that have not yet read it): 400 x 6 = 2400 bits.
// On a thread start (init) all entries become Valid=1, count=0.
//   * Rename: every source read increments its register's counter; the
//     register previously mapped to a destination becomes Valid=0; a newly
//     allocated register becomes Valid=1.
//   * Operand read (just before execution): the counter is decremented.
// A register is freed when an update leaves it Valid=0 with count 0: either
// it is unmapped while nobody still has to read it, or its last reader has
// read it after a younger micro-op overwrote the mapping. The counter wraps
// on overflow; this can only corrupt a precomputation, never the main thread.
//
// Interface: REN_W rename slots (ren_fire qualifies them), RD_W read ports.
// free_vec is registered: a one-cycle pulse per freed register, the cycle
// after the update.
module pr_ref_table
  import tea_pkg::*;
#(
  parameter int REN_W = WIDTH,
  parameter int RD_W  = 8,
  parameter int CNT_W = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              init,
  input  logic              ren_fire,
  input  logic [REN_W-1:0]  src1_v, src2_v, prev_v, new_v,
  input  logic [PREG_W-1:0] src1 [REN_W],
  input  logic [PREG_W-1:0] src2 [REN_W],
  input  logic [PREG_W-1:0] prev [REN_W],
  input  logic [PREG_W-1:0] newr [REN_W],
  input  logic [RD_W-1:0]   rd_v,
  input  logic [PREG_W-1:0] rd   [RD_W],
  output logic [PREG_N-1:0] free_vec,
  output logic [PREG_N-1:0] valid_vec
);
  localparam int IW = $clog2(2*REN_W+1);
  localparam int DW = $clog2(RD_W+1);
  logic             v   [PREG_N];
  logic [CNT_W-1:0] cnt [PREG_N];

  // one update cell per physical register
  for (genvar p = 0; p < PREG_N; p++) begin : g_pr
    logic [IW-1:0]    inc;
    logic [DW-1:0]    dec;
    logic             unmap, remap, unmap_after_new, nv;
    logic [CNT_W-1:0] nc;

    always_comb begin
      logic seen_new;
      inc = '0; dec = '0; unmap = 1'b0; remap = 1'b0;
      unmap_after_new = 1'b0; seen_new = 1'b0;
      if (ren_fire)
        for (int s = 0; s < REN_W; s++) begin
          if (src1_v[s] && src1[s] == PREG_W'(p)) inc = inc + 1'b1;
          if (src2_v[s] && src2[s] == PREG_W'(p)) inc = inc + 1'b1;
          if (prev_v[s] && prev[s] == PREG_W'(p)) begin
            unmap = 1'b1;
            // allocated earlier in the same group and overwritten again
            if (seen_new) unmap_after_new = 1'b1;
          end
          if (new_v[s] && newr[s] == PREG_W'(p)) begin remap = 1'b1; seen_new = 1'b1; end
        end
      for (int r = 0; r < RD_W; r++)
        if (rd_v[r] && rd[r] == PREG_W'(p)) dec = dec + 1'b1;
      nv = remap ? !unmap_after_new : (unmap ? 1'b0 : v[p]);
      nc = remap ? CNT_W'(inc) - CNT_W'(dec) : cnt[p] + CNT_W'(inc) - CNT_W'(dec);
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v[p] <= 1'b1; cnt[p] <= '0; free_vec[p] <= 1'b0;
      end else if (init) begin
        v[p] <= 1'b1; cnt[p] <= '0; free_vec[p] <= 1'b0;
      end else begin
        v[p]        <= nv;
        cnt[p]      <= nc;
        free_vec[p] <= !nv && nc == '0 && (unmap || dec != '0);
      end
    end

    assign valid_vec[p] = v[p];
  end
endmodule
