// store_data_cache: keeps the values of TEA thread stores.
//
// TEA stores must not change architectural memory, so they write into this
// small fully associative cache of the last ENTRIES half-lines (32 bytes
// each) they touched instead of the D-cache. A store of up to 8 aligned bytes
// (byte enables) updates a matching half-line or claims the oldest entry
// (FIFO replacement), with per-byte valid bits. A TEA load looks up the
// half-line and gets the bytes it holds plus a byte-valid mask: the backend
// takes the remaining bytes from the D-cache. clear empties the cache (a new
// thread starts).
//
// Timing: stores update at the clock edge; load lookup is combinational.
module store_data_cache
  import tea_pkg::*;
#(
  parameter int ENTRIES = 16,
  parameter int LINE_B  = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              st_valid,
  input  logic [ADDR_W-1:0] st_addr,     // 8-byte aligned
  input  logic [7:0]        st_be,
  input  logic [63:0]       st_data,
  input  logic [ADDR_W-1:0] ld_addr,     // 8-byte aligned
  output logic [7:0]        ld_bvalid,
  output logic [63:0]       ld_data,
  output logic              ld_hit       // all 8 bytes found
);
  localparam int OW = $clog2(LINE_B);
  localparam int EW = $clog2(ENTRIES);
  localparam int TW = ADDR_W - OW;
  localparam int WPL = LINE_B / 8;        // 8-byte words per half-line
  localparam int SW = $clog2(WPL);

  logic          v    [ENTRIES];
  logic [TW-1:0] tag  [ENTRIES];
  logic [LINE_B-1:0]   bv   [ENTRIES];
  logic [8*LINE_B-1:0] data [ENTRIES];
  logic [EW-1:0] fifo;

  wire [TW-1:0] st_tag = st_addr[ADDR_W-1:OW];
  wire [SW-1:0] st_w   = st_addr[OW-1:3];
  wire [TW-1:0] ld_tag = ld_addr[ADDR_W-1:OW];
  wire [SW-1:0] ld_w   = ld_addr[OW-1:3];

  logic st_hit; logic [EW-1:0] st_idx;
  always_comb begin
    st_hit = 1'b0; st_idx = '0;
    for (int i = 0; i < ENTRIES; i++)
      if (v[i] && tag[i] == st_tag) begin st_hit = 1'b1; st_idx = EW'(i); end
  end

  always_comb begin
    ld_bvalid = '0; ld_data = '0;
    for (int i = 0; i < ENTRIES; i++)
      if (v[i] && tag[i] == ld_tag) begin
        ld_bvalid = bv[i][ld_w*8 +: 8];
        ld_data   = data[i][ld_w*64 +: 64];
      end
    ld_hit = (ld_bvalid == 8'hFF);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fifo <= '0;
      for (int i = 0; i < ENTRIES; i++) begin v[i] <= 1'b0; tag[i] <= '0; bv[i] <= '0; data[i] <= '0; end
    end else if (clear) begin
      fifo <= '0;
      for (int i = 0; i < ENTRIES; i++) v[i] <= 1'b0;
    end else if (st_valid) begin
      logic [EW-1:0] e;
      e = st_hit ? st_idx : fifo;
      if (!st_hit) begin
        v[e]   <= 1'b1;
        tag[e] <= st_tag;
        fifo   <= fifo + 1'b1;
      end
      for (int b = 0; b < 8; b++) begin
        if (st_be[b]) begin
          bv[e][st_w*8 + b]           <= 1'b1;
          data[e][(st_w*8 + b)*8 +: 8] <= st_data[b*8 +: 8];
        end else if (!st_hit) begin
          bv[e][st_w*8 + b] <= 1'b0;
        end
      end
      if (!st_hit)
        for (int k = 0; k < LINE_B; k++)
          if (k / 8 != int'(st_w)) bv[e][k] <= 1'b0;
    end
  end
endmodule
