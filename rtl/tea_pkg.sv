// tea_pkg: shared sizes, micro-op formats and timestamp helpers for the
// TEA (timely, efficient, accurate) branch precomputation thread.
//
// The sizes that the TEA structures are built around (512-entry Fill Buffer,
// 512-entry Block Cache with 256 extra zero tags, 256-entry H2P table, 400
// physical registers of which 192 serve the TEA thread, 16-entry store data
// cache, 8-wide TEA fetch/rename/issue, 128-entry Fetch Queue) follow the
// reference configuration. The micro-op encoding, register counts, timestamp
// width and fixed 4-byte instruction size are this design's own choices: the
// RTL treats every instruction as one micro-op of 4 bytes, so a segment of N
// micro-ops covers 4*N bytes of code.
package tea_pkg;

  parameter int PC_W     = 40;   // full fetch PC, also the Block Cache tag width
  parameter int ADDR_W   = 40;   // data (memory) address width
  parameter int AREG_N   = 32;   // architectural registers (incl. flags)
  parameter int AREG_W   = $clog2(AREG_N);
  parameter int PREG_N   = 400;  // physical registers of the core
  parameter int PREG_W   = $clog2(PREG_N);
  parameter int TS_W     = 10;   // branch timestamp width
  parameter int WIDTH    = 8;    // TEA fetch / rename / issue width
  parameter int SEG_UOPS = 8;    // chain micro-ops held by one Block Cache entry
  parameter int MASK_W   = 32;   // bit-mask length of a Block Cache entry
  parameter int LEN_W    = $clog2(MASK_W) + 1; // segment length field
  parameter int INSN_B   = 4;    // bytes per instruction (one micro-op each)

  // Decoded micro-op, the part of a uop the TEA structures look at.
  typedef struct packed {
    logic [5:0]        opc;      // opaque operation code, carried along
    logic              is_br;
    logic              is_load;
    logic              is_store;
    logic              has_dst;
    logic              has_src1;
    logic              has_src2;
    logic [AREG_W-1:0] dst;
    logic [AREG_W-1:0] src1;
    logic [AREG_W-1:0] src2;
  } dec_uop_t;                   // 27 bits

  // Micro-op as kept in a Block Cache entry: the decoded uop plus its
  // position inside the basic-block segment (4 bytes in total).
  typedef struct packed {
    logic [LEN_W-2:0] pos;
    dec_uop_t         u;
  } bc_uop_t;

  // Retired micro-op as it enters the Fill Buffer.
  typedef struct packed {
    logic [PC_W-1:0]   pc;
    dec_uop_t          u;
    logic [ADDR_W-1:0] maddr;    // effective address of a load or store
    logic              h2p;      // branch marked hard-to-predict by the H2P table
    logic              tea;      // uop was also fetched by the TEA thread (mask bit 1)
  } ret_uop_t;

  // TEA uop leaving the TEA fetch stage.
  typedef struct packed {
    logic [PC_W-1:0] pc;
    logic [TS_W-1:0] ts;
    dec_uop_t        u;
  } tea_uop_t;

  // Renamed uop, the format both threads hand to Issue.
  typedef struct packed {
    logic [PC_W-1:0]   pc;
    logic [TS_W-1:0]   ts;
    dec_uop_t          u;
    logic              tea;      // extra Reservation Station bit: TEA thread uop
    logic [PREG_W-1:0] pdst;
    logic [PREG_W-1:0] psrc1;
    logic [PREG_W-1:0] psrc2;
  } ren_uop_t;

  // Fetch address produced by the decoupled branch predictor: one fetch block
  // [start, stop) and the timestamp of the branch that ends it.
  typedef struct packed {
    logic [PC_W-1:0] start;
    logic [PC_W-1:0] stop;
    logic [TS_W-1:0] ts;
  } fetch_addr_t;

  // a is younger than b (timestamps wrap around).
  function automatic logic ts_younger(logic [TS_W-1:0] a, logic [TS_W-1:0] b);
    logic [TS_W-1:0] d;
    d = a - b;
    return (d != '0) && !d[TS_W-1];
  endfunction

endpackage
