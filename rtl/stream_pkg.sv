// stream_pkg: types and constants shared by the stream prefetcher and the
// access-ordering Direct Rambus memory controller.
//
// The RDRAM timings are the Table-1 values of a -45/-800 Direct RDRAM, in
// 400 MHz interface-clock cycles ("memory cycles"). The derived offsets give
// the fixed closed-page command sequence the controller uses for one 64-byte
// line: ROW ACT at 0, four COL packets tCC apart starting at tRCD, a ROW PRER
// once both tRAS and tRDP are met, and data packets tCAC (read) or tCWD
// (write) after each COL packet. The sequence shape and the 32-bit data bus
// word per cycle (2 bytes on each clock edge) are this design's own choices.
package stream_pkg;

  // ---- address geometry -------------------------------------------------
  localparam int unsigned ADDR_W    = 32;  // physical / instruction address
  localparam int unsigned LINE_BYTES = 64; // L2 line
  localparam int unsigned LINE_OFF_W = 6;
  localparam int unsigned LINE_W    = ADDR_W - LINE_OFF_W; // line address
  localparam int unsigned LINE_BITS = LINE_BYTES * 8;

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [LINE_W-1:0] line_t;
  typedef logic [LINE_BITS-1:0] line_data_t;

  // ---- reference prediction table --------------------------------------
  typedef enum logic [1:0] {
    RPT_INITIAL   = 2'd0,
    RPT_TRANSIENT = 2'd1,
    RPT_STEADY    = 2'd2,
    RPT_IRREGULAR = 2'd3
  } rpt_state_e;

  // ---- Direct RDRAM organisation (64 Mbit devices) ------------------------
  localparam int unsigned NUM_DEV   = 8;
  localparam int unsigned DEV_W     = 3;
  localparam int unsigned NUM_BANK  = 16;
  localparam int unsigned BANK_W    = 4;
  localparam int unsigned ROW_W     = 9;   // 512 rows per bank
  localparam int unsigned COL_W     = 6;   // 64 dualocts (16 B) per 1 KB row
  localparam int unsigned DQ_W      = 32;  // bytes moved per memory cycle x 8
  localparam int unsigned PKT_BEATS = 4;   // cycles per packet (tPACK)
  localparam int unsigned COLS_PER_LINE = LINE_BYTES / 16;

  typedef logic [DEV_W-1:0]  dev_t;
  typedef logic [BANK_W-1:0] bank_t;
  typedef logic [ROW_W-1:0]  row_t;
  typedef logic [COL_W-1:0]  col_t;

  typedef struct packed {
    dev_t  dev;
    bank_t bank;
    row_t  row;
    col_t  col;   // first dualoct of the line
  } dram_loc_t;

  typedef enum logic [1:0] {
    INTERLEAVE_LINE = 2'd0,   // consecutive 64 B lines on consecutive devices
    INTERLEAVE_PAGE = 2'd1    // consecutive 1 KB pages on consecutive devices
  } interleave_e;

  // ---- Table 1 timings (memory cycles) -----------------------------------
  localparam int unsigned T_PACK = 4;
  localparam int unsigned T_RC   = 28;
  localparam int unsigned T_RAS  = 20;
  localparam int unsigned T_RP   = 8;
  localparam int unsigned T_RR   = 8;
  localparam int unsigned T_RCD  = 9;
  localparam int unsigned T_CAC  = 8;
  localparam int unsigned T_CWD  = 6;
  localparam int unsigned T_CC   = 4;
  localparam int unsigned T_RDP  = 4;

  function automatic int unsigned max2(int unsigned a, int unsigned b);
    return (a > b) ? a : b;
  endfunction

  // ---- derived offsets of the per-line command sequence, from ROW ACT ----
  localparam int unsigned OFS_COL0    = T_RCD;                              // 9
  localparam int unsigned OFS_COLLAST = T_RCD + (COLS_PER_LINE-1)*T_CC;      // 21
  localparam int unsigned OFS_PRER    = max2(T_RAS, OFS_COLLAST + T_RDP);    // 25
  localparam int unsigned OFS_NEXTACT = max2(T_RC, OFS_PRER + T_RP);         // 33
  localparam int unsigned OFS_RDATA   = T_RCD + T_CAC;                       // 17
  localparam int unsigned OFS_WDATA   = T_RCD + T_CWD;                       // 15
  localparam int unsigned LINE_BEATS  = COLS_PER_LINE * T_PACK;              // 16
  localparam int unsigned OFS_COLFREE = OFS_COL0 + LINE_BEATS;               // 25
  localparam int unsigned OFS_DONE    = OFS_RDATA + LINE_BEATS;              // 33

  typedef enum logic [1:0] {ROW_NOP = 2'd0, ROW_ACT = 2'd1, ROW_PRER = 2'd2} row_op_e;
  typedef enum logic [1:0] {COL_NOP = 2'd0, COL_RD = 2'd1, COL_WR = 2'd2} col_op_e;

  // ---- per-cycle event strobes of the whole system (for counting) -------
  typedef struct packed {
    logic pf_hit;        // steady RPT entry predicted the operand address
    logic pf_miss;       // steady RPT entry mispredicted: stream end
    logic rpt_alloc;     // RPT miss, entry replaced
    logic pf_issue;      // prefetch sent to the memory controller
    logic pf_drop_l2;    // prefetch dropped: line already in the L2
    logic pf_drop_dup;   // prefetch dropped: line already outstanding
    logic pf_stall_full; // prefetch held: outstanding-prefetch table full
    logic dm_merge;      // demand miss absorbed by an outstanding prefetch
    logic mc_issue;      // controller started a line access
    logic mc_bypass;     // ... ahead of an older queued request
    logic mc_turnaround; // ... in the other direction than the previous one
  } stream_ev_t;

endpackage
