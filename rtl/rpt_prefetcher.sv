// rpt_prefetcher: stride-detecting reference prediction table (RPT) that
// prefetches L2 cache lines.
//
// The table is a set-associative cache of ENTRIES entries, WAYS per set,
// indexed and tagged by the address of the load/store instruction. Each entry
// holds the previous operand address, the stride between its last two
// operand addresses and a two-bit history state (rpt_state_next). One
// reference (instruction address, operand address) is accepted per cycle
// and never stalled: the table sits beside the cache path, not in it.
//
// When an entry already in the steady state predicts the operand address
// correctly (a "prefetch hit"), it opens a window of offsets [L, R] relative
// to the referenced address; the prefetch engine issues addr + L*stride and
// advances L, so that after the first burst each further hit normally adds
// exactly one request (addr + d*stride). With ADAPTIVE set, the distance d
// starts at 1 and doubles on each prefetch hit up to MAX_DIST; otherwise d is
// MAX_DIST from the first hit. A mispredicted address (prefetch miss) ends
// the stream: the window is emptied and the distance reset.
//
// Prefetches are for whole lines: an offset whose address falls in the line
// this entry last requested is consumed without a request. Requests leave
// through a one-deep output register with a valid/ready handshake; the
// window itself is the only queue, as no request list is kept.
//
// Table geometry (64 entries, 4 ways), the state machine, the window, the
// adaptive doubling and the largest distance (16) follow the published
// design. Own choices: indexing by instruction word address, round-robin
// replacement within a set, rebasing the window on each prefetch hit
// (L -> max(L-1,1), R -> d), round-robin choice among entries with open
// windows, and the one-entry line filter.
module rpt_prefetcher
  import stream_pkg::*;
#(
  parameter int unsigned ENTRIES  = 64,
  parameter int unsigned WAYS     = 4,
  parameter int unsigned MAX_DIST = 16,
  parameter bit          ADAPTIVE = 1'b1
) (
  input  logic  clk,
  input  logic  rst_n,
  // observed CPU reference stream
  input  logic  ref_valid,
  input  addr_t ref_pc,
  input  addr_t ref_addr,
  // prefetch requests (line addresses)
  output logic  pf_valid,
  output line_t pf_line,
  input  logic  pf_ready,
  // per-cycle event strobes, for counting
  output logic  ev_pf_hit,     // steady entry predicted the address
  output logic  ev_pf_miss,    // steady entry mispredicted: stream end
  output logic  ev_alloc       // table miss, entry replaced
);
  localparam int unsigned SETS  = ENTRIES / WAYS;
  localparam int unsigned SET_W = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned IDX_W = $clog2(ENTRIES);
  localparam int unsigned TAG_W = ADDR_W - 2 - SET_W;
  localparam int unsigned OFF_W = $clog2(MAX_DIST + 2);

  typedef logic [OFF_W-1:0] off_t;

  typedef struct packed {
    logic                valid;
    logic [TAG_W-1:0]    tag;
    addr_t               prev_addr;
    addr_t               stride;
    rpt_state_e          state;
    off_t                lo;        // L: next offset to request
    off_t                hi;        // R: last offset that may be requested
    off_t                pdist;      // current prefetch distance, 0 = none yet
    logic                last_ok;   // last_line is meaningful
    line_t               last_line; // line of this entry's last request
  } rpt_entry_t;

  rpt_entry_t               tbl   [ENTRIES];
  logic [WAY_W-1:0]         victim[SETS];
  logic [IDX_W-1:0]         rr_ptr;

  // ---------------------------------------------------------------- lookup
  logic [SET_W-1:0] set_idx;
  logic [TAG_W-1:0] ref_tag;
  logic             hit;
  logic [WAY_W-1:0] hit_way;
  logic [WAY_W-1:0] sel_way;
  logic [IDX_W-1:0] ref_idx;
  rpt_entry_t       cur;
  addr_t            diff;
  logic             correct;
  rpt_state_e       nstate;
  logic             upd_stride, do_issue;

  assign set_idx = (SETS > 1) ? SET_W'(ref_pc[2 +: SET_W]) : '0;
  assign ref_tag = ref_pc[ADDR_W-1 -: TAG_W];

  always_comb begin
    hit     = 1'b0;
    hit_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (!hit && tbl[int'(set_idx)*WAYS + w].valid &&
          tbl[int'(set_idx)*WAYS + w].tag == ref_tag) begin
        hit     = 1'b1;
        hit_way = WAY_W'(w);
      end
    end
    sel_way = hit ? hit_way : victim[set_idx];
    ref_idx = IDX_W'(int'(set_idx)*WAYS + int'(sel_way));
  end

  assign cur     = tbl[ref_idx];
  assign diff    = ref_addr - cur.prev_addr;
  assign correct = (diff == cur.stride);

  rpt_state_next u_fsm (
    .state        (cur.state),
    .correct      (correct),
    .next_state   (nstate),
    .update_stride(upd_stride),
    .issue        (do_issue)
  );

  // next distance on a prefetch hit
  off_t dist_next;
  always_comb begin
    if (!ADAPTIVE)            dist_next = off_t'(MAX_DIST);
    else if (cur.pdist == '0)  dist_next = off_t'(1);
    else if (int'(cur.pdist) * 2 >= MAX_DIST) dist_next = off_t'(MAX_DIST);
    else                      dist_next = off_t'(cur.pdist << 1);
  end

  assign ev_pf_hit  = ref_valid && hit && do_issue;
  assign ev_pf_miss = ref_valid && hit && !correct && cur.state == RPT_STEADY;
  assign ev_alloc   = ref_valid && !hit;

  // ------------------------------------------------------- prefetch engine
  // Pick an entry with an open window (round robin), never the one being
  // updated by this cycle's reference.
  logic             eng_found;
  logic [IDX_W-1:0] eng_idx;
  always_comb begin
    eng_found = 1'b0;
    eng_idx   = '0;
    for (int k = 0; k < ENTRIES; k++) begin
      automatic logic [IDX_W-1:0] i = IDX_W'(int'(rr_ptr) + k);
      if (!eng_found && tbl[i].valid && tbl[i].lo <= tbl[i].hi &&
          !(ref_valid && i == ref_idx)) begin
        eng_found = 1'b1;
        eng_idx   = i;
      end
    end
  end

  addr_t eng_addr;
  line_t eng_line;
  logic  eng_dup;
  assign eng_addr = tbl[eng_idx].prev_addr +
                    addr_t'($signed({1'b0, tbl[eng_idx].lo}) * $signed(tbl[eng_idx].stride));
  assign eng_line = eng_addr[ADDR_W-1:LINE_OFF_W];
  assign eng_dup  = tbl[eng_idx].last_ok && tbl[eng_idx].last_line == eng_line;

  logic out_free, eng_step, eng_emit;
  assign out_free = !pf_valid || pf_ready;
  assign eng_step = eng_found && (eng_dup || out_free);   // consume one offset
  assign eng_emit = eng_found && !eng_dup && out_free;    // and send it

  // ---------------------------------------------------------------- update
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) begin
        tbl[i] <= '{valid: 1'b0, state: RPT_INITIAL, lo: off_t'(1), default: '0};
      end
      for (int s = 0; s < SETS; s++) victim[s] <= '0;
      rr_ptr   <= '0;
      pf_valid <= 1'b0;
      pf_line  <= '0;
    end else begin
      // prefetch engine
      if (eng_step) begin
        tbl[eng_idx].lo        <= tbl[eng_idx].lo + 1'b1;
        tbl[eng_idx].last_ok   <= 1'b1;
        tbl[eng_idx].last_line <= eng_line;
        rr_ptr                 <= eng_idx + 1'b1;
      end
      if (eng_emit) begin
        pf_valid <= 1'b1;
        pf_line  <= eng_line;
      end else if (pf_ready) begin
        pf_valid <= 1'b0;
      end

      // reference
      if (ref_valid) begin
        if (hit) begin
          tbl[ref_idx].prev_addr <= ref_addr;
          tbl[ref_idx].state     <= nstate;
          if (upd_stride) tbl[ref_idx].stride <= diff;
          if (do_issue) begin
            tbl[ref_idx].lo   <= (cur.lo > off_t'(1)) ? cur.lo - 1'b1 : off_t'(1);
            tbl[ref_idx].hi   <= dist_next;
            tbl[ref_idx].pdist <= dist_next;
          end else if (!correct) begin
            tbl[ref_idx].lo      <= off_t'(1);
            tbl[ref_idx].hi      <= '0;
            tbl[ref_idx].pdist    <= '0;
            tbl[ref_idx].last_ok <= 1'b0;
          end
        end else begin
          tbl[ref_idx] <= '{valid: 1'b1, tag: ref_tag, prev_addr: ref_addr,
                            state: RPT_INITIAL, lo: off_t'(1), default: '0};
          victim[set_idx] <= victim[set_idx] + 1'b1;
        end
      end
    end
  end

  // A request stays valid and unchanged until it is accepted.
  assert property (@(posedge clk) disable iff (!rst_n)
                   pf_valid && !pf_ready |=> pf_valid && $stable(pf_line));
endmodule
