// stream_mem_top: hardware stream prefetching combined with dynamic access
// ordering in the memory controller.
//
// A reference prediction table (rpt_prefetcher) watches the CPU's load/store
// stream, recognises constant-stride streams per instruction and produces
// prefetch requests for L2 lines ahead of the stream. Each request is first
// checked against the L2 (pf_probe_*: the L2 answers in the same cycle
// whether it holds the line or is already fetching it) and against the outstanding-prefetch table (pf_mshr); lines that
// are present or already on their way are dropped. The rest enter the
// access-ordering memory controller (reorder_mc) together with the L2's own
// demand misses and write-backs. The extra, predictable requests give the
// controller a choice, which it uses to issue first whatever the Direct
// Rambus channel can accept soonest.
//
// Arbitration: an L2 demand request has priority over a prefetch for the
// single controller input. A demand read to a line with an outstanding
// prefetch is absorbed (dm_ready without a memory request): the data will
// arrive with the prefetch's fill. Every read completion leaves on fill_*,
// marked when it was a prefetch, and frees its pf_mshr entry. At most
// PF_OUTSTANDING prefetches are outstanding; beyond that the prefetcher
// waits.
//
// Ports: ref_* (CPU references, one per cycle, never stalled), pf_probe_*
// (L2 tag probe), dm_* (L2 miss/write-back handshake), fill_* (line data to
// the L2), row_*/col_*/dq_* (Direct RDRAM channel), events (one strobe per
// mechanism and cycle, for performance counters) and the two occupancies. One clock domain: the
// published system runs the CPU side four times faster than the 400 MHz
// channel; here both sides share one clock.
module stream_mem_top
  import stream_pkg::*;
#(
  parameter int unsigned RPT_ENTRIES    = 64,
  parameter int unsigned RPT_WAYS       = 4,
  parameter int unsigned MAX_DIST       = 16,
  parameter bit          ADAPTIVE       = 1'b1,
  parameter int unsigned PF_OUTSTANDING = 32,
  parameter int unsigned QDEPTH         = 40,
  parameter bit          REORDER        = 1'b1,
  parameter interleave_e INTERLEAVE     = INTERLEAVE_LINE
) (
  input  logic        clk,
  input  logic        rst_n,
  // CPU reference stream
  input  logic        ref_valid,
  input  addr_t       ref_pc,
  input  addr_t       ref_addr,
  // L2 tag probe for prefetch candidates
  output logic        pf_probe_valid,
  output line_t       pf_probe_line,
  input  logic        pf_probe_hit,
  // L2 demand misses and write-backs
  input  logic        dm_valid,
  output logic        dm_ready,
  input  line_t       dm_line,
  input  logic        dm_write,
  input  line_data_t  dm_data,
  // line fills to the L2
  output logic        fill_valid,
  output line_t       fill_line,
  output logic        fill_prefetch,
  output line_data_t  fill_data,
  // Direct RDRAM channel
  output row_op_e     row_op,
  output dev_t        row_dev,
  output bank_t       row_bank,
  output row_t        row_row,
  output col_op_e     col_op,
  output dev_t        col_dev,
  output bank_t       col_bank,
  output col_t        col_col,
  output logic        dq_oe,
  output logic [DQ_W-1:0] dq_out,
  input  logic [DQ_W-1:0] dq_in,
  // per-cycle event strobes and occupancies, for performance counters
  output stream_ev_t  events,
  output logic [$clog2(PF_OUTSTANDING+1)-1:0] pf_outstanding,
  output logic [$clog2(QDEPTH+1)-1:0]         mc_queued
);
  // ---------------------------------------------------------- prefetcher
  logic  pf_valid, pf_ready;
  line_t pf_line;
  logic  ev_pf_hit, ev_pf_miss, ev_alloc;

  rpt_prefetcher #(
    .ENTRIES (RPT_ENTRIES),
    .WAYS    (RPT_WAYS),
    .MAX_DIST(MAX_DIST),
    .ADAPTIVE(ADAPTIVE)
  ) u_rpt (
    .clk, .rst_n,
    .ref_valid, .ref_pc, .ref_addr,
    .pf_valid, .pf_line, .pf_ready,
    .ev_pf_hit, .ev_pf_miss, .ev_alloc
  );

  // ----------------------------------------------- outstanding prefetches
  logic mshr_hit, mshr_merge_hit, mshr_full, mshr_fill_hit;
  logic pf_enq;

  pf_mshr #(.DEPTH(PF_OUTSTANDING)) u_mshr (
    .clk, .rst_n,
    .lookup_line(pf_line),
    .lookup_hit (mshr_hit),
    .merge_line (dm_line),
    .merge_hit  (mshr_merge_hit),
    .alloc_valid(pf_enq),
    .alloc_line (pf_line),
    .full       (mshr_full),
    .fill_valid (fill_valid),
    .fill_line  (fill_line),
    .fill_hit   (mshr_fill_hit),
    .count      (pf_outstanding)
  );

  // ---------------------------------------------------------- arbitration
  logic mc_req_valid, mc_req_ready, mc_req_write, mc_req_prefetch;
  line_t mc_req_line;
  logic dm_merge, dm_go, pf_drop;

  assign pf_probe_valid = pf_valid;
  assign pf_probe_line  = pf_line;

  assign dm_merge = dm_valid && !dm_write && mshr_merge_hit;
  assign dm_go    = dm_valid && !dm_merge;
  assign dm_ready = dm_merge || (dm_go && mc_req_ready);

  assign pf_drop  = pf_valid && (pf_probe_hit || mshr_hit);
  assign pf_enq   = pf_valid && !pf_drop && !dm_go && mc_req_ready && !mshr_full;
  assign pf_ready = pf_drop || pf_enq;

  assign mc_req_valid    = dm_go || pf_enq;
  assign mc_req_line     = dm_go ? dm_line : pf_line;
  assign mc_req_write    = dm_go && dm_write;
  assign mc_req_prefetch = !dm_go;

  // ------------------------------------------------------ memory controller
  logic ev_issue, ev_bypass, ev_turnaround;

  reorder_mc #(
    .QDEPTH    (QDEPTH),
    .REORDER   (REORDER),
    .INTERLEAVE(INTERLEAVE)
  ) u_mc (
    .clk, .rst_n,
    .req_valid    (mc_req_valid),
    .req_ready    (mc_req_ready),
    .req_line     (mc_req_line),
    .req_write    (mc_req_write),
    .req_prefetch (mc_req_prefetch),
    .req_data     (dm_data),
    .resp_valid   (fill_valid),
    .resp_line    (fill_line),
    .resp_prefetch(fill_prefetch),
    .resp_data    (fill_data),
    .row_op, .row_dev, .row_bank, .row_row,
    .col_op, .col_dev, .col_bank, .col_col,
    .dq_oe, .dq_out, .dq_in,
    .ev_issue, .ev_bypass, .ev_turnaround, .q_count(mc_queued)
  );

  always_comb begin
    events.pf_hit        = ev_pf_hit;
    events.pf_miss       = ev_pf_miss;
    events.rpt_alloc     = ev_alloc;
    events.pf_issue      = pf_enq;
    events.pf_drop_l2    = pf_valid && pf_probe_hit;
    events.pf_drop_dup   = pf_valid && !pf_probe_hit && mshr_hit;
    events.pf_stall_full = pf_valid && !pf_ready && mshr_full;
    events.dm_merge      = dm_merge;
    events.mc_issue      = ev_issue;
    events.mc_bypass     = ev_bypass;
    events.mc_turnaround = ev_turnaround;
  end


  // An outstanding-prefetch entry is only taken when one is free.
  assert property (@(posedge clk) disable iff (!rst_n) pf_enq |-> !mshr_full);
endmodule
