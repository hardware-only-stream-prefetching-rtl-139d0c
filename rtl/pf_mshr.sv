// pf_mshr: miss status holding registers for outstanding prefetches.
//
// Holds the line addresses of up to DEPTH prefetches that have been sent to
// the memory controller and whose data has not yet come back. It provides
//   * two lookup ports, answered in the same cycle, used to drop a prefetch for
//     a line that is already outstanding and to let an L2 demand miss merge
//     with an outstanding prefetch instead of going to memory again;
//   * an allocate port (one line per cycle, refused when full);
//   * a fill port: returning line data frees the matching entry.
// A fill and an allocation may happen in the same cycle; the allocation uses
// the lowest free entry as seen before the fill.
//
// The limit of 32 outstanding prefetches is the published figure; the
// content-addressed organisation is this design's own.
module pf_mshr
  import stream_pkg::*;
#(
  parameter int unsigned DEPTH = 32
) (
  input  logic  clk,
  input  logic  rst_n,
  // lookup
  input  line_t lookup_line,
  output logic  lookup_hit,
  input  line_t merge_line,    // second lookup, for demand misses
  output logic  merge_hit,
  // allocate
  input  logic  alloc_valid,
  input  line_t alloc_line,
  output logic  full,
  // fill
  input  logic  fill_valid,
  input  line_t fill_line,
  output logic  fill_hit,      // the fill was for an outstanding prefetch
  output logic [$clog2(DEPTH+1)-1:0] count
);
  logic  valid [DEPTH];
  line_t line  [DEPTH];

  logic                     free_found;
  logic [$clog2(DEPTH)-1:0] free_idx;
  logic [DEPTH-1:0]         fill_match;

  always_comb begin
    lookup_hit = 1'b0;
    merge_hit  = 1'b0;
    free_found = 1'b0;
    free_idx   = '0;
    count      = '0;
    for (int i = 0; i < DEPTH; i++) begin
      fill_match[i] = valid[i] && line[i] == fill_line;
      if (valid[i] && line[i] == lookup_line) lookup_hit = 1'b1;
      if (valid[i] && line[i] == merge_line)  merge_hit  = 1'b1;
      if (!valid[i] && !free_found) begin
        free_found = 1'b1;
        free_idx   = $clog2(DEPTH)'(i);
      end
      if (valid[i]) count = count + 1'b1;
    end
    full     = !free_found;
    fill_hit = fill_valid && |fill_match;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) begin
        valid[i] <= 1'b0;
        line[i]  <= '0;
      end
    end else begin
      if (fill_valid) begin
        for (int i = 0; i < DEPTH; i++) if (fill_match[i]) valid[i] <= 1'b0;
      end
      if (alloc_valid && free_found) begin
        valid[free_idx] <= 1'b1;
        line[free_idx]  <= alloc_line;
      end
    end
  end

  // Never allocate into a full table.
  assert property (@(posedge clk) disable iff (!rst_n) alloc_valid |-> !full);
endmodule
