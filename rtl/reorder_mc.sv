// reorder_mc: access-ordering memory controller for a Direct Rambus channel.
//
// Requests are whole 64-byte L2 lines (reads and write-backs). They wait in a
// QDEPTH-entry queue kept in arrival order (entry 0 is the oldest; the queue
// closes up when an entry leaves). For every queued request the controller
// keeps, as count-down timers, how many cycles remain before its ROW ACT
// could legally be sent: the bank's own precharge/row-cycle limit, the
// neighbouring banks that share its sense amplifiers, the device's
// ACT-to-ACT spacing, and when the COL and data wires of the channel become
// free for a request of that direction. The soonest-issue time of a request
// is the largest of these. With REORDER set, the request with the smallest
// soonest-issue time is chosen; equal times go to the oldest. A request is
// never chosen ahead of an older one to the same line if either is a write,
// so a read never overtakes a write to the same data. With REORDER clear
// the controller is a plain FIFO (the comparison point).
//
// Every line is moved with the same closed-page sequence, offsets in memory
// cycles from the ROW ACT (values from the Table-1 timing set):
//   ACT 0 | COL RD/WR 9,13,17,21 | PRER 25 | read data 17..32 | write data 15..30
// and the bank may be activated again 33 cycles after its ACT. Up to four
// requests are in flight at once (the device pipeline depth). Command
// packets appear on the row_*/col_* ports as one-cycle strobes at the start
// of each four-cycle packet; data moves 32 bits per memory cycle on dq_*.
// A read completes with resp_valid in the cycle after its last data word.
//
// Interface timing: req_* is a valid/ready handshake (ready while the queue
// has room). The whole controller runs on the 400 MHz memory clock.
//
// Published: greedy soonest-issue-first order with FIFO tie-break and the
// read-after-write restriction, closed-page policy, the timing values, 8
// devices x 16 double banks. Own choices: queue depth, the fixed command
// sequence, full-table selection each cycle rather than a single running
// candidate (the same choice, computed in parallel), and the
// write-after-read restriction.
module reorder_mc
  import stream_pkg::*;
#(
  parameter int unsigned QDEPTH     = 40,
  parameter bit          REORDER    = 1'b1,
  parameter interleave_e INTERLEAVE = INTERLEAVE_LINE
) (
  input  logic        clk,
  input  logic        rst_n,
  // line requests
  input  logic        req_valid,
  output logic        req_ready,
  input  line_t       req_line,
  input  logic        req_write,
  input  logic        req_prefetch,
  input  line_data_t  req_data,
  // read completions
  output logic        resp_valid,
  output line_t       resp_line,
  output logic        resp_prefetch,
  output line_data_t  resp_data,
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
  // per-cycle event strobes
  output logic        ev_issue,
  output logic        ev_bypass,     // issued request was not the oldest
  output logic        ev_turnaround, // direction differs from previous issue
  output logic [$clog2(QDEPTH+1)-1:0] q_count
);
  localparam int unsigned NSLOT  = 4;
  localparam int unsigned NBANKS = NUM_DEV * NUM_BANK;
  localparam int unsigned QI_W   = $clog2(QDEPTH);
  localparam int unsigned TW     = 6;             // timer width (max 33)
  localparam int unsigned RB_W   = 32;            // ROW-bus reservation horizon
  typedef logic [TW-1:0] tmr_t;

  typedef struct packed {
    line_t      line;
    logic       write;
    logic       prefetch;
    dram_loc_t  loc;
  } qent_t;

  // ------------------------------------------------------------- the queue
  logic       q_valid [QDEPTH];
  qent_t      q       [QDEPTH];
  line_data_t q_data  [QDEPTH];

  dram_loc_t  req_loc;
  rdram_addr_map u_map (.mode(INTERLEAVE), .line(req_line), .loc(req_loc));

  // -------------------------------------------------------- timing state
  tmr_t             bank_wait [NBANKS];
  tmr_t             dev_wait  [NUM_DEV];
  tmr_t             col_wait;     // cycles until the COL wires are free
  tmr_t             dat_wait;     // cycles until the data wires are free
  logic [RB_W-1:0]  row_busy;     // bit k: ROW wires busy k cycles from now
  logic             last_write;

  function automatic tmr_t sat_sub(tmr_t a, int unsigned b);
    return (int'(a) > int'(b)) ? tmr_t'(int'(a) - int'(b)) : '0;
  endfunction

  function automatic tmr_t tmax(tmr_t a, tmr_t b);
    return (a > b) ? a : b;
  endfunction

  // -------------------------------------------------------- in-flight slots
  logic       s_valid [NSLOT];
  tmr_t       s_cnt   [NSLOT];
  qent_t      s_ent   [NSLOT];
  line_data_t s_data  [NSLOT];

  logic                     slot_free_found;
  logic [$clog2(NSLOT)-1:0] slot_free_idx;
  always_comb begin
    slot_free_found = 1'b0;
    slot_free_idx   = '0;
    for (int s = 0; s < NSLOT; s++) begin
      if (!s_valid[s] && !slot_free_found) begin
        slot_free_found = 1'b1;
        slot_free_idx   = $clog2(NSLOT)'(s);
      end
    end
  end

  // ------------------------------------------- soonest-issue time per entry
  tmr_t        soon    [QDEPTH];
  logic        elig    [QDEPTH];
  always_comb begin
    for (int j = 0; j < QDEPTH; j++) begin
      automatic int unsigned bi = int'(q[j].loc.dev) * NUM_BANK + int'(q[j].loc.bank);
      soon[j] = tmax(tmax(bank_wait[bi], dev_wait[q[j].loc.dev]),
                     tmax(sat_sub(col_wait, OFS_COL0),
                          sat_sub(dat_wait, q[j].write ? OFS_WDATA : OFS_RDATA)));
      elig[j] = q_valid[j];
      for (int i = 0; i < j; i++) begin
        if (q_valid[i] && q[i].line == q[j].line && (q[i].write || q[j].write))
          elig[j] = 1'b0;
      end
    end
  end

  // greedy choice: smallest soonest-issue time, oldest on a tie
  logic          sel_found;
  logic [QI_W-1:0] sel;
  tmr_t          sel_soon;
  always_comb begin
    sel_found = 1'b0;
    sel       = '0;
    sel_soon  = '1;
    if (REORDER) begin
      for (int j = 0; j < QDEPTH; j++) begin
        if (elig[j] && (!sel_found || soon[j] < sel_soon)) begin
          sel_found = 1'b1;
          sel       = QI_W'(j);
          sel_soon  = soon[j];
        end
      end
    end else begin
      sel_found = q_valid[0];
      sel_soon  = soon[0];
    end
  end

  logic issue;
  assign issue = sel_found && sel_soon == '0 && row_busy[T_PACK-1:0] == '0 &&
                 slot_free_found;

  assign ev_issue      = issue;
  assign ev_bypass     = issue && sel != '0;
  assign ev_turnaround = issue && q[sel].write != last_write;

  // queue occupancy
  logic [$clog2(QDEPTH+1)-1:0] cnt;
  assign q_count   = cnt;
  assign req_ready = cnt < ($clog2(QDEPTH+1))'(QDEPTH);

  // ------------------------------------------------------- channel outputs
  always_comb begin
    row_op = ROW_NOP; row_dev = '0; row_bank = '0; row_row = '0;
    col_op = COL_NOP; col_dev = '0; col_bank = '0; col_col = '0;
    dq_oe  = 1'b0;    dq_out  = '0;
    resp_valid = 1'b0; resp_line = '0; resp_prefetch = 1'b0; resp_data = '0;
    if (issue) begin
      row_op   = ROW_ACT;
      row_dev  = q[sel].loc.dev;
      row_bank = q[sel].loc.bank;
      row_row  = q[sel].loc.row;
    end
    for (int s = 0; s < NSLOT; s++) begin
      if (s_valid[s]) begin
        if (int'(s_cnt[s]) == OFS_PRER) begin
          row_op   = ROW_PRER;
          row_dev  = s_ent[s].loc.dev;
          row_bank = s_ent[s].loc.bank;
          row_row  = s_ent[s].loc.row;
        end
        for (int k = 0; k < COLS_PER_LINE; k++) begin
          if (int'(s_cnt[s]) == OFS_COL0 + k*T_CC) begin
            col_op   = s_ent[s].write ? COL_WR : COL_RD;
            col_dev  = s_ent[s].loc.dev;
            col_bank = s_ent[s].loc.bank;
            col_col  = s_ent[s].loc.col + col_t'(k);
          end
        end
        if (s_ent[s].write && int'(s_cnt[s]) >= OFS_WDATA &&
            int'(s_cnt[s]) < OFS_WDATA + LINE_BEATS) begin
          dq_oe  = 1'b1;
          dq_out = s_data[s][(int'(s_cnt[s]) - OFS_WDATA)*DQ_W +: DQ_W];
        end
        if (!s_ent[s].write && int'(s_cnt[s]) == OFS_DONE) begin
          resp_valid    = 1'b1;
          resp_line     = s_ent[s].line;
          resp_prefetch = s_ent[s].prefetch;
          resp_data     = s_data[s];
        end
      end
    end
  end

  // ------------------------------------------------------------ registers
  logic do_enq;
  assign do_enq = req_valid && req_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < QDEPTH; j++) begin
        q_valid[j] <= 1'b0;
        q[j]       <= '0;
        q_data[j]  <= '0;
      end
      cnt        <= '0;
      for (int b = 0; b < NBANKS; b++) bank_wait[b] <= '0;
      for (int d = 0; d < NUM_DEV; d++) dev_wait[d] <= '0;
      col_wait   <= '0;
      dat_wait   <= '0;
      row_busy   <= '0;
      last_write <= 1'b0;
      for (int s = 0; s < NSLOT; s++) begin
        s_valid[s] <= 1'b0;
        s_cnt[s]   <= '0;
        s_ent[s]   <= '0;
        s_data[s]  <= '0;
      end
    end else begin
      // -- queue: close up behind the issued entry, append the new one
      for (int j = 0; j < QDEPTH; j++) begin
        if (issue && j >= int'(sel)) begin
          if (j + 1 < QDEPTH) begin
            q_valid[j] <= q_valid[j+1];
            q[j]       <= q[j+1];
            q_data[j]  <= q_data[j+1];
          end else begin
            q_valid[j] <= 1'b0;
          end
        end
      end
      if (do_enq) begin
        automatic int unsigned pos = int'(cnt) - (issue ? 1 : 0);
        q_valid[pos] <= 1'b1;
        q[pos]       <= '{line: req_line, write: req_write,
                          prefetch: req_prefetch, loc: req_loc};
        q_data[pos]  <= req_data;
      end
      cnt <= cnt + $bits(cnt)'(do_enq) - $bits(cnt)'(issue);

      // -- timers count down
      for (int b = 0; b < NBANKS; b++) bank_wait[b] <= sat_sub(bank_wait[b], 1);
      for (int d = 0; d < NUM_DEV; d++) dev_wait[d] <= sat_sub(dev_wait[d], 1);
      col_wait <= sat_sub(col_wait, 1);
      dat_wait <= sat_sub(dat_wait, 1);
      row_busy <= row_busy >> 1;

      if (issue) begin
        automatic int unsigned d  = int'(q[sel].loc.dev);
        automatic int unsigned b  = int'(q[sel].loc.bank);
        automatic int unsigned bi = d * NUM_BANK + b;
        bank_wait[bi] <= tmr_t'(OFS_NEXTACT - 1);
        // double banks: a neighbour may not open until this bank is precharged
        if (b > 0)
          bank_wait[bi-1] <= tmax(sat_sub(bank_wait[bi-1], 1), tmr_t'(OFS_NEXTACT - 1));
        if (b + 1 < NUM_BANK)
          bank_wait[bi+1] <= tmax(sat_sub(bank_wait[bi+1], 1), tmr_t'(OFS_NEXTACT - 1));
        dev_wait[d] <= tmr_t'(T_RR - 1);
        col_wait    <= tmr_t'(OFS_COLFREE - 1);
        dat_wait    <= tmr_t'((q[sel].write ? OFS_WDATA : OFS_RDATA) + LINE_BEATS - 1);
        row_busy    <= (row_busy >> 1)
                     | RB_W'((1 << (T_PACK - 1)) - 1)                 // rest of ACT
                     | (RB_W'((1 << T_PACK) - 1) << (OFS_PRER - 1));  // PRER packet
        last_write  <= q[sel].write;
      end

      // -- in-flight slots
      for (int s = 0; s < NSLOT; s++) begin
        if (s_valid[s]) begin
          s_cnt[s] <= s_cnt[s] + 1'b1;
          if (!s_ent[s].write && int'(s_cnt[s]) >= OFS_RDATA &&
              int'(s_cnt[s]) < OFS_RDATA + LINE_BEATS)
            s_data[s][(int'(s_cnt[s]) - OFS_RDATA)*DQ_W +: DQ_W] <= dq_in;
          if (int'(s_cnt[s]) == OFS_DONE) s_valid[s] <= 1'b0;
        end
      end
      if (issue) begin
        s_valid[slot_free_idx] <= 1'b1;
        s_cnt[slot_free_idx]   <= tmr_t'(1);
        s_ent[slot_free_idx]   <= q[sel];
        s_data[slot_free_idx]  <= q_data[sel];
      end
    end
  end

  // Handshake and ordering rules.
  assert property (@(posedge clk) disable iff (!rst_n)
                   req_valid && !req_ready |=> $stable(req_line) || !req_valid);
  assert property (@(posedge clk) disable iff (!rst_n) issue |-> elig[sel]);
endmodule
