// tb_reorder_mc: checks the access-ordering memory controller against a
// behavioural Direct RDRAM model (tb/rdram_model.sv), which flags every
// command that breaks a Table-1 timing rule.
//
// Two controllers, one reordering and one strict FIFO, each with its own
// RDRAM model, receive the same request sequences. Checked:
//   * an isolated read: ROW ACT one cycle after the request, data returned
//     tRCD + 3*tCC + tCAC + tPACK cycles after the ACT (34 cycles after the
//     request is accepted);
//   * a stream of reads to consecutive lines runs at the channel's peak rate
//     of one 64-byte line per 16 memory cycles (1.6 GB/s at 400 MHz);
//   * random reads and write-backs over a small set of lines: every read
//     returns the data of the last write to that line issued before it (a
//     shadow memory in this testbench), and no timing rule is broken;
//   * a bank-conflict pattern: the reordering controller issues requests
//     out of order and finishes no later than the FIFO one.
module tb_reorder_mc;
  import stream_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle++;

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (cycle %0d)", what, cycle); end
  endtask

  // ------------------------------------------------------ two controllers
  logic        req_valid;
  line_t       req_line;
  logic        req_write;
  line_data_t  req_data;
  logic        req_ready   [2];
  logic        resp_valid  [2];
  line_t       resp_line   [2];
  logic        resp_pf     [2];
  line_data_t  resp_data   [2];
  row_op_e     row_op      [2];
  dev_t        row_dev     [2];
  bank_t       row_bank    [2];
  row_t        row_row     [2];
  col_op_e     col_op      [2];
  dev_t        col_dev     [2];
  bank_t       col_bank    [2];
  col_t        col_col     [2];
  logic        dq_oe       [2];
  logic [DQ_W-1:0] dq_out  [2];
  logic [DQ_W-1:0] dq_in   [2];
  logic        ev_issue [2], ev_bypass [2], ev_turn [2];
  logic [$clog2(41)-1:0] qc [2];
  logic        use_mc [2];   // which controllers take part in a phase
  logic        all_ready;    // a request is offered only when all can take it
  assign all_ready = (req_ready[0] || !use_mc[0]) && (req_ready[1] || !use_mc[1]);

  for (genvar g = 0; g < 2; g++) begin : g_mc
    reorder_mc #(.REORDER(g == 0)) mc (
      .clk, .rst_n,
      .req_valid(req_valid && use_mc[g] && all_ready), .req_ready(req_ready[g]),
      .req_line, .req_write, .req_prefetch(1'b0), .req_data,
      .resp_valid(resp_valid[g]), .resp_line(resp_line[g]),
      .resp_prefetch(resp_pf[g]), .resp_data(resp_data[g]),
      .row_op(row_op[g]), .row_dev(row_dev[g]), .row_bank(row_bank[g]), .row_row(row_row[g]),
      .col_op(col_op[g]), .col_dev(col_dev[g]), .col_bank(col_bank[g]), .col_col(col_col[g]),
      .dq_oe(dq_oe[g]), .dq_out(dq_out[g]), .dq_in(dq_in[g]),
      .ev_issue(ev_issue[g]), .ev_bypass(ev_bypass[g]), .ev_turnaround(ev_turn[g]),
      .q_count(qc[g]));
    rdram_model mem (
      .clk, .rst_n,
      .row_op(row_op[g]), .row_dev(row_dev[g]), .row_bank(row_bank[g]), .row_row(row_row[g]),
      .col_op(col_op[g]), .col_dev(col_dev[g]), .col_bank(col_bank[g]), .col_col(col_col[g]),
      .dq_oe(dq_oe[g]), .dq_out(dq_out[g]), .dq_in(dq_in[g]));
  end

  // ----------------------------------------------------- reference memory
  // expected data of unwritten lines: the model's init pattern, recomputed
  // here from the line's location under line interleaving
  function automatic line_data_t init_line(line_t l);
    line_data_t v;
    for (int c = 0; c < 4; c++) begin
      automatic logic [DEV_W+BANK_W+ROW_W+COL_W-1:0] k =
        {l[2:0], l[6:3], l[19:11], l[10:7], 2'(c)};
      v[c*128 +: 128] = {4{32'(k) * 32'h9E37_79B1 ^ 32'h5A5A_0000}};
    end
    return v;
  endfunction

  line_data_t shadow [line_t];
  line_data_t expq   [2][line_t][$];
  int outstanding [2];
  int n_resp [2], n_bypass [2], n_turn [2];

  always @(posedge clk) if (rst_n) begin
    for (int g = 0; g < 2; g++) begin
      if (resp_valid[g]) begin
        n_resp[g]++;
        outstanding[g]--;
        if (expq[g].exists(resp_line[g]) && expq[g][resp_line[g]].size() > 0) begin
          automatic line_data_t e = expq[g][resp_line[g]].pop_front();
          chk(resp_data[g] == e, $sformatf("mc%0d read data of line %h", g, resp_line[g]));
        end else begin
          chk(0, $sformatf("mc%0d unexpected response for line %h", g, resp_line[g]));
        end
      end
      if (ev_bypass[g]) n_bypass[g]++;
      if (ev_turn[g])   n_turn[g]++;
    end
  end

  // send one request to the selected controllers (both must accept)
  task automatic send(line_t l, bit wr);
    @(negedge clk);
    req_valid = 1; req_line = l; req_write = wr;
    for (int w = 0; w < LINE_BITS/32; w++) req_data[w*32 +: 32] = $urandom;
    while (!all_ready) @(negedge clk);
    if (!shadow.exists(l)) shadow[l] = init_line(l);
    for (int g = 0; g < 2; g++) if (use_mc[g]) begin
      if (wr) begin
        ;
      end else begin
        expq[g][l].push_back(shadow[l]);
        outstanding[g]++;
      end
    end
    if (wr) shadow[l] = req_data;
    @(posedge clk);
    #1 req_valid = 0;
  endtask

  task automatic drain(output longint t_done);
    while (outstanding[0] > 0 || outstanding[1] > 0 || qc[0] != 0 || qc[1] != 0)
      @(posedge clk);
    t_done = cycle;
    repeat (40) @(posedge clk);
  endtask

  longint t0, t1, t_act, t_resp;
  longint t_fifo, t_reord;
  int     last_act_cnt;

  initial begin
    req_valid = 0; req_line = '0; req_write = 0; req_data = '0;
    use_mc[0] = 1; use_mc[1] = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // 1. isolated read latency (reordering controller)
    use_mc[1] = 0;
    fork
      send(line_t'(26'h12345), 0);
      begin
        @(posedge clk iff (req_valid && all_ready)); t0 = cycle;
        @(posedge clk iff (row_op[0] == ROW_ACT)); t_act = cycle;
        @(posedge clk iff resp_valid[0]); t_resp = cycle;
      end
    join
    chk(t_act - t0 == 1, $sformatf("ACT one cycle after request (%0d)", t_act - t0));
    chk(t_resp - t_act == T_RCD + 3*T_CC + T_CAC + T_PACK,
        $sformatf("read latency ACT->done %0d", t_resp - t_act));
    drain(t1);

    // 2. peak rate: 32 reads to consecutive lines
    begin
      longint first_act = -1, last_act = -1;
      int acts = 0;
      fork
        for (int i = 0; i < 32; i++) send(line_t'(26'h20000 + i), 0);
        while (acts < 32) begin
          @(posedge clk);
          if (row_op[0] == ROW_ACT) begin
            if (first_act < 0) first_act = cycle;
            last_act = cycle; acts++;
          end
        end
      join
      chk(last_act - first_act == 31 * LINE_BEATS,
          $sformatf("32 lines in %0d cycles of ACT spacing (expected %0d)",
                    last_act - first_act, 31 * LINE_BEATS));
      drain(t1);
    end

    // 3. random reads and writes over 24 lines, both controllers
    use_mc[1] = 1;
    for (int i = 0; i < 400; i++) begin
      automatic line_t l = line_t'(26'h30000 + ($urandom % 24) * 37);
      send(l, ($urandom % 3) == 0);
    end
    drain(t1);

    // 4. bank conflicts: back-to-back pairs of lines in the same bank but
    //    different rows, each pair in another device/bank. In arrival order
    //    the second line of a pair must wait a full row cycle; the
    //    reordering controller fills that wait with the next pairs.
    for (int g = 1; g >= 0; g--) begin
      use_mc[0] = (g == 0); use_mc[1] = (g == 1);
      t0 = cycle;
      for (int i = 0; i < 24; i++) begin
        automatic int dv = i % 8, bk = 4 * ((i / 8) % 4);
        send(line_t'((6 << 11) | (bk << 3) | dv), 0);
        send(line_t'((7 << 11) | (bk << 3) | dv), 0);
      end
      drain(t1);
      if (g == 1) t_fifo = t1 - t0; else t_reord = t1 - t0;
    end
    chk(n_bypass[0] > 0, "reordering controller bypassed older requests");
    chk(n_bypass[1] == 0, "FIFO controller never bypasses");
    chk(t_reord <= t_fifo, $sformatf("reorder %0d cycles vs FIFO %0d", t_reord, t_fifo));
    chk(n_turn[0] > 0, "read/write turnarounds exercised");
    chk(g_mc[0].mem.violations == 0, "no RDRAM timing violations (reorder)");
    chk(g_mc[1].mem.violations == 0, "no RDRAM timing violations (FIFO)");
    chk(n_resp[0] > 100 && n_resp[1] > 100, "responses received");

    $display("reorder: %0d cycles, FIFO: %0d cycles; bypasses %0d, turnarounds %0d",
             t_reord, t_fifo, n_bypass[0], n_turn[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
