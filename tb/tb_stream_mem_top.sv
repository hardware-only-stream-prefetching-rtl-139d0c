// tb_stream_mem_top: end-to-end run of the whole prefetching, reordering
// memory system at its default parameters.
//
// A simple in-order CPU stand-in executes the four vector kernels copy,
// daxpy, swap and vaxpy (8-byte elements, unit stride and stride ten),
// presenting every load and store address, with its own instruction
// address, to the prefetcher. An L2 stand-in (4096 lines of 64 bytes,
// write-allocate, write-back, first-in first-out replacement, one demand
// miss at a time) answers the prefetcher's tag probes, sends demand misses
// and dirty write-backs, and blocks the CPU until its miss is filled. A
// behavioural Direct RDRAM model sits on the channel and checks its timing.
//
// Checked: every fill carries the data last written to that line (a shadow
// memory kept here), every demand miss is filled, no RDRAM timing rule is
// broken, prefetching removes at least half of the demand misses of the
// unit-stride kernels,
// and each mechanism of the design occurs at least once: prefetch issue,
// prefetch dropped on an L2 hit, prefetch dropped as already outstanding,
// demand miss merged with an outstanding prefetch, prefetcher held back by
// a full outstanding-prefetch table, distance grown to 16, stream end,
// RPT replacement, controller bypassing an older request, read/write
// turnaround, and write-back.
module tb_stream_mem_top;
  import stream_pkg::*;

  localparam int L2_LINES = 4096;
  localparam int ITERS    = 10000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  longint cycle = 0;
  always @(posedge clk) cycle++;
  int checks = 0, failures = 0;

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (cycle %0d)", what, cycle); end
  endtask

  // ------------------------------------------------------------------ DUT
  logic        ref_valid;
  addr_t       ref_pc, ref_addr;
  logic        pf_probe_valid, pf_probe_hit;
  line_t       pf_probe_line;
  logic        dm_valid, dm_ready, dm_write;
  line_t       dm_line;
  line_data_t  dm_data;
  logic        fill_valid, fill_prefetch;
  line_t       fill_line;
  line_data_t  fill_data;
  row_op_e     row_op;  dev_t row_dev; bank_t row_bank; row_t row_row;
  col_op_e     col_op;  dev_t col_dev; bank_t col_bank; col_t col_col;
  logic        dq_oe;
  logic [DQ_W-1:0] dq_out, dq_in;
  stream_ev_t  events;
  logic [5:0]  pf_outstanding, mc_queued;

  stream_mem_top dut (.*);
  rdram_model    mem (.*);

  // --------------------------------------------------------- L2 stand-in
  line_data_t l2_data  [line_t];
  bit         l2_dirty [line_t];
  bit         l2_pf    [line_t];   // brought in by a prefetch, not yet used
  line_t      l2_fifo  [$];
  line_data_t shadow   [line_t];   // memory contents as the testbench sees them

  // the probe hits a line held or being fetched by a demand miss
  line_t dm_pending_line;
  logic  dm_pending = 0;
  assign pf_probe_hit = pf_probe_valid && (l2_data.exists(pf_probe_line) ||
                                           (dm_pending && dm_pending_line == pf_probe_line));

  function automatic line_data_t init_line(line_t l);
    line_data_t v;
    for (int c = 0; c < 4; c++) begin
      automatic logic [DEV_W+BANK_W+ROW_W+COL_W-1:0] k =
        {l[2:0], l[6:3], l[19:11], l[10:7], 2'(c)};
      v[c*128 +: 128] = {4{32'(k) * 32'h9E37_79B1 ^ 32'h5A5A_0000}};
    end
    return v;
  endfunction

  function automatic line_data_t mem_line(line_t l);
    return shadow.exists(l) ? shadow[l] : init_line(l);
  endfunction

  // counters
  int n_fill = 0, n_fill_pf = 0, n_demand = 0, n_wb = 0, n_l2_hit = 0, n_pf_used = 0;
  int n_pf_enq = 0, n_probe_drop = 0, n_dup_drop = 0, n_merge = 0, n_mshr_full = 0;
  int n_bypass = 0, n_turn = 0, n_stream_end = 0, n_dist_max = 0, n_alloc = 0;
  int n_refs = 0;

  // one pending write-back queue feeding the dm port (FIFO of lines)
  line_t      wb_q  [$];
  line_data_t wb_dq [$];

  always @(posedge clk) if (rst_n) begin
    if (fill_valid) begin
      n_fill++;
      if (fill_prefetch) n_fill_pf++;
      if (!l2_data.exists(fill_line)) begin
        chk(fill_data == mem_line(fill_line),
            $sformatf("fill data of line %h", fill_line));
        l2_data[fill_line]  = fill_data;
        l2_dirty[fill_line] = 0;
        l2_pf[fill_line]    = fill_prefetch;
        l2_fifo.push_back(fill_line);
        if (l2_fifo.size() > L2_LINES) begin
          automatic line_t v = l2_fifo.pop_front();
          if (l2_dirty[v]) begin
            wb_q.push_back(v); wb_dq.push_back(l2_data[v]);
            shadow[v] = l2_data[v];
          end
          l2_data.delete(v); l2_dirty.delete(v); l2_pf.delete(v);
        end
      end
    end
    if (events.pf_issue)      n_pf_enq++;
    if (events.pf_drop_l2)    n_probe_drop++;
    if (events.pf_drop_dup)   n_dup_drop++;
    if (events.dm_merge)      n_merge++;
    if (events.pf_stall_full) n_mshr_full++;
    if (events.mc_bypass)     n_bypass++;
    if (events.mc_turnaround) n_turn++;
    if (events.pf_miss)       n_stream_end++;
    if (events.rpt_alloc)     n_alloc++;
    if (events.pf_hit && dut.u_rpt.dist_next == 5'(16)) n_dist_max++;
  end

  // ------------------------------------------------------- demand port
  // Write-backs leave first; a demand read waits for them (they are older).
  task automatic dm_send(line_t l, bit wr, line_data_t d);
    @(negedge clk);
    dm_valid = 1; dm_line = l; dm_write = wr; dm_data = d;
    @(posedge clk iff dm_ready);
    #1 dm_valid = 0;
  endtask

  task automatic flush_wb();
    while (wb_q.size() > 0) begin
      automatic line_t l = wb_q.pop_front();
      automatic line_data_t d = wb_dq.pop_front();
      n_wb++;
      dm_send(l, 1, d);
    end
  endtask

  // ----------------------------------------------------------- CPU stand-in
  task automatic cpu_ref(addr_t pc, addr_t a, bit store);
    automatic line_t l = a[ADDR_W-1:LINE_OFF_W];
    @(negedge clk);
    ref_valid = 1; ref_pc = pc; ref_addr = a;
    @(negedge clk);
    ref_valid = 0;
    n_refs++;
    if (l2_data.exists(l)) begin
      n_l2_hit++;
      if (l2_pf[l]) begin n_pf_used++; l2_pf[l] = 0; end
    end else begin
      flush_wb();
      n_demand++;
      dm_pending_line = l; dm_pending = 1;
      dm_send(l, 0, '0);
      while (!l2_data.exists(l)) @(posedge clk);
      dm_pending = 0;
      l2_pf[l] = 0;
    end
    if (store) begin
      automatic int unsigned off = a[LINE_OFF_W-1:3];
      l2_data[l][off*64 +: 64] = {$urandom, $urandom};
      l2_dirty[l] = 1;
    end
    flush_wb();
  endtask

  // kernels: arrays of 8-byte elements, S = stride in elements
  int run = 0;
  task automatic run_kernel(string name, int s);
    // fresh arrays for every run: x, y and a 2 MB apart
    addr_t x = 32'h0040_0000 + addr_t'(run) * 32'h0060_0000;
    addr_t y = x + 32'h0020_0000, av = x + 32'h0040_0000;
    int streams = (name == "copy") ? 2 : (name == "vaxpy") ? 3 : 2;
    addr_t pc = 32'h0040_1000;
    longint t0 = cycle;
    int d0 = n_demand;
    for (int i = 0; i < ITERS * s; i += s) begin
      automatic addr_t o = addr_t'(i * 8);
      case (name)
        "copy":  begin cpu_ref(pc, x+o, 0); cpu_ref(pc+4, y+o, 1); end
        "daxpy": begin cpu_ref(pc, x+o, 0); cpu_ref(pc+4, y+o, 0); cpu_ref(pc+8, y+o, 1); end
        "swap":  begin cpu_ref(pc, x+o, 0); cpu_ref(pc+4, y+o, 0);
                       cpu_ref(pc+8, x+o, 1); cpu_ref(pc+12, y+o, 1); end
        default: begin cpu_ref(pc, av+o, 0); cpu_ref(pc+4, x+o, 0);
                       cpu_ref(pc+8, y+o, 0); cpu_ref(pc+12, y+o, 1); end
      endcase
    end
    $display("%-6s stride %0d: %0d cycles, %0d demand misses", name, s,
             cycle - t0, n_demand - d0);
    run++;
    // unit stride: fewer than half of the lines touched may miss
    if (s == 1) chk(n_demand - d0 < ITERS * 8 * streams / LINE_BYTES / 2,
                    $sformatf("%s unit stride: prefetching removes most misses", name));
  endtask

  int n_unfilled;
  initial begin
    ref_valid = 0; ref_pc = '0; ref_addr = '0;
    dm_valid = 0; dm_line = '0; dm_write = 0; dm_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    run_kernel("copy", 1);  run_kernel("copy", 10);
    run_kernel("daxpy", 1); run_kernel("daxpy", 10);
    run_kernel("swap", 1);  run_kernel("swap", 10);
    run_kernel("vaxpy", 1); run_kernel("vaxpy", 10);
    // irregular references from another instruction: no stream
    for (int i = 0; i < 200; i++) cpu_ref(32'h0040_2000, ({$urandom} % 32'h0010_0000) & ~32'h7, 0);
    repeat (400) @(posedge clk);

    chk(mem.violations == 0, "no RDRAM timing violations");
    chk(pf_outstanding == 0 && mc_queued == 0, "all prefetches filled");
    chk(n_pf_enq > 0,      "prefetches issued");
    chk(n_fill_pf > 0,     "prefetch fills");
    chk(n_pf_used > 0,     "prefetched lines used");
    chk(n_probe_drop > 0,  "prefetch dropped on L2 hit");
    chk(n_dup_drop > 0,    "prefetch dropped as already outstanding");
    chk(n_merge > 0,       "demand miss merged with outstanding prefetch");
    chk(n_mshr_full > 0,   "outstanding-prefetch table full");
    chk(n_dist_max > 0,    "adaptive distance reached 16");
    chk(n_stream_end > 0,  "stream end detected");
    chk(n_alloc > 0,       "RPT entries allocated");
    chk(n_bypass > 0,      "controller reordered requests");
    chk(n_turn > 0,        "read/write turnaround");
    chk(n_wb > 0,          "write-backs");
    $display("refs=%0d L2 hits=%0d demand=%0d merged=%0d wb=%0d", n_refs, n_l2_hit, n_demand, n_merge, n_wb);
    $display("pf enq=%0d fills=%0d used=%0d probe-drop=%0d dup-drop=%0d mshr-full=%0d",
             n_pf_enq, n_fill_pf, n_pf_used, n_probe_drop, n_dup_drop, n_mshr_full);
    $display("bypass=%0d turnaround=%0d stream-end=%0d dist16=%0d alloc=%0d cycles=%0d",
             n_bypass, n_turn, n_stream_end, n_dist_max, n_alloc, cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
