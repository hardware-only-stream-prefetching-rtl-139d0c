// stream_sys_harness: reusable simulation harness around stream_mem_top for
// configuration sweeps (simulation only).
//
// It holds the same stand-ins as the end-to-end testbench: an in-order CPU
// that runs one vector kernel (KERNEL 0 copy, 1 daxpy, 2 swap, 3 vaxpy) for
// ITERS iterations with STRIDE-element steps, an L2 of 4096 64-byte lines
// (write-allocate, write-back, FIFO replacement, one demand miss at a time)
// and the behavioural RDRAM model. After reset it runs the kernel, waits for
// the memory system to drain and raises `done`. Results: `cycles` (kernel
// run time), `demand` (L2 demand misses), `errors` (wrong fill data plus
// RDRAM timing violations).
module stream_sys_harness
  import stream_pkg::*;
#(
  parameter int unsigned MAX_DIST   = 16,
  parameter bit          ADAPTIVE   = 1'b1,
  parameter bit          REORDER    = 1'b1,
  parameter interleave_e INTERLEAVE = INTERLEAVE_LINE,
  parameter int          KERNEL     = 0,
  parameter int          STRIDE     = 1,
  parameter int          ITERS      = 2000
) (
  input  logic   clk,
  input  logic   rst_n,
  output logic   done,
  output longint cycles,
  output int     demand,
  output int     errors
);
  localparam int L2_LINES = 4096;

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

  stream_mem_top #(.MAX_DIST(MAX_DIST), .ADAPTIVE(ADAPTIVE), .REORDER(REORDER),
                   .INTERLEAVE(INTERLEAVE)) dut (.*);
  rdram_model mem (.*);

  longint cyc = 0;
  always @(posedge clk) cyc++;

  line_data_t l2_data  [line_t];
  bit         l2_dirty [line_t];
  line_t      l2_fifo  [$];
  line_data_t shadow   [line_t];
  line_t      wb_q  [$];
  line_data_t wb_dq [$];
  line_t      dm_pending_line;
  logic       dm_pending = 0;
  int         bad_data = 0;

  assign pf_probe_hit = pf_probe_valid && (l2_data.exists(pf_probe_line) ||
                                           (dm_pending && dm_pending_line == pf_probe_line));

  // unwritten memory: the RDRAM model's pattern at this line's location,
  // with the location worked out here for each mapping
  function automatic line_data_t init_line(line_t l);
    line_data_t v;
    for (int c = 0; c < 4; c++) begin
      automatic logic [DEV_W+BANK_W+ROW_W+COL_W-1:0] k;
      if (INTERLEAVE == INTERLEAVE_PAGE) k = {l[6:4], l[10:7], l[19:11], l[3:0], 2'(c)};
      else                               k = {l[2:0], l[6:3], l[19:11], l[10:7], 2'(c)};
      v[c*128 +: 128] = {4{32'(k) * 32'h9E37_79B1 ^ 32'h5A5A_0000}};
    end
    return v;
  endfunction

  always @(posedge clk) if (rst_n && fill_valid && !l2_data.exists(fill_line)) begin
    if (fill_data != (shadow.exists(fill_line) ? shadow[fill_line] : init_line(fill_line)))
      bad_data++;
    l2_data[fill_line]  = fill_data;
    l2_dirty[fill_line] = 0;
    l2_fifo.push_back(fill_line);
    if (l2_fifo.size() > L2_LINES) begin
      automatic line_t v = l2_fifo.pop_front();
      if (l2_dirty[v]) begin
        wb_q.push_back(v); wb_dq.push_back(l2_data[v]); shadow[v] = l2_data[v];
      end
      l2_data.delete(v); l2_dirty.delete(v);
    end
  end

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
      dm_send(l, 1, d);
    end
  endtask

  task automatic cpu_ref(addr_t pc, addr_t a, bit store);
    automatic line_t l = a[ADDR_W-1:LINE_OFF_W];
    @(negedge clk);
    ref_valid = 1; ref_pc = pc; ref_addr = a;
    @(negedge clk);
    ref_valid = 0;
    if (!l2_data.exists(l)) begin
      flush_wb();
      demand++;
      dm_pending_line = l; dm_pending = 1;
      dm_send(l, 0, '0);
      while (!l2_data.exists(l)) @(posedge clk);
      dm_pending = 0;
    end
    if (store) begin
      l2_data[l][a[LINE_OFF_W-1:3]*64 +: 64] = {$urandom, $urandom};
      l2_dirty[l] = 1;
    end
    flush_wb();
  endtask

  initial begin
    addr_t x = 32'h0040_0000, y = 32'h0060_0000, av = 32'h0080_0000, pc = 32'h0040_1000;
    longint t0;
    done = 0; cycles = 0; demand = 0; errors = 0;
    ref_valid = 0; ref_pc = '0; ref_addr = '0;
    dm_valid = 0; dm_line = '0; dm_write = 0; dm_data = '0;
    @(posedge clk iff rst_n);
    repeat (2) @(posedge clk);
    t0 = cyc;
    for (int i = 0; i < ITERS * STRIDE; i += STRIDE) begin
      automatic addr_t o = addr_t'(i * 8);
      case (KERNEL)
        0: begin cpu_ref(pc, x+o, 0); cpu_ref(pc+4, y+o, 1); end
        1: begin cpu_ref(pc, x+o, 0); cpu_ref(pc+4, y+o, 0); cpu_ref(pc+8, y+o, 1); end
        2: begin cpu_ref(pc, x+o, 0); cpu_ref(pc+4, y+o, 0);
                 cpu_ref(pc+8, x+o, 1); cpu_ref(pc+12, y+o, 1); end
        default: begin cpu_ref(pc, av+o, 0); cpu_ref(pc+4, x+o, 0);
                       cpu_ref(pc+8, y+o, 0); cpu_ref(pc+12, y+o, 1); end
      endcase
    end
    cycles = cyc - t0;
    while (pf_outstanding != 0 || mc_queued != 0) @(posedge clk);
    repeat (40) @(posedge clk);
    errors = bad_data + mem.violations;
    done = 1;
  end
endmodule
