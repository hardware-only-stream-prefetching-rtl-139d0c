// tb_stream_sweep: the copy kernel (y[i] = x[i], 8-byte elements, 2000
// iterations) at unit stride and stride ten, run on the whole memory system
// in several configurations side by side:
//   baseline (no prefetching, FIFO controller), fixed prefetch distance
//   1/2/4/8/16 and adaptive distance, each with reordering, and adaptive
//   without reordering, on the line-interleaved mapping; baseline and
//   adaptive with and without reordering on the page-interleaved mapping.
// It prints run time normalised to the baseline and the demand misses
// relative to the baseline, and checks: no data or timing errors anywhere;
// for unit stride, distance 16 leaves fewer L2 demand misses than distance 1;
// adaptive prefetching with reordering runs faster than the baseline, and
// no slower than adaptive prefetching alone, at both strides and on both
// mappings.
module tb_stream_sweep;
  import stream_pkg::*;

  localparam int NCFG = 11;
  localparam int ITERS = 2000;
  // configuration table: {max distance, adaptive, reorder, page mapping}
  localparam int CFG_DIST [NCFG] = '{0, 1, 2, 4, 8, 16, 16, 16,  0, 16, 16};
  localparam bit CFG_ADPT [NCFG] = '{0, 0, 0, 0, 0,  0,  1,  1,  0,  1,  1};
  localparam bit CFG_REOR [NCFG] = '{0, 1, 1, 1, 1,  1,  1,  0,  0,  1,  0};
  localparam bit CFG_PAGE [NCFG] = '{0, 0, 0, 0, 0,  0,  0,  0,  1,  1,  1};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic   done   [2][NCFG];
  longint cycles [2][NCFG];
  int     demand [2][NCFG];
  int     errors [2][NCFG];

  for (genvar s = 0; s < 2; s++) begin : g_stride
    for (genvar c = 0; c < NCFG; c++) begin : g_cfg
      stream_sys_harness #(
        .MAX_DIST  (CFG_DIST[c]),
        .ADAPTIVE  (CFG_ADPT[c]),
        .REORDER   (CFG_REOR[c]),
        .INTERLEAVE(CFG_PAGE[c] ? INTERLEAVE_PAGE : INTERLEAVE_LINE),
        .KERNEL    (0),
        .STRIDE    (s == 0 ? 1 : 10),
        .ITERS     (ITERS)
      ) h (.clk, .rst_n, .done(done[s][c]), .cycles(cycles[s][c]),
           .demand(demand[s][c]), .errors(errors[s][c]));
    end
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic string cname(int c);
    string n;
    if (CFG_DIST[c] == 0) n = "baseline";
    else if (CFG_ADPT[c]) n = "adaptive";
    else n = $sformatf("prefetch%0d", CFG_DIST[c]);
    if (CFG_REOR[c]) n = {n, "+reorder"};
    return {CFG_PAGE[c] ? "page " : "line ", n};
  endfunction

  bit all_done;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    do begin
      @(posedge clk);
      all_done = 1;
      for (int s = 0; s < 2; s++) for (int c = 0; c < NCFG; c++) all_done &= done[s][c];
    end while (!all_done);
    for (int s = 0; s < 2; s++) begin
      $display("copy, stride %0d", s == 0 ? 1 : 10);
      for (int c = 0; c < NCFG; c++) begin
        automatic int b = CFG_PAGE[c] ? 8 : 0;
        $display("  %-26s cycles %8d  normalised %5.3f  demand misses %5d (%5.1f%%)",
                 cname(c), cycles[s][c], real'(cycles[s][c]) / real'(cycles[s][b]),
                 demand[s][c], 100.0 * demand[s][c] / demand[s][b]);
        chk(errors[s][c] == 0, $sformatf("%s stride %0d: no errors", cname(c), s));
      end
      chk(cycles[s][6] < cycles[s][0], $sformatf("line: adaptive+reorder beats baseline, stride %0d", s));
      chk(cycles[s][9] < cycles[s][8], $sformatf("page: adaptive+reorder beats baseline, stride %0d", s));
      chk(cycles[s][6] <= cycles[s][7], $sformatf("line: reordering does not slow adaptive, stride %0d", s));
      chk(cycles[s][9] <= cycles[s][10], $sformatf("page: reordering does not slow adaptive, stride %0d", s));
    end
    chk(demand[0][5] < demand[0][1], "unit stride: distance 16 leaves fewer misses than distance 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
