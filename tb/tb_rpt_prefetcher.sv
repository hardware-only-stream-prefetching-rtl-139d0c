// tb_rpt_prefetcher: drives constant-stride and irregular reference streams
// into the reference prediction table and checks the prefetched lines.
//
// Expected lines come from the prefetch rule itself: the k-th prefetch hit
// of a stream at address a (k = 1 for the first reference made while the
// entry is steady) must cause lines of a + o*stride, 1 <= o <= d_k, to be
// requested, with d_k = min(2^(k-1), 16) in adaptive mode; every such line
// exactly once, and nothing else. Also checked: irregular addresses produce
// no prefetches, a mispredicted address ends the stream, five instructions
// in one four-way set force replacement, and requests held under
// back-pressure stay stable. In the fixed-distance instance the first hit
// already requests 16 elements ahead and each later hit exactly one more.
module tb_rpt_prefetcher;
  import stream_pkg::*;

  logic  clk = 0, rst_n = 0;
  logic  ref_valid;
  addr_t ref_pc, ref_addr;
  logic  pf_valid, pf_ready;
  line_t pf_line;
  logic  ev_pf_hit, ev_pf_miss, ev_alloc;
  // fixed-distance instance
  logic  f_pf_valid;
  line_t f_pf_line;
  logic  f_hit, f_miss, f_alloc;

  int checks = 0, failures = 0, cycle = 0;
  int n_hit = 0, n_miss = 0, n_alloc = 0, n_stall = 0;

  rpt_prefetcher dut (.*);
  rpt_prefetcher #(.ADAPTIVE(1'b0)) dut_fixed (
    .clk, .rst_n, .ref_valid, .ref_pc, .ref_addr,
    .pf_valid(f_pf_valid), .pf_line(f_pf_line), .pf_ready(1'b1),
    .ev_pf_hit(f_hit), .ev_pf_miss(f_miss), .ev_alloc(f_alloc));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  // issued lines, counted per line
  int got   [line_t];
  int f_got [line_t];
  int f_requests = 0;
  always @(posedge clk) if (rst_n) begin
    if (pf_valid && pf_ready) got[pf_line] = got.exists(pf_line) ? got[pf_line] + 1 : 1;
    if (pf_valid && !pf_ready) n_stall++;
    if (f_pf_valid) begin
      f_got[f_pf_line] = f_got.exists(f_pf_line) ? f_got[f_pf_line] + 1 : 1;
      f_requests++;
    end
    if (ev_pf_hit)  n_hit++;
    if (ev_pf_miss) n_miss++;
    if (ev_alloc)   n_alloc++;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (cycle %0d)", what, cycle); end
  endtask

  task automatic ref_one(addr_t pc, addr_t a);
    @(negedge clk);
    ref_valid = 1; ref_pc = pc; ref_addr = a;
    @(negedge clk);
    ref_valid = 0;
  endtask

  task automatic idle(int n);
    repeat (n) @(negedge clk);
  endtask

  // expected line set of one stream of n references, first at a0
  int exp   [line_t];
  int f_exp [line_t];

  task automatic expect_stream(input addr_t a0, input int stride, input int n,
                               input bit adaptive);
    int d = 0;
    for (int j = 3; j < n; j++) begin        // hits start at the 4th reference
      addr_t a = a0 + addr_t'(j * stride);
      d = !adaptive ? 16 : (d == 0 ? 1 : (d * 2 > 16 ? 16 : d * 2));
      for (int o = 1; o <= d; o++) begin
        addr_t p = a + addr_t'(o * stride);
        if (adaptive) exp[p[ADDR_W-1:LINE_OFF_W]] = 1;
        else          f_exp[p[ADDR_W-1:LINE_OFF_W]] = 1;
      end
    end
  endtask

  task automatic compare(input bit fixed, input string name);
    int missing = 0, extra = 0, dup = 0, esize;
    if (!fixed) begin
      foreach (exp[l]) if (!got.exists(l)) missing++;
      foreach (got[l]) begin
        if (!exp.exists(l)) extra++;
        else if (got[l] != 1) dup++;
      end
      esize = exp.size();
    end else begin
      foreach (f_exp[l]) if (!f_got.exists(l)) missing++;
      foreach (f_got[l]) begin
        if (!f_exp.exists(l)) extra++;
        else if (f_got[l] != 1) dup++;
      end
      esize = f_exp.size();
    end
    chk(missing == 0, $sformatf("%s: %0d expected lines not requested", name, missing));
    chk(extra == 0,   $sformatf("%s: %0d unexpected lines requested", name, extra));
    chk(dup == 0,     $sformatf("%s: %0d lines requested twice", name, dup));
    chk(esize > 0, $sformatf("%s: non-empty expectation", name));
  endtask

  initial begin
    int c0;
    ref_valid = 0; ref_pc = '0; ref_addr = '0; pf_ready = 1;
    idle(3);
    rst_n = 1;
    idle(2);

    // 1. one stream, stride one line, adaptive distance
    for (int i = 0; i < 24; i++) begin ref_one(32'h0040_0100, 32'h0010_0000 + i*64); idle(20); end
    expect_stream(32'h0010_0000, 64, 24, 1);
    expect_stream(32'h0010_0000, 64, 24, 0);
    compare(0, "stride-64 stream");
    compare(1, "stride-64 stream, fixed distance");
    chk(n_hit == 21, $sformatf("21 prefetch hits, got %0d", n_hit));
    // fixed distance: first hit requests 16 lines, every later one exactly 1
    chk(f_requests == 16 + 20, $sformatf("fixed-distance request count %0d", f_requests));
    exp.delete(); got.delete(); f_exp.delete(); f_got.delete();

    // 2. two interleaved streams (copy kernel: load x[i], store y[i]),
    //    8-byte elements, prefetch requests back-pressured at random
    fork
      begin
        for (int i = 0; i < 200; i++) begin
          ref_one(32'h0040_0200, 32'h0020_0000 + i*8);
          ref_one(32'h0040_0204, 32'h0030_0000 + i*8);
          idle(6);
        end
      end
      begin
        while (1) begin
          @(negedge clk);
          pf_ready = ($urandom % 3) != 0;
        end
      end
    join_any
    disable fork;
    pf_ready = 1;
    idle(60);
    expect_stream(32'h0020_0000, 8, 200, 1);
    expect_stream(32'h0030_0000, 8, 200, 1);
    compare(0, "two unit-stride streams");
    chk(n_stall > 0, "back-pressure exercised");
    exp.delete(); got.delete();

    // 3. negative stride of three lines
    for (int i = 0; i < 30; i++) begin ref_one(32'h0040_0300, 32'h0080_0000 - i*192); idle(20); end
    expect_stream(32'h0080_0000, -192, 30, 1);
    compare(0, "negative stride");
    exp.delete(); got.delete();

    // 4. irregular addresses: never steady, no prefetch
    c0 = n_hit;
    for (int i = 0; i < 60; i++) begin
      ref_one(32'h0040_0400, {$urandom} & 32'h00ff_fff8); idle(3);
    end
    idle(40);
    chk(got.size() == 0, $sformatf("irregular stream prefetched %0d lines", got.size()));
    chk(n_hit == c0, "no prefetch hits on irregular stream");

    // 5. stream end: a steady stream jumps; no prefetch from the old stride
    got.delete();
    c0 = n_miss;
    for (int i = 0; i < 10; i++) begin ref_one(32'h0040_0500, 32'h0050_0000 + i*128); idle(20); end
    got.delete();
    ref_one(32'h0040_0500, 32'h0090_0000);          // misprediction
    idle(40);
    chk(n_miss == c0 + 1, "stream end detected");
    chk(got.size() == 0, "no prefetch after stream end");

    // 6. five instructions in one set (index bits equal): replacement
    c0 = n_alloc;
    for (int k = 0; k < 5; k++) ref_one(32'h0041_0600 + k * 32'h40, 32'h0060_0000);
    for (int k = 0; k < 5; k++) ref_one(32'h0041_0600 + k * 32'h40, 32'h0060_0000);
    chk(n_alloc == c0 + 10, $sformatf("round-robin replacement in a full set (%0d)", n_alloc - c0));

    $display("hits=%0d misses=%0d allocs=%0d stalls=%0d", n_hit, n_miss, n_alloc, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
