// tb_pf_mshr: random allocate/fill/lookup traffic against a queue-based
// reference model of the outstanding-prefetch set; checks lookup hits, the
// full flag, the fill-hit flag and the count every cycle, and that exactly
// DEPTH distinct lines fill it.
module tb_pf_mshr;
  import stream_pkg::*;
  localparam int DEPTH = 32;

  logic  clk = 0, rst_n = 0;
  line_t lookup_line, merge_line, alloc_line, fill_line;
  logic  lookup_hit, merge_hit, alloc_valid, full, fill_valid, fill_hit;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0, cycles = 0;
  int fulls = 0;

  pf_mshr dut (.*);

  always #5 clk = ~clk;

  line_t model[$];

  function automatic bit in_model(line_t l);
    foreach (model[i]) if (model[i] == l) return 1;
    return 0;
  endfunction

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at cycle %0d", what, cycles); end
  endtask

  initial begin
    alloc_valid = 0; fill_valid = 0;
    lookup_line = '0; merge_line = '0; alloc_line = '0; fill_line = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      cycles++;
      // random stimulus over a small line space so hits are common
      lookup_line = line_t'($urandom % 48);
      merge_line  = line_t'($urandom % 48);
      alloc_line  = line_t'($urandom % 48);
      fill_line   = (model.size() > 0 && $urandom % 2) ?
                    model[$urandom % model.size()] : line_t'($urandom % 48);
      fill_valid  = ($urandom % 4) == 0 || n > 3500;
      alloc_valid = !in_model(alloc_line) && model.size() < DEPTH &&
                    (n < 1500 || $urandom % 2);
      #1;
      if (full) alloc_valid = 0;   // a well-behaved user never allocates when full
      #1;
      chk(lookup_hit == in_model(lookup_line), "lookup_hit");
      chk(merge_hit  == in_model(merge_line),  "merge_hit");
      chk(full == (model.size() == DEPTH), "full");
      chk(int'(count) == model.size(), "count");
      chk(fill_hit == (fill_valid && in_model(fill_line)), "fill_hit");
      if (full) fulls++;
      @(posedge clk);
      if (fill_valid) begin
        foreach (model[i]) if (model[i] == fill_line) begin model.delete(i); break; end
      end
      if (alloc_valid) model.push_back(alloc_line);
    end
    chk(fulls > 0, "table reached full");
    $display("full cycles=%0d", fulls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
