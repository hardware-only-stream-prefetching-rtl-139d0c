// tb_rdram_addr_map: checks both address interleavings against a reference
// decomposition computed with division and remainder, and that consecutive
// lines (line interleave) or consecutive 1 KB pages (page interleave) land on
// consecutive devices.
module tb_rdram_addr_map;
  import stream_pkg::*;

  interleave_e mode;
  line_t       line;
  dram_loc_t   loc;
  int checks = 0, failures = 0;

  rdram_addr_map dut (.*);

  task automatic check(input dram_loc_t exp);
    #1;
    checks++;
    if (loc !== exp) begin
      failures++;
      $display("FAIL mode=%0d line=%h got %p exp %p", mode, line, loc, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 2000; n++) begin
      automatic int unsigned l = (n < 64) ? n : ($urandom % (1 << 20));
      automatic int unsigned byte_addr = l * 64;
      dram_loc_t e;
      line = line_t'(l);
      // line interleave: device = line mod 8, bank = (line/8) mod 16,
      // line-in-row = (line/128) mod 16, row = (line/2048) mod 512
      mode = INTERLEAVE_LINE;
      e.dev  = dev_t'(l % 8);
      e.bank = bank_t'((l / 8) % 16);
      e.col  = col_t'(((l / 128) % 16) * 4);
      e.row  = row_t'((l / 2048) % 512);
      check(e);
      // page interleave: page = byte/1024, device = page mod 8,
      // bank = (page/8) mod 16, row = (page/128) mod 512, col = (byte%1024)/16
      mode = INTERLEAVE_PAGE;
      e.dev  = dev_t'((byte_addr / 1024) % 8);
      e.bank = bank_t'((byte_addr / 8192) % 16);
      e.row  = row_t'((byte_addr / 131072) % 512);
      e.col  = col_t'((byte_addr % 1024) / 16);
      check(e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
