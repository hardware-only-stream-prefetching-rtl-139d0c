// rdram_addr_map: physical line address to Direct RDRAM location.
//
// Combinational. The memory is eight 64 Mbit devices on one channel; each
// device has 16 banks of 512 rows of 1 KB (64 dualocts of 16 bytes), so a
// 64-byte line is four consecutive dualocts of one row. Two mappings:
//   INTERLEAVE_LINE  consecutive lines rotate over the devices, then banks:
//     line[2:0] device, line[6:3] bank, line[10:7] line-in-row, line[19:11] row
//   INTERLEAVE_PAGE  consecutive 1 KB pages rotate over devices, then banks:
//     line[3:0] line-in-row, line[6:4] device, line[10:7] bank, line[19:11] row
// Address bits above the 64 MB of memory are ignored. The two interleavings
// and the device geometry follow the published memory system; the bit
// order inside each mapping is this design's own.
module rdram_addr_map
  import stream_pkg::*;
(
  input  interleave_e mode,
  input  line_t       line,
  output dram_loc_t   loc
);
  localparam int unsigned LIR_W = COL_W - 2;   // line-in-row bits (16 lines)

  always_comb begin
    loc = '0;
    if (mode == INTERLEAVE_PAGE) begin
      loc.col  = {line[LIR_W-1:0], 2'b00};
      loc.dev  = line[LIR_W +: DEV_W];
      loc.bank = line[LIR_W+DEV_W +: BANK_W];
    end else begin
      loc.dev  = line[0 +: DEV_W];
      loc.bank = line[DEV_W +: BANK_W];
      loc.col  = {line[DEV_W+BANK_W +: LIR_W], 2'b00};
    end
    loc.row = line[DEV_W+BANK_W+LIR_W +: ROW_W];
  end
endmodule
