// rdram_model: behavioural model of a Direct Rambus channel with eight
// devices of 16 double banks, for simulation only (not synthesizable).
//
// It watches the ROW and COL command strobes and the write-data wires,
// stores written dualocts (16 bytes), and drives read data tCAC cycles
// after each COL RD packet, one 32-bit word per cycle for four cycles. Data
// never written reads as init_word(), a fixed function of the location.
// Every command is checked against the Table-1 timing rules:
//   ACT : bank precharged for tRP, tRC since its last ACT, tRR since the
//         device's last ACT, neither neighbouring bank open (shared sense
//         amplifiers), ROW wires free (one packet per tPACK)
//   COL : bank open for tRCD, tCC since the last COL packet
//   PRER: bank open for tRAS, tRDP since its last COL RD
//   data: write data present tCWD after COL WR, no two data packets overlap
// Violations are counted in `violations` and printed.
module rdram_model
  import stream_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  row_op_e         row_op,
  input  dev_t            row_dev,
  input  bank_t           row_bank,
  input  row_t            row_row,
  input  col_op_e         col_op,
  input  dev_t            col_dev,
  input  bank_t           col_bank,
  input  col_t            col_col,
  input  logic            dq_oe,
  input  logic [DQ_W-1:0] dq_out,
  output logic [DQ_W-1:0] dq_in
);
  typedef logic [DEV_W+BANK_W+ROW_W+COL_W-1:0] key_t;

  int violations = 0;
  int n_act = 0, n_prer = 0, n_rd = 0, n_wr = 0;
  longint cyc = 0;

  logic [127:0] mem [key_t];
  logic [DQ_W-1:0] rd_sched [longint];
  key_t         wr_key  [longint];   // cycle -> location of a write word
  int           wr_word [longint];
  bit           dbus    [longint];   // data wires booked

  localparam longint NEVER = -1000;
  longint last_act [NUM_DEV][NUM_BANK];
  longint last_prer[NUM_DEV][NUM_BANK];
  longint last_rd  [NUM_DEV][NUM_BANK];
  bit     open_b   [NUM_DEV][NUM_BANK];
  row_t   open_row [NUM_DEV][NUM_BANK];
  longint dev_act  [NUM_DEV];
  longint last_row_pkt = NEVER, last_col_pkt = NEVER;

  function automatic logic [127:0] init_word(key_t k);
    return {4{32'(k) * 32'h9E37_79B1 ^ 32'h5A5A_0000}};
  endfunction

  function automatic key_t mk(dev_t d, bank_t b, row_t r, col_t c);
    return {d, b, r, c};
  endfunction

  task automatic viol(string s);
    violations++;
    $display("RDRAM timing violation at cycle %0d: %s", cyc, s);
  endtask

  initial begin
    for (int d = 0; d < NUM_DEV; d++) begin
      dev_act[d] = NEVER;
      for (int b = 0; b < NUM_BANK; b++) begin
        last_act[d][b] = NEVER; last_prer[d][b] = NEVER; last_rd[d][b] = NEVER;
        open_b[d][b] = 0; open_row[d][b] = '0;
      end
    end
    dq_in = '0;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      // ---- ROW packets
      if (row_op != ROW_NOP) begin
        automatic int d = int'(row_dev), b = int'(row_bank);
        if (cyc - last_row_pkt < T_PACK) viol("ROW packets overlap");
        last_row_pkt = cyc;
        if (row_op == ROW_ACT) begin
          n_act++;
          if (open_b[d][b]) viol("ACT to open bank");
          if (cyc - last_prer[d][b] < T_RP) viol("tRP");
          if (cyc - last_act[d][b] < T_RC) viol("tRC");
          if (cyc - dev_act[d] < T_RR) viol("tRR");
          if (b > 0 && (open_b[d][b-1] || cyc - last_prer[d][b-1] < T_RP))
            viol("neighbour bank b-1 shares sense amps");
          if (b < NUM_BANK-1 && (open_b[d][b+1] || cyc - last_prer[d][b+1] < T_RP))
            viol("neighbour bank b+1 shares sense amps");
          open_b[d][b] = 1; open_row[d][b] = row_row;
          last_act[d][b] = cyc; dev_act[d] = cyc;
        end else begin
          n_prer++;
          if (!open_b[d][b]) viol("PRER to closed bank");
          if (cyc - last_act[d][b] < T_RAS) viol("tRAS");
          if (cyc - last_rd[d][b] < T_RDP) viol("tRDP");
          open_b[d][b] = 0; last_prer[d][b] = cyc;
        end
      end
      // ---- COL packets
      if (col_op != COL_NOP) begin
        automatic int d = int'(col_dev), b = int'(col_bank);
        automatic key_t k = mk(col_dev, col_bank, open_row[d][b], col_col);
        if (cyc - last_col_pkt < T_CC) viol("COL packets closer than tCC");
        last_col_pkt = cyc;
        if (!open_b[d][b]) viol("COL to closed bank");
        if (cyc - last_act[d][b] < T_RCD) viol("tRCD");
        if (col_op == COL_RD) begin
          automatic logic [127:0] v = mem.exists(k) ? mem[k] : init_word(k);
          n_rd++;
          last_rd[d][b] = cyc;
          for (int w = 0; w < 4; w++) begin
            if (dbus.exists(cyc + T_CAC + w)) viol("data packets overlap (read)");
            dbus[cyc + T_CAC + w] = 1;
            rd_sched[cyc + T_CAC + w] = v[w*32 +: 32];
          end
        end else begin
          n_wr++;
          for (int w = 0; w < 4; w++) begin
            if (dbus.exists(cyc + T_CWD + w)) viol("data packets overlap (write)");
            dbus[cyc + T_CWD + w] = 1;
            wr_key[cyc + T_CWD + w]  = k;
            wr_word[cyc + T_CWD + w] = w;
          end
        end
      end
      // ---- write data
      if (wr_key.exists(cyc)) begin
        automatic key_t k = wr_key[cyc];
        automatic logic [127:0] v = mem.exists(k) ? mem[k] : init_word(k);
        if (!dq_oe) viol("write data missing");
        v[wr_word[cyc]*32 +: 32] = dq_out;
        mem[k] = v;
        wr_key.delete(cyc); wr_word.delete(cyc);
      end else if (dq_oe) begin
        viol("data driven outside a write packet");
      end
      dbus.delete(cyc);
    end
    cyc = cyc + 1;
    if (rd_sched.exists(cyc)) begin
      dq_in <= rd_sched[cyc];
      rd_sched.delete(cyc);
    end else begin
      dq_in <= '0;
    end
  end
endmodule
