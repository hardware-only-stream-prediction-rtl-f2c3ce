// rdram_channel_model: behavioural model of a Direct RDRAM channel of eight
// 64 Mbit devices, for simulation only (not synthesizable).
//
// It receives ROW, COL and write DATA packets as one-cycle strobes (each
// packet occupies T_PACK cycles of its bus), stores 16-byte dualocts, and
// returns read data T_CAC cycles after a COL RD.  It checks the timing rules
// of the part and counts every violation in `violations`:
//   ROW bus / COL bus / DATA bus packets not overlapping (T_PACK apart),
//   ACT: bank closed, both neighbouring banks closed (shared sense amps),
//        T_RC since the bank's last ACT, T_RP since its PRER, T_RR since
//        the device's last ACT,
//   PRER: bank open, T_RAS since ACT, T_RDP since the last COL RD,
//   COL: bank open, T_RCD since ACT, T_CC since the previous COL,
//   write data arriving exactly T_CWD after its COL WR.
// Unwritten memory reads as init_word(location), a fixed function of the
// address, so that a testbench can predict it.
module rdram_channel_model
  import smp_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   row_valid,
  input  row_pkt_t               row_pkt,
  input  logic                   col_valid,
  input  col_pkt_t               col_pkt,
  input  logic                   wdata_valid,
  input  logic [PKT_BYTES*8-1:0] wdata,
  output logic                   rdata_valid,
  output logic [PKT_BYTES*8-1:0] rdata
);

  typedef logic [DEV_W+BANK_W+ROW_W+COL_W-1:0] key_t;

  function automatic logic [PKT_BYTES*8-1:0] init_word(key_t k);
    return {4{32'hA5000000 ^ 32'(k) * 32'd2654435761}};
  endfunction

  longint cyc;
  int violations;
  int n_act, n_prer, n_rd, n_wr;
  logic [PKT_BYTES*8-1:0] mem [key_t];

  longint last_act   [NDEV][NBANK];
  longint last_prer  [NDEV][NBANK];
  longint last_rdcol [NDEV][NBANK];
  logic   open_b     [NDEV][NBANK];
  logic [ROW_W-1:0] open_row [NDEV][NBANK];
  longint dev_act    [NDEV];
  longint last_row_pkt, last_col_pkt, last_data_pkt;

  // pending read returns and write-data expectations, by cycle
  longint rd_time [$];
  logic [PKT_BYTES*8-1:0] rd_word [$];
  longint wr_time [$];
  key_t   wr_key  [$];

  task automatic violation(string what);
    violations++;
    $display("RDRAM VIOLATION @%0d: %s", cyc, what);
  endtask

  task automatic data_bus(longint t);
    if (t - last_data_pkt < T_PACK) violation("DATA bus overlap");
    last_data_pkt = t;
  endtask

  always @(posedge clk) begin
    if (!rst_n) begin
      cyc = 0;
      violations = 0; n_act = 0; n_prer = 0; n_rd = 0; n_wr = 0;
      last_row_pkt = -100; last_col_pkt = -100; last_data_pkt = -100;
      for (int d = 0; d < NDEV; d++) begin
        dev_act[d] = -100;
        for (int b = 0; b < NBANK; b++) begin
          last_act[d][b] = -100; last_prer[d][b] = -100; last_rdcol[d][b] = -100;
          open_b[d][b] = 1'b0; open_row[d][b] = '0;
        end
      end
      rd_time.delete(); rd_word.delete(); wr_time.delete(); wr_key.delete();
      rdata_valid <= 1'b0;
      rdata <= '0;
    end else begin
      // ---- ROW packets ----
      if (row_valid) begin
        int d, b;
        d = int'(row_pkt.dev); b = int'(row_pkt.bank);
        if (cyc - last_row_pkt < T_PACK) violation("ROW bus overlap");
        last_row_pkt = cyc;
        if (row_pkt.op == ROW_ACT) begin
          n_act++;
          if (open_b[d][b]) violation("ACT to open bank");
          if (b > 0 && open_b[d][b-1]) violation("ACT next to open bank (below)");
          if (b < NBANK-1 && open_b[d][b+1]) violation("ACT next to open bank (above)");
          if (cyc - last_act[d][b] < T_RC) violation("tRC");
          if (cyc - last_prer[d][b] < T_RP) violation("tRP");
          if (cyc - dev_act[d] < T_RR) violation("tRR");
          open_b[d][b] = 1'b1; open_row[d][b] = row_pkt.row;
          last_act[d][b] = cyc; dev_act[d] = cyc;
        end else begin
          n_prer++;
          if (!open_b[d][b]) violation("PRER to closed bank");
          if (cyc - last_act[d][b] < T_RAS) violation("tRAS");
          if (cyc - last_rdcol[d][b] < T_RDP) violation("tRDP");
          open_b[d][b] = 1'b0; last_prer[d][b] = cyc;
        end
      end
      // ---- COL packets ----
      if (col_valid) begin
        int d, b;
        key_t k;
        d = int'(col_pkt.dev); b = int'(col_pkt.bank);
        k = {col_pkt.dev, col_pkt.bank, open_row[d][b], col_pkt.col};
        if (cyc - last_col_pkt < T_CC) violation("COL bus overlap / tCC");
        last_col_pkt = cyc;
        if (!open_b[d][b]) violation("COL to closed bank");
        if (cyc - last_act[d][b] < T_RCD) violation("tRCD");
        if (col_pkt.op == COL_RD) begin
          n_rd++;
          last_rdcol[d][b] = cyc;
          rd_time.push_back(cyc + T_CAC);
          rd_word.push_back(mem.exists(k) ? mem[k] : init_word(k));
          data_bus(cyc + T_CAC);
        end else begin
          n_wr++;
          wr_time.push_back(cyc + T_CWD);
          wr_key.push_back(k);
          data_bus(cyc + T_CWD);
        end
      end
      // ---- write data ----
      if (wdata_valid) begin
        if (wr_time.size() == 0 || wr_time[0] != cyc) violation("unexpected write data");
        else begin
          mem[wr_key[0]] = wdata;
          void'(wr_time.pop_front()); void'(wr_key.pop_front());
        end
      end else if (wr_time.size() != 0 && wr_time[0] == cyc) begin
        violation("missing write data");
        void'(wr_time.pop_front()); void'(wr_key.pop_front());
      end
      // ---- drive read data for the next cycle ----
      cyc = cyc + 1;
      if (rd_time.size() != 0 && rd_time[0] == cyc) begin
        rdata_valid <= 1'b1;
        rdata <= rd_word[0];
        void'(rd_time.pop_front()); void'(rd_word.pop_front());
      end else begin
        rdata_valid <= 1'b0;
      end
    end
  end

endmodule
