// reorder_mem_ctrl: access-ordering memory controller for a Direct RDRAM
// channel of eight devices.
//
// Requests are whole 64-byte L2 lines (demand fills, prefetches and
// write-backs alike; the controller does not tell them apart).  They wait in
// a queue kept in arrival order.  Every cycle the controller works out, for
// each queued request, how many cycles remain before its ROW ACT packet could
// be sent: the largest of
//   * the wait of its bank and of the two neighbouring banks, which share
//     sense amplifiers ("double bank" core: adjacent banks may not be open
//     together), covering tRC and precharge tRP,
//   * the device's tRR wait since its last ACT,
//   * the wait until the COL bus is free tRCD cycles after the ACT,
//   * the wait until the DATA bus is free when the line's data would move
//     (tCAC after COL RD, tCWD after COL WR), which creates the read-to-write
//     bus turnaround gap.
// Greedy policy: the request that can issue soonest is chosen, ties go to
// the oldest (FIFO order), and a request never passes an older request to
// the same line when either of them is a write (reads do not bypass writes).
// With REORDER=0 only the oldest request is considered (in-order baseline).
// The pick is made by a parallel minimum search over the queue each cycle,
// which gives the same order as keeping a running candidate.
//
// Once chosen, a line follows a fixed closed-page schedule, counted from its
// ROW ACT in 2.5 ns memory cycles (timing of a -45/-800 Direct RDRAM part):
//   ACT @0, COL RD/WR k @ tRCD + k*tCC (k = 0..3, one 16-byte dualoct each),
//   read data k @ tRCD + tCAC + k*tCC, write data k @ tRCD + tCWD + k*tCC,
//   PRER @ max(tRAS, last COL + tRDP) for reads.  The data sheet timing here
//   gives no write recovery time, so a write's PRER waits until its last data
//   packet has ended (this design's choice).  A ROW packet reservation vector
//   keeps ACT and PRER packets from overlapping on the ROW bus.
//
// Interface: req_* is valid/ready, one line per cycle.  rsp_valid_o pulses
// once per request (read data or write done), without back-pressure.  The
// channel side emits one-cycle strobes for packets (each occupies tPACK
// cycles on its bus); write data is presented in the cycle its DATA packet
// starts and read data is sampled in the cycle its DATA packet starts.
// Each request is placed on the channel (device, bank, row, line slot) by
// smp_pkg::map_line under the INTERLEAVE organisation when it is queued.
// Queue depth and the in-flight limit are this design's choices.
module reorder_mem_ctrl
  import smp_pkg::*;
#(
  parameter int unsigned QDEPTH     = 40,
  parameter int unsigned INFLIGHT   = 4,
  parameter int unsigned ID_W       = 6,
  parameter bit          REORDER    = 1'b1,
  parameter interleave_e INTERLEAVE = ILV_CACHE_LINE
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // line requests from the L2 side
  input  logic                   req_valid_i,
  output logic                   req_ready_o,
  input  logic                   req_write_i,
  input  logic [MEM_ADDR_W-1:0]  req_addr_i,
  input  logic [ID_W-1:0]        req_id_i,
  input  logic [LINE_BYTES*8-1:0] req_wdata_i,
  // completions
  output logic                   rsp_valid_o,
  output logic                   rsp_write_o,
  output logic [ID_W-1:0]        rsp_id_o,
  output logic [LINE_BYTES*8-1:0] rsp_rdata_o,
  // Direct RDRAM channel
  output logic                   row_valid_o,
  output row_pkt_t               row_pkt_o,
  output logic                   col_valid_o,
  output col_pkt_t               col_pkt_o,
  output logic                   wdata_valid_o,
  output logic [PKT_BYTES*8-1:0] wdata_o,
  input  logic                   rdata_valid_i,
  input  logic [PKT_BYTES*8-1:0] rdata_i,
  // status
  output logic [$clog2(QDEPTH+1)-1:0] queue_count_o
);

  localparam int unsigned QI_W  = $clog2(QDEPTH);
  localparam int unsigned QC_W  = $clog2(QDEPTH + 1);
  localparam int unsigned FI_W  = (INFLIGHT > 1) ? $clog2(INFLIGHT) : 1;
  localparam int unsigned CW    = 6;    // wait counters, cycles
  localparam int unsigned HZN   = 64;   // ROW bus reservation horizon
  localparam int unsigned LINE_W = LINE_BYTES * 8;
  localparam int unsigned PKT_W  = PKT_BYTES * 8;
  // completion: one cycle after the last data packet starts
  localparam int unsigned RD_DONE = T_RCD + T_CAC + (PKTS_PER_LINE - 1) * T_CC + 1;
  localparam int unsigned WR_DONE = T_RCD + T_CWD + (PKTS_PER_LINE - 1) * T_CC + 1;
  // a slot is released once both its PRER and its completion are past
  localparam int unsigned RD_END  = (RD_PRER > RD_DONE) ? RD_PRER : RD_DONE;
  localparam int unsigned WR_END  = (WR_PRER > WR_DONE) ? WR_PRER : WR_DONE;

  typedef struct packed {
    logic              write;
    rdram_loc_t        loc;
    logic [ID_W-1:0]   id;
  } qmeta_t;

  typedef struct packed {
    logic              valid;
    logic              write;
    rdram_loc_t        loc;
    logic [ID_W-1:0]   id;
    logic [CW-1:0]     cnt;
  } flight_t;

  // ---------------- queue ----------------
  qmeta_t             qm   [QDEPTH];
  logic [LINE_W-1:0]  qd   [QDEPTH];
  logic [QC_W-1:0]    count;

  // ---------------- channel timing state ----------------
  logic [CW-1:0] bank_wait [NDEV][NBANK];
  logic [CW-1:0] dev_wait  [NDEV];
  logic [CW-1:0] col_wait, data_wait;
  logic [HZN-1:0] row_busy;

  flight_t           fl    [INFLIGHT];
  logic [LINE_W-1:0] fl_wd [INFLIGHT];
  logic [LINE_W-1:0] fl_rd [INFLIGHT];

  // ---------------- request address mapping ----------------
  rdram_loc_t req_loc;
  assign req_loc = map_line(req_addr_i[MEM_ADDR_W-1:6], INTERLEAVE);

  function automatic logic [CW-1:0] sat_sub(logic [CW-1:0] a, int unsigned b);
    return (a > CW'(b)) ? a - CW'(b) : '0;
  endfunction

  function automatic logic [CW-1:0] max2(logic [CW-1:0] a, logic [CW-1:0] b);
    return (a > b) ? a : b;
  endfunction

  // ---------------- soonest-issue search ----------------
  logic [CW-1:0] wait_q [QDEPTH];
  logic          elig   [QDEPTH];

  always_comb begin
    for (int i = 0; i < QDEPTH; i++) begin
      logic [CW-1:0] w;
      logic [BANK_W-1:0] b;
      logic [DEV_W-1:0]  d;
      d = qm[i].loc.dev;
      b = qm[i].loc.bank;
      w = bank_wait[d][b];
      if (b != '0)              w = max2(w, bank_wait[d][b - BANK_W'(1)]);
      if (b != BANK_W'(NBANK-1)) w = max2(w, bank_wait[d][b + BANK_W'(1)]);
      w = max2(w, dev_wait[d]);
      w = max2(w, sat_sub(col_wait, T_RCD));
      w = max2(w, sat_sub(data_wait, T_RCD + (qm[i].write ? T_CWD : T_CAC)));
      wait_q[i] = w;

      elig[i] = (QC_W'(i) < count) && (REORDER || i == 0);
      for (int j = 0; j < i; j++) begin
        if (qm[j].loc == qm[i].loc && (qm[j].write || qm[i].write))
          elig[i] = 1'b0;
      end
    end
  end

  logic            cand_any;
  logic [QI_W-1:0] cand;
  logic [CW-1:0]   cand_wait;
  always_comb begin
    cand_any = 1'b0; cand = '0; cand_wait = '1;
    for (int i = 0; i < QDEPTH; i++) begin
      if (elig[i] && (!cand_any || wait_q[i] < cand_wait)) begin
        cand_any = 1'b1; cand = QI_W'(i); cand_wait = wait_q[i];
      end
    end
  end

  // free in-flight slot
  logic            slot_any;
  logic [FI_W-1:0] slot;
  always_comb begin
    slot_any = 1'b0; slot = '0;
    for (int s = INFLIGHT - 1; s >= 0; s--) begin
      if (!fl[s].valid) begin slot_any = 1'b1; slot = FI_W'(s); end
    end
  end

  qmeta_t        cm;
  int unsigned   prer_off;
  logic          row_ok, issue;
  logic [HZN-1:0] issue_mask;
  assign cm       = qm[cand];
  assign prer_off = cm.write ? WR_PRER : RD_PRER;
  always_comb begin
    issue_mask = '0;
    for (int k = 0; k < T_PACK; k++) begin
      issue_mask[k] = 1'b1;
      issue_mask[prer_off + k] = 1'b1;
    end
  end
  assign row_ok = ((row_busy & issue_mask) == '0);
  assign issue  = cand_any && (cand_wait == '0) && row_ok && slot_any;

  // ---------------- in-flight events ----------------
  logic            prer_any, col_any, wd_any, rd_any, done_any;
  logic [FI_W-1:0] prer_s, col_s, wd_s, rd_s, done_s;
  logic [1:0]      col_k, wd_k, rd_k;
  always_comb begin
    prer_any = 1'b0; col_any = 1'b0; wd_any = 1'b0; rd_any = 1'b0; done_any = 1'b0;
    prer_s = '0; col_s = '0; wd_s = '0; rd_s = '0; done_s = '0;
    col_k = '0; wd_k = '0; rd_k = '0;
    for (int s = 0; s < INFLIGHT; s++) begin
      if (fl[s].valid) begin
        if (int'(fl[s].cnt) == (fl[s].write ? WR_PRER : RD_PRER)) begin
          prer_any = 1'b1; prer_s = FI_W'(s);
        end
        for (int k = 0; k < PKTS_PER_LINE; k++) begin
          if (int'(fl[s].cnt) == T_RCD + k * T_CC) begin
            col_any = 1'b1; col_s = FI_W'(s); col_k = 2'(k);
          end
          if (fl[s].write && int'(fl[s].cnt) == T_RCD + T_CWD + k * T_CC) begin
            wd_any = 1'b1; wd_s = FI_W'(s); wd_k = 2'(k);
          end
          if (!fl[s].write && int'(fl[s].cnt) == T_RCD + T_CAC + k * T_CC) begin
            rd_any = 1'b1; rd_s = FI_W'(s); rd_k = 2'(k);
          end
        end
        if (int'(fl[s].cnt) == (fl[s].write ? WR_DONE : RD_DONE)) begin
          done_any = 1'b1; done_s = FI_W'(s);
        end
      end
    end
  end

  // channel outputs
  always_comb begin
    row_valid_o = issue || prer_any;
    if (issue) row_pkt_o = '{op: ROW_ACT, dev: cm.loc.dev, bank: cm.loc.bank, row: cm.loc.row};
    else       row_pkt_o = '{op: ROW_PRER, dev: fl[prer_s].loc.dev, bank: fl[prer_s].loc.bank,
                             row: fl[prer_s].loc.row};
    col_valid_o = col_any;
    col_pkt_o   = '{op: fl[col_s].write ? COL_WR : COL_RD, dev: fl[col_s].loc.dev,
                    bank: fl[col_s].loc.bank, col: {fl[col_s].loc.lcol, col_k}};
    wdata_valid_o = wd_any;
    wdata_o       = fl_wd[wd_s][wd_k * PKT_W +: PKT_W];
  end

  assign rsp_valid_o = done_any;
  assign rsp_write_o = fl[done_s].write;
  assign rsp_id_o    = fl[done_s].id;
  assign rsp_rdata_o = fl_rd[done_s];

  assign req_ready_o   = (count < QC_W'(QDEPTH));
  assign queue_count_o = count;

  // ---------------- sequential state ----------------
  logic enq;
  assign enq = req_valid_i && req_ready_o;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count     <= '0;
      col_wait  <= '0;
      data_wait <= '0;
      row_busy  <= '0;
      for (int d = 0; d < NDEV; d++) begin
        dev_wait[d] <= '0;
        for (int b = 0; b < NBANK; b++) bank_wait[d][b] <= '0;
      end
      for (int i = 0; i < QDEPTH; i++) begin
        qm[i] <= '0;
        qd[i] <= '0;
      end
      for (int s = 0; s < INFLIGHT; s++) begin
        fl[s]    <= '0;
        fl_wd[s] <= '0;
        fl_rd[s] <= '0;
      end
    end else begin
      // timers count down
      for (int d = 0; d < NDEV; d++) begin
        dev_wait[d] <= sat_sub(dev_wait[d], 1);
        for (int b = 0; b < NBANK; b++) bank_wait[d][b] <= sat_sub(bank_wait[d][b], 1);
      end
      col_wait  <= sat_sub(col_wait, 1);
      data_wait <= sat_sub(data_wait, 1);
      row_busy  <= (row_busy | (issue ? issue_mask : '0)) >> 1;

      // in-flight progress
      for (int s = 0; s < INFLIGHT; s++) begin
        if (fl[s].valid) begin
          fl[s].cnt <= fl[s].cnt + CW'(1);
          if (int'(fl[s].cnt) == (fl[s].write ? WR_END : RD_END)) fl[s].valid <= 1'b0;
        end
      end
      if (rd_any) fl_rd[rd_s][rd_k * PKT_W +: PKT_W] <= rdata_i;

      // queue: remove the issued entry, then append the new one
      if (issue) begin
        fl[slot]    <= '{valid: 1'b1, write: cm.write, loc: cm.loc, id: cm.id, cnt: CW'(1)};
        fl_wd[slot] <= qd[cand];
        bank_wait[cm.loc.dev][cm.loc.bank] <= CW'((cm.write ? WR_BANK_BUSY : RD_BANK_BUSY) - 1);
        dev_wait[cm.loc.dev] <= CW'(T_RR - 1);
        col_wait  <= CW'(T_RCD + COL_SPAN - 1);
        data_wait <= CW'(T_RCD + (cm.write ? T_CWD : T_CAC) + DATA_SPAN - 1);
        for (int i = 0; i < QDEPTH - 1; i++) begin
          if (QI_W'(i) >= cand) begin
            qm[i] <= qm[i + 1];
            qd[i] <= qd[i + 1];
          end
        end
      end
      if (enq) begin
        qm[QI_W'(count - QC_W'(issue))] <= '{write: req_write_i, loc: req_loc, id: req_id_i};
        qd[QI_W'(count - QC_W'(issue))] <= req_wdata_i;
      end
      count <= count + QC_W'(enq) - QC_W'(issue);
    end
  end

`ifndef SYNTHESIS
  // the RDRAM must return read data in the cycle the schedule expects it
  a_rdata_on_time: assert property (@(posedge clk) disable iff (!rst_n)
    rd_any |-> rdata_valid_i);
  // no unexpected read data
  a_rdata_expected: assert property (@(posedge clk) disable iff (!rst_n)
    rdata_valid_i |-> rd_any);
`endif

endmodule
