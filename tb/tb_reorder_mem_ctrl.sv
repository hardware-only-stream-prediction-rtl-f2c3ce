// tb_reorder_mem_ctrl: self-checking test of the access-ordering RDRAM
// controller against the behavioural RDRAM channel model, which flags every
// timing violation.  Read data is checked against a shadow memory kept here
// in request-arrival order.  Covered:
//   * idle read latency: 1 + tRCD + tCAC + 3*tCC + 1 = 31 memory cycles,
//   * write followed by a read of the same line (no bypass, data forwarded
//     through the DRAM),
//   * greedy reordering: a request to a busy bank is passed by a later one to
//     another device; the in-order instance (REORDER=0) keeps arrival order,
//   * peak rate: one 64-byte line per 16 cycles for reads to distinct banks,
//   * a full queue stalls the requester,
//   * a long random mix of reads and writes over few lines.
module tb_reorder_mem_ctrl;
  import smp_pkg::*;

  localparam int LW = 512;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // ---- main instance (reordering) ----
  logic req_valid, req_ready, req_write;
  logic [MEM_ADDR_W-1:0] req_addr;
  logic [5:0] req_id;
  logic [LW-1:0] req_wdata;
  logic rsp_valid, rsp_write;
  logic [5:0] rsp_id;
  logic [LW-1:0] rsp_rdata;
  logic row_valid, col_valid, wd_valid, rd_valid;
  row_pkt_t row_pkt; col_pkt_t col_pkt;
  logic [127:0] wd, rd;
  logic [5:0] qcount;

  reorder_mem_ctrl dut (
    .clk(clk), .rst_n(rst_n),
    .req_valid_i(req_valid), .req_ready_o(req_ready), .req_write_i(req_write),
    .req_addr_i(req_addr), .req_id_i(req_id), .req_wdata_i(req_wdata),
    .rsp_valid_o(rsp_valid), .rsp_write_o(rsp_write), .rsp_id_o(rsp_id), .rsp_rdata_o(rsp_rdata),
    .row_valid_o(row_valid), .row_pkt_o(row_pkt), .col_valid_o(col_valid), .col_pkt_o(col_pkt),
    .wdata_valid_o(wd_valid), .wdata_o(wd), .rdata_valid_i(rd_valid), .rdata_i(rd),
    .queue_count_o(qcount));

  rdram_channel_model mdl (
    .clk(clk), .rst_n(rst_n), .row_valid(row_valid), .row_pkt(row_pkt),
    .col_valid(col_valid), .col_pkt(col_pkt), .wdata_valid(wd_valid), .wdata(wd),
    .rdata_valid(rd_valid), .rdata(rd));

  // ---- in-order instance ----
  logic b_req_valid, b_req_ready;
  logic [MEM_ADDR_W-1:0] b_req_addr;
  logic [5:0] b_req_id;
  logic b_rsp_valid, b_rsp_write;
  logic [5:0] b_rsp_id;
  logic [LW-1:0] b_rsp_rdata;
  logic b_row_valid, b_col_valid, b_wd_valid, b_rd_valid;
  row_pkt_t b_row_pkt; col_pkt_t b_col_pkt;
  logic [127:0] b_wd, b_rd;
  logic [5:0] b_qcount;

  reorder_mem_ctrl #(.REORDER(1'b0)) dut_fifo (
    .clk(clk), .rst_n(rst_n),
    .req_valid_i(b_req_valid), .req_ready_o(b_req_ready), .req_write_i(1'b0),
    .req_addr_i(b_req_addr), .req_id_i(b_req_id), .req_wdata_i('0),
    .rsp_valid_o(b_rsp_valid), .rsp_write_o(b_rsp_write), .rsp_id_o(b_rsp_id), .rsp_rdata_o(b_rsp_rdata),
    .row_valid_o(b_row_valid), .row_pkt_o(b_row_pkt), .col_valid_o(b_col_valid), .col_pkt_o(b_col_pkt),
    .wdata_valid_o(b_wd_valid), .wdata_o(b_wd), .rdata_valid_i(b_rd_valid), .rdata_i(b_rd),
    .queue_count_o(b_qcount));

  rdram_channel_model mdl_fifo (
    .clk(clk), .rst_n(rst_n), .row_valid(b_row_valid), .row_pkt(b_row_pkt),
    .col_valid(b_col_valid), .col_pkt(b_col_pkt), .wdata_valid(b_wd_valid), .wdata(b_wd),
    .rdata_valid(b_rd_valid), .rdata(b_rd));

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  // ---- reference data: cache-line interleaving, unwritten memory pattern ----
  function automatic logic [127:0] init_pkt(logic [MEM_ADDR_W-1:0] a, int k);
    int unsigned l, dev, bank, lcol, row;
    logic [DEV_W+BANK_W+ROW_W+COL_W-1:0] key;
    l = int'(a >> 6);
    dev = l % 8; bank = (l / 8) % 16; lcol = (l / 128) % 16; row = l / 2048;
    key = {DEV_W'(dev), BANK_W'(bank), ROW_W'(row), COL_W'(lcol * 4 + k)};
    return {4{32'hA5000000 ^ 32'(key) * 32'd2654435761}};
  endfunction

  logic [LW-1:0] shadow [int];
  function automatic logic [LW-1:0] line_value(logic [MEM_ADDR_W-1:0] a);
    logic [LW-1:0] v;
    if (shadow.exists(int'(a >> 6))) return shadow[int'(a >> 6)];
    for (int k = 0; k < 4; k++) v[k*128 +: 128] = init_pkt(a, k);
    return v;
  endfunction

  // ---- request issue and response scoreboard ----
  logic [LW-1:0] exp_data [64];
  bit            exp_write [64];
  bit            busy_id [64];
  int            rsp_order[$];
  longint        rsp_time[$];
  int            outstanding = 0;
  bit            saw_full = 1'b0;

  always @(posedge clk) if (rst_n) begin
    if (rsp_valid) begin
      chk(busy_id[rsp_id], $sformatf("response for idle id %0d", rsp_id));
      chk(rsp_write == exp_write[rsp_id], $sformatf("id %0d response kind", rsp_id));
      if (!rsp_write)
        chk(rsp_rdata == exp_data[rsp_id], $sformatf("id %0d read data", rsp_id));
      busy_id[rsp_id] = 1'b0;
      outstanding--;
      rsp_order.push_back(int'(rsp_id));
      rsp_time.push_back(cyc);
    end
    if (!req_ready) saw_full = 1'b1;
  end

  int next_id = 0;
  task automatic send(bit wr, logic [MEM_ADDR_W-1:0] a, logic [LW-1:0] data, output int id);
    while (busy_id[next_id]) next_id = (next_id + 1) % 64;
    id = next_id;
    next_id = (next_id + 1) % 64;
    @(negedge clk);
    req_valid = 1'b1; req_write = wr; req_addr = a; req_id = 6'(id); req_wdata = data;
    exp_write[id] = wr;
    if (wr) shadow[int'(a >> 6)] = data;
    else    exp_data[id] = line_value(a);
    busy_id[id] = 1'b1;
    outstanding++;
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    @(negedge clk);
    req_valid = 1'b0;
  endtask

  task automatic drain();
    int guard;
    guard = 0;
    while (outstanding != 0 && guard < 20000) begin @(negedge clk); guard++; end
    chk(outstanding == 0, "all requests answered");
    repeat (50) @(negedge clk);
  endtask

  function automatic logic [LW-1:0] rnd_line();
    logic [LW-1:0] v;
    for (int k = 0; k < LW / 32; k++) v[k*32 +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int id, ida, idb, idc;
    longint t0;
    req_valid = 1'b0; req_write = 1'b0; req_addr = '0; req_id = '0; req_wdata = '0;
    b_req_valid = 1'b0; b_req_addr = '0; b_req_id = '0;
    for (int i = 0; i < 64; i++) busy_id[i] = 1'b0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // ---- 1: idle read latency ----
    rsp_time.delete(); rsp_order.delete();
    @(negedge clk);
    t0 = cyc + 1;  // send() presents the request at the next falling edge
    send(1'b0, 26'h0001_2340, '0, id);
    drain();
    chk(rsp_time.size() == 1 && rsp_time[0] - t0 == 31,
        $sformatf("idle read latency %0d, expected 31", rsp_time.size() ? rsp_time[0] - t0 : -1));

    // ---- 2: write then read of the same line ----
    rsp_order.delete();
    send(1'b1, 26'h0000_4000, rnd_line(), ida);
    send(1'b0, 26'h0000_4000, '0, idb);
    drain();
    chk(rsp_order.size() == 2 && rsp_order[0] == ida && rsp_order[1] == idb, "read after write order");

    // ---- 3: reordering around a busy bank ----
    // A: line 0 (dev 0 bank 0), B: line 2048 (dev 0 bank 0, other row),
    // C: line 1 (dev 1 bank 0).  B must wait for A's bank; C need not.
    rsp_order.delete();
    send(1'b0, 26'(0 * 64), '0, ida);
    send(1'b0, 26'(2048 * 64), '0, idb);
    send(1'b0, 26'(1 * 64), '0, idc);
    drain();
    chk(rsp_order.size() == 3 && rsp_order[0] == ida && rsp_order[1] == idc && rsp_order[2] == idb,
        "greedy order A, C, B");
    begin
      int border[$];
      for (int i = 0; i < 3; i++) begin
        @(negedge clk);
        b_req_valid = 1'b1; b_req_id = 6'(i);
        b_req_addr = (i == 0) ? 26'(0) : (i == 1) ? 26'(2048 * 64) : 26'(64);
      end
      @(negedge clk); b_req_valid = 1'b0;
      repeat (200) begin
        @(posedge clk);
        if (b_rsp_valid) border.push_back(int'(b_rsp_id));
      end
      chk(border.size() == 3 && border[0] == 0 && border[1] == 1 && border[2] == 2,
          "in-order instance keeps arrival order");
    end

    // ---- 4: peak rate, 32 reads to consecutive lines ----
    rsp_time.delete();
    for (int i = 0; i < 32; i++) send(1'b0, 26'h0010_0000 + 26'(i * 64), '0, id);
    drain();
    chk(rsp_time.size() == 32 && rsp_time[31] - rsp_time[0] == 31 * 16,
        $sformatf("32 lines in %0d cycles, expected %0d", rsp_time[31] - rsp_time[0], 31 * 16));

    // ---- 5: queue full ----
    for (int i = 0; i < 50; i++) send(1'b0, 26'h0020_0000 + 26'((i % 4) * 8 * 64), '0, id);
    drain();
    chk(saw_full, "requester stalled by a full queue");

    // ---- 6: random mix over a few lines ----
    for (int i = 0; i < 300; i++) begin
      logic [MEM_ADDR_W-1:0] a;
      a = 26'h0030_0000 + 26'(($urandom % 24) * 64 * (1 + ($urandom % 3)));
      send(($urandom % 3) == 0, a, rnd_line(), id);
      if (($urandom % 8) == 0) repeat ($urandom % 40) @(negedge clk);
    end
    drain();

    chk(mdl.violations == 0, $sformatf("%0d RDRAM timing violations", mdl.violations));
    chk(mdl_fifo.violations == 0, $sformatf("%0d RDRAM timing violations (in-order)", mdl_fifo.violations));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
