// tb_stream_memory_system: end-to-end test of the stream prefetching and
// access-ordering memory system at its default configuration (64-entry RPT,
// adaptive distance up to 16, 32 outstanding prefetches, 40-entry reordering
// queue, cache-line interleaving).
//
// The processor is replaced by a driver that replays the reference streams
// of vector kernels (copy, daxpy, swap, vaxpy at unit stride and stride ten)
// and of an irregular phase, one reference per processor cycle, stalling on
// a miss.  The L2 cache is a behavioural model here: unlimited capacity,
// write-allocate, dirty lines written back when more than DIRTY_MAX are held
// and all of them at a context switch.  The RDRAM channel model checks every
// timing rule.  The processor clock runs at four times the memory clock.
//
// Checked: read data of every line against a shadow memory, no RDRAM timing
// violation, every prefetch and demand miss completed, and that each
// mechanism happened at least once (RPT states, prefetch issue, line skip,
// distance at its maximum, outstanding limit, table replacement, flush;
// reordering, same-line ordering hold, bank wait, read/write switch, ROW
// bus hold, full queue).
module tb_stream_memory_system;
  import smp_pkg::*;

  localparam int LW        = 512;
  localparam int ITER      = 10000;  // kernel iterations per run
  localparam int DIRTY_MAX = 24;

  logic cpu_clk = 1'b0, mem_clk = 1'b0, rst_n = 1'b0;
  always #1 cpu_clk = ~cpu_clk;   // 4:1 processor to memory clock
  always #4 mem_clk = ~mem_clk;

  logic flush, ref_valid, pf_valid, pf_ready, pf_done;
  logic [31:0] ref_pc, ref_addr, pf_addr;
  logic [5:0]  pf_outstanding;
  logic mreq_valid, mreq_ready, mreq_write;
  logic [MEM_ADDR_W-1:0] mreq_addr;
  logic [5:0] mreq_id;
  logic [LW-1:0] mreq_wdata;
  logic mrsp_valid, mrsp_write;
  logic [5:0] mrsp_id;
  logic [LW-1:0] mrsp_rdata;
  logic [5:0] mq_count;
  logic row_valid, col_valid, wd_valid, rd_valid;
  row_pkt_t row_pkt; col_pkt_t col_pkt;
  logic [127:0] wd, rd;

  stream_memory_system dut (
    .cpu_clk(cpu_clk), .mem_clk(mem_clk), .rst_n(rst_n),
    .flush_i(flush), .ref_valid_i(ref_valid), .ref_pc_i(ref_pc), .ref_addr_i(ref_addr),
    .pf_valid_o(pf_valid), .pf_ready_i(pf_ready), .pf_addr_o(pf_addr), .pf_done_i(pf_done),
    .pf_outstanding_o(pf_outstanding),
    .mem_req_valid_i(mreq_valid), .mem_req_ready_o(mreq_ready), .mem_req_write_i(mreq_write),
    .mem_req_addr_i(mreq_addr), .mem_req_id_i(mreq_id), .mem_req_wdata_i(mreq_wdata),
    .mem_rsp_valid_o(mrsp_valid), .mem_rsp_write_o(mrsp_write), .mem_rsp_id_o(mrsp_id),
    .mem_rsp_rdata_o(mrsp_rdata), .mem_queue_count_o(mq_count),
    .row_valid_o(row_valid), .row_pkt_o(row_pkt), .col_valid_o(col_valid), .col_pkt_o(col_pkt),
    .wdata_valid_o(wd_valid), .wdata_o(wd), .rdata_valid_i(rd_valid), .rdata_i(rd));

  rdram_channel_model mdl (
    .clk(mem_clk), .rst_n(rst_n), .row_valid(row_valid), .row_pkt(row_pkt),
    .col_valid(col_valid), .col_pkt(col_pkt), .wdata_valid(wd_valid), .wdata(wd),
    .rdata_valid(rd_valid), .rdata(rd));

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- shadow memory (cache-line interleaving) ----------------
  function automatic logic [127:0] init_pkt(int unsigned l, int k);
    int unsigned dev, bank, lcol, row;
    logic [DEV_W+BANK_W+ROW_W+COL_W-1:0] key;
    dev = l % 8; bank = (l / 8) % 16; lcol = (l / 128) % 16; row = (l / 2048) % 512;
    key = {DEV_W'(dev), BANK_W'(bank), ROW_W'(row), COL_W'(lcol * 4 + k)};
    return {4{32'hA5000000 ^ 32'(key) * 32'd2654435761}};
  endfunction
  logic [LW-1:0] shadow [int unsigned];
  function automatic logic [LW-1:0] line_value(int unsigned l);
    logic [LW-1:0] v;
    if (shadow.exists(l)) return shadow[l];
    for (int k = 0; k < 4; k++) v[k*128 +: 128] = init_pkt(l, k);
    return v;
  endfunction

  // ---------------- behavioural L2 ----------------
  typedef struct {bit write; int unsigned line; logic [LW-1:0] data; bit pf;} mreq_t;
  mreq_t       mq[$];           // requests waiting for the controller
  bit          present [int unsigned];
  bit          pending [int unsigned];
  bit          dirty   [int unsigned];
  int unsigned dirty_fifo[$];
  bit          id_busy [64];
  int unsigned id_line [64];
  bit          id_pf   [64];
  bit          id_wr   [64];
  logic [LW-1:0] id_exp [64];
  int          done_credit = 0;  // prefetch arrivals to report to the RPT
  int          n_demand = 0, n_pf_mem = 0, n_pf_dropped = 0, n_wb = 0, n_pf_hit = 0, n_rsp = 0;
  bit          pf_line [int unsigned];   // line brought in by a prefetch

  task automatic writeback(int unsigned l);
    logic [LW-1:0] v;
    for (int k = 0; k < LW / 32; k++) v[k*32 +: 32] = $urandom;
    shadow[l] = v;
    dirty.delete(l);
    mq.push_back('{write: 1'b1, line: l, data: v, pf: 1'b0});
    n_wb++;
  endtask

  // prefetch requests from the RPT (processor clock)
  always @(posedge cpu_clk) if (rst_n) begin
    if (pf_valid && pf_ready) begin
      int unsigned l;
      l = pf_addr[31:6] % (1 << LINE_ADDR_W);
      if (present.exists(l) || pending.exists(l)) begin
        n_pf_dropped++;
        done_credit++;
      end else begin
        pending[l] = 1'b1;
        pf_line[l] = 1'b1;
        mq.push_back('{write: 1'b0, line: l, data: '0, pf: 1'b1});
        n_pf_mem++;
      end
    end
  end
  always @(posedge cpu_clk) if (rst_n) begin
    if (done_credit > 0) begin pf_done <= 1'b1; done_credit--; end
    else pf_done <= 1'b0;
  end

  // requests to and completions from the controller (memory clock)
  int next_id = 0;
  always @(posedge mem_clk) if (rst_n) begin
    if (mrsp_valid) begin
      n_rsp++;
      chk(id_busy[mrsp_id], "response for an idle id");
      if (!id_wr[mrsp_id]) begin
        chk(mrsp_rdata == id_exp[mrsp_id], $sformatf("line %0h read data", id_line[mrsp_id]));
        present[id_line[mrsp_id]] = 1'b1;
        pending.delete(id_line[mrsp_id]);
        if (id_pf[mrsp_id]) done_credit++;
      end
      id_busy[mrsp_id] = 1'b0;
    end
    if (mreq_valid && mreq_ready) mreq_valid <= 1'b0;
    if ((!mreq_valid || mreq_ready) && mq.size() != 0 && !id_busy[next_id]) begin
      mreq_t r;
      r = mq.pop_front();
      mreq_valid <= 1'b1;
      mreq_write <= r.write;
      mreq_addr  <= MEM_ADDR_W'(r.line) << 6;
      mreq_id    <= 6'(next_id);
      mreq_wdata <= r.data;
      id_busy[next_id] = 1'b1;
      id_line[next_id] = r.line;
      id_pf[next_id]   = r.pf;
      id_wr[next_id]   = r.write;
      id_exp[next_id]  = r.write ? '0 : line_value(r.line);
      next_id = (next_id + 1) % 64;
    end
  end

  // ---------------- processor driver ----------------
  longint cpu_cyc = 0;
  always @(posedge cpu_clk) cpu_cyc <= cpu_cyc + 1;

  task automatic cpu_ref(logic [31:0] pc, logic [31:0] a, bit store);
    int unsigned l;
    l = a[31:6] % (1 << LINE_ADDR_W);
    @(negedge cpu_clk);
    ref_valid = 1'b1; ref_pc = pc; ref_addr = a;
    @(negedge cpu_clk);
    ref_valid = 1'b0;
    if (!present.exists(l)) begin
      if (!pending.exists(l)) begin
        pending[l] = 1'b1;
        mq.push_back('{write: 1'b0, line: l, data: '0, pf: 1'b0});
        n_demand++;
      end else if (pf_line.exists(l)) n_pf_hit++;
      while (!present.exists(l)) @(negedge cpu_clk);
    end else if (pf_line.exists(l)) n_pf_hit++;
    if (store && !dirty.exists(l)) begin
      dirty[l] = 1'b1;
      dirty_fifo.push_back(l);
      if (dirty_fifo.size() > DIRTY_MAX) begin   // evict the oldest dirty line
        int unsigned v;
        v = dirty_fifo.pop_front();
        writeback(v);
        present.delete(v);
      end
    end
  endtask

  // vector kernels: x at X, y at Y, a at A; element size 8 bytes, stride S
  task automatic kernel(string name, int S, logic [31:0] X, logic [31:0] Y, logic [31:0] A);
    longint t0;
    t0 = cpu_cyc;
    for (int i = 0; i < ITER * S; i += S) begin
      logic [31:0] xi, yi, ai;
      xi = X + 32'(i * 8); yi = Y + 32'(i * 8); ai = A + 32'(i * 8);
      case (name)
        "copy":  begin cpu_ref(32'h1000, xi, 0); cpu_ref(32'h1004, yi, 1); end
        "daxpy": begin cpu_ref(32'h1100, xi, 0); cpu_ref(32'h1104, yi, 0); cpu_ref(32'h1108, yi, 1); end
        "swap":  begin cpu_ref(32'h1200, xi, 0); cpu_ref(32'h1204, yi, 0);
                       cpu_ref(32'h1208, xi, 1); cpu_ref(32'h120c, yi, 1); end
        default: begin cpu_ref(32'h1300, ai, 0); cpu_ref(32'h1304, xi, 0);
                       cpu_ref(32'h1308, yi, 0); cpu_ref(32'h130c, yi, 1); end
      endcase
    end
    $display("%s stride %0d: %0d processor cycles for %0d iterations", name, S, cpu_cyc - t0, ITER);
  endtask

  // ---------------- mechanism counters ----------------
  int ev_transient = 0, ev_irregular = 0, ev_steady = 0, ev_pf = 0, ev_skip = 0, ev_maxdist = 0,
      ev_limit = 0, ev_replace = 0, ev_flush = 0;
  int ev_reorder = 0, ev_samehold = 0, ev_bankwait = 0, ev_rwswitch = 0, ev_rowhold = 0, ev_qfull = 0;
  bit last_issue_wr = 1'b0;

  always @(posedge cpu_clk) if (rst_n) begin
    if (ref_valid && dut.u_rpt.hit) begin
      if (dut.u_rpt.nstate == RPT_TRANSIENT && dut.u_rpt.cur.state != RPT_TRANSIENT) ev_transient++;
      if (dut.u_rpt.nstate == RPT_IRREGULAR && dut.u_rpt.cur.state != RPT_IRREGULAR) ev_irregular++;
      if (dut.u_rpt.nstate == RPT_STEADY && dut.u_rpt.cur.state != RPT_STEADY) ev_steady++;
      if (dut.u_rpt.do_pf && dut.u_rpt.d_new == 16) ev_maxdist++;
    end
    if (ref_valid && !dut.u_rpt.hit && !dut.u_rpt.have_free) ev_replace++;
    if (pf_valid && pf_ready) ev_pf++;
    if (dut.u_rpt.sel_any && dut.u_rpt.same_line) ev_skip++;
    if (dut.u_rpt.sel_any && !dut.u_rpt.same_line && pf_outstanding == 32) ev_limit++;
    if (flush) ev_flush++;
  end

  always @(posedge mem_clk) if (rst_n) begin
    if (dut.u_mc.issue) begin
      if (dut.u_mc.cand != 0) ev_reorder++;
      if (dut.u_mc.cm.write && !last_issue_wr) ev_rwswitch++;
      last_issue_wr = dut.u_mc.cm.write;
    end
    for (int i = 1; i < 40; i++)
      if (32'(i) < 32'(dut.u_mc.count) && !dut.u_mc.elig[i]) begin ev_samehold++; break; end
    if (dut.u_mc.cand_any && dut.u_mc.cand_wait != 0 && mq_count > 1) ev_bankwait++;
    if (dut.u_mc.cand_any && dut.u_mc.cand_wait == 0 && !dut.u_mc.row_ok) ev_rowhold++;
    if (mreq_valid && !mreq_ready) ev_qfull++;
  end

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flush = 1'b0; ref_valid = 1'b0; ref_pc = '0; ref_addr = '0; pf_ready = 1'b1;
    mreq_valid = 1'b0; mreq_write = 1'b0; mreq_addr = '0; mreq_id = '0; mreq_wdata = '0;
    for (int i = 0; i < 64; i++) id_busy[i] = 1'b0;
    repeat (4) @(negedge mem_clk);
    rst_n = 1'b1;
    repeat (2) @(negedge mem_clk);

    kernel("copy",  1,  32'h0010_0000, 32'h0018_0000, 32'h0);
    kernel("daxpy", 1,  32'h0020_0000, 32'h0028_0000, 32'h0);
    kernel("swap",  10, 32'h0030_0000, 32'h0040_0000, 32'h0);
    kernel("vaxpy", 1,  32'h0050_0000, 32'h0058_0000, 32'h0060_0000);

    // irregular phase: four instructions of one RPT set, pseudo-random
    // addresses over 512 lines, then six instructions of one set (replacement)
    for (int i = 0; i < 400; i++)
      cpu_ref(32'h2000 + 32'((i % 4) * 64), 32'h0070_0000 + 32'(($urandom % 4096) * 8), (i % 2) == 0);
    for (int i = 0; i < 120; i++)
      cpu_ref(32'h3000 + 32'((i % 6) * 64), 32'h0070_0000 + 32'(($urandom % 4096) * 8), (i % 3) == 0);

    // context switch: the RPT is invalidated, the L2 writes back its dirty lines
    @(negedge cpu_clk); flush = 1'b1; @(negedge cpu_clk); flush = 1'b0;
    // (some of the written-back lines are dropped from the L2 and loaded
    // again at once, so a read meets an older write to its line in the queue)
    begin
      int unsigned reload[$];
      int n;
      n = 0;
      while (dirty_fifo.size() != 0) begin
        int unsigned v;
        v = dirty_fifo.pop_front();
        writeback(v);
        if (n >= 16 && reload.size() < 6) begin present.delete(v); reload.push_back(v); end
        n++;
      end
      foreach (reload[j]) cpu_ref(32'h2400, reload[j] << 6, 1'b0);
    end
    kernel("copy",  10, 32'h0080_0000, 32'h00A0_0000, 32'h0);

    // drain
    begin
      int guard;
      guard = 0;
      while ((mq.size() != 0 || pending.size() != 0 || pf_outstanding != 0) && guard < 100000) begin
        @(negedge cpu_clk); guard++;
      end
      repeat (400) @(negedge cpu_clk);
    end
    chk(mq.size() == 0 && pending.size() == 0, "all line requests completed");
    chk(pf_outstanding == 0, $sformatf("RPT outstanding count returns to 0 (%0d)", pf_outstanding));
    chk(mdl.violations == 0, $sformatf("%0d RDRAM timing violations", mdl.violations));
    chk(n_pf_hit > 0, "demand references found prefetched lines");

    $display("demand misses %0d, prefetches to memory %0d, dropped %0d, prefetch hits %0d, write-backs %0d",
             n_demand, n_pf_mem, n_pf_dropped, n_pf_hit, n_wb);
    $display("RPT: transient %0d irregular %0d steady %0d prefetch %0d skip %0d maxdist %0d limit %0d replace %0d flush %0d",
             ev_transient, ev_irregular, ev_steady, ev_pf, ev_skip, ev_maxdist, ev_limit, ev_replace, ev_flush);
    $display("MC: reorder %0d same-line hold %0d bank wait %0d r/w switch %0d row hold %0d queue full %0d",
             ev_reorder, ev_samehold, ev_bankwait, ev_rwswitch, ev_rowhold, ev_qfull);
    chk(ev_transient > 0, "RPT transient state reached");
    chk(ev_irregular > 0, "RPT irregular state reached");
    chk(ev_steady > 0, "RPT steady state reached");
    chk(ev_pf > 0, "prefetches issued");
    chk(ev_skip > 0, "same-line window steps skipped");
    chk(ev_maxdist > 0, "adaptive distance reached its maximum");
    chk(ev_limit > 0, "outstanding prefetch limit reached");
    chk(ev_replace > 0, "RPT entry replaced");
    chk(ev_flush > 0, "RPT flushed");
    chk(ev_reorder > 0, "controller issued out of arrival order");
    chk(ev_samehold > 0, "same-line request held behind an older one");
    chk(ev_bankwait > 0, "candidate waited for a bank or bus");
    chk(ev_rwswitch > 0, "read/write direction switched");
    chk(ev_rowhold > 0, "ROW bus reservation held an issue");
    chk(ev_qfull > 0, "full queue stalled the L2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
