// tb_rpt_prefetcher: self-checking test of the reference prediction table.
//
// Expected prefetch sequences are computed here from the stream definition
// (first prefetch on the fourth reference of a stream, adaptive distance
// 1, 2, 4, 8, 16, 16, ..., every line ahead requested exactly once), not from
// the design.  Covered: request order and count for large and negative
// strides, one request per line for unit stride, no requests for an
// irregular pattern, the one-cycle reference-to-request latency, the
// outstanding-request limit and its release, table flush, and a second
// instance with a fixed distance of four.
module tb_rpt_prefetcher;
  localparam int unsigned AW = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          flush, ref_valid, pf_valid, pf_ready, pf_done;
  logic [AW-1:0] ref_pc, ref_addr, pf_addr;
  logic [5:0]    outstanding;
  // fixed-distance instance
  logic          f_pf_valid;
  logic [AW-1:0] f_pf_addr;
  logic [5:0]    f_outstanding;

  int checks = 0, failures = 0;
  bit auto_done = 1'b1;
  logic [AW-1:0] got[$], fgot[$];
  longint cyc = 0, ref_cyc = 0, first_pf_cyc = -1;

  rpt_prefetcher dut (
    .clk(clk), .rst_n(rst_n), .flush_i(flush),
    .ref_valid_i(ref_valid), .ref_pc_i(ref_pc), .ref_addr_i(ref_addr),
    .pf_valid_o(pf_valid), .pf_ready_i(pf_ready), .pf_addr_o(pf_addr),
    .pf_done_i(pf_done), .outstanding_o(outstanding));

  rpt_prefetcher #(.ADAPTIVE(1'b0), .FIXED_DIST(4)) dut_fixed (
    .clk(clk), .rst_n(rst_n), .flush_i(flush),
    .ref_valid_i(ref_valid), .ref_pc_i(ref_pc), .ref_addr_i(ref_addr),
    .pf_valid_o(f_pf_valid), .pf_ready_i(1'b1), .pf_addr_o(f_pf_addr),
    .pf_done_i(f_pf_valid), .outstanding_o(f_outstanding));

  // monitor: record accepted requests, complete them one cycle later
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (pf_valid && pf_ready) begin
        got.push_back(pf_addr);
        if (first_pf_cyc < 0) first_pf_cyc = cyc;
      end
      if (f_pf_valid) fgot.push_back(f_pf_addr);
      pf_done <= auto_done && pf_valid && pf_ready;
      pf_ready <= ($urandom % 4) != 0;
    end
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic do_ref(logic [AW-1:0] pc, logic [AW-1:0] a, int idle);
    @(negedge clk);
    ref_valid = 1'b1; ref_pc = pc; ref_addr = a;
    ref_cyc = cyc;
    @(negedge clk);
    ref_valid = 1'b0;
    repeat (idle) @(negedge clk);
  endtask

  function automatic int dist_at(int k);  // adaptive distance at reference k
    int d;
    d = 1;
    for (int i = 3; i < k; i++) d = (d * 2 > 16) ? 16 : d * 2;
    return d;
  endfunction

  // lines requested after n references of a stream whose stride spans >= 1 line
  task automatic check_stream(logic [AW-1:0] base, int stride, int n, string name);
    int last;
    last = (n - 1) + dist_at(n - 1);
    chk(got.size() == last - 3, $sformatf("%s: %0d requests, expected %0d", name, got.size(), last - 3));
    for (int j = 4; j <= last && (j - 4) < got.size(); j++) begin
      logic [AW-1:0] e;
      e = base + AW'(j * stride);
      e[5:0] = '0;
      chk(got[j-4] == e, $sformatf("%s: request %0d = %h, expected %h", name, j - 4, got[j-4], e));
    end
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flush = 1'b0; ref_valid = 1'b0; ref_pc = '0; ref_addr = '0;
    pf_ready = 1'b1; pf_done = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---- stride 64: one line per element, adaptive distance ----
    for (int k = 0; k < 10; k++) begin
      do_ref(32'h0000_0400, 32'h0010_0000 + 32'(k * 64), 40);
      if (k == 3) chk(first_pf_cyc >= 0 && first_pf_cyc - ref_cyc <= 4,
                      $sformatf("first request %0d cycles after the reference", first_pf_cyc - ref_cyc));
    end
    check_stream(32'h0010_0000, 64, 10, "stride 64");
    chk(dut.tbl[dut.ref_idx].pdist == 16, "distance saturates at 16");

    // ---- negative stride ----
    got.delete();
    for (int k = 0; k < 6; k++) do_ref(32'h0000_0804, 32'h0030_0000 - 32'(k * 128), 40);
    check_stream(32'h0030_0000, -128, 6, "stride -128");

    // ---- unit stride (8 bytes): each line once ----
    got.delete();
    for (int k = 0; k < 40; k++) do_ref(32'h0000_0408, 32'h0020_0000 + 32'(k * 8), 6);
    repeat (40) @(negedge clk);
    chk(got.size() == 6, $sformatf("unit stride: %0d requests, expected 6", got.size()));
    for (int j = 0; j < got.size(); j++)
      chk(got[j] == 32'h0020_0000 + 32'((j + 1) * 64), $sformatf("unit stride request %0d = %h", j, got[j]));

    // ---- irregular pattern: never steady ----
    got.delete();
    begin
      logic [AW-1:0] a;
      a = 32'h0040_0000;
      for (int k = 0; k < 20; k++) begin
        do_ref(32'h0000_040c, a, 4);
        a = a + ((k % 2) ? 32'd24 : 32'd8);
      end
    end
    repeat (20) @(negedge clk);
    chk(got.size() == 0, $sformatf("irregular: %0d requests, expected 0", got.size()));

    // ---- outstanding limit ----
    got.delete();
    repeat (5) @(negedge clk);
    chk(outstanding == 0, "all earlier requests completed");
    auto_done = 1'b0;
    for (int k = 0; k < 40; k++) do_ref(32'h0000_0410, 32'h0050_0000 + 32'(k * 64), 3);
    repeat (30) @(negedge clk);
    chk(outstanding == 32, $sformatf("outstanding = %0d, expected 32", outstanding));
    chk(got.size() == 32, $sformatf("%0d accepted at the limit, expected 32", got.size()));
    chk(pf_valid == 1'b0, "no request offered at the limit");
    auto_done = 1'b1;
    @(negedge clk); pf_done = 1'b1;   // release by completing one at a time
    repeat (5) @(negedge clk);
    pf_done = 1'b0;
    repeat (40) @(negedge clk);
    // elements referenced while the prefetcher was held are not requested any
    // more; after release the window covers the 16 elements past the last
    // reference (offsets 1..16), so 32 + 16 requests in all
    chk(got.size() == 48, $sformatf("after release %0d requests, expected 48", got.size()));
    for (int j = 0; j < 16 && got.size() == 48; j++)
      chk(got[32 + j] == 32'h0050_0000 + 32'((40 + j) * 64),
          $sformatf("after release request %0d = %h", j, got[32 + j]));

    // ---- flush: the stream must be learnt again ----
    got.delete();
    repeat (60) @(negedge clk);
    got.delete();
    @(negedge clk); flush = 1'b1; @(negedge clk); flush = 1'b0;
    for (int k = 0; k < 3; k++) do_ref(32'h0000_0400, 32'h0060_0000 + 32'(k * 64), 20);
    chk(got.size() == 0, $sformatf("after flush: %0d requests before steady state", got.size()));
    do_ref(32'h0000_0400, 32'h0060_0000 + 32'(3 * 64), 20);
    chk(got.size() == 1 && got[0] == 32'h0060_0000 + 32'(4 * 64), "first request after flush");

    // ---- fixed distance 4 (second instance, same reference stream) ----
    fgot.delete();
    for (int k = 0; k < 4; k++) do_ref(32'h0000_0500, 32'h0070_0000 + 32'(k * 64), 20);
    chk(fgot.size() == 4, $sformatf("fixed distance: %0d requests at the first hit, expected 4", fgot.size()));
    do_ref(32'h0000_0500, 32'h0070_0000 + 32'(4 * 64), 20);
    chk(fgot.size() == 5, $sformatf("fixed distance: %0d requests after the second hit, expected 5", fgot.size()));
    for (int j = 0; j < fgot.size(); j++)
      chk(fgot[j] == 32'h0070_0000 + 32'((j + 4) * 64), $sformatf("fixed request %0d = %h", j, fgot[j]));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
