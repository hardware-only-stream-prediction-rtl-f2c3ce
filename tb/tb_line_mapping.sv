// tb_line_mapping: checks the line-to-channel mapping (smp_pkg::map_line)
// for both interleavings against field extraction written independently
// (divide / modulo arithmetic on the line number), for directed and random
// line addresses.
module tb_line_mapping;
  import smp_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(int unsigned l);
    int unsigned dev, bank, lcol, row;
    rdram_loc_t loc_cl, loc_pg;
    loc_cl = map_line(LINE_ADDR_W'(l), ILV_CACHE_LINE);
    loc_pg = map_line(LINE_ADDR_W'(l), ILV_PAGE);
    // cache-line interleaved: line n goes to device n mod 8
    dev  = l % 8;  bank = (l / 8) % 16;  lcol = (l / 128) % 16;  row = l / 2048;
    checks++;
    if (loc_cl.dev != DEV_W'(dev) || loc_cl.bank != BANK_W'(bank) ||
        loc_cl.lcol != LINE_COL_W'(lcol) || loc_cl.row != ROW_W'(row)) begin
      failures++;
      $display("FAIL cache-line map of line %0d", l);
    end
    // page interleaved: a 1 KB row (16 lines) stays in one bank
    lcol = l % 16;  dev = (l / 16) % 8;  bank = (l / 128) % 16;  row = l / 2048;
    checks++;
    if (loc_pg.dev != DEV_W'(dev) || loc_pg.bank != BANK_W'(bank) ||
        loc_pg.lcol != LINE_COL_W'(lcol) || loc_pg.row != ROW_W'(row)) begin
      failures++;
      $display("FAIL page map of line %0d", l);
    end
    #1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int unsigned l = 0; l < 300; l++) check(l);
    check((1 << LINE_ADDR_W) - 1);
    for (int n = 0; n < 500; n++) check($urandom % (1 << LINE_ADDR_W));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
