// smp_pkg: types and constants shared by the stream prefetcher and the
// reordering Direct RDRAM memory controller.
//
// The RPT state encoding, the Direct RDRAM timing values (in 2.5 ns memory
// cycles) and the channel packet formats live here.  The timing numbers are
// those of a -45/-800 Direct RDRAM part.  The encodings of states and packet
// opcodes are this design's own choice.
package smp_pkg;

  // ---------------- Reference prediction table ----------------
  // Two-bit history state of one RPT entry.
  typedef enum logic [1:0] {
    RPT_INITIAL   = 2'd0,
    RPT_TRANSIENT = 2'd1,
    RPT_STEADY    = 2'd2,
    RPT_IRREGULAR = 2'd3
  } rpt_state_e;

  // ---------------- Direct RDRAM timing (memory cycles) ----------------
  localparam int unsigned T_PACK = 4;   // packet transfer time
  localparam int unsigned T_RC   = 28;  // ACT to ACT, same bank
  localparam int unsigned T_RAS  = 20;  // ACT to PRER, same bank
  localparam int unsigned T_RP   = 8;   // PRER to ACT, same bank
  localparam int unsigned T_RR   = 8;   // ACT to ACT, same device
  localparam int unsigned T_RCD  = 9;   // ACT to COL RD/WR
  localparam int unsigned T_CAC  = 8;   // COL RD to read data
  localparam int unsigned T_CWD  = 6;   // COL WR to write data
  localparam int unsigned T_CC   = 4;   // COL to COL, same bank
  localparam int unsigned T_RDP  = 4;   // last COL RD to PRER

  // Channel geometry: eight 64 Mbit devices, 16 banks each, 512 rows of
  // 64 dualocts (16 bytes) per bank.
  localparam int unsigned NDEV      = 8;
  localparam int unsigned NBANK     = 16;
  localparam int unsigned DEV_W     = 3;
  localparam int unsigned BANK_W    = 4;
  localparam int unsigned ROW_W     = 9;
  localparam int unsigned COL_W     = 6;   // dualoct column within a row
  localparam int unsigned LINE_COL_W = 4;  // 64-byte line within a 1 KB row
  localparam int unsigned MEM_ADDR_W = 26; // 64 MB of memory, byte address
  localparam int unsigned LINE_ADDR_W = MEM_ADDR_W - 6;
  localparam int unsigned PKT_BYTES = 16;  // one DATA packet
  localparam int unsigned LINE_BYTES = 64; // one L2 line
  localparam int unsigned PKTS_PER_LINE = LINE_BYTES / PKT_BYTES;

  // Derived per-transaction offsets from the ROW ACT packet, closed page.
  localparam int unsigned COL_LAST  = T_RCD + (PKTS_PER_LINE - 1) * T_CC;   // 21
  localparam int unsigned RD_PRER   = (COL_LAST + T_RDP > T_RAS) ? COL_LAST + T_RDP : T_RAS; // 25
  localparam int unsigned WR_PRER   = (COL_LAST + T_CWD + T_PACK > T_RAS) ?
                                      COL_LAST + T_CWD + T_PACK : T_RAS;    // 31
  localparam int unsigned RD_BANK_BUSY = (RD_PRER + T_RP > T_RC) ? RD_PRER + T_RP : T_RC; // 33
  localparam int unsigned WR_BANK_BUSY = (WR_PRER + T_RP > T_RC) ? WR_PRER + T_RP : T_RC; // 39
  localparam int unsigned COL_SPAN  = PKTS_PER_LINE * T_CC;   // 16 cycles of COL bus
  localparam int unsigned DATA_SPAN = PKTS_PER_LINE * T_PACK; // 16 cycles of DATA bus

  typedef enum logic {ROW_ACT = 1'b0, ROW_PRER = 1'b1} row_op_e;
  typedef enum logic {COL_RD = 1'b0, COL_WR = 1'b1} col_op_e;

  typedef struct packed {
    logic [DEV_W-1:0]  dev;
    logic [BANK_W-1:0] bank;
    logic [ROW_W-1:0]  row;
    logic [LINE_COL_W-1:0] lcol;   // line slot within the row
  } rdram_loc_t;

  typedef struct packed {
    row_op_e           op;
    logic [DEV_W-1:0]  dev;
    logic [BANK_W-1:0] bank;
    logic [ROW_W-1:0]  row;
  } row_pkt_t;

  typedef struct packed {
    col_op_e           op;
    logic [DEV_W-1:0]  dev;
    logic [BANK_W-1:0] bank;
    logic [COL_W-1:0]  col;
  } col_pkt_t;

  // Address interleaving of lines over devices and banks.
  typedef enum logic {ILV_CACHE_LINE = 1'b0, ILV_PAGE = 1'b1} interleave_e;

  // Place of a 64-byte line on the channel.  A bank row holds 1 KB, i.e.
  // sixteen lines.
  //   ILV_CACHE_LINE : consecutive lines go to consecutive devices, then banks
  //                    line = {row[8:0], lcol[3:0], bank[3:0], dev[2:0]}
  //   ILV_PAGE       : a whole row is filled before the next device, then bank
  //                    line = {row[8:0], bank[3:0], dev[2:0], lcol[3:0]}
  // The two organisations are the evaluated ones; the order of the device
  // and bank fields inside each is this design's choice.
  function automatic rdram_loc_t map_line(logic [LINE_ADDR_W-1:0] line, interleave_e ilv);
    rdram_loc_t loc;
    loc.row = line[LINE_ADDR_W-1 -: ROW_W];
    if (ilv == ILV_CACHE_LINE) begin
      loc.dev  = line[0 +: DEV_W];
      loc.bank = line[DEV_W +: BANK_W];
      loc.lcol = line[DEV_W + BANK_W +: LINE_COL_W];
    end else begin
      loc.lcol = line[0 +: LINE_COL_W];
      loc.dev  = line[LINE_COL_W +: DEV_W];
      loc.bank = line[LINE_COL_W + DEV_W +: BANK_W];
    end
    return loc;
  endfunction

endpackage
