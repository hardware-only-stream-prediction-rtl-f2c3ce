// stream_memory_system: hardware-only stream prefetching plus dynamic access
// ordering, from the processor's reference stream to the Direct RDRAM channel.
//
// The system has three parts in series:
//   processor --refs--> RPT prefetcher --line prefetches--> L2 cache
//   L2 cache --line fills / write-backs--> reordering controller --> RDRAM
// The RPT (rpt_prefetcher) sits beside the L1 caches, watches the operand
// addresses of loads and stores, and asks the L2 to fetch lines ahead of
// strided streams.  The L2's misses, including those caused by prefetches,
// reach the controller (reorder_mem_ctrl), which queues them and sends the
// one that can start soonest to the eight-device RDRAM channel.  The extra
// requests the prefetcher creates are what give the controller a choice.
//
// The processor, the L1 caches and the L2 cache are conventional parts and
// are not part of this RTL; their connections are ports of this module:
//   ref_*    processor references seen by the RPT          (cpu_clk)
//   pf_*     RPT prefetch requests to the L2 and arrivals   (cpu_clk)
//   mem_*    L2 line requests and completions               (mem_clk)
//   row_/col_/wdata_/rdata_*  the Direct RDRAM channel      (mem_clk)
// The two halves run on separate clocks (the evaluated system uses a
// processor clock four times the 400 MHz memory clock); any crossing
// between them is inside the L2.
module stream_memory_system
  import smp_pkg::*;
#(
  parameter int unsigned RPT_ENTRIES     = 64,
  parameter int unsigned RPT_WAYS        = 4,
  parameter int unsigned ADDR_W          = 32,
  parameter int unsigned MAX_DIST        = 16,
  parameter bit          ADAPTIVE        = 1'b1,
  parameter int unsigned FIXED_DIST      = 16,
  parameter int unsigned MAX_OUTSTANDING = 32,
  parameter int unsigned QDEPTH          = 40,
  parameter int unsigned ID_W            = 6,
  parameter bit          REORDER         = 1'b1,
  parameter interleave_e INTERLEAVE      = ILV_CACHE_LINE
) (
  input  logic                    cpu_clk,
  input  logic                    mem_clk,
  input  logic                    rst_n,
  // processor side (cpu_clk)
  input  logic                    flush_i,
  input  logic                    ref_valid_i,
  input  logic [ADDR_W-1:0]       ref_pc_i,
  input  logic [ADDR_W-1:0]       ref_addr_i,
  output logic                    pf_valid_o,
  input  logic                    pf_ready_i,
  output logic [ADDR_W-1:0]       pf_addr_o,
  input  logic                    pf_done_i,
  output logic [$clog2(MAX_OUTSTANDING+1)-1:0] pf_outstanding_o,
  // L2 miss side (mem_clk)
  input  logic                    mem_req_valid_i,
  output logic                    mem_req_ready_o,
  input  logic                    mem_req_write_i,
  input  logic [MEM_ADDR_W-1:0]   mem_req_addr_i,
  input  logic [ID_W-1:0]         mem_req_id_i,
  input  logic [LINE_BYTES*8-1:0] mem_req_wdata_i,
  output logic                    mem_rsp_valid_o,
  output logic                    mem_rsp_write_o,
  output logic [ID_W-1:0]         mem_rsp_id_o,
  output logic [LINE_BYTES*8-1:0] mem_rsp_rdata_o,
  output logic [$clog2(QDEPTH+1)-1:0] mem_queue_count_o,
  // Direct RDRAM channel (mem_clk)
  output logic                    row_valid_o,
  output row_pkt_t                row_pkt_o,
  output logic                    col_valid_o,
  output col_pkt_t                col_pkt_o,
  output logic                    wdata_valid_o,
  output logic [PKT_BYTES*8-1:0]  wdata_o,
  input  logic                    rdata_valid_i,
  input  logic [PKT_BYTES*8-1:0]  rdata_i
);

  rpt_prefetcher #(
    .ENTRIES        (RPT_ENTRIES),
    .WAYS           (RPT_WAYS),
    .ADDR_W         (ADDR_W),
    .LINE_BYTES_P   (LINE_BYTES),
    .MAX_DIST       (MAX_DIST),
    .ADAPTIVE       (ADAPTIVE),
    .FIXED_DIST     (FIXED_DIST),
    .MAX_OUTSTANDING(MAX_OUTSTANDING)
  ) u_rpt (
    .clk          (cpu_clk),
    .rst_n        (rst_n),
    .flush_i      (flush_i),
    .ref_valid_i  (ref_valid_i),
    .ref_pc_i     (ref_pc_i),
    .ref_addr_i   (ref_addr_i),
    .pf_valid_o   (pf_valid_o),
    .pf_ready_i   (pf_ready_i),
    .pf_addr_o    (pf_addr_o),
    .pf_done_i    (pf_done_i),
    .outstanding_o(pf_outstanding_o)
  );

  reorder_mem_ctrl #(
    .QDEPTH    (QDEPTH),
    .ID_W      (ID_W),
    .REORDER   (REORDER),
    .INTERLEAVE(INTERLEAVE)
  ) u_mc (
    .clk          (mem_clk),
    .rst_n        (rst_n),
    .req_valid_i  (mem_req_valid_i),
    .req_ready_o  (mem_req_ready_o),
    .req_write_i  (mem_req_write_i),
    .req_addr_i   (mem_req_addr_i),
    .req_id_i     (mem_req_id_i),
    .req_wdata_i  (mem_req_wdata_i),
    .rsp_valid_o  (mem_rsp_valid_o),
    .rsp_write_o  (mem_rsp_write_o),
    .rsp_id_o     (mem_rsp_id_o),
    .rsp_rdata_o  (mem_rsp_rdata_o),
    .row_valid_o  (row_valid_o),
    .row_pkt_o    (row_pkt_o),
    .col_valid_o  (col_valid_o),
    .col_pkt_o    (col_pkt_o),
    .wdata_valid_o(wdata_valid_o),
    .wdata_o      (wdata_o),
    .rdata_valid_i(rdata_valid_i),
    .rdata_i      (rdata_i),
    .queue_count_o(mem_queue_count_o)
  );

endmodule
