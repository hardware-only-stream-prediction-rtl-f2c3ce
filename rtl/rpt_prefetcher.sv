// rpt_prefetcher: reference prediction table (RPT) stream detector and L2
// line prefetcher.
//
// The RPT watches every load and store the processor issues (instruction
// address plus operand address) and keeps, per instruction, the previous
// operand address, the last stride and a two-bit history state
// (rpt_state_next).  It is a 64-entry, 4-way set-associative table indexed by
// the instruction address.  When an entry in steady state predicts the
// current address correctly, the prefetcher requests the lines at
// addr + stride ... addr + d*stride, where d is the prefetch distance.
//
// Sliding window.  Each entry holds a window [L,R] of offsets, counted in
// strides from its most recent address, that are still to be requested.
// Issuing the request for offset L moves the window to [L+1,R].  Each further
// correct reference moves the base up by one stride, so L drops by one (never
// below 1) and R is set to the current distance.  In steady state one new
// request (offset d) is therefore produced per reference.  L > R means the
// window is empty.
//
// Distance.  With ADAPTIVE=1 the distance starts at one on the first correct
// steady-state reference and doubles on every further one, up to MAX_DIST.
// With ADAPTIVE=0 it is FIXED_DIST.  Leaving steady state ends the stream and
// clears the window and the distance.
//
// Design choices not fixed by the stream-prefetching scheme itself:
//  * A window step whose target falls in the same 64-byte line as the
//    previous offset (or the referenced element) is skipped without a
//    request, so each line is requested once.
//  * At most MAX_OUTSTANDING accepted prefetches may be waiting for their
//    line; pf_done_i reports one arrival.  Requests stop at the limit.
//  * Windows are served in fixed priority, lowest entry first, one step per
//    cycle.  A new entry replaces an invalid way first, otherwise the set's
//    round-robin victim.  flush_i invalidates the table (context switch).
//
// Timing: a reference is looked up and its entry updated in the cycle
// ref_valid_i is high (one reference per cycle).  pf_valid_o/pf_addr_o are a
// valid/ready request to the L2; pf_addr_o is line-aligned and may change
// while not accepted if the same entry is referenced again.
module rpt_prefetcher
  import smp_pkg::*;
#(
  parameter int unsigned ENTRIES         = 64,
  parameter int unsigned WAYS            = 4,
  parameter int unsigned ADDR_W          = 32,
  parameter int unsigned PC_LSB          = 2,
  parameter int unsigned LINE_BYTES_P    = 64,
  parameter int unsigned MAX_DIST        = 16,
  parameter bit          ADAPTIVE        = 1'b1,
  parameter int unsigned FIXED_DIST      = 16,
  parameter int unsigned MAX_OUTSTANDING = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              flush_i,
  // observed processor references (loads and stores alike)
  input  logic              ref_valid_i,
  input  logic [ADDR_W-1:0] ref_pc_i,
  input  logic [ADDR_W-1:0] ref_addr_i,
  // prefetch requests to the L2
  output logic              pf_valid_o,
  input  logic              pf_ready_i,
  output logic [ADDR_W-1:0] pf_addr_o,
  input  logic              pf_done_i,
  output logic [$clog2(MAX_OUTSTANDING+1)-1:0] outstanding_o
);

  localparam int unsigned SETS   = ENTRIES / WAYS;
  localparam int unsigned SET_W  = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned WAY_W  = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned TAG_W  = ADDR_W - PC_LSB - SET_W;
  localparam int unsigned OFF_W  = $clog2(LINE_BYTES_P);
  localparam int unsigned DW     = $clog2(MAX_DIST + 2);
  localparam int unsigned IDX_W  = $clog2(ENTRIES);
  localparam int unsigned OUT_W  = $clog2(MAX_OUTSTANDING + 1);

  typedef struct packed {
    logic              valid;
    logic [TAG_W-1:0]  tag;
    logic [ADDR_W-1:0] prev;
    logic [ADDR_W-1:0] stride;
    rpt_state_e        state;
    logic [DW-1:0]     pdist;
    logic [DW-1:0]     wl;
    logic [DW-1:0]     wr;
  } rpt_entry_t;

  rpt_entry_t tbl [ENTRIES];
  logic [WAY_W-1:0] victim [SETS];
  logic [OUT_W-1:0] outstanding;

  // ---------------- reference lookup ----------------
  logic [SET_W-1:0] set_idx;
  logic [TAG_W-1:0] ref_tag;
  logic             hit;
  logic [WAY_W-1:0] hit_way, alloc_way;
  logic             have_free;
  logic [IDX_W-1:0] ref_idx;

  assign set_idx = SET_W'(ref_pc_i >> PC_LSB);
  assign ref_tag = ref_pc_i[ADDR_W-1 -: TAG_W];

  always_comb begin
    hit = 1'b0; hit_way = '0; have_free = 1'b0; alloc_way = victim[set_idx];
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (!tbl[set_idx * WAYS + w].valid) begin
        have_free = 1'b1; alloc_way = WAY_W'(w);
      end
    end
    for (int w = 0; w < WAYS; w++) begin
      if (tbl[set_idx * WAYS + w].valid && tbl[set_idx * WAYS + w].tag == ref_tag) begin
        hit = 1'b1; hit_way = WAY_W'(w);
      end
    end
    ref_idx = IDX_W'(set_idx * WAYS) + IDX_W'(hit ? hit_way : alloc_way);
  end

  rpt_entry_t       cur;
  logic [ADDR_W-1:0] delta;
  logic              correct;
  rpt_state_e        nstate;
  logic              upd_stride, do_pf;

  assign cur     = tbl[ref_idx];
  assign delta   = ref_addr_i - cur.prev;
  assign correct = (delta == cur.stride);

  rpt_state_next u_fsm (
    .state_i        (cur.state),
    .correct_i      (correct),
    .state_o        (nstate),
    .update_stride_o(upd_stride),
    .prefetch_o     (do_pf)
  );

  // ---------------- window service ----------------
  logic             sel_any;
  logic [IDX_W-1:0] sel_idx;
  always_comb begin
    sel_any = 1'b0; sel_idx = '0;
    for (int e = ENTRIES - 1; e >= 0; e--) begin
      if (tbl[e].valid && tbl[e].wl <= tbl[e].wr) begin
        sel_any = 1'b1; sel_idx = IDX_W'(e);
      end
    end
  end

  rpt_entry_t        sel;
  logic [ADDR_W-1:0] tgt, tgt_prev;
  logic              same_line, step;
  assign sel       = tbl[sel_idx];
  assign tgt       = sel.prev + ADDR_W'(sel.wl) * sel.stride;
  assign tgt_prev  = tgt - sel.stride;
  assign same_line = (tgt[ADDR_W-1:OFF_W] == tgt_prev[ADDR_W-1:OFF_W]);

  assign pf_valid_o = sel_any && !same_line && (outstanding < OUT_W'(MAX_OUTSTANDING));
  assign pf_addr_o  = {tgt[ADDR_W-1:OFF_W], {OFF_W{1'b0}}};
  // window of the selected entry advances on a skip or an accepted request
  assign step       = sel_any && (same_line ? 1'b1 : (pf_valid_o && pf_ready_i));
  assign outstanding_o = outstanding;

  // ---------------- state update ----------------
  function automatic logic [DW-1:0] next_dist(logic [DW-1:0] d);
    if (!ADAPTIVE)                      return DW'(FIXED_DIST);
    if (d == '0)                        return DW'(1);
    if ({1'b0, d} << 1 > (DW+1)'(MAX_DIST)) return DW'(MAX_DIST);
    return d << 1;
  endfunction

  // window start of the referenced entry after this cycle's service step,
  // and its next distance
  logic [DW-1:0] l_now, d_new;
  assign l_now = cur.wl + DW'(step && sel_idx == ref_idx);
  assign d_new = next_dist(cur.pdist);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) tbl[e] <= '0;
      for (int s = 0; s < SETS; s++)    victim[s] <= '0;
      outstanding <= '0;
    end else begin
      // outstanding prefetch count
      outstanding <= outstanding
                     + OUT_W'(pf_valid_o && pf_ready_i)
                     - OUT_W'(pf_done_i && outstanding != '0);

      if (flush_i) begin
        for (int e = 0; e < ENTRIES; e++) tbl[e].valid <= 1'b0;
      end else begin
        if (step) tbl[sel_idx].wl <= sel.wl + DW'(1);

        if (ref_valid_i) begin
          if (hit) begin
            tbl[ref_idx].prev  <= ref_addr_i;
            tbl[ref_idx].state <= nstate;
            if (upd_stride) tbl[ref_idx].stride <= delta;
            if (do_pf) begin
              tbl[ref_idx].pdist <= d_new;
              tbl[ref_idx].wl   <= (l_now > DW'(1)) ? l_now - DW'(1) : DW'(1);
              tbl[ref_idx].wr   <= d_new;
            end else begin
              tbl[ref_idx].pdist <= '0;
              tbl[ref_idx].wl   <= DW'(1);
              tbl[ref_idx].wr   <= '0;
            end
          end else begin
            tbl[ref_idx].valid  <= 1'b1;
            tbl[ref_idx].tag    <= ref_tag;
            tbl[ref_idx].prev   <= ref_addr_i;
            tbl[ref_idx].stride <= '0;
            tbl[ref_idx].state  <= RPT_INITIAL;
            tbl[ref_idx].pdist   <= '0;
            tbl[ref_idx].wl     <= DW'(1);
            tbl[ref_idx].wr     <= '0;
            if (!have_free) victim[set_idx] <= victim[set_idx] + WAY_W'(1);
          end
        end
      end
    end
  end

`ifndef SYNTHESIS
  // a prefetch is never issued beyond the outstanding limit
  a_out_limit: assert property (@(posedge clk) disable iff (!rst_n)
    outstanding <= OUT_W'(MAX_OUTSTANDING));
`endif

endmodule
