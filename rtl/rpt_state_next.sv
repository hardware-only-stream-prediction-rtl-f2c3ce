// rpt_state_next: next-state function of one reference prediction table entry.
//
// Each RPT entry keeps a two-bit history of how well its stride predicted the
// last operand addresses of its load/store instruction.  A reference is
// "correct" when addr - prev_addr equals the stored stride.  The transitions
// follow the four-state diagram of the prefetcher:
//   initial   : correct -> steady,    incorrect -> transient (update stride)
//   transient : correct -> steady,    incorrect -> irregular (update stride)
//   steady    : correct -> steady (issue prefetch), incorrect -> initial (update stride)
//   irregular : correct -> transient, incorrect -> irregular (update stride)
// Purely combinational; the RPT applies it in the cycle a reference is seen.
// Only the steady->steady transition on a correct prediction triggers prefetching.
module rpt_state_next
  import smp_pkg::*;
(
  input  rpt_state_e state_i,        // current entry state
  input  logic       correct_i,      // addr - prev_addr == stride
  output rpt_state_e state_o,        // next entry state
  output logic       update_stride_o,// load stride with addr - prev_addr
  output logic       prefetch_o      // correct prediction in steady state
);

  always_comb begin
    update_stride_o = !correct_i;
    prefetch_o      = correct_i && (state_i == RPT_STEADY);
    unique case (state_i)
      RPT_INITIAL:   state_o = correct_i ? RPT_STEADY    : RPT_TRANSIENT;
      RPT_TRANSIENT: state_o = correct_i ? RPT_STEADY    : RPT_IRREGULAR;
      RPT_STEADY:    state_o = correct_i ? RPT_STEADY    : RPT_INITIAL;
      RPT_IRREGULAR: state_o = correct_i ? RPT_TRANSIENT : RPT_IRREGULAR;
      default:       state_o = RPT_INITIAL;
    endcase
  end

endmodule
