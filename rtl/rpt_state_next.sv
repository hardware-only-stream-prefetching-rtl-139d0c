// rpt_state_next: next-state logic of one reference prediction table entry.
//
// Purely combinational. Given the entry's two-bit history state and whether
// the current operand address matched the prediction (addr - prev_addr ==
// stride), it returns the next state, whether the stride field is to be
// rewritten with the new difference, and whether the reference is a
// "prefetch hit" that may issue prefetches. The transitions are the four
// states and eight arcs of the classic stride-detection table:
//   initial   --correct--> steady      initial   --incorrect--> transient (new stride)
//   transient --correct--> steady      transient --incorrect--> irregular (new stride)
//   steady    --correct--> steady (issue prefetch)
//   steady    --incorrect--> initial (new stride)
//   irregular --correct--> transient   irregular --incorrect--> irregular (new stride)
// Every incorrect prediction rewrites the stride; no correct one does.
module rpt_state_next
  import stream_pkg::*;
(
  input  rpt_state_e state,
  input  logic       correct,
  output rpt_state_e next_state,
  output logic       update_stride,
  output logic       issue
);
  always_comb begin
    update_stride = !correct;
    issue         = correct && (state == RPT_STEADY);
    unique case (state)
      RPT_INITIAL:   next_state = correct ? RPT_STEADY    : RPT_TRANSIENT;
      RPT_TRANSIENT: next_state = correct ? RPT_STEADY    : RPT_IRREGULAR;
      RPT_STEADY:    next_state = correct ? RPT_STEADY    : RPT_INITIAL;
      RPT_IRREGULAR: next_state = correct ? RPT_TRANSIENT : RPT_IRREGULAR;
      default:       next_state = RPT_INITIAL;
    endcase
  end
endmodule
