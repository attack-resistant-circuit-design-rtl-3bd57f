// precharge_ctrl: precharge / evaluate phase sequencer for the dual-rail S-box.
//
// The dual-rail S-box must return to its all-zero spacer before every
// evaluation, so that each computation starts from the same electrical state.
// This block derives the two phases from the clock: it alternates one clock
// cycle of PRECHARGE with one clock cycle of EVALUATE, starting in PRECHARGE
// after reset. Outputs (all registered or decoded from the state register):
//   precharge  - high for the whole precharge cycle
//   eval_start - high in the last precharge cycle (input may be captured on
//                the next clock edge, which begins evaluation)
//   eval_end   - high in the evaluation cycle (results may be captured on the
//                next clock edge, which begins precharge)
// The alternation of the two phases follows the source's precharge /
// evaluation description; one clock cycle per phase is this design's choice.
module precharge_ctrl
  import arcd_pkg::*;
(
  input  logic clk,
  input  logic rst_n,       // active-low synchronous reset
  output logic precharge,
  output logic eval_start,
  output logic eval_end
);
  typedef enum logic {PRECHARGE = 1'b0, EVALUATE = 1'b1} phase_e;
  phase_e phase_q;

  always_ff @(posedge clk) begin
    if (!rst_n) phase_q <= PRECHARGE;
    else        phase_q <= (phase_q == PRECHARGE) ? EVALUATE : PRECHARGE;
  end

  always_comb begin
    precharge  = (phase_q == PRECHARGE);
    eval_start = (phase_q == PRECHARGE) && rst_n;
    eval_end   = (phase_q == EVALUATE);
  end
endmodule
