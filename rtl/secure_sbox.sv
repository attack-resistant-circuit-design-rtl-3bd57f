// secure_sbox: precharged dual-rail BDD S-box with result capture and check.
//
// Single-rail input bytes are converted to dual rail and gated by the phase:
// in precharge both input rails are 0, so the whole BDD tree and both outputs
// out_t/out_f sit at 0; in evaluation x_t = data and x_f = ~data, and the
// tree produces out_t = S(data), out_f = ~S(data). Every evaluation therefore
// starts from the same all-zero state and every output pair makes exactly one
// 0->1 transition per evaluation, independent of the data.
//
// Timing (precharge_ctrl alternates one precharge and one evaluation cycle):
//   edge k   (end of a precharge cycle)  : data_in is captured
//   cycle k  (evaluation)                : live_dr carries the result
//   edge k+1 (end of evaluation)         : result, res_valid, check pass
// So one byte is accepted every two clock cycles; res is valid two clock
// edges after data_in was sampled and holds until the next result. The XOR
// check runs on the live outputs in every evaluation cycle.
//
// The input conversion, the precharge/evaluate phases and the XOR check
// follow the source's block diagram; the capture registers, res_valid and
// the one-cycle phases are this design's choices.
module secure_sbox
  import arcd_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,      // active-low synchronous reset
  input  logic [7:0] data_in,    // single-rail input byte (switches)
  output logic       precharge,  // high during the precharge phase
  output dr_byte_t   live_dr,    // live out_t/out_f of the BDD tree
  output dr_byte_t   res,        // last evaluated out_t/out_f, held
  output logic       res_valid,  // one-cycle pulse when res is updated
  output logic [7:0] xor_out,    // out_t ^ out_f of the live outputs
  output logic       xor_ones,   // xor_out is all ones (live)
  output logic       check_pass, // last evaluation had XOR = all ones
  output logic       alarm       // sticky: an evaluation failed the check
);
  logic eval_start, eval_end;
  logic [7:0] in_q;
  logic [7:0] x_t, x_f;

  precharge_ctrl u_phase (
    .clk        (clk),
    .rst_n      (rst_n),
    .precharge  (precharge),
    .eval_start (eval_start),
    .eval_end   (eval_end)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) in_q <= '0;
    else if (eval_start) in_q <= data_in;
  end

  // single rail to dual rail, forced to the spacer in precharge
  always_comb begin
    x_t = precharge ? 8'h00 :  in_q;
    x_f = precharge ? 8'h00 : ~in_q;
  end

  bdd_sbox_dualrail u_sbox (
    .x_t (x_t),
    .x_f (x_f),
    .out (live_dr)
  );

  dual_rail_checker u_check (
    .clk      (clk),
    .rst_n    (rst_n),
    .dr       (live_dr),
    .check    (eval_end),
    .xor_out  (xor_out),
    .all_ones (xor_ones),
    .pass     (check_pass),
    .alarm    (alarm)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      res       <= '0;
      res_valid <= 1'b0;
    end else begin
      res_valid <= eval_end;
      if (eval_end) res <= live_dr;
    end
  end

  // the tree must sit in its spacer whenever the phase is precharge
  a_spacer: assert property (@(posedge clk) disable iff (!rst_n)
                             precharge |-> (live_dr == '0));
endmodule
