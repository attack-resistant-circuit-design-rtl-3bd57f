// bdd_node: one decision node of a dual-rail binary decision diagram.
//
// Each node evaluates Shannon's expansion F = x.F_x + x'.F_x' on both rails:
//   f_t = (x_t & hi_t) | (x_f & lo_t)
//   f_f = (x_t & hi_f) | (x_f & lo_f)
// where (x_t, x_f) is the dual-rail decision variable, hi is the cofactor for
// x = 1 and lo the cofactor for x = 0. When the variable is in its precharge
// spacer (x_t = x_f = 0) both outputs are 0 whatever the cofactors hold, so a
// tree of these nodes precharges to all zeros. In evaluation exactly one of
// f_t, f_f rises. The node is purely combinational. Building the node as an
// AND-OR of the two rails is this design's reading of the source's transistor
// pull-up/pull-down description at the gate level.
module bdd_node (
  input  logic x_t,   // decision variable, true rail
  input  logic x_f,   // decision variable, false rail
  input  logic hi_t,  // positive cofactor F_x, true rail
  input  logic hi_f,  // positive cofactor F_x, false rail
  input  logic lo_t,  // negative cofactor F_x', true rail
  input  logic lo_f,  // negative cofactor F_x', false rail
  output logic f_t,   // node function, true rail
  output logic f_f    // node function, false rail
);
  always_comb begin
    f_t = (x_t & hi_t) | (x_f & lo_t);
    f_f = (x_t & hi_f) | (x_f & lo_f);
  end
endmodule
