// bdd_sbox_dualrail: the AES S-box as a balanced dual-rail binary decision tree.
//
// Every output bit is a complete binary decision tree of 255 bdd_node
// instances (Shannon expansion on one input bit per level, MSB at the root,
// bit 0 next to the leaves). Leaf i of output bit b holds the constant
// S(i)[b] on the true rail and its complement on the false rail, with S()
// computed by arcd_pkg::aes_sbox at elaboration. Because the tree is complete,
// every path from an input to an output passes exactly eight nodes, which
// gives the equal path length and equal switching count per evaluation that
// the balanced-BDD style asks for.
//
// Interface: x_t/x_f are the dual-rail input byte. With x_t = x_f = 0
// (precharge) both output rails are 0. With x_f = ~x_t (evaluation) the
// outputs settle to out.t = S(x_t) and out.f = ~S(x_t). Purely combinational;
// the phase control lives in secure_sbox.
//
// The complete (unreduced) tree is this design's choice: the source describes
// a BDD built from Shannon nodes with uniform path length but gives no node
// list. A "simplified" BDD that looks at chosen input bits is mentioned but
// not specified, so the full standard S-box is implemented.
module bdd_sbox_dualrail
  import arcd_pkg::*;
(
  input  logic [7:0] x_t,  // input byte, true rail
  input  logic [7:0] x_f,  // input byte, false rail
  output dr_byte_t   out   // S-box output, out.t = out_t, out.f = out_f
);
  localparam int unsigned NBITS  = 8;
  localparam int unsigned NLEAF  = 1 << NBITS;   // 256 leaves per tree

  for (genvar b = 0; b < NBITS; b++) begin : g_bit
    // Heap numbering: node n has children 2n (variable = 0) and 2n+1
    // (variable = 1); leaves are 256..511 and leaf 256+i stands for input i.
    logic nt [1:2*NLEAF-1];
    logic nf [1:2*NLEAF-1];

    for (genvar i = 0; i < NLEAF; i++) begin : g_leaf
      localparam logic [7:0] S = aes_sbox(8'(i));
      assign nt[NLEAF + i] = S[b];
      assign nf[NLEAF + i] = ~S[b];
    end

    for (genvar n = 1; n < NLEAF; n++) begin : g_node
      // depth 0 is the root; a node at depth d decides on input bit 7-d
      localparam int D = $clog2(n + 1) - 1;
      bdd_node u_node (
        .x_t  (x_t[NBITS-1-D]),
        .x_f  (x_f[NBITS-1-D]),
        .hi_t (nt[2*n+1]),
        .hi_f (nf[2*n+1]),
        .lo_t (nt[2*n]),
        .lo_f (nf[2*n]),
        .f_t  (nt[n]),
        .f_f  (nf[n])
      );
    end

    assign out.t[b] = nt[1];
    assign out.f[b] = nf[1];
  end
endmodule
