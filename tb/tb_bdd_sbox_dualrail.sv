// tb_bdd_sbox_dualrail: exhaustive test of the dual-rail BDD S-box.
//
// For all 256 inputs: after a precharge (both input rails 0) both output
// rails must be 0; in evaluation out.t must equal the AES S-box value
// computed by the reference model and out.f its complement, so that
// out.t ^ out.f is all ones. A few published S-box values are also checked
// directly against the reference model.
//
// The switching count is also checked inside the trees: after a precharge
// every node rail is 0, and after any evaluation exactly one rail of each of
// the 8 x 255 nodes is 1. So every input causes the same 2040 rising node
// transitions, and no node ends with both rails high.
module tb_bdd_sbox_dualrail;
  import arcd_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [7:0] x_t, x_f;
  dr_byte_t   out;

  bdd_sbox_dualrail dut (.x_t(x_t), .x_f(x_f), .out(out));

  localparam int NODES = 8 * 255;
  logic [NODES-1:0] node_t, node_f;
  for (genvar b = 0; b < 8; b++) begin : g_probe_bit
    for (genvar n = 1; n < 256; n++) begin : g_probe_node
      assign node_t[b*255 + n - 1] = dut.g_bit[b].nt[n];
      assign node_f[b*255 + n - 1] = dut.g_bit[b].nf[n];
    end
  end

  task automatic check8(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // FIPS-197 values, to confirm the reference model itself
    check8(ref_sbox(8'h00), 8'h63, "ref S(00)");
    check8(ref_sbox(8'h53), 8'hed, "ref S(53)");
    check8(ref_sbox(8'h81), 8'h0c, "ref S(81)");
    check8(ref_sbox(8'hff), 8'h16, "ref S(ff)");

    for (int i = 0; i < 256; i++) begin
      x_t = 8'h00; x_f = 8'h00;           // precharge
      #5;
      check8(out.t, 8'h00, $sformatf("spacer out_t before %02h", i));
      check8(out.f, 8'h00, $sformatf("spacer out_f before %02h", i));
      checks++;
      if ((node_t | node_f) != '0) begin
        failures++;
        $display("FAIL node rails not all 0 in precharge before %02h", i);
      end
      x_t = 8'(i); x_f = ~8'(i);           // evaluate
      #5;
      check8(out.t, ref_sbox(8'(i)), $sformatf("out_t S(%02h)", i));
      check8(out.f, ~ref_sbox(8'(i)), $sformatf("out_f S(%02h)", i));
      check8(out.t ^ out.f, 8'hff, $sformatf("xor S(%02h)", i));
      checks++;
      if ($countones(node_t | node_f) != NODES || (node_t & node_f) != '0) begin
        failures++;
        $display("FAIL input %02h: %0d node rails rose, expected %0d", i,
                 $countones(node_t | node_f), NODES);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
