// tb_bdd_node: exhaustive test of one dual-rail Shannon node.
//
// All 64 combinations of the six inputs are applied. For the two valid
// encodings of the decision variable the node must select the positive
// (x = 1) or negative (x = 0) cofactor on both rails; in the spacer
// (x_t = x_f = 0) both outputs must be 0.
module tb_bdd_node;
  int checks = 0, failures = 0;
  logic x_t, x_f, hi_t, hi_f, lo_t, lo_f, f_t, f_f;

  bdd_node dut (.*);

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b exp %b (x=%b%b hi=%b%b lo=%b%b)", what, got, exp,
               x_t, x_f, hi_t, hi_f, lo_t, lo_f);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      {x_t, x_f, hi_t, hi_f, lo_t, lo_f} = 6'(v);
      #1;
      case ({x_t, x_f})
        2'b10: begin check(f_t, hi_t, "x=1 true rail");  check(f_f, hi_f, "x=1 false rail"); end
        2'b01: begin check(f_t, lo_t, "x=0 true rail");  check(f_f, lo_f, "x=0 false rail"); end
        2'b00: begin check(f_t, 1'b0, "spacer true");    check(f_f, 1'b0, "spacer false");   end
        default: ;  // both rails high is not a legal code word
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
