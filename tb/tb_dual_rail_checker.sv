// tb_dual_rail_checker: checks the XOR verification and status flags.
//
// Random complementary pairs must give xor_out = FF, all_ones and a pass;
// pairs with one or more flipped bits must clear all_ones, clear pass and set
// the sticky alarm, which only a reset clears. Checks with `check` low must
// not change the registered flags.
module tb_dual_rail_checker;
  import arcd_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, check_en = 0;
  dr_byte_t   dr;
  logic [7:0] xor_out;
  logic all_ones, pass, alarm;

  dual_rail_checker dut (.clk(clk), .rst_n(rst_n), .dr(dr), .check(check_en),
                         .xor_out(xor_out), .all_ones(all_ones), .pass(pass), .alarm(alarm));

  always #5 clk = ~clk;

  task automatic check(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %h exp %h", what, $time, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] v, flip;
    dr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check_en = 1;
    // good pairs
    for (int i = 0; i < 200; i++) begin
      v = 8'($urandom);
      dr.t = v; dr.f = ~v;
      #1;
      check(xor_out, 8'hff, "xor of good pair");
      check(8'(all_ones), 8'h1, "all_ones good pair");
      @(negedge clk);
      check(8'(pass), 8'h1, "pass after good pair");
      check(8'(alarm), 8'h0, "no alarm on good pairs");
    end
    // a bad pair while check is low changes nothing
    check_en = 0;
    dr.t = 8'h5a; dr.f = 8'h5a;
    #1;
    check(xor_out, 8'h00, "xor of equal rails");
    @(negedge clk);
    check(8'(pass), 8'h1, "pass held while check low");
    check(8'(alarm), 8'h0, "alarm held while check low");
    // bad pairs: flip at least one bit of the false rail
    check_en = 1;
    for (int i = 0; i < 100; i++) begin
      v = 8'($urandom);
      flip = 8'($urandom);
      if (flip == 0) flip = 8'h80;
      dr.t = v; dr.f = ~v ^ flip;
      #1;
      check(xor_out, ~flip, "xor of bad pair");
      check(8'(all_ones), 8'h0, "all_ones bad pair");
      @(negedge clk);
      check(8'(pass), 8'h0, "pass cleared on bad pair");
      check(8'(alarm), 8'h1, "alarm set on bad pair");
      // a good pair afterwards restores pass but not the alarm
      dr.f = ~v;
      @(negedge clk);
      check(8'(pass), 8'h1, "pass after recovery");
      check(8'(alarm), 8'h1, "alarm is sticky");
    end
    rst_n = 0;
    @(negedge clk);
    check(8'(alarm), 8'h0, "reset clears alarm");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
