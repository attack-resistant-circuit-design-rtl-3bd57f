// tb_secure_sbox: all 256 inputs through the precharged dual-rail S-box.
//
// In every precharge cycle the testbench puts the next byte on data_in. It
// checks that the live outputs are all zero in every precharge cycle and
// complementary in every evaluation cycle, that res_valid pulses exactly two
// clock edges after the byte was sampled (one result per two cycles), that
// res holds {S(x), ~S(x)} from the reference model, that check_pass is set
// and that the alarm never rises.
module tb_secure_sbox;
  import arcd_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [7:0] data_in = '0;
  logic precharge, res_valid, xor_ones, check_pass, alarm;
  dr_byte_t live_dr, res;
  logic [7:0] xor_out;

  secure_sbox dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [15:0] got, input logic [15:0] exp, input string what);
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

  int n_pre = 0, n_eval = 0;
  // spacer and complement properties on every cycle after reset
  always @(negedge clk) if (rst_n) begin
    if (precharge) begin
      n_pre++;
      check(live_dr, 16'h0000, "live outputs zero in precharge");
    end else begin
      n_eval++;
      check(16'(xor_out), 16'h00ff, "live out_t ^ out_f in evaluation");
      check(16'(xor_ones), 16'h1, "xor_ones in evaluation");
    end
  end

  initial begin
    logic [7:0] s;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      // wait for a precharge cycle, present the byte
      while (!precharge) @(negedge clk);
      data_in = 8'(i);
      @(negedge clk);                      // edge 1: byte sampled, evaluation
      data_in = 8'($urandom);              // must not affect this result
      check(16'(res_valid), 16'h0, "res_valid not yet");
      @(negedge clk);                      // edge 2: result captured
      check(16'(res_valid), 16'h1, $sformatf("res_valid two edges after sampling %02h", i));
      s = ref_sbox(8'(i));
      check(res, {s, ~s}, $sformatf("res for %02h", i));
      check(16'(check_pass), 16'h1, "check_pass");
      check(16'(alarm), 16'h0, "no alarm");
    end
    check(16'(n_pre > 200 && n_eval > 200), 16'h1, "both phases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
