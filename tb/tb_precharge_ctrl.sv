// tb_precharge_ctrl: checks the precharge / evaluate alternation.
//
// After reset the sequencer must be in precharge, then alternate one
// precharge and one evaluation cycle; eval_start must coincide with every
// precharge cycle outside reset and eval_end with every evaluation cycle.
// A reset in mid-sequence must return it to precharge.
module tb_precharge_ctrl;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic precharge, eval_start, eval_end;

  precharge_ctrl dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %b exp %b", what, $time, got, exp);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    check(precharge, 1'b1, "precharge in reset");
    check(eval_start, 1'b0, "no eval_start in reset");
    rst_n = 1;
    for (int c = 0; c < 40; c++) begin
      @(negedge clk);
      // the cycle of reset release (c = -1) is precharge: odd c = precharge
      check(precharge,  (c % 2) == 1, $sformatf("precharge cycle %0d", c));
      check(eval_start, (c % 2) == 1, $sformatf("eval_start cycle %0d", c));
      check(eval_end,   (c % 2) == 0, $sformatf("eval_end cycle %0d", c));
    end
    // reset during an evaluation cycle
    if (!precharge) @(negedge clk);
    @(negedge clk);
    check(eval_end, 1'b1, "in evaluation before reset");
    rst_n = 0;
    @(negedge clk);
    check(precharge, 1'b1, "reset returns to precharge");
    rst_n = 1;
    #1;
    check(precharge, 1'b1, "release cycle is precharge");
    check(eval_start, 1'b1, "eval_start in release cycle");
    @(negedge clk);
    check(eval_end, 1'b1, "then evaluation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
