// tb_spi_clk_div: checks the SPI clock divider at its default 100 MHz ->
// 1 MHz setting (HALF = 50 board cycles per SCLK half period).
//
// No tick may occur while run is low; the first tick must be high in the
// HALF-th cycle in which run is high (so the SCLK toggle it causes lands
// HALF cycles after run rose) and then every HALF cycles; dropping run must
// restart the count.
module tb_spi_clk_div;
  localparam int HALF = 100_000_000 / (2 * 1_000_000);

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, run = 0;
  logic tick;

  spi_clk_div dut (.*);

  always #5 clk = ~clk;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0d exp %0d", what, $time, got, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ticks, gap;
    repeat (2) @(negedge clk);
    rst_n = 1;
    ticks = 0;
    repeat (300) begin @(negedge clk); ticks += tick; end
    check(ticks, 0, "no tick while idle");
    for (int r = 0; r < 3; r++) begin
      // run for 10 half periods plus a partial one
      @(negedge clk);
      run = 1;
      gap = 0;
      for (int k = 0; k < 10; k++) begin
        gap = 0;
        do begin @(negedge clk); gap++; end while (!tick);
        check(gap, (k == 0) ? HALF - 1 : HALF, $sformatf("tick spacing run %0d tick %0d", r, k));
      end
      repeat (HALF / 2 + r) @(negedge clk);
      run = 0;
      ticks = 0;
      repeat (2 * HALF) begin @(negedge clk); ticks += tick; end
      check(ticks, 0, "no tick after run drops");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
