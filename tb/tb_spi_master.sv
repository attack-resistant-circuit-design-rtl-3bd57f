// tb_spi_master: checks the SPI master at its default settings (16-bit
// packets, 100 MHz board clock, 1 MHz SCLK).
//
// A small receiver model samples MOSI on each rising SCLK edge while SS_N is
// low. For random words the testbench checks the received word (MSB first),
// exactly 16 rising edges per frame, an SCLK period of 100 board cycles
// (1 Mbit/s), SS_N low for exactly 16*100 cycles, the done pulse, that start
// is ignored while busy, and that SCLK stays low while SS_N is high.
module tb_spi_master;
  import arcd_pkg::*;

  localparam int WIDTH = 16;
  localparam int HALF  = 50;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic [WIDTH-1:0] tx_data = '0;
  spi_link_t link;
  logic busy, done;

  spi_master dut (.*);

  always #5 clk = ~clk;

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0h exp %0h", what, $time, got, exp);
    end
  endtask

  // receiver model and timing monitor, all in board-clock cycles
  logic [WIDTH-1:0] rx;
  int rises, cyc, ss_low, last_rise, period_err, sclk_idle_err;
  logic sclk_d;
  always @(posedge clk) begin
    cyc++;
    sclk_d <= link.sclk;
    if (link.ss_n && link.sclk) sclk_idle_err++;
    if (!link.ss_n) ss_low++;
    if (link.sclk && !sclk_d && !link.ss_n) begin
      rx = {rx[WIDTH-2:0], link.mosi};
      if (rises > 0 && cyc - last_rise != 2 * HALF) period_err++;
      last_rise = cyc;
      rises++;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] w;
    int dones;
    sclk_idle_err = 0; period_err = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(link.ss_n, 1, "SS_N high when idle");
    for (int p = 0; p < 12; p++) begin
      w = (p == 0) ? 16'h8001 : (p == 1) ? 16'hc639 : 16'($urandom);
      rises = 0; ss_low = 0;
      tx_data = w;
      start = 1;
      @(negedge clk);
      start = 0;
      tx_data = ~w;                       // loaded already; must not matter
      check(busy, 1, "busy after start");
      // a second start while busy must be ignored
      repeat (300) @(negedge clk);
      start = 1; @(negedge clk); start = 0;
      dones = 0;
      while (busy) begin @(negedge clk); dones += done; end
      check(dones, 1, "one done pulse");
      check(rx, w, $sformatf("word %0d received", p));
      check(rises, WIDTH, "rising edges per frame");
      check(ss_low, 2 * WIDTH * HALF, "SS_N low time in board cycles");
      repeat (20) @(negedge clk);
      check(busy, 0, "start while busy was ignored");
    end
    check(period_err, 0, "SCLK period = 100 board cycles");
    check(sclk_idle_err, 0, "SCLK low while deselected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
