// tb_arcd_top: end-to-end test of the two-board design at its default
// settings (100 MHz boards, 1 MHz SCLK, 16-bit packets).
//
// Board A runs on a 10 ns clock and board B on an unrelated 9.7 ns clock.
// For every one of the 256 switch settings the testbench checks the held
// S-box result {S(x), ~S(x)} against the reference model and the XOR check,
// then requests one SPI transfer and checks that board B shows the same 16
// bits on its LEDs, that the transfer took 16 SCLK periods of 100 board-A
// cycles and that the result arrived within a few cycles of the end of the
// frame. Once, board A is reset in the middle of a frame, which must make
// board B drop the partial packet. Every mechanism of the design is counted
// and a mechanism that never occurred counts as a failure.
module tb_arcd_top;
  import arcd_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk_a = 0, clk_b = 0, rst_a_n = 0, rst_b_n = 0;
  logic [7:0] sw = '0;
  logic send = 0;
  logic precharge, sbox_valid, xor_ones, check_pass, alarm, spi_busy, spi_done;
  logic rx_valid, frame_err;
  dr_byte_t sbox_live, sbox_res;
  logic [7:0] xor_out;
  spi_link_t spi;
  logic [15:0] led_b;

  arcd_top dut (.*);

  always #5    clk_a = ~clk_a;
  always #4.85 clk_b = ~clk_b;

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0h exp %0h", what, $time, got, exp);
    end
  endtask

  // mechanism counters
  int n_precharge = 0, n_eval = 0, n_check_pass = 0, n_spacer_bad = 0;
  int n_sclk_rise = 0, n_xfer = 0, n_rx = 0, n_frame_drop = 0, n_alarm = 0;
  int a_cyc = 0, ss_low = 0;
  logic sclk_d = 0;
  always @(posedge clk_a) begin
    a_cyc++;
    sclk_d <= spi.sclk;
    if (rst_a_n) begin
      if (precharge) begin
        n_precharge++;
        if (sbox_live != '0) n_spacer_bad++;
      end else begin
        n_eval++;
        if (xor_ones) n_check_pass++;
      end
      if (spi.sclk && !sclk_d) n_sclk_rise++;
      if (!spi.ss_n) ss_low++;
      n_xfer  += spi_done;
      n_alarm += alarm;
    end
  end
  always @(posedge clk_b) if (rst_b_n) begin
    n_rx         += rx_valid;
    n_frame_drop += frame_err;
  end

  initial begin
    #8ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] s;
    int rx0, t0, lat;
    repeat (4) @(negedge clk_a);
    rst_a_n = 1;
    rst_b_n = 1;
    for (int i = 0; i < 256; i++) begin
      // the example input shown on the board first, then all others
      sw = (i == 0) ? 8'h81 : (i == 8'h81) ? 8'h00 : 8'(i);
      s  = ref_sbox(sw);
      repeat (4) @(negedge clk_a);
      check(sbox_res, {s, ~s}, $sformatf("S-box result for %02h", sw));
      check(sbox_res.t ^ sbox_res.f, 8'hff, "out_t ^ out_f all ones");
      check(check_pass, 1, "check_pass");
      // one SPI packet
      rx0 = n_rx;
      ss_low = 0;
      t0 = a_cyc;
      send = 1;
      @(negedge clk_a);
      send = 0;
      while (spi_busy) @(negedge clk_a);
      check(ss_low, 2 * 16 * 50, "SS_N low for 16 SCLK periods");
      lat = 0;
      while (n_rx == rx0 && lat < 100) begin @(negedge clk_a); lat++; end
      check(lat < 8, 1, $sformatf("packet delivered %0d cycles after SS_N rose", lat));
      check(n_rx - rx0, 1, "one packet received");
      check(led_b, {s, ~s}, $sformatf("LEDs on board B for %02h", sw));
      if (i == 0) check(a_cyc - t0 - lat, 2 * 16 * 50 + 1, "frame length in board-A cycles");
    end

    // board A reset in the middle of a frame: board B drops the partial packet
    rx0 = n_rx;
    send = 1;
    @(negedge clk_a);
    send = 0;
    repeat (700) @(negedge clk_a);
    rst_a_n = 0;
    repeat (3) @(negedge clk_a);
    rst_a_n = 1;
    repeat (200) @(negedge clk_a);
    check(n_rx - rx0, 0, "no packet from an aborted frame");
    check(led_b, {ref_sbox(8'hff), ~ref_sbox(8'hff)}, "LEDs keep the last packet");

    // every mechanism must have happened
    check(n_precharge > 0,   1, "precharge phases seen");
    check(n_eval > 0,        1, "evaluation phases seen");
    check(n_check_pass > 0,  1, "XOR checks passed");
    check(n_spacer_bad,      0, "outputs zero in every precharge");
    check(n_sclk_rise >= 16 * 256, 1, "SCLK edges seen");
    check(n_xfer,            256, "SPI transfers completed");
    check(n_rx,              256, "packets received");
    check(n_frame_drop,      1, "partial frame dropped");
    check(n_alarm,           0, "no dual-rail alarm");
    $display("mechanisms: precharge=%0d eval=%0d xor_pass=%0d sclk_rise=%0d xfer=%0d rx=%0d frame_drop=%0d",
             n_precharge, n_eval, n_check_pass, n_sclk_rise, n_xfer, n_rx, n_frame_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
