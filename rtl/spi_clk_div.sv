// spi_clk_div: clock division and timing control for the SPI master.
//
// The board clock (CLK_HZ, 100 MHz by default) is far too fast for a wired
// link between two boards, so it is divided to the SPI bit clock (SCLK_HZ,
// 1 MHz by default). This block counts board-clock cycles while `run` is high
// and emits a one-cycle `tick` every HALF = CLK_HZ / (2*SCLK_HZ) cycles; the
// master toggles SCLK on each tick, so SCLK has a period of 2*HALF board
// cycles. The counter is held at zero while `run` is low; tick is high in
// the HALF-th cycle with `run` high, so the toggle it causes lands exactly
// HALF cycles after `run` rose. Dividing the board clock to a 1 MHz SPI
// clock follows the source; the tick-enable form (no derived clock
// net) is this design's choice.
module spi_clk_div #(
  parameter int unsigned CLK_HZ  = 100_000_000,
  parameter int unsigned SCLK_HZ = 1_000_000
) (
  input  logic clk,
  input  logic rst_n,   // active-low synchronous reset
  input  logic run,     // count while high, hold at zero while low
  output logic tick     // one-cycle pulse every HALF cycles
);
  localparam int unsigned HALF = CLK_HZ / (2 * SCLK_HZ);
  localparam int unsigned CW   = (HALF > 1) ? $clog2(HALF) : 1;

  initial begin
    if (HALF < 1) $error("spi_clk_div: SCLK_HZ must be at most CLK_HZ/2");
  end

  logic [CW-1:0] cnt_q;

  always_ff @(posedge clk) begin
    if (!rst_n || !run)                 cnt_q <= '0;
    else if (cnt_q == CW'(HALF - 1))    cnt_q <= '0;
    else                                cnt_q <= cnt_q + 1'b1;
  end

  assign tick = run && (cnt_q == CW'(HALF - 1));
endmodule
