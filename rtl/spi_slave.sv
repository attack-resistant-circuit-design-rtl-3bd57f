// spi_slave: SPI slave with serial-to-parallel shift register (board B).
//
// The slave runs on its own board clock, unrelated to the master's, so SCLK,
// SS_N and MOSI first pass through two-flop synchronisers. A rising edge of
// the synchronised SCLK while SS_N is low shifts the synchronised MOSI bit
// into the shift register (MSB first, SPI mode 0). When WIDTH bits have been
// taken, the word is copied to `rx_data`, which holds it for the LEDs until
// the next packet, and `rx_valid` pulses for one cycle. SS_N frames every
// packet: if SS_N returns high after some but fewer than WIDTH bits, the
// partial word is discarded and `frame_err` pulses; the bit counter is
// cleared whenever SS_N is high.
//
// Timing: rx_valid rises 3 to 4 board-B cycles after the last rising SCLK
// edge at the pins. The synchroniser needs each SCLK half period to span at
// least three board-B cycles (at 100 MHz / 1 MHz it spans 50).
//
// Receiving on the clock edge into a shift register and showing the word on
// LEDs follows the source; the synchronisers, mode 0, MSB first and the
// partial-frame rule are this design's choices.
module spi_slave
  import arcd_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,     // active-low synchronous reset
  input  spi_link_t        link,      // SCLK, SS_N, MOSI from the master
  output logic [WIDTH-1:0] rx_data,   // last complete word received
  output logic             rx_valid,  // one-cycle pulse per complete word
  output logic             frame_err  // one-cycle pulse: short frame dropped
);
  localparam int unsigned CW = $clog2(WIDTH + 1);

  logic [2:0]       sclk_s;   // [1:0] synchroniser, [2] previous value
  logic [1:0]       ss_s;
  logic [1:0]       mosi_s;
  logic [WIDTH-2:0] shreg_q;  // the first WIDTH-1 bits of the word
  logic [CW-1:0]    cnt_q;
  logic             sclk_rise;
  logic             selected;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sclk_s <= '0;
      ss_s   <= '1;
      mosi_s <= '0;
    end else begin
      sclk_s <= {sclk_s[1:0], link.sclk};
      ss_s   <= {ss_s[0], link.ss_n};
      mosi_s <= {mosi_s[0], link.mosi};
    end
  end

  always_comb begin
    sclk_rise = sclk_s[1] && !sclk_s[2];
    selected  = !ss_s[1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      shreg_q   <= '0;
      cnt_q     <= '0;
      rx_data   <= '0;
      rx_valid  <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      rx_valid  <= 1'b0;
      frame_err <= 1'b0;
      if (!selected) begin
        if (cnt_q != '0) frame_err <= 1'b1;
        cnt_q <= '0;
      end else if (sclk_rise) begin
        shreg_q <= {shreg_q[WIDTH-3:0], mosi_s[1]};
        if (cnt_q == CW'(WIDTH - 1)) begin
          rx_data  <= {shreg_q[WIDTH-2:0], mosi_s[1]};
          rx_valid <= 1'b1;
          cnt_q    <= '0;
        end else begin
          cnt_q <= cnt_q + 1'b1;
        end
      end
    end
  end
endmodule
