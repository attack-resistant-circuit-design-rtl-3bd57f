// arcd_top: two-board attack-resistant S-box demonstrator.
//
// Board A evaluates the AES S-box in precharged dual-rail BDD logic
// (secure_sbox) on the byte set by its switches, checks that out_t XOR out_f
// is all ones, and sends the 16-bit dual-rail result {out_t, out_f} over a
// three-wire SPI link (SCLK, SS_N, MOSI) when `send` is high. Board B
// receives the packet with an SPI slave on its own clock and holds it on its
// 16 LEDs. The link wires are connected inside this top and are also brought
// out, as they would appear on the PMOD header.
//
// Timing: a new S-box result every two board-A cycles; one SPI packet every
// 2*16*HALF + 1 board-A cycles while `send` stays high (HALF = CLK_HZ /
// (2*SCLK_HZ), 50 by default, 1601 cycles = about 16 us at 100 MHz). The
// packet is the S-box result captured when the transfer starts.
//
// Both the S-box and the SPI link are the source's; sending the dual-rail
// result as the 16-bit packet is this design's choice, since the source does
// not say what the packet holds.
module arcd_top
  import arcd_pkg::*;
#(
  parameter int unsigned CLK_HZ  = BOARD_CLK_HZ,
  parameter int unsigned SCLK_HZ = SPI_SCLK_HZ
) (
  // board A
  input  logic       clk_a,
  input  logic       rst_a_n,     // active-low synchronous reset, board A
  input  logic [7:0] sw,          // input byte of the S-box
  input  logic       send,        // send the current result over SPI
  output logic       precharge,   // S-box precharge phase
  output dr_byte_t   sbox_live,   // live out_t / out_f (zero in precharge)
  output dr_byte_t   sbox_res,    // last evaluated out_t / out_f, held
  output logic       sbox_valid,  // sbox_res was just updated
  output logic [7:0] xor_out,     // out_t XOR out_f of the live outputs
  output logic       xor_ones,    // xor_out is all ones
  output logic       check_pass,  // last XOR check was all ones
  output logic       alarm,       // sticky dual-rail check failure
  output logic       spi_busy,    // SPI transfer in progress
  output logic       spi_done,    // SPI transfer just finished
  output spi_link_t  spi,         // SCLK, SS_N, MOSI on the link
  // board B
  input  logic       clk_b,
  input  logic       rst_b_n,     // active-low synchronous reset, board B
  output logic [15:0] led_b,      // received packet on the LEDs
  output logic       rx_valid,    // a packet has just been received
  output logic       frame_err    // a short frame was dropped
);
  secure_sbox u_sbox (
    .clk        (clk_a),
    .rst_n      (rst_a_n),
    .data_in    (sw),
    .precharge  (precharge),
    .live_dr    (sbox_live),
    .res        (sbox_res),
    .res_valid  (sbox_valid),
    .xor_out    (xor_out),
    .xor_ones   (xor_ones),
    .check_pass (check_pass),
    .alarm      (alarm)
  );

  spi_master #(
    .WIDTH   (SPI_PACKET_BITS),
    .CLK_HZ  (CLK_HZ),
    .SCLK_HZ (SCLK_HZ)
  ) u_master (
    .clk     (clk_a),
    .rst_n   (rst_a_n),
    .start   (send),
    .tx_data ({sbox_res.t, sbox_res.f}),
    .link    (spi),
    .busy    (spi_busy),
    .done    (spi_done)
  );

  spi_slave #(.WIDTH(SPI_PACKET_BITS)) u_slave (
    .clk       (clk_b),
    .rst_n     (rst_b_n),
    .link      (spi),
    .rx_data   (led_b),
    .rx_valid  (rx_valid),
    .frame_err (frame_err)
  );
endmodule
