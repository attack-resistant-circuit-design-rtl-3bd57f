// spi_master: SPI master with parallel-to-serial shift register (board A).
//
// A rising `start` while idle loads the WIDTH-bit word `tx_data` into the
// shift register, drives SS_N low and puts the most significant bit on MOSI.
// spi_clk_div then ticks every HALF board cycles and SCLK toggles on each
// tick: the slave samples MOSI on the rising SCLK edge, and the master shifts
// the next bit onto MOSI on the falling edge (SPI mode 0, MSB first). After
// the WIDTH-th falling edge SS_N returns high, `done` pulses for one cycle and
// the master is idle again. SS_N is low for exactly 2*WIDTH*HALF board
// cycles, so the bit rate equals the SCLK frequency: 16 bits at 1 MHz take
// 16 us. `start` is ignored while `busy`.
//
// The 16-bit packet, the three-wire link (SCLK, SS_N, MOSI) and the divided
// clock follow the source; mode 0, MSB first and the start/busy/done
// handshake are this design's choices.
module spi_master
  import arcd_pkg::*;
#(
  parameter int unsigned WIDTH   = 16,
  parameter int unsigned CLK_HZ  = 100_000_000,
  parameter int unsigned SCLK_HZ = 1_000_000
) (
  input  logic             clk,
  input  logic             rst_n,    // active-low synchronous reset
  input  logic             start,    // begin a transfer (when idle)
  input  logic [WIDTH-1:0] tx_data,  // parallel word to send
  output spi_link_t        link,     // SCLK, SS_N, MOSI to the slave
  output logic             busy,     // transfer in progress
  output logic             done      // one-cycle pulse at the end
);
  localparam int unsigned BW = $clog2(WIDTH);

  typedef enum logic {IDLE, XFER} state_e;
  state_e           state_q;
  logic [WIDTH-1:0] shreg_q;
  logic [BW-1:0]    bit_q;
  logic             sclk_q;
  logic             tick;

  spi_clk_div #(.CLK_HZ(CLK_HZ), .SCLK_HZ(SCLK_HZ)) u_div (
    .clk   (clk),
    .rst_n (rst_n),
    .run   (state_q == XFER),
    .tick  (tick)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= IDLE;
      shreg_q <= '0;
      bit_q   <= '0;
      sclk_q  <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        IDLE: begin
          sclk_q <= 1'b0;
          if (start) begin
            shreg_q <= tx_data;
            bit_q   <= '0;
            state_q <= XFER;
          end
        end
        XFER: begin
          if (tick) begin
            if (!sclk_q) begin
              sclk_q <= 1'b1;                  // rising edge: slave samples
            end else begin
              sclk_q <= 1'b0;                  // falling edge: next bit
              if (bit_q == BW'(WIDTH - 1)) begin
                state_q <= IDLE;
                done    <= 1'b1;
              end else begin
                shreg_q <= shreg_q << 1;
                bit_q   <= bit_q + 1'b1;
              end
            end
          end
        end
        default: state_q <= IDLE;
      endcase
    end
  end

  always_comb begin
    busy      = (state_q == XFER);
    link.sclk = sclk_q;
    link.ss_n = (state_q != XFER);
    link.mosi = shreg_q[WIDTH-1];
  end

  // SCLK only toggles while the slave is selected
  a_sclk_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                link.ss_n |-> !link.sclk);
endmodule
