// tb_spi_slave: checks the SPI slave against a bit-banged master model that
// runs on its own timing, unrelated to the slave's 100 MHz clock.
//
// Random 16-bit words are sent in SPI mode 0, MSB first, with an SCLK half
// period of 370 ns (about 1.35 MHz). Each word must appear on rx_data with a
// single rx_valid pulse within 6 slave cycles of the last rising SCLK edge.
// Short frames (SS_N released after fewer than 16 bits) must give a
// frame_err pulse, no rx_valid and leave rx_data unchanged, and the next
// full frame must again be received correctly.
module tb_spi_slave;
  import arcd_pkg::*;

  localparam int WIDTH = 16;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  spi_link_t link = '{sclk: 1'b0, ss_n: 1'b1, mosi: 1'b0};
  logic [WIDTH-1:0] rx_data;
  logic rx_valid, frame_err;

  spi_slave dut (.*);

  always #5 clk = ~clk;

  int n_valid = 0, n_ferr = 0;
  always @(posedge clk) begin
    n_valid  += rx_valid;
    n_ferr   += frame_err;
  end

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0h exp %0h", what, $time, got, exp);
    end
  endtask

  task automatic send_bits(input logic [WIDTH-1:0] w, input int nbits);
    link.ss_n = 0;
    for (int i = WIDTH - 1; i >= WIDTH - nbits; i--) begin
      link.mosi = w[i];
      #370 link.sclk = 1;
      #370 link.sclk = 0;
    end
    #370 link.ss_n = 1;
  endtask

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] w, last;
    int v0, f0, lat;
    #33 rst_n = 1;
    #1000;
    last = '0;
    for (int p = 0; p < 40; p++) begin
      w = 16'($urandom);
      v0 = n_valid; f0 = n_ferr;
      if (p % 5 == 4) begin
        send_bits(w, 1 + p % 15);          // short frame
        #2000;
        check(n_valid - v0, 0, "no rx_valid on short frame");
        check(n_ferr - f0, 1, "frame_err on short frame");
        check(rx_data, last, "rx_data kept after short frame");
      end else begin
        link.ss_n = 0;
        for (int i = WIDTH - 1; i >= 0; i--) begin
          link.mosi = w[i];
          #370 link.sclk = 1;
          if (i > 0) #370 link.sclk = 0;
        end
        // latency from the last rising edge
        lat = 0;
        while (n_valid == v0 && lat < 50) begin @(posedge clk); lat++; end
        check(lat <= 6, 1, $sformatf("rx_valid latency %0d cycles", lat));
        #370 link.sclk = 0;
        #370 link.ss_n = 1;
        #2000;
        check(n_valid - v0, 1, "one rx_valid per word");
        check(n_ferr - f0, 0, "no frame_err on full frame");
        check(rx_data, w, $sformatf("word %0d", p));
        last = w;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
