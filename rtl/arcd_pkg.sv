// arcd_pkg: types and constants shared by the secure S-box and the SPI link.
//
// The dual-rail byte type carries a true rail (t) and a false rail (f). In the
// evaluation phase f is the bitwise complement of t; in the precharge phase
// both rails are zero (the "spacer"). The S-box table is not stored anywhere:
// aes_sbox() computes each entry at elaboration time from its definition,
// S(x) = A * x^-1 + 0x63 over GF(2^8) with the AES polynomial x^8+x^4+x^3+x+1
// (0x00 maps to inverse 0x00), and the BDD leaves are built from it.
// The SPI packet width of 16 bits and the 100 MHz / 1 MHz clocks are the
// defaults of the source design; SPI mode 0 framing is this design's choice.
package arcd_pkg;

  typedef struct packed {
    logic [7:0] t;  // true rail (out_t)
    logic [7:0] f;  // false rail (out_f)
  } dr_byte_t;

  typedef struct packed {
    logic sclk;
    logic ss_n;
    logic mosi;
  } spi_link_t;

  localparam int unsigned SPI_PACKET_BITS = 16;
  localparam int unsigned BOARD_CLK_HZ    = 100_000_000;
  localparam int unsigned SPI_SCLK_HZ     = 1_000_000;

  // Multiply two elements of GF(2^8) modulo x^8+x^4+x^3+x+1.
  function automatic logic [7:0] gf_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, aa, bb;
    p  = '0;
    aa = a;
    bb = b;
    for (int i = 0; i < 8; i++) begin
      if (bb[0]) p = p ^ aa;
      aa = aa[7] ? ((aa << 1) ^ 8'h1b) : (aa << 1);
      bb = bb >> 1;
    end
    return p;
  endfunction

  // Multiplicative inverse as a^254 (square and multiply); 0 maps to 0.
  function automatic logic [7:0] gf_inv(input logic [7:0] a);
    logic [7:0] r, sq;
    logic [7:0] e;
    r  = 8'h01;
    sq = a;
    e  = 8'd254;
    for (int i = 0; i < 8; i++) begin
      if (e[i]) r = gf_mul(r, sq);
      sq = gf_mul(sq, sq);
    end
    return r;
  endfunction

  // AES forward S-box entry: inverse followed by the affine transform.
  function automatic logic [7:0] aes_sbox(input logic [7:0] x);
    logic [7:0] b, r;
    b = gf_inv(x);
    for (int i = 0; i < 8; i++)
      r[i] = b[i] ^ b[(i + 4) % 8] ^ b[(i + 5) % 8] ^ b[(i + 6) % 8] ^ b[(i + 7) % 8];
    return r ^ 8'h63;
  endfunction

endpackage
