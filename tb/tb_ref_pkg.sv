// tb_ref_pkg: reference models shared by the testbenches.
//
// ref_sbox() computes the AES S-box independently of the design's own
// function: the multiplicative inverse is found by exhaustive search with a
// shift-and-add multiplier, and the affine step uses the rotate form
// s = b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63.
package tb_ref_pkg;

  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] ref_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] acc, p;
    acc = 8'h00;
    p   = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) acc ^= p;
      p = xtime(p);
    end
    return acc;
  endfunction

  function automatic logic [7:0] rotl(input logic [7:0] a, input int n);
    return 8'((a << n) | (a >> (8 - n)));
  endfunction

  function automatic logic [7:0] ref_sbox(input logic [7:0] x);
    logic [7:0] b;
    b = 8'h00;
    if (x != 8'h00)
      for (int c = 1; c < 256; c++)
        if (ref_mul(x, 8'(c)) == 8'h01) b = 8'(c);
    return b ^ rotl(b, 1) ^ rotl(b, 2) ^ rotl(b, 3) ^ rotl(b, 4) ^ 8'h63;
  endfunction

endpackage
