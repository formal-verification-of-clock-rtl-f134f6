// xing_pkg: code conversions shared by the crossing example circuits.
// Binary-reflected Gray code: g = b ^ (b >> 1); decoding XORs all higher
// Gray bits into each binary bit.
package xing_pkg;

  localparam int unsigned MAX_W = 32;

  function automatic logic [MAX_W-1:0] bin2gray(input logic [MAX_W-1:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [MAX_W-1:0] gray2bin(input logic [MAX_W-1:0] g);
    logic [MAX_W-1:0] b;
    b[MAX_W-1] = g[MAX_W-1];
    for (int i = MAX_W - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

endpackage
