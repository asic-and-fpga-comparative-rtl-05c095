// aes_ref_pkg: plain AES-128 encryption model for testbenches.
//
// Written straight from the FIPS-197 description, byte by byte: the state is
// 16 bytes in column order (byte i of the 128-bit input, counting from the
// most significant end, is row i%4 of column i/4). The S-box entry of x is
// found by searching for the multiplicative inverse in GF(2^8) (x^8 + x^4 +
// x^3 + x + 1) and applying the affine map; the key schedule keeps 44 words.
// It is slow and simple on purpose, to be independent of the RTL's datapath.
package aes_ref_pkg;

  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] r, x;
    r = '0; x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= x;
      x = xtime(x);
    end
    return r;
  endfunction

  function automatic logic [7:0] sbox(input logic [7:0] x);
    logic [7:0] inv, b;
    inv = '0;
    for (int y = 1; y < 256; y++) if (gmul(x, 8'(y)) == 8'h01) inv = 8'(y);
    b = 8'h63;
    for (int i = 0; i < 5; i++) b ^= (inv << i) | (inv >> (8 - i));
    return b;
  endfunction

  function automatic logic [31:0] subword(input logic [31:0] w);
    return {sbox(w[31:24]), sbox(w[23:16]), sbox(w[15:8]), sbox(w[7:0])};
  endfunction

  function automatic logic [127:0] encrypt(input logic [127:0] key, input logic [127:0] pt);
    logic [31:0] w[44];
    logic [7:0]  s[16], t[16];
    logic [7:0]  rcon;
    rcon = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      if (i % 4 == 0) begin
        w[i] = w[i-4] ^ subword({w[i-1][23:0], w[i-1][31:24]}) ^ {rcon, 24'd0};
        rcon = xtime(rcon);
      end else w[i] = w[i-4] ^ w[i-1];
    end
    for (int i = 0; i < 16; i++) s[i] = pt[127-8*i -: 8] ^ w[i/4][31-8*(i%4) -: 8];
    for (int r = 1; r <= 10; r++) begin
      for (int i = 0; i < 16; i++) s[i] = sbox(s[i]);
      // shift rows: row j moves left by j columns
      for (int c = 0; c < 4; c++)
        for (int j = 0; j < 4; j++) t[4*c+j] = s[4*((c+j)%4)+j];
      s = t;
      if (r != 10)
        for (int c = 0; c < 4; c++) begin
          t[4*c+0] = gmul(s[4*c], 2) ^ gmul(s[4*c+1], 3) ^ s[4*c+2] ^ s[4*c+3];
          t[4*c+1] = s[4*c] ^ gmul(s[4*c+1], 2) ^ gmul(s[4*c+2], 3) ^ s[4*c+3];
          t[4*c+2] = s[4*c] ^ s[4*c+1] ^ gmul(s[4*c+2], 2) ^ gmul(s[4*c+3], 3);
          t[4*c+3] = gmul(s[4*c], 3) ^ s[4*c+1] ^ s[4*c+2] ^ gmul(s[4*c+3], 2);
          s[4*c+0] = t[4*c+0]; s[4*c+1] = t[4*c+1]; s[4*c+2] = t[4*c+2]; s[4*c+3] = t[4*c+3];
        end
      for (int i = 0; i < 16; i++) s[i] ^= w[4*r + i/4][31-8*(i%4) -: 8];
    end
    for (int i = 0; i < 16; i++) encrypt[127-8*i -: 8] = s[i];
  endfunction

endpackage
