// ascon_ref_pkg: behavioural reference model of ASCON-128 for testbenches.
//
// Written independently of the RTL: the S-box is applied bit slice by bit
// slice through its 32-entry table instead of the bitsliced logic, and
// encryption works on whole byte strings with the padding rule of the
// specification (a 0x80 byte, then zeros up to the 8-byte rate).
package ascon_ref_pkg;

  typedef logic [63:0] w64_t;
  typedef logic [7:0]  bytes_t[$];

  localparam logic [4:0] SBOX [32] = '{
    5'h04, 5'h0b, 5'h1f, 5'h14, 5'h1a, 5'h15, 5'h09, 5'h02,
    5'h1b, 5'h05, 5'h08, 5'h12, 5'h1d, 5'h03, 5'h06, 5'h1c,
    5'h1e, 5'h13, 5'h07, 5'h0e, 5'h00, 5'h0d, 5'h11, 5'h18,
    5'h10, 5'h0c, 5'h01, 5'h19, 5'h16, 5'h0a, 5'h0f, 5'h17};

  function automatic w64_t rotr(w64_t v, int n);
    return (v >> n) | (v << (64 - n));
  endfunction

  function automatic void perm(ref w64_t s[5], input int rounds);
    logic [4:0] col, o;
    w64_t t[5];
    for (int r = 12 - rounds; r < 12; r++) begin
      s[2] ^= {56'd0, 4'(15 - r), 4'(r)};
      for (int i = 0; i < 5; i++) t[i] = '0;
      for (int b = 0; b < 64; b++) begin
        col = {s[0][b], s[1][b], s[2][b], s[3][b], s[4][b]};
        o   = SBOX[col];
        for (int i = 0; i < 5; i++) t[i][b] = o[4-i];
      end
      s[0] = t[0] ^ rotr(t[0], 19) ^ rotr(t[0], 28);
      s[1] = t[1] ^ rotr(t[1], 61) ^ rotr(t[1], 39);
      s[2] = t[2] ^ rotr(t[2], 1)  ^ rotr(t[2], 6);
      s[3] = t[3] ^ rotr(t[3], 10) ^ rotr(t[3], 17);
      s[4] = t[4] ^ rotr(t[4], 7)  ^ rotr(t[4], 41);
    end
  endfunction

  // 8-byte big-endian block i of a padded byte string
  function automatic w64_t pad_block(bytes_t d, int i);
    w64_t v = '0;
    for (int j = 0; j < 8; j++) begin
      int idx = 8 * i + j;
      logic [7:0] by = (idx < d.size()) ? d[idx] : ((idx == d.size()) ? 8'h80 : 8'h00);
      v[63-8*j -: 8] = by;
    end
    return v;
  endfunction

  // Encrypt (dec=0) or decrypt (dec=1) din; dout gets the other text.
  function automatic void aead(input logic [127:0] key, input logic [127:0] npub,
                               input bytes_t ad, input bytes_t din, input bit dec,
                               output bytes_t dout, output logic [127:0] tag);
    w64_t s[5];
    int nb;
    s[0] = 64'h80400c0600000000;
    s[1] = key[127:64]; s[2] = key[63:0];
    s[3] = npub[127:64]; s[4] = npub[63:0];
    perm(s, 12);
    s[3] ^= key[127:64]; s[4] ^= key[63:0];
    if (ad.size() > 0) begin
      nb = ad.size() / 8 + 1;
      for (int i = 0; i < nb; i++) begin
        s[0] ^= pad_block(ad, i);
        perm(s, 6);
      end
    end
    s[4] ^= 64'd1;
    dout = {};
    nb = din.size() / 8 + 1;
    for (int i = 0; i < nb; i++) begin
      w64_t blk = pad_block(din, i);
      int n = (i == nb - 1) ? din.size() % 8 : 8;
      for (int j = 0; j < n; j++) begin
        logic [7:0] sb = s[0][63-8*j -: 8];
        dout.push_back(sb ^ blk[63-8*j -: 8]);
        if (dec) s[0][63-8*j -: 8] = blk[63-8*j -: 8];
        else     s[0][63-8*j -: 8] = sb ^ blk[63-8*j -: 8];
      end
      if (i == nb - 1) s[0][63-8*n -: 8] ^= 8'h80;
      if (i != nb - 1) perm(s, 6);
    end
    s[1] ^= key[127:64]; s[2] ^= key[63:0];
    perm(s, 12);
    tag = {s[3] ^ key[127:64], s[4] ^ key[63:0]};
  endfunction

endpackage
