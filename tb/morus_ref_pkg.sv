// morus_ref_pkg: behavioural reference of MORUS-1280-128 for testbenches,
// written the way the MORUS reference code is: the state is 5 x 4 64-bit
// lanes and whole-word rotations are lane index shifts. Finalization uses
// 8 StateUpdate steps, as in the design.
package morus_ref_pkg;

  typedef logic [7:0] bytes_t[$];
  typedef logic [63:0] lane_t;

  class morus_model;
    lane_t s[5][4];

    static function lane_t rl(lane_t v, int b);
      return (v << b) | (v >> (64 - b));
    endfunction

    function void rot_word(int i, int lanes);   // rotate word i left by 64*lanes bits
      lane_t t[4];
      for (int j = 0; j < 4; j++) t[(j + lanes) % 4] = s[i][j];
      for (int j = 0; j < 4; j++) s[i][j] = t[j];
    endfunction

    function void update(lane_t m[4]);
      for (int j = 0; j < 4; j++) s[0][j] = rl(s[0][j] ^ (s[1][j] & s[2][j]) ^ s[3][j], 13);
      rot_word(3, 1);
      for (int j = 0; j < 4; j++) s[1][j] = rl(s[1][j] ^ (s[2][j] & s[3][j]) ^ s[4][j] ^ m[j], 46);
      rot_word(4, 2);
      for (int j = 0; j < 4; j++) s[2][j] = rl(s[2][j] ^ (s[3][j] & s[4][j]) ^ s[0][j] ^ m[j], 38);
      rot_word(0, 3);
      for (int j = 0; j < 4; j++) s[3][j] = rl(s[3][j] ^ (s[4][j] & s[0][j]) ^ s[1][j] ^ m[j], 7);
      rot_word(1, 2);
      for (int j = 0; j < 4; j++) s[4][j] = rl(s[4][j] ^ (s[0][j] & s[1][j]) ^ s[2][j] ^ m[j], 4);
      rot_word(2, 1);
    endfunction

    function lane_t ks(int j);
      return s[0][j] ^ s[1][(j + 1) % 4] ^ (s[2][j] & s[3][j]);
    endfunction

    static function void to_lanes(bytes_t d, int off, int n, output lane_t m[4]);
      for (int j = 0; j < 4; j++) m[j] = '0;
      for (int i = 0; i < n; i++) m[i / 8][8 * (i % 8) +: 8] = d[off + i];
    endfunction

    function void aead(logic [127:0] key, logic [127:0] iv, bytes_t ad, bytes_t din, bit dec,
                       output bytes_t dout, output logic [127:0] tag);
      lane_t m[4], z[4], c[4];
      int n;
      byte unsigned c0[16] = '{8'h00, 8'h01, 8'h01, 8'h02, 8'h03, 8'h05, 8'h08, 8'h0d,
                               8'h15, 8'h22, 8'h37, 8'h59, 8'h90, 8'he9, 8'h79, 8'h62};
      byte unsigned c1[16] = '{8'hdb, 8'h3d, 8'h18, 8'h55, 8'h6d, 8'hc2, 8'h2f, 8'hf1,
                               8'h20, 8'h11, 8'h31, 8'h42, 8'h73, 8'hb5, 8'h28, 8'hdd};
      for (int j = 0; j < 4; j++) z[j] = '0;
      s[0][0] = iv[63:0]; s[0][1] = iv[127:64]; s[0][2] = '0; s[0][3] = '0;
      s[1][0] = key[63:0]; s[1][1] = key[127:64]; s[1][2] = key[63:0]; s[1][3] = key[127:64];
      for (int j = 0; j < 4; j++) begin s[2][j] = '1; s[3][j] = '0; end
      for (int i = 0; i < 16; i++) begin
        s[4][i / 8][8 * (i % 8) +: 8] = c0[i];
        s[4][2 + i / 8][8 * (i % 8) +: 8] = c1[i];
      end
      for (int i = 0; i < 16; i++) update(z);
      s[1][0] ^= key[63:0]; s[1][1] ^= key[127:64]; s[1][2] ^= key[63:0]; s[1][3] ^= key[127:64];
      for (int off = 0; off < ad.size(); off += 32) begin
        n = (ad.size() - off > 32) ? 32 : ad.size() - off;
        to_lanes(ad, off, n, m);
        update(m);
      end
      dout = {};
      for (int off = 0; off < din.size(); off += 32) begin
        n = (din.size() - off > 32) ? 32 : din.size() - off;
        to_lanes(din, off, n, m);
        for (int j = 0; j < 4; j++) c[j] = m[j] ^ ks(j);
        for (int i = 0; i < n; i++) dout.push_back(c[i / 8][8 * (i % 8) +: 8]);
        if (dec) begin
          to_lanes(dout, off, n, m);
        end
        update(m);
      end
      for (int j = 0; j < 4; j++) s[4][j] ^= s[0][j];
      m[0] = 64'(ad.size()) * 8; m[1] = 64'(din.size()) * 8; m[2] = '0; m[3] = '0;
      for (int i = 0; i < 8; i++) update(m);
      tag = {ks(1), ks(0)};
    endfunction
  endclass

endpackage
